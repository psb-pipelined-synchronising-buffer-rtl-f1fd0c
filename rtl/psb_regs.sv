// VME register file of the PSB chip.
//
// The VME interface chip hands each access to the PSB chip as a one-clock
// request on a local bus: bus_en with bus_wr, the word address bus_addr
// (VME A19..A1 of the chip's 1 MB window) and bus_wdata. The answer comes two
// clocks later: bus_ack for one clock with bus_rdata for a read. This local
// bus handshake is this design's choice.
//
// Address map (byte offsets in the chip window, as in the register overview):
//   0x000-0x00E CHAN_REG0..7        0x010-0x01E CHAN_DELAY0..7
//   0x020-0x03E LVDS_DELAY0..15     0x040 BOARD_ID   0x042 BCRES_DELAY
//   0x044 LATENCY_DELAY  0x046 ROP_SETUP  0x048 MAX_BC_NUMBER (reset 0x0DEB)
//   0x04A SEL_PHASE3100  0x04C SEL_PHASE6332  0x04E IDLE_ID_LOW
//   0x050 IDLE_ID_HIGH (bits 11..0 used)      0x052-0x05E TESTMASK0..6
//   0x070 CMD_PULSE (write only: each 1 bit gives a one-clock pulse)
//   0x800-0x80E PHASE_CNTR_A0..7    0x810-0x81E PHASE_CNTR_B0..7
//   0x820-0x83E PHASE_CNTR_A of LVDS groups 0..15
//   0x840-0x85E PHASE_CNTR_B of LVDS groups 0..15
//   0x860 PSB_STATUS  0x862 ROP_STATUS  0x864 CHIP_ID (8131)
//   0x866 VERSION_NR (0005)  0x868 CHIP_IDH (0001)
//   0x20000 + 0x4000 * n: SIM/SPY memory n (8k x 16), n = 0..7
// Writable registers read back what was written. Reading a phase-counter
// word clears its counters (clr pulses). Writes to read-only addresses and
// accesses to unused addresses are acknowledged and have no effect; unused
// addresses read 0. Reset (RESET_PSB) loads the default values; the default
// of IDLE_ID is the example idle word 555AAAA of the record format, all other
// defaults except MAX_BC_NUMBER are 0.
module psb_regs
  import psb_pkg::*;
(
  input  logic                        clk,
  input  logic                        rst,
  // local bus from the VME chip
  input  logic                        bus_en,
  input  logic                        bus_wr,
  input  logic [19:1]                 bus_addr,
  input  logic [15:0]                 bus_wdata,
  output logic [15:0]                 bus_rdata,
  output logic                        bus_ack,
  // setup registers
  output chan_reg_t  [N_CHAN-1:0]     chan_reg,
  output logic [N_CHAN-1:0][15:0]     chan_delay,
  output logic [N_GRP-1:0][15:0]      lvds_delay,
  output logic [15:0]                 board_id,
  output logic [15:0]                 bcres_delay,
  output logic [15:0]                 latency_delay,
  output rop_setup_t                  rop_setup,
  output logic [15:0]                 max_bc,
  output logic [15:0]                 sel_phase3100,
  output logic [15:0]                 sel_phase6332,
  output logic [27:0]                 idle_id,
  output logic [6:0][15:0]            testmask,
  output cmd_pulse_t                  cmd,
  // read-only sources
  input  logic [N_CHAN-1:0][15:0]     ser_cnt_a,
  input  logic [N_CHAN-1:0][15:0]     ser_cnt_b,
  output logic [N_CHAN-1:0]           ser_clr_a,
  output logic [N_CHAN-1:0]           ser_clr_b,
  input  logic [N_GRP-1:0][15:0]      lvds_cnt_a,
  input  logic [N_GRP-1:0][15:0]      lvds_cnt_b,
  output logic [N_GRP-1:0]            lvds_clr_a,
  output logic [N_GRP-1:0]            lvds_clr_b,
  input  logic [15:0]                 psb_status,
  input  logic [15:0]                 rop_status,
  // SIM/SPY memories
  output logic [N_CHAN-1:0]           mem_we,
  output logic [N_CHAN-1:0]           mem_re,
  output logic [12:0]                 mem_addr,
  output logic [15:0]                 mem_wdata,
  input  logic [N_CHAN-1:0][15:0]     mem_rdata
);

  // ---- decode ------------------------------------------------------------
  logic [11:0] boff;         // byte offset in the register space
  logic        in_regs, in_ro, in_mem;
  logic [2:0]  mem_n;

  assign boff    = {bus_addr[11:1], 1'b0};
  assign in_regs = (bus_addr[19:11] == '0);
  assign in_ro   = (bus_addr[19:12] == '0) && bus_addr[11];
  assign in_mem  = (bus_addr[19:17] == 3'b001);
  assign mem_n   = bus_addr[16:14];

  logic wr, rd;
  assign wr = bus_en && bus_wr;
  assign rd = bus_en && !bus_wr;

  // ---- writable registers -------------------------------------------------
  always_ff @(posedge clk) begin
    if (rst) begin
      chan_reg      <= '0;
      chan_delay    <= '0;
      lvds_delay    <= '0;
      board_id      <= '0;
      bcres_delay   <= '0;
      latency_delay <= '0;
      rop_setup     <= '0;
      max_bc        <= MAX_BC_DEFAULT;
      sel_phase3100 <= '0;
      sel_phase6332 <= '0;
      idle_id       <= 28'h555AAAA;
      testmask      <= '0;
    end else if (wr && in_regs) begin
      if (boff < 12'h010)      chan_reg[boff[3:1]]   <= chan_reg_t'(bus_wdata);
      else if (boff < 12'h020) chan_delay[boff[3:1]] <= bus_wdata;
      else if (boff < 12'h040) lvds_delay[boff[4:1]] <= bus_wdata;
      else begin
        unique case (boff)
          12'h040: board_id          <= bus_wdata;
          12'h042: bcres_delay       <= bus_wdata;
          12'h044: latency_delay     <= bus_wdata;
          12'h046: rop_setup         <= rop_setup_t'(bus_wdata);
          12'h048: max_bc            <= bus_wdata;
          12'h04A: sel_phase3100     <= bus_wdata;
          12'h04C: sel_phase6332     <= bus_wdata;
          12'h04E: idle_id[15:0]     <= bus_wdata;
          12'h050: idle_id[27:16]    <= bus_wdata[11:0];
          12'h052, 12'h054, 12'h056, 12'h058, 12'h05A, 12'h05C, 12'h05E:
                   testmask[3'((boff - 12'h052) >> 1)] <= bus_wdata;
          default: ;
        endcase
      end
    end
  end

  // ---- command pulses ------------------------------------------------------
  always_ff @(posedge clk) begin
    if (rst) cmd <= '0;
    else     cmd <= (wr && in_regs && boff == 12'h070) ? cmd_pulse_t'(bus_wdata) : '0;
  end

  // ---- phase counter clear on read ----------------------------------------
  always_comb begin
    ser_clr_a  = '0;
    ser_clr_b  = '0;
    lvds_clr_a = '0;
    lvds_clr_b = '0;
    if (rd && in_ro) begin
      if (boff < 12'h810)      ser_clr_a[boff[3:1]]  = 1'b1;
      else if (boff < 12'h820) ser_clr_b[boff[3:1]]  = 1'b1;
      else if (boff < 12'h840) lvds_clr_a[boff[4:1]] = 1'b1;
      else if (boff < 12'h860) lvds_clr_b[boff[4:1]] = 1'b1;
    end
  end

  // ---- SIM/SPY memory port --------------------------------------------------
  assign mem_addr  = bus_addr[13:1];
  assign mem_wdata = bus_wdata;
  always_comb begin
    mem_we = '0;
    mem_re = '0;
    if (in_mem) begin
      mem_we[mem_n] = wr;
      mem_re[mem_n] = rd;
    end
  end

  // ---- read data -------------------------------------------------------------
  // stage 1: register values and read-only words are captured in the clock
  // of the request; memory data come one clock later.
  logic [15:0] rd_q;
  logic        ack_q, mem_q;
  logic [2:0]  mem_n_q;

  function automatic logic [15:0] rw_value(input logic [11:0] a);
    logic [15:0] v;
    v = '0;
    if (a < 12'h010)      v = chan_reg[a[3:1]];
    else if (a < 12'h020) v = chan_delay[a[3:1]];
    else if (a < 12'h040) v = lvds_delay[a[4:1]];
    else begin
      unique case (a)
        12'h040: v = board_id;
        12'h042: v = bcres_delay;
        12'h044: v = latency_delay;
        12'h046: v = rop_setup;
        12'h048: v = max_bc;
        12'h04A: v = sel_phase3100;
        12'h04C: v = sel_phase6332;
        12'h04E: v = idle_id[15:0];
        12'h050: v = {4'h0, idle_id[27:16]};
        12'h052, 12'h054, 12'h056, 12'h058, 12'h05A, 12'h05C, 12'h05E:
                 v = testmask[3'((a - 12'h052) >> 1)];
        default: v = '0;
      endcase
    end
    return v;
  endfunction

  function automatic logic [15:0] ro_value(input logic [11:0] a);
    logic [15:0] v;
    v = '0;
    if (a < 12'h810)      v = ser_cnt_a[a[3:1]];
    else if (a < 12'h820) v = ser_cnt_b[a[3:1]];
    else if (a < 12'h840) v = lvds_cnt_a[a[4:1]];
    else if (a < 12'h860) v = lvds_cnt_b[a[4:1]];
    else begin
      unique case (a)
        12'h860: v = psb_status;
        12'h862: v = rop_status;
        12'h864: v = CHIP_ID;
        12'h866: v = VERSION_NR;
        12'h868: v = CHIP_IDH;
        default: v = '0;
      endcase
    end
    return v;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_q      <= '0;
      ack_q     <= 1'b0;
      mem_q     <= 1'b0;
      mem_n_q   <= '0;
      bus_ack   <= 1'b0;
      bus_rdata <= '0;
    end else begin
      ack_q   <= bus_en;
      mem_q   <= rd && in_mem;
      mem_n_q <= mem_n;
      if (rd && in_regs)     rd_q <= rw_value(boff);
      else if (rd && in_ro)  rd_q <= ro_value(boff);
      else                   rd_q <= '0;
      bus_ack   <= ack_q;
      bus_rdata <= mem_q ? mem_rdata[mem_n_q] : rd_q;
    end
  end

endmodule
