// Readout processor (ROP) of the PSB chip.
//
// On each accepted L1A the ROP copies the data of 3 bunch crossings (bx-1,
// bx, bx+1) or, with five_bx_event, 5 (bx-2..bx+2) from the ring buffers into
// the derandomising FIFOs, and the readout controller (ROC) later sends each
// event as a record over the 28-bit, 40 MHz Channel Link to the readout board.
//
// L1A side. An L1A is accepted while the run flag is set (PSB_MODE = READY
// and a START, from VME or from a ROBUS BGo command) and the L1A queue is
// not full. The queue stores the ring read address of the triggering bx and
// the event number. A transfer sequencer takes one queue entry at a time;
// if the FIFOs have room for the whole event it reads the rings at
// address-2..+2 (or -1..+1), one bx per clock, and one clock later pushes the
// 8 channel words and a bookkeeping word (event number, bx offset, bunch
// number from the bunch-number ring, ring address, last-bx flag) into the 9
// FIFOs; otherwise the event is dropped and l1a_lost is set. Every L1A
// increments the 24-bit event number (the first event after a reset is 1),
// whether accepted or not, so the number stays that of the central trigger.
//
// ROC side. When the FIFOs are not empty and the run flag is set, the ROC
// pops one entry of every FIFO per bx section and sends, per section,
//   A (EVNr 15..0), B (EVNr 23..16), C (bx offset, bunch number),
//   D (board identifier), 8 A-words ch0..7, 8 B-words ch0..7,
//   E (ring address), E000000 x 3
// followed after the last section by FFFFFFF; IDLE_ID fills the link between
// records. A record is 24 x 3 + 1 = 73 words (121 with five_bx_event), one
// per clock. The ROC has no reset of its own: it always finishes the record
// and returns to IDLE.
//
// L1Res clears the FIFOs and the L1A queue, but only once the ROC and the
// sequencer are idle, so the current event is finished first.
//
// Status: ROP_STATUS = {roc_is_idle, run_flag, 0, out_of_sync, error (0),
// warning (> 75 % filled), full_fifo, empty[8:0]}; out_of_sync is sticky
// (empty flags that differ) and is cleared by reset_error_flag. The 4-bit
// PSB status sent to the trigger control is encoded from PSB_MODE and these
// flags (see psb_status below); the priority between flags is this design's
// choice.
module rop
  import psb_pkg::*;
#(
  parameter int unsigned RING_AW    = 8,    // 256-word ring buffers
  parameter int unsigned FIFO_DEPTH = 512,  // one 512 x 32 block RAM per FIFO
  parameter int unsigned Q_DEPTH    = 16    // L1A queue
) (
  input  logic                          clk,
  input  logic                          rst,
  // timing and control
  input  logic                          l1a,
  input  logic                          l1res,
  input  logic                          evc_res,
  input  logic                          start_run,
  input  logic                          stop_run,
  input  logic                          reset_error_flag,
  input  rop_setup_t                    setup,
  input  logic [15:0]                   board_id,
  input  logic [27:0]                   idle_id,
  // ring buffers
  input  logic [RING_AW-1:0]            ring_rd_cnt,
  output logic                          ring_rd_en,
  output logic [RING_AW-1:0]            ring_rd_addr,
  input  logic [N_CHAN-1:0][CHW-1:0]    ring_ch_data,
  input  logic [BX_W-1:0]               ring_bx_data,
  // Channel Link
  output logic [CL_W-1:0]               chlink,
  output logic                          chlink_rec,   // a record word is on chlink
  // status
  output logic [15:0]                   rop_status,
  output logic [3:0]                    psb_status,
  output logic                          run_flag,
  output logic                          l1a_lost,
  // internal strobes for the test points
  output logic                          write_fifo,
  output logic                          read_fifo,
  output logic                          store_fifo_data,
  output logic                          sclr_fifo,
  output logic                          inc_event_nr
);

  localparam int unsigned FAW = $clog2(FIFO_DEPTH);
  localparam int unsigned QAW = $clog2(Q_DEPTH);

  // bookkeeping word stored with every bx of an event
  typedef struct packed {
    logic                last;
    logic [EVNR_W-1:0]   evnr;
    logic [3:0]          boff;
    logic [BX_W-1:0]     bx;
    logic [RING_AW-1:0]  raddr;
  } bx_entry_t;

  typedef struct packed {
    logic [EVNR_W-1:0]   evnr;
    logic [RING_AW-1:0]  raddr;
  } q_entry_t;

  // ---------------------------------------------------------------------
  // run flag and event number
  // ---------------------------------------------------------------------
  logic ready;
  assign ready = (setup.psb_mode == PSB_READY);

  always_ff @(posedge clk) begin
    if (rst)                    run_flag <= 1'b0;
    else if (!ready || stop_run) run_flag <= 1'b0;
    else if (start_run)         run_flag <= 1'b1;
  end

  logic [EVNR_W-1:0] evnr;
  assign inc_event_nr = l1a;
  always_ff @(posedge clk) begin
    if (rst || evc_res) evnr <= '0;
    else if (l1a)       evnr <= evnr + 1'b1;
  end

  // ---------------------------------------------------------------------
  // L1A queue
  // ---------------------------------------------------------------------
  q_entry_t q_din, q_dout;
  logic     q_push, q_pop, q_empty, q_full, q_warn;
  logic [QAW:0] q_count;

  assign q_din.evnr  = evnr + 1'b1;
  assign q_din.raddr = ring_rd_cnt;
  assign q_push      = l1a && run_flag && !q_full;

  derand_fifo #(.W($bits(q_entry_t)), .DEPTH(Q_DEPTH)) u_l1a_q (
    .clk, .rst, .clr(sclr_fifo), .push(q_push), .din(q_din), .pop(q_pop),
    .dout(q_dout), .empty(q_empty), .full(q_full), .warn(q_warn), .count(q_count));

  // ---------------------------------------------------------------------
  // transfer sequencer: ring buffers -> FIFOs
  // ---------------------------------------------------------------------
  typedef enum logic [1:0] {T_IDLE, T_LOAD, T_READ} t_state_e;
  t_state_e t_state;

  logic [2:0]          t_k;        // bx index within the event
  logic [2:0]          t_nbx;
  q_entry_t            t_ev;
  logic [FAW:0]        f_count;    // fill of the FIFOs (all move together)
  logic                room;

  // pipeline stage between ring read and FIFO push
  logic                p_valid;
  logic                p_last;
  logic [3:0]          p_boff;
  logic [RING_AW-1:0]  p_raddr;
  logic [EVNR_W-1:0]   p_evnr;

  logic [2:0] half;
  assign half = setup.five_bx_event ? 3'd2 : 3'd1;

  assign room  = (int'(f_count) + int'(t_nbx) <= FIFO_DEPTH);
  assign q_pop = (t_state == T_IDLE) && !q_empty && !sclr_fifo;

  logic [3:0] k_off;   // k - half as a 4-bit two's complement offset
  assign k_off = 4'(t_k) - 4'(half);

  assign ring_rd_en   = (t_state == T_READ);
  assign ring_rd_addr = t_ev.raddr + {{(RING_AW-4){k_off[3]}}, k_off};

  always_ff @(posedge clk) begin
    if (rst || sclr_fifo) begin
      t_state  <= T_IDLE;
      t_k      <= '0;
      t_nbx    <= 3'd3;
      t_ev     <= '0;
      l1a_lost <= 1'b0;
      p_valid  <= 1'b0;
    end else begin
      p_valid <= 1'b0;
      if (q_push == 1'b0 && l1a && run_flag) l1a_lost <= 1'b1;   // queue full
      unique case (t_state)
        T_IDLE: if (q_pop) t_state <= T_LOAD;
        T_LOAD: begin
          t_ev  <= q_dout;
          t_k   <= '0;
          t_nbx <= setup.five_bx_event ? 3'd5 : 3'd3;
          t_state <= T_READ;
        end
        T_READ: begin
          if (t_k == 3'd0 && !room) begin
            l1a_lost <= 1'b1;            // not enough room: drop the event
            t_state  <= T_IDLE;
          end else begin
            p_valid <= 1'b1;
            p_last  <= (t_k == t_nbx - 1'b1);
            p_boff  <= k_off;
            p_raddr <= ring_rd_addr;
            p_evnr  <= t_ev.evnr;
            if (t_k == t_nbx - 1'b1) t_state <= T_IDLE;
            else                     t_k <= t_k + 1'b1;
          end
        end
        default: t_state <= T_IDLE;
      endcase
      if (reset_error_flag) l1a_lost <= 1'b0;
    end
  end

  // ring_rd_en is also high in the clock a full event is dropped; the read
  // is harmless.
  assign write_fifo      = p_valid;
  assign store_fifo_data = ring_rd_en;

  // ---------------------------------------------------------------------
  // derandomising FIFOs: 8 channels + bookkeeping (bunch number)
  // ---------------------------------------------------------------------
  bx_entry_t                     bx_din, bx_dout;
  logic [N_CHAN-1:0][CHW-1:0]    ch_dout;
  logic [N_CHAN:0]               f_empty, f_full, f_warn;
  logic [N_CHAN:0][FAW:0]        f_cnt;
  logic                          f_pop;

  assign bx_din.last  = p_last;
  assign bx_din.evnr  = p_evnr;
  assign bx_din.boff  = p_boff;
  assign bx_din.bx    = ring_bx_data;
  assign bx_din.raddr = p_raddr;

  for (genvar c = 0; c < N_CHAN; c++) begin : g_fifo
    derand_fifo #(.W(CHW), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst, .clr(sclr_fifo), .push(p_valid), .din(ring_ch_data[c]), .pop(f_pop),
      .dout(ch_dout[c]), .empty(f_empty[c]), .full(f_full[c]), .warn(f_warn[c]), .count(f_cnt[c]));
  end

  derand_fifo #(.W($bits(bx_entry_t)), .DEPTH(FIFO_DEPTH)) u_bx_fifo (
    .clk, .rst, .clr(sclr_fifo), .push(p_valid), .din(bx_din), .pop(f_pop),
    .dout(bx_dout), .empty(f_empty[N_CHAN]), .full(f_full[N_CHAN]), .warn(f_warn[N_CHAN]),
    .count(f_cnt[N_CHAN]));

  // the fill of the FIFOs counting what is still in the push pipeline
  assign f_count = f_cnt[N_CHAN] + (FAW+1)'(p_valid);

  // ---------------------------------------------------------------------
  // ROC: FIFOs -> Channel Link
  // ---------------------------------------------------------------------
  typedef enum logic [1:0] {R_IDLE, R_SEC, R_TRAILER} r_state_e;
  r_state_e    r_state;
  logic [4:0]  wcnt;          // word within a bx section, 0..23
  logic [CL_W-1:0] word;

  logic roc_start;
  assign roc_start = (r_state == R_IDLE) && !f_empty[N_CHAN] && run_flag && !sclr_fifo;
  assign f_pop     = roc_start ||
                     ((r_state == R_SEC) && (wcnt == 5'(WORDS_PER_BX - 1)) && !bx_dout.last);
  assign read_fifo = f_pop;

  always_ff @(posedge clk) begin
    if (rst) begin
      r_state <= R_IDLE;
      wcnt    <= '0;
    end else begin
      unique case (r_state)
        R_IDLE: if (roc_start) begin
          r_state <= R_SEC;
          wcnt    <= '0;
        end
        R_SEC: begin
          if (wcnt == 5'(WORDS_PER_BX - 1)) begin
            wcnt <= '0;
            if (bx_dout.last) r_state <= R_TRAILER;
          end else begin
            wcnt <= wcnt + 1'b1;
          end
        end
        R_TRAILER: r_state <= R_IDLE;
        default:   r_state <= R_IDLE;
      endcase
    end
  end

  always_comb begin
    unique case (r_state)
      R_IDLE:    word = idle_id;
      R_TRAILER: word = CL_TRAILER;
      R_SEC: begin
        if (wcnt == 5'd0)       word = {CL_HDR_A, 8'h00, bx_dout.evnr[15:0]};
        else if (wcnt == 5'd1)  word = {CL_HDR_B, 16'h0000, bx_dout.evnr[23:16]};
        else if (wcnt == 5'd2)  word = {CL_HDR_C, 8'h00, bx_dout.boff, bx_dout.bx};
        else if (wcnt == 5'd3)  word = {CL_HDR_D, 8'h00, board_id};
        else if (wcnt < 5'd12)  word = {CL_DATA, 8'h00, ch_dout[3'(wcnt - 5'd4)][WORD_W-1:0]};
        else if (wcnt < 5'd20)  word = {CL_DATA, 8'h00, ch_dout[3'(wcnt - 5'd12)][CHW-1:WORD_W]};
        else if (wcnt == 5'd20) word = {CL_END, 11'h000, 13'(bx_dout.raddr)};
        else                    word = {CL_END, 24'h000000};
      end
      default: word = idle_id;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      chlink     <= '0;
      chlink_rec <= 1'b0;
    end else begin
      chlink     <= word;
      chlink_rec <= (r_state != R_IDLE);
    end
  end

  // ---------------------------------------------------------------------
  // L1Res: clear when the ROC and the sequencer are idle
  // ---------------------------------------------------------------------
  logic clr_pend;
  always_ff @(posedge clk) begin
    if (rst)            clr_pend <= 1'b0;
    else if (l1res)     clr_pend <= 1'b1;
    else if (sclr_fifo) clr_pend <= 1'b0;
  end
  assign sclr_fifo = clr_pend && (r_state == R_IDLE) && (t_state == T_IDLE) && !p_valid;

  // ---------------------------------------------------------------------
  // status
  // ---------------------------------------------------------------------
  logic out_of_sync, warning, full_any;
  assign warning  = |f_warn;
  assign full_any = |f_full;

  always_ff @(posedge clk) begin
    if (rst)                                   out_of_sync <= 1'b0;
    else if (!(&f_empty) && (|f_empty))         out_of_sync <= 1'b1;
    else if (reset_error_flag)                 out_of_sync <= 1'b0;
  end

  assign rop_status = {(r_state == R_IDLE), run_flag, 1'b0, out_of_sync, 1'b0,
                       warning, full_any, f_empty};

  // TCS status code: {Ready, Busy, Out_of_Sync, Warning}
  always_comb begin
    unique case (setup.psb_mode)
      PSB_DISCONNECTED: psb_status = 4'b0000;
      PSB_BAD_CODE:     psb_status = 4'b1111;
      default: begin
        if (out_of_sync)                          psb_status = 4'b0010;
        else if (full_any || setup.psb_mode == PSB_BUSY) psb_status = 4'b0100;
        else if (warning)                         psb_status = 4'b0001;
        else                                      psb_status = 4'b1000;
      end
    endcase
  end

endmodule
