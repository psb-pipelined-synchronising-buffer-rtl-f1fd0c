// CR/CSR space of the board's VME64x protocol chip: the configuration ROM,
// the user ROM with chip identifier, version and serial number, the CRAM,
// the TEST_OUT selection registers and the control/status registers (bit
// set/clear, ADER of functions 0 and 1, BAR), plus the base-address decode
// of the two data-access functions.
//
// CR/CSR accesses (address modifier 0x2F, D08(O): only byte addresses
// 3 mod 4) come as a one-clock csr_req with csr_addr = A23..A0, csr_wr and
// csr_wdata. The access belongs to this board when A23..A19 equal the BAR:
// the slot number from the geographic-address pins, or the amnesia address
// 11110 where the backplane gives none (ga = 0). It is answered one clock
// later by csr_ack with csr_rdata. Map (A18..A0):
//   0x00003-0x007FF configuration ROM (fixed contents, see cr_byte)
//   0x01003-0x0100F chip_id 0x00018n11 (n = card number), bytes 3..0
//   0x01013-0x0101F version 0x0000100C, bytes 3..0
//   0x01023-0x01033 serial number "PSBxx", xx = card number in decimal with
//                   a leading zero (card number 0 is board 16)
//   0x03003-0x037FF CRAM, 512 x 8 read/write
//   0x05003 / 0x05007 sel_test_out_12 / sel_test_out_34
//   0x7FF63-0x7FF6F ADER of function 0, 0x7FF73-0x7FF7F ADER of function 1
//   0x7FFF7 bit clear / 0x7FFFB bit set register: bit 7 RESET_MODE,
//           bit 4 MODULE enable, bit 3 BERR flag; both read the bits
//   0x7FFFF BAR (read): A23..A19 in bits 7..3
// Other addresses of the space read 0 and ignore writes.
//
// Data accesses: function 0 takes AM 0x0D and 0x09, function 1 AM 0x0F and
// 0x0B, both with the base address at A31..A25 (ADEM 0xFE000000) compared
// with the function's ADER. f0_sel / f1_sel are combinational and only high
// while the module is enabled (disabled after reset). test_out[k] shows
// test_sig[sel_test_out_k] one clock later; code 15 is MODULE_ENABLED inside
// this block.
//
// The map, the ROM values the document lists, the BSR/BCR bits and the
// TEST_OUT codes follow the chip description. Fields it leaves open
// (checksum, ROM length, board and revision ID) read 0. This design's own
// choices: the "CR" identifier at 0x1F/0x23 from the VME64 standard, the
// request/answer handshake, the AM bits of ADER not being compared, the
// BERR flag set by a berr_seen pulse, and reads of unmapped space giving 0.
module vme64x_cr_csr (
  input  logic        clk,
  input  logic        rst,
  input  logic [4:0]  ga,            // geographic address (slot), 0 = none
  input  logic [3:0]  card_nr,       // card number jumpers
  // CR/CSR access (AM 0x2F)
  input  logic        csr_req,
  input  logic        csr_wr,
  input  logic [23:0] csr_addr,
  input  logic [7:0]  csr_wdata,
  output logic [7:0]  csr_rdata,
  output logic        csr_ack,
  // data-access address decode
  input  logic [5:0]  acc_am,
  input  logic [31:25] acc_addr,
  output logic        f0_sel,
  output logic        f1_sel,
  // control
  input  logic        berr_seen,     // the board answered BERR
  output logic        module_enabled,
  output logic        reset_mode,
  output logic        berr_flag,
  // test outputs
  input  logic [14:0] test_sig,
  output logic [3:0]  test_out
);

  // ---- BAR and decode ------------------------------------------------------
  logic [4:0]  bar;
  logic [18:0] a;
  logic        hit;
  assign bar = (ga == 5'd0) ? 5'b11110 : ga;
  assign a   = csr_addr[18:0];
  assign hit = csr_req && (csr_addr[23:19] == bar) && (a[1:0] == 2'b11);

  // ---- configuration ROM contents ---------------------------------------------
  function automatic logic [7:0] cr_byte(input logic [10:0] x);
    unique case (x)
      11'h013, 11'h017: return 8'h81;          // CR and CSR data access width
      11'h01B:          return 8'h02;          // VME64x CR/CSR space
      11'h01F:          return 8'h43;          // 'C'
      11'h023:          return 8'h52;          // 'R'
      11'h07F:          return 8'h01;          // no program, ID ROM only
      // BEG_USER_CR 0x01003, END_USER_CR 0x0101F
      11'h087: return 8'h10;  11'h08B: return 8'h03;
      11'h093: return 8'h10;  11'h097: return 8'h1F;
      // BEG_CRAM 0x03003, END_CRAM 0x037FF
      11'h09F: return 8'h30;  11'h0A3: return 8'h03;
      11'h0AB: return 8'h37;  11'h0AF: return 8'hFF;
      // BEG_USER_CSR 0x05003, END_USER_CSR 0x0502F
      11'h0B7: return 8'h50;  11'h0BB: return 8'h03;
      11'h0C3: return 8'h50;  11'h0C7: return 8'h2F;
      // BEG_SN 0x01023, END_SN 0x01033
      11'h0CF: return 8'h10;  11'h0D3: return 8'h23;
      11'h0DB: return 8'h10;  11'h0DF: return 8'h33;
      11'h0FF:          return 8'h81;          // CRAM access width
      11'h103, 11'h107: return 8'h83;          // DAWPR of functions 0, 1
      11'h13B:          return 8'h22;          // AMCAP F0: AM 0x0D, 0x09
      11'h15B:          return 8'h88;          // AMCAP F1: AM 0x0F, 0x0B
      11'h623, 11'h633: return 8'hFE;          // ADEM F0, F1: A31..A25
      default:          return 8'h00;
    endcase
  endfunction

  function automatic logic [7:0] dec_digit(input int unsigned v);
    return 8'h30 + 8'(v);
  endfunction

  logic [31:0] chip_id;
  logic [4:0]  sn_num;
  assign chip_id = {16'h0001, 4'h8, card_nr, 8'h11};
  assign sn_num  = (card_nr == 4'd0) ? 5'd16 : {1'b0, card_nr};

  localparam logic [31:0] VERSION = 32'h0000_100C;

  // ---- registers ------------------------------------------------------------------
  logic [31:0] ader0, ader1;
  logic [7:0]  sel12, sel34;
  logic [7:0]  cram [512];
  logic        wr_hit;
  assign wr_hit = hit && csr_wr;

  always_ff @(posedge clk) begin
    if (rst) begin
      ader0          <= '0;
      ader1          <= '0;
      sel12          <= '0;
      sel34          <= '0;
      module_enabled <= 1'b0;
      reset_mode     <= 1'b0;
      berr_flag      <= 1'b0;
    end else begin
      if (berr_seen) berr_flag <= 1'b1;
      if (wr_hit) begin
        unique case (a)
          19'h05003: sel12 <= csr_wdata;
          19'h05007: sel34 <= csr_wdata;
          19'h7FF63: ader0[31:24] <= csr_wdata;
          19'h7FF67: ader0[23:16] <= csr_wdata;
          19'h7FF6B: ader0[15:8]  <= csr_wdata;
          19'h7FF6F: ader0[7:0]   <= csr_wdata;
          19'h7FF73: ader1[31:24] <= csr_wdata;
          19'h7FF77: ader1[23:16] <= csr_wdata;
          19'h7FF7B: ader1[15:8]  <= csr_wdata;
          19'h7FF7F: ader1[7:0]   <= csr_wdata;
          19'h7FFF7: begin          // bit clear
                       if (csr_wdata[7]) reset_mode     <= 1'b0;
                       if (csr_wdata[4]) module_enabled <= 1'b0;
                       if (csr_wdata[3]) berr_flag      <= 1'b0;
                     end
          19'h7FFFB: begin          // bit set
                       if (csr_wdata[7]) reset_mode     <= 1'b1;
                       if (csr_wdata[4]) module_enabled <= 1'b1;
                       if (csr_wdata[3]) berr_flag      <= 1'b1;
                     end
          default: ;
        endcase
      end
    end
  end

  // CRAM: no reset, written and read through the CR/CSR space only
  logic cram_hit;
  assign cram_hit = (a >= 19'h03003) && (a <= 19'h037FF);
  always_ff @(posedge clk) begin
    if (wr_hit && cram_hit) cram[9'((a - 19'h03003) >> 2)] <= csr_wdata;
  end

  // ---- read data ----------------------------------------------------------------------
  function automatic logic [7:0] rd_value(input logic [18:0] x);
    if (x <= 19'h007FF) return cr_byte(x[10:0]);
    unique case (x)
      19'h01003: return chip_id[31:24];
      19'h01007: return chip_id[23:16];
      19'h0100B: return chip_id[15:8];
      19'h0100F: return chip_id[7:0];
      19'h01013: return VERSION[31:24];
      19'h01017: return VERSION[23:16];
      19'h0101B: return VERSION[15:8];
      19'h0101F: return VERSION[7:0];
      19'h01023: return 8'h50;                         // 'P'
      19'h01027: return 8'h53;                         // 'S'
      19'h0102B: return 8'h42;                         // 'B'
      19'h0102F: return dec_digit(int'(sn_num) / 10);
      19'h01033: return dec_digit(int'(sn_num) % 10);
      19'h05003: return sel12;
      19'h05007: return sel34;
      19'h7FF63: return ader0[31:24];
      19'h7FF67: return ader0[23:16];
      19'h7FF6B: return ader0[15:8];
      19'h7FF6F: return ader0[7:0];
      19'h7FF73: return ader1[31:24];
      19'h7FF77: return ader1[23:16];
      19'h7FF7B: return ader1[15:8];
      19'h7FF7F: return ader1[7:0];
      19'h7FFF7, 19'h7FFFB: return {reset_mode, 2'b00, module_enabled, berr_flag, 3'b000};
      19'h7FFFF: return {bar, 3'b000};
      default:   return 8'h00;
    endcase
  endfunction

  logic       cram_rd_q;
  logic [7:0] reg_q, cram_q;
  always_ff @(posedge clk) begin
    if (rst) begin
      csr_ack   <= 1'b0;
      cram_rd_q <= 1'b0;
      reg_q     <= '0;
      cram_q    <= '0;
    end else begin
      csr_ack   <= hit;
      cram_rd_q <= hit && !csr_wr && cram_hit;
      reg_q     <= (hit && !csr_wr) ? rd_value(a) : 8'h00;
      cram_q    <= cram[9'((a - 19'h03003) >> 2)];
    end
  end
  assign csr_rdata = cram_rd_q ? cram_q : reg_q;

  // ---- data-access decode ----------------------------------------------------------------
  assign f0_sel = module_enabled && (acc_am == 6'h0D || acc_am == 6'h09) &&
                  (acc_addr == ader0[31:25]);
  assign f1_sel = module_enabled && (acc_am == 6'h0F || acc_am == 6'h0B) &&
                  (acc_addr == ader1[31:25]);

  // ---- TEST_OUT ------------------------------------------------------------------------------
  logic [15:0] tsig;
  logic [3:0][3:0] sel;
  assign tsig = {module_enabled, test_sig};
  assign sel  = {sel34[7:4], sel34[3:0], sel12[7:4], sel12[3:0]};
  always_ff @(posedge clk) begin
    if (rst) test_out <= '0;
    else for (int k = 0; k < 4; k++) test_out[k] <= tsig[sel[k]];
  end

endmodule
