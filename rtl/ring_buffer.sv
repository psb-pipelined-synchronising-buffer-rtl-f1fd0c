// Ring buffer monitoring one trigger channel (or the bunch numbers).
//
// A dual-port memory of DEPTH words. Port A writes din every clock at the
// write counter, which counts up by one per bx, wraps after the end of the
// memory and is cleared by the internal BCRES (wr_clr), locking addresses to
// the LHC orbit. A read counter runs the same way but is cleared by the
// latency-delayed BCRES (rd_clr); rd_cnt therefore points at the entry
// written one trigger latency earlier, that is the bx an arriving L1A refers
// to. wr_cnt and rd_cnt are the addresses of the current clock (0 in the
// clock of a clear). The readout processor reads port B at any address rd_addr (usually
// rd_cnt plus a small offset); rd_data follows one clock after rd_en.
// Memory contents are not reset.
module ring_buffer #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 256,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          wr_clr,
  input  logic          rd_clr,
  input  logic [W-1:0]  din,
  output logic [AW-1:0] wr_cnt,
  output logic [AW-1:0] rd_cnt,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output logic [W-1:0]  rd_data
);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wr_last, rd_last;

  // current addresses: 0 in the clock of the clear, else one past the last
  assign wr_cnt = wr_clr ? '0 : wr_last + 1'b1;
  assign rd_cnt = rd_clr ? '0 : rd_last + 1'b1;

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_last <= '1;
      rd_last <= '1;
    end else begin
      wr_last <= wr_cnt;
      rd_last <= rd_cnt;
    end
  end

  always_ff @(posedge clk) begin
    mem[wr_cnt] <= din;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
