// Derandomising FIFO of the readout path.
//
// A synchronous FIFO of DEPTH words. push writes din (ignored when full); pop
// reads the oldest word into dout, valid in the clock after pop (ignored when
// empty). clr empties the FIFO synchronously (L1Res). Flags: empty, full and
// warn, the last meaning more than 75 % of the FIFO is filled.
module derand_fifo #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 512,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         clr,
  input  logic         push,
  input  logic [W-1:0] din,
  input  logic         pop,
  output logic [W-1:0] dout,
  output logic         empty,
  output logic         full,
  output logic         warn,
  output logic [AW:0]  count
);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic          do_push, do_pop;

  assign empty   = (count == '0);
  assign full    = (count == (AW+1)'(DEPTH));
  assign warn    = (count > (AW+1)'((3 * DEPTH) / 4));
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;

  always_ff @(posedge clk) begin
    if (rst || clr) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_push) wp <= wp + 1'b1;
      if (do_pop)  rp <= rp + 1'b1;
      count <= count + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (do_push && !clr) mem[wp] <= din;
  end

  always_ff @(posedge clk) begin
    if (do_pop && !clr) dout <= mem[rp];
  end

endmodule
