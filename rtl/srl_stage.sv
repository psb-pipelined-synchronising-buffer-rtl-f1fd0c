// One stage of the programmable delay: a shift register of DEPTH words with
// an output multiplexer, the way an SRL16 shift-register LUT works. sel = 0
// passes the input straight through (no delay); sel = n (1..DEPTH) takes the
// output of the n-th register, a delay of n clocks. The registers shift every
// clock whatever sel is, so a delay change is seen at once (a word already in
// flight may appear twice when the delay is lengthened, as on the real chip).
// Reset clears the registers, which the SRL16 itself cannot do; this keeps
// simulation deterministic.
module srl_stage #(
  parameter int unsigned W     = 16,
  parameter int unsigned DEPTH = 15,
  parameter int unsigned SEL_W = 4
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [SEL_W-1:0] sel,
  input  logic [W-1:0]     din,
  output logic [W-1:0]     dout
);

  logic [W-1:0] sr [DEPTH];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < DEPTH; i++) sr[i] <= '0;
    end else begin
      sr[0] <= din;
      for (int i = 1; i < DEPTH; i++) sr[i] <= sr[i-1];
    end
  end

  always_comb begin
    int idx;
    idx = int'(sel);
    if (idx > int'(DEPTH)) idx = int'(DEPTH);
    if (idx == 0) dout = din;
    else          dout = sr[idx - 1];
  end

endmodule
