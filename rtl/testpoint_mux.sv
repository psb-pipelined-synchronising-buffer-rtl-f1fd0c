// Oscilloscope test points. Each of the N test points has a 16-bit TESTMASK
// register selecting which of its 16 internal signals reach the pin; when
// several are selected they are merged with an OR. The output is registered
// to keep the pin timing independent of the selected signals.
module testpoint_mux #(
  parameter int unsigned N = 7
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [N-1:0][15:0]  mask,
  input  logic [N-1:0][15:0]  sig,
  output logic [N-1:0]        tp
);

  always_ff @(posedge clk) begin
    if (rst) tp <= '0;
    else for (int i = 0; i < N; i++) tp[i] <= |(mask[i] & sig[i]);
  end

endmodule
