// 8-bit saturating event counter, used for the phase counters and the
// serial-link error counters. It adds inc (0..3 events seen this clock) and
// stops at FF to show an overflow. A read of the counter (clr, one clock)
// clears it; events seen in the same clock start the new count.
module phase_counter (
  input  logic       clk,
  input  logic       rst,
  input  logic [1:0] inc,
  input  logic       clr,
  output logic [7:0] cnt
);

  logic [8:0] sum;
  assign sum = {1'b0, cnt} + {7'd0, inc};

  always_ff @(posedge clk) begin
    if (rst)           cnt <= '0;
    else if (clr)      cnt <= {6'd0, inc};
    else if (sum[8])   cnt <= 8'hFF;
    else               cnt <= sum[7:0];
  end

endmodule
