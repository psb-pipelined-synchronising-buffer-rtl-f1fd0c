// Phase selection and phase monitoring of one serial-link channel.
//
// Every 16-bit word coming from a DS92LV16 deserialiser is sampled four times
// per 12.5 ns tick by capture flip-flops on four clock phases (outside this
// module). Per bx this module receives those samples for both ticks:
// samp[t][p][b] is sample p (0..3) of bit b in tick t (0 = A word, 1 = B word).
//
// Selection (CHAN_REG bits 1..0, chip version 5): 00 takes sample 0, 10 takes
// sample 2, 01 and 11 inhibit the data (zero). The selected pair {B, A} is
// registered.
//
// Monitoring: the four samples of bit 0 are compared with each other and with
// sample 3 of the preceding tick ("pre3"). A transition between two
// consecutive samples increments one of four 8-bit phase counters:
//   c0p3: pre3 -> 0,  c10: 0 -> 1,  c21: 1 -> 2,  c32: 2 -> 3.
// Both ticks are counted, so a counter may advance by 2 per bx. Read-out
// words: PHASE_CNTR_A = {c10, c0p3}, PHASE_CNTR_B = {c32, c21}; reading one
// word (clr_a / clr_b) clears its two counters.
module serial_oversampler
  import psb_pkg::*;
(
  input  logic                         clk,
  input  logic                         rst,
  input  logic [1:0][3:0][WORD_W-1:0]  samp,
  input  logic [1:0]                   sel_phase,
  output logic [CHW-1:0]               word,       // {B, A}, registered
  input  logic                         clr_a,
  input  logic                         clr_b,
  output logic [15:0]                  cnt_a,
  output logic [15:0]                  cnt_b
);

  // ---- selection ---------------------------------------------------------
  always_ff @(posedge clk) begin
    if (rst) word <= '0;
    else begin
      unique case (sel_phase)
        2'b00:   word <= {samp[1][0], samp[0][0]};
        2'b10:   word <= {samp[1][2], samp[0][2]};
        default: word <= '0;   // 01, 11: inhibit
      endcase
    end
  end

  // ---- transition detection on bit 0 ------------------------------------
  logic prev3;   // sample 3 of the B tick of the previous bx
  always_ff @(posedge clk) begin
    if (rst) prev3 <= 1'b0;
    else     prev3 <= samp[1][3][0];
  end

  logic [1:0] t0p3, t10, t21, t32;   // transitions per pair, per tick
  always_comb begin
    t0p3[0] = samp[0][0][0] ^ prev3;
    t0p3[1] = samp[1][0][0] ^ samp[0][3][0];
    for (int t = 0; t < 2; t++) begin
      t10[t] = samp[t][1][0] ^ samp[t][0][0];
      t21[t] = samp[t][2][0] ^ samp[t][1][0];
      t32[t] = samp[t][3][0] ^ samp[t][2][0];
    end
  end

  function automatic logic [1:0] popc2(input logic [1:0] v);
    return {1'b0, v[0]} + {1'b0, v[1]};
  endfunction

  phase_counter u_c0p3 (.clk, .rst, .inc(popc2(t0p3)), .clr(clr_a), .cnt(cnt_a[7:0]));
  phase_counter u_c10  (.clk, .rst, .inc(popc2(t10)),  .clr(clr_a), .cnt(cnt_a[15:8]));
  phase_counter u_c21  (.clk, .rst, .inc(popc2(t21)),  .clr(clr_b), .cnt(cnt_b[7:0]));
  phase_counter u_c32  (.clk, .rst, .inc(popc2(t32)),  .clr(clr_b), .cnt(cnt_b[15:8]));

endmodule
