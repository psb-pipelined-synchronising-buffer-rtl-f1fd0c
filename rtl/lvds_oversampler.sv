// Phase selection and phase monitoring of the 64 parallel LVDS trigger bits.
//
// The 40 MHz LVDS bits arrive in negative logic (trigger bit = 1 is a
// negative voltage difference) and are sampled four times per bx by capture
// flip-flops outside this module: samp_n[p][b] is sample p of bit b as
// received. The module inverts them back to true levels.
//
// Each 4-bit group g (bits 4g+3..4g) has its own 2-bit phase select, taken
// from SEL_PHASE3100 (groups 0..7) and SEL_PHASE6332 (groups 8..15), two bits
// per group, group 0 in bits 1..0: 00..11 select sample 0..3. The result is
// registered.
//
// Monitoring uses the lowest bit of each group (bit 4g): four 8-bit phase
// counters per group count transitions pre3 -> 0, 0 -> 1, 1 -> 2, 2 -> 3,
// pre3 being sample 3 of the preceding bx. Read-out words per group:
// PHASE_CNTR_A = {c10, c0p3}, PHASE_CNTR_B = {c32, c21}, cleared on read.
module lvds_oversampler
  import psb_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst,
  input  logic [3:0][N_LVDS-1:0]        samp_n,
  input  logic [15:0]                   sel_phase3100,
  input  logic [15:0]                   sel_phase6332,
  output logic [N_LVDS-1:0]             bits,
  input  logic [N_GRP-1:0]              clr_a,
  input  logic [N_GRP-1:0]              clr_b,
  output logic [N_GRP-1:0][15:0]        cnt_a,
  output logic [N_GRP-1:0][15:0]        cnt_b
);

  logic [3:0][N_LVDS-1:0] s;     // true-level samples
  assign s = ~samp_n;

  logic [31:0] sel_all;
  assign sel_all = {sel_phase6332, sel_phase3100};

  always_ff @(posedge clk) begin
    if (rst) bits <= '0;
    else begin
      for (int g = 0; g < N_GRP; g++)
        for (int k = 0; k < 4; k++)
          bits[4*g+k] <= s[sel_all[2*g +: 2]][4*g+k];
    end
  end

  logic [N_GRP-1:0] prev3;
  always_ff @(posedge clk) begin
    if (rst) prev3 <= '0;
    else for (int g = 0; g < N_GRP; g++) prev3[g] <= s[3][4*g];
  end

  for (genvar g = 0; g < N_GRP; g++) begin : g_grp
    phase_counter u_c0p3 (.clk, .rst, .inc({1'b0, s[0][4*g] ^ prev3[g]}),    .clr(clr_a[g]), .cnt(cnt_a[g][7:0]));
    phase_counter u_c10  (.clk, .rst, .inc({1'b0, s[1][4*g] ^ s[0][4*g]}),   .clr(clr_a[g]), .cnt(cnt_a[g][15:8]));
    phase_counter u_c21  (.clk, .rst, .inc({1'b0, s[2][4*g] ^ s[1][4*g]}),   .clr(clr_b[g]), .cnt(cnt_b[g][7:0]));
    phase_counter u_c32  (.clk, .rst, .inc({1'b0, s[3][4*g] ^ s[2][4*g]}),   .clr(clr_b[g]), .cnt(cnt_b[g][15:8]));
  end

endmodule
