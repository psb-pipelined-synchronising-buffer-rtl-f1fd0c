// Decoder of the BGo commands the TIM board sends over the readout bus
// (ROBUS).
//
// A BGo command is present when RDRQST (the OR of the strobes) is high and
// STROBE = 001 (BGO_CMD_STROBE). The BX lines then carry the command bits:
// BX0 TEST_ENABLE, BX1 PRIVATE_GAP, BX2 PRIVATE_ORBIT, BX3 HARD_RES,
// BX4 RES_ORBITNR, BX5 START_RUN, BX6 STOP_RUN, BX11..8 USER_MSG3..0.
// The ROBUS lines are registered once; each command gives a one-clock pulse
// on the first clock it is seen (a command held for several clocks counts
// once). Commands are passed on only when en_robust (ROP_SETUP bit 3) is
// set. The monitoring and test strobes are not used by the chip.
module robus_decoder (
  input  logic        clk,
  input  logic        rst,
  input  logic        en_robust,
  input  logic        rdrqst,
  input  logic [2:0]  strobe,
  input  logic [11:0] bx,
  output logic        start_run,
  output logic        stop_run,
  output logic        res_orbitnr,
  output logic        hard_res,
  output logic [3:0]  user_msg
);

  logic        cmd_q, cmd_qq;
  logic [11:0] bx_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      cmd_q  <= 1'b0;
      cmd_qq <= 1'b0;
      bx_q   <= '0;
    end else begin
      cmd_q  <= rdrqst && (strobe == 3'b001) && en_robust;
      cmd_qq <= cmd_q;
      bx_q   <= bx;
    end
  end

  logic fire;
  assign fire = cmd_q && !cmd_qq;

  assign start_run   = fire && bx_q[5];
  assign stop_run    = fire && bx_q[6];
  assign res_orbitnr = fire && bx_q[4];
  assign hard_res    = fire && bx_q[3];
  assign user_msg    = fire ? bx_q[11:8] : 4'h0;

endmodule
