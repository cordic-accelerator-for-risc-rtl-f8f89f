// cordic_rocc_accel: CORDIC sine/cosine accelerator attached to a RISC-V core
// through a RoCC-style command/response interface.
//
// The core issues a custom-2 instruction whose funct3 selects the function
// (0: cosine, 1: sine) and whose rs1 value is the angle in degrees, 64-bit Q32.32.
// The accelerator evaluates the function with the combinational CORDIC array
// (cordic_systolic) in the cycle the command is accepted, stores the result,
// sign-extended to 64-bit Q32.32, together with the instruction's rd in a response
// register and offers it on the response channel in the next cycle. A command
// issued at cycle t is therefore answered at cycle t+1: two cycles in all.
//
// Handshake: valid/ready on both channels; a transfer happens in a cycle where both
// are high. cmd_ready is high when the response register is empty or is being
// emptied in this cycle, so back-to-back commands are accepted one per cycle while
// the core takes every response; when resp_ready is low the response is held
// stable and new commands wait. busy is high while a response is pending.
// Reset: active-low, synchronous; it empties the response register.
//
// From the design description: the instruction format, funct3 coding, Q32.32
// format, angle in degrees, single-cycle computation and the one-cycle response.
// This design's choices: the one-entry response register and its ready rule, the
// reset, the busy output, only the low Z_INT+32 bits of rs1 being used, and any
// funct3 other than 1 giving the cosine.
module cordic_rocc_accel
  import cordic_pkg::*;
#(
  parameter int unsigned ROUNDS = 8,
  parameter int unsigned XY_INT = 3,
  parameter int unsigned Z_INT  = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  // command channel
  input  logic       cmd_valid,
  output logic       cmd_ready,
  input  rocc_cmd_t  cmd,
  // response channel
  output logic       resp_valid,
  input  logic       resp_ready,
  output rocc_resp_t resp,
  output logic       busy
);

  localparam int unsigned WXY = XY_INT + FRAC;
  localparam int unsigned WZ  = Z_INT + FRAC;

  logic                  cmd_fire;
  logic                  fn_sin;
  logic signed [WZ-1:0]  angle;
  logic signed [WXY-1:0] cos_val;
  logic signed [WXY-1:0] sin_val;
  logic signed [WXY-1:0] result;

  assign cmd_ready = !resp_valid || resp_ready;
  assign cmd_fire  = cmd_valid && cmd_ready;
  assign fn_sin    = (cmd.inst.funct3 == FN_SIN);
  assign angle     = cmd.rs1[WZ-1:0];
  assign busy      = resp_valid;

  cordic_systolic #(
    .ROUNDS (ROUNDS),
    .XY_INT (XY_INT),
    .Z_INT  (Z_INT)
  ) u_array (
    .angle   (angle),
    .fn_sin  (fn_sin),
    .cos_out (cos_val),
    .sin_out (sin_val),
    .result  (result)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      resp_valid <= 1'b0;
      resp       <= '0;
    end else if (cmd_fire) begin
      resp_valid <= 1'b1;
      resp.rd    <= cmd.inst.rd;
      resp.data  <= XLEN'(result);
    end else if (resp_ready) begin
      resp_valid <= 1'b0;
    end
  end

  // Protocol rules.
  a_cmd_opcode : assert property (@(posedge clk) disable iff (!rst_n)
    cmd_fire |-> cmd.inst.opcode == OPC_CUSTOM2)
    else $error("cordic_rocc_accel: command with a non custom-2 opcode");
  a_resp_hold : assert property (@(posedge clk) disable iff (!rst_n)
    resp_valid && !resp_ready |=> resp_valid && $stable(resp))
    else $error("cordic_rocc_accel: response changed while stalled");

endmodule
