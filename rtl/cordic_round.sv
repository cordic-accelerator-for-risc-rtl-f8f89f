// cordic_round: one round (round index I) of the CORDIC rotation-mode iteration.
//
//   d      = +1 if z_in >= 0, else -1
//   x_out  = x_in - d * (y_in >>> I)
//   y_out  = y_in + d * (x_in >>> I)
//   z_out  = z_in - d * atan(2^-I)      (degrees)
// Three PE rows (cordic_addsub) do the additions; the arithmetic right shifts by I
// are plain wiring between rows and the angle atan(2^-I) is a constant taken from
// cordic_pkg. X/Y are signed WXY-bit and Z signed WZ-bit fixed-point numbers with
// 32 fraction bits. The equations and the use of shifts as interconnect follow the
// design description; the sign of z choosing d (z = 0 counts as positive) is
// this design's reading. Combinational.
module cordic_round
  import cordic_pkg::*;
#(
  parameter int unsigned I   = 0,
  parameter int unsigned WXY = 35,
  parameter int unsigned WZ  = 40
) (
  input  logic signed [WXY-1:0] x_in,
  input  logic signed [WXY-1:0] y_in,
  input  logic signed [WZ-1:0]  z_in,
  output logic signed [WXY-1:0] x_out,
  output logic signed [WXY-1:0] y_out,
  output logic signed [WZ-1:0]  z_out
);

  localparam logic [39:0]   ALPHA_FULL = atan_deg(I);
  localparam logic [WZ-1:0] ALPHA      = WZ'(ALPHA_FULL);

  logic                  z_neg;
  logic signed [WXY-1:0] x_sh;
  logic signed [WXY-1:0] y_sh;

  assign z_neg = z_in[WZ-1];
  assign x_sh  = x_in >>> I;
  assign y_sh  = y_in >>> I;

  // d = +1 (z_neg = 0): X subtracts, Y adds, Z subtracts.
  cordic_addsub #(.W(WXY)) u_x (.x(x_in), .y(y_sh),  .sub(~z_neg), .sum(x_out));
  cordic_addsub #(.W(WXY)) u_y (.x(y_in), .y(x_sh),  .sub(z_neg),  .sum(y_out));
  cordic_addsub #(.W(WZ))  u_z (.x(z_in), .y(ALPHA), .sub(~z_neg), .sum(z_out));

endmodule
