// cordic_systolic: the CORDIC sine/cosine array, all rounds unrolled into one
// combinational path.
//
// ROUNDS cordic_round stages are chained. Stage 0 starts with X0 = K (the gain of
// ROUNDS rounds, from cordic_pkg), Y0 = 0 and Z0 = the input angle in degrees; after
// the last stage X = cos(angle) and Y = sin(angle). fn_sin selects which of the two
// is driven on result (1: sine, 0: cosine); both are also brought out.
// Interface: angle is signed, Z_INT integer bits (sign included) and 32 fraction
// bits; results are signed, XY_INT integer bits and 32 fraction bits. Valid for
// angles within the CORDIC convergence range, about -99.88 to +99.88 degrees.
// Timing: purely combinational, so a result is available in the same clock cycle.
// Round count 8, the starting values and the removal of unused high integer bits
// follow the design description; Z_INT = 8 (room for +/-127 degrees) is this
// design's choice.
module cordic_systolic
  import cordic_pkg::*;
#(
  parameter int unsigned ROUNDS = 8,
  parameter int unsigned XY_INT = 3,
  parameter int unsigned Z_INT  = 8
) (
  input  logic signed [Z_INT+FRAC-1:0]  angle,
  input  logic                          fn_sin,
  output logic signed [XY_INT+FRAC-1:0] cos_out,
  output logic signed [XY_INT+FRAC-1:0] sin_out,
  output logic signed [XY_INT+FRAC-1:0] result
);

  localparam int unsigned WXY = XY_INT + FRAC;
  localparam int unsigned WZ  = Z_INT + FRAC;
  localparam logic [31:0] K   = k_gain(ROUNDS);

  if (ROUNDS < 1 || ROUNDS > MAX_ROUNDS) begin : g_bad_rounds
    $error("cordic_systolic: ROUNDS must be 1..%0d", MAX_ROUNDS);
  end

  logic signed [WXY-1:0] xs [ROUNDS+1];
  logic signed [WXY-1:0] ys [ROUNDS+1];
  logic signed [WZ-1:0]  zs [ROUNDS+1];

  assign xs[0] = WXY'(K);
  assign ys[0] = '0;
  assign zs[0] = angle;

  for (genvar i = 0; i < ROUNDS; i++) begin : g_round
    cordic_round #(.I(i), .WXY(WXY), .WZ(WZ)) u_round (
      .x_in  (xs[i]),
      .y_in  (ys[i]),
      .z_in  (zs[i]),
      .x_out (xs[i+1]),
      .y_out (ys[i+1]),
      .z_out (zs[i+1])
    );
  end

  assign cos_out = xs[ROUNDS];
  assign sin_out = ys[ROUNDS];
  assign result  = fn_sin ? sin_out : cos_out;

endmodule
