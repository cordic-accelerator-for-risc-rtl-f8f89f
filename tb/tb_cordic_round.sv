// tb_cordic_round: tests single CORDIC rounds (I = 0, 3 and 7) against the
// behavioural reference round, for random coordinates and residual angles of
// both signs, so that both rotation directions are exercised.
module tb_cordic_round;
  import cordic_ref_pkg::*;

  localparam int unsigned WXY = 35;
  localparam int unsigned WZ  = 40;
  localparam int NR = 3;
  localparam int IDX [NR] = '{0, 3, 7};

  logic signed [WXY-1:0] x_in, y_in;
  logic signed [WZ-1:0]  z_in;
  logic signed [WXY-1:0] x_out [NR];
  logic signed [WXY-1:0] y_out [NR];
  logic signed [WZ-1:0]  z_out [NR];
  int checks = 0, failures = 0;
  int pos_dir = 0, neg_dir = 0;

  for (genvar r = 0; r < NR; r++) begin : g_dut
    cordic_round #(.I(IDX[r]), .WXY(WXY), .WZ(WZ)) dut (
      .x_in(x_in), .y_in(y_in), .z_in(z_in),
      .x_out(x_out[r]), .y_out(y_out[r]), .z_out(z_out[r]));
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      longint xr, yr, zr;
      // |x|,|y| < 1.5 and |z| < 100 degrees
      xr = longint'($urandom_range(0, 32'hC000_0000)) * (($urandom & 1) ? -1 : 1);
      yr = longint'($urandom_range(0, 32'hC000_0000)) * (($urandom & 1) ? -1 : 1);
      zr = (longint'($urandom_range(0, 99)) << 32 | longint'($urandom))
           * (($urandom & 1) ? -1 : 1);
      if (n == 0) zr = 0;
      x_in = WXY'(xr); y_in = WXY'(yr); z_in = WZ'(zr);
      if (zr >= 0) pos_dir++; else neg_dir++;
      #1;
      for (int r = 0; r < NR; r++) begin
        longint xe, ye, ze;
        xe = xr; ye = yr; ze = zr;
        ref_round(IDX[r], xe, ye, ze);
        checks += 3;
        if (x_out[r] !== WXY'(xe) || y_out[r] !== WXY'(ye) || z_out[r] !== WZ'(ze)) begin
          failures++;
          $display("FAIL round %0d: in (%h,%h,%h) got (%h,%h,%h) expected (%h,%h,%h)",
                   IDX[r], x_in, y_in, z_in, x_out[r], y_out[r], z_out[r],
                   WXY'(xe), WXY'(ye), WZ'(ze));
        end
      end
    end
    checks++;
    if (pos_dir == 0 || neg_dir == 0) begin
      failures++;
      $display("FAIL a rotation direction was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
