// tb_cordic_systolic: tests the combinational CORDIC array.
//
// Four arrays are built, with 4, 6, 8 (the default) and 10 rounds. Each angle of
// the sweep 0, 1, ..., 90 degrees and 300 random angles in (-99, 99) degrees are
// applied; for every array
//   - cos_out and sin_out must equal the behavioural reference bit for bit,
//   - result must follow fn_sin,
//   - the error against the real sine and cosine must stay within the bound set
//     by the last rotation angle: |err| <= 1.5 * atan(2^-(n-1)) (radians) + 2^-24.
// The largest relative sine error over 1..90 degrees is printed per round count.
module tb_cordic_systolic;
  import cordic_ref_pkg::*;

  localparam int NA = 4;
  localparam int RNDS [NA] = '{4, 6, 8, 10};
  localparam int unsigned WXY = 35;
  localparam int unsigned WZ  = 40;

  logic signed [WZ-1:0]  angle;
  logic                  fn_sin;
  logic signed [WXY-1:0] cos_o [NA];
  logic signed [WXY-1:0] sin_o [NA];
  logic signed [WXY-1:0] res_o [NA];
  int checks = 0, failures = 0;
  real max_rel [NA];

  // default configuration: no parameter override
  cordic_systolic dut8 (.angle(angle), .fn_sin(fn_sin),
                        .cos_out(cos_o[2]), .sin_out(sin_o[2]), .result(res_o[2]));
  cordic_systolic #(.ROUNDS(4))  dut4  (.angle(angle), .fn_sin(fn_sin),
                        .cos_out(cos_o[0]), .sin_out(sin_o[0]), .result(res_o[0]));
  cordic_systolic #(.ROUNDS(6))  dut6  (.angle(angle), .fn_sin(fn_sin),
                        .cos_out(cos_o[1]), .sin_out(sin_o[1]), .result(res_o[1]));
  cordic_systolic #(.ROUNDS(10)) dut10 (.angle(angle), .fn_sin(fn_sin),
                        .cos_out(cos_o[3]), .sin_out(sin_o[3]), .result(res_o[3]));

  function automatic real fabs(input real v);
    return v < 0.0 ? -v : v;
  endfunction

  task automatic apply(input longint a);
    angle = WZ'(a);
    for (int f = 0; f < 2; f++) begin
      fn_sin = 1'(f);
      #1;
      for (int k = 0; k < NA; k++) begin
        longint ce, se;
        real    deg, bound, cerr, serr;
        ref_cordic(a, RNDS[k], ce, se);
        checks += 3;
        if (cos_o[k] !== WXY'(ce) || sin_o[k] !== WXY'(se)) begin
          failures++;
          $display("FAIL n=%0d angle=%f: cos %h/%h sin %h/%h", RNDS[k], q32_to_real(a),
                   cos_o[k], WXY'(ce), sin_o[k], WXY'(se));
        end
        if (res_o[k] !== (fn_sin ? WXY'(se) : WXY'(ce))) begin
          failures++;
          $display("FAIL n=%0d result select fn_sin=%0b", RNDS[k], fn_sin);
        end
        deg   = q32_to_real(a);
        bound = 1.5 * $atan(2.0 ** (-(RNDS[k] - 1))) + 2.0 ** (-24);
        cerr  = fabs(q32_to_real(longint'(cos_o[k])) - $cos(deg * PI / 180.0));
        serr  = fabs(q32_to_real(longint'(sin_o[k])) - $sin(deg * PI / 180.0));
        if (cerr > bound || serr > bound) begin
          failures++;
          $display("FAIL n=%0d angle=%f: error cos %g sin %g above %g", RNDS[k], deg,
                   cerr, serr, bound);
        end
        if (f == 1 && deg >= 1.0 && deg <= 90.0 && (fabs(serr / $sin(deg * PI / 180.0)) > max_rel[k]))
          max_rel[k] = fabs(serr / $sin(deg * PI / 180.0));
      end
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < NA; k++) max_rel[k] = 0.0;
    for (int d = 0; d <= 90; d++) apply(longint'(d) <<< 32);
    for (int n = 0; n < 300; n++) begin
      longint a;
      a = (longint'($urandom_range(0, 98)) <<< 32) | longint'($urandom);
      if ($urandom & 1) a = -a;
      apply(a);
    end
    for (int k = 0; k < NA; k++)
      $display("rounds=%0d  max relative sine error over 1..90 deg = %g", RNDS[k], max_rel[k]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
