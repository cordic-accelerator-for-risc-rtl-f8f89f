// cordic_ref_pkg: behavioural reference for the CORDIC testbenches.
//
// Computes the rotation-mode CORDIC iteration on 64-bit integers with 32 fraction
// bits, deriving its constants at run time from real arithmetic instead of the
// tables in the RTL:
//   alpha_i = round(atan(2^-i) * 180/pi * 2^32),  K_n = round(prod cos(atan(2^-i)) * 2^32)
// Its results must match the RTL bit for bit (no intermediate overflow occurs for
// angles within the convergence range).
package cordic_ref_pkg;

  localparam real PI = 3.14159265358979323846;

  function automatic longint alpha_q32(input int i);
    real a;
    a = $atan(2.0 ** (-i)) * 180.0 / PI;
    return longint'(a * (2.0 ** 32));
  endfunction

  function automatic longint k_q32(input int n);
    real k;
    k = 1.0;
    for (int i = 0; i < n; i++) k = k * $cos($atan(2.0 ** (-i)));
    return longint'(k * (2.0 ** 32));
  endfunction

  // One round; returns the new x, y, z.
  function automatic void ref_round(input int i, inout longint x, inout longint y,
                                    inout longint z);
    longint xn, yn;
    if (z >= 0) begin
      xn = x - (y >>> i);
      yn = y + (x >>> i);
      z  = z - alpha_q32(i);
    end else begin
      xn = x + (y >>> i);
      yn = y - (x >>> i);
      z  = z + alpha_q32(i);
    end
    x = xn;
    y = yn;
  endfunction

  // Full CORDIC: angle in degrees Q32.32, n rounds; cos and sin in Q32.32.
  function automatic void ref_cordic(input longint angle, input int n,
                                     output longint c, output longint s);
    longint x, y, z;
    x = k_q32(n);
    y = 0;
    z = angle;
    for (int i = 0; i < n; i++) ref_round(i, x, y, z);
    c = x;
    s = y;
  endfunction

  function automatic real q32_to_real(input longint v);
    return real'(v) / (2.0 ** 32);
  endfunction

endpackage
