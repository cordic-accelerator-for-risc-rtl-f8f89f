// tb_cordic_pe: exhaustive test of the CORDIC processing element.
// All 16 input combinations are applied; Result and Carry are compared with the
// low and high bit of X + (Y xor S) + C worked out arithmetically.
module tb_cordic_pe;

  logic x, y, c, s, result, carry;
  int checks = 0, failures = 0;

  cordic_pe dut (.x(x), .y(y), .c(c), .s(s), .result(result), .carry(carry));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      int unsigned total;
      {x, y, c, s} = 4'(v);
      #1;
      total = int'(x) + int'(y ^ s) + int'(c);
      checks += 2;
      if (result !== total[0]) begin
        failures++;
        $display("FAIL result x=%b y=%b c=%b s=%b got %b", x, y, c, s, result);
      end
      if (carry !== total[1]) begin
        failures++;
        $display("FAIL carry  x=%b y=%b c=%b s=%b got %b", x, y, c, s, carry);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
