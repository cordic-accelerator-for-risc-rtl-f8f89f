// tb_cordic_addsub: random and corner-case test of the PE adder/subtractor row at
// its default width (40 bits). Each result is compared with x + y or x - y
// computed by the simulator, modulo 2^40.
module tb_cordic_addsub;

  localparam int unsigned W = 40;

  logic [W-1:0] x, y, sum;
  logic         sub;
  int checks = 0, failures = 0;

  cordic_addsub #(.W(W)) dut (.x(x), .y(y), .sub(sub), .sum(sum));

  task automatic apply(input logic [W-1:0] a, input logic [W-1:0] b, input logic op);
    logic [W-1:0] expect_v;
    x = a; y = b; sub = op;
    #1;
    expect_v = op ? a - b : a + b;
    checks++;
    if (sum !== expect_v) begin
      failures++;
      $display("FAIL %h %s %h: got %h expected %h", a, op ? "-" : "+", b, sum, expect_v);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply('0, '0, 1'b0);
    apply('0, '0, 1'b1);
    apply('1, 40'd1, 1'b0);
    apply('0, 40'd1, 1'b1);
    apply({1'b0, {(W-1){1'b1}}}, 40'd1, 1'b0);
    apply({1'b1, {(W-1){1'b0}}}, 40'd1, 1'b1);
    for (int n = 0; n < 2000; n++)
      apply({$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
