// tb_cordic_rocc_accel: end-to-end test of the CORDIC RoCC accelerator at its
// default parameters (8 rounds, Q32.32 angle in degrees).
//
// A behavioural core side issues custom-2 sine/cosine instructions and takes the
// responses. Every response is compared with the behavioural CORDIC reference and
// with the instruction's rd. Phases:
//   1. the accuracy sweep: sine and cosine of 0..90 degrees in 1-degree steps,
//      issued back to back with the response channel always ready;
//   2. random angles in (-99, 99) degrees with random gaps and random response
//      back-pressure;
//   3. bursts of N = 1..44 consecutive sine instructions, each timed: N results
//      must arrive in N + 1 cycles;
//   4. a reset while a response is pending.
// Timing checks: every accepted command is answered in the next cycle, and a
// stalled response stays unchanged. Each mechanism (sine, cosine, stall, back-to-
// back issue, negative angle, reset with a pending response) must occur at least once.
module tb_cordic_rocc_accel;
  import cordic_pkg::*;
  import cordic_ref_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n;
  logic       cmd_valid;
  logic       cmd_ready;
  rocc_cmd_t  cmd;
  logic       resp_valid;
  logic       resp_ready;
  rocc_resp_t resp;
  logic       busy;

  int checks = 0, failures = 0;
  longint unsigned cycle = 0;

  // mechanism counters
  int n_sin = 0, n_cos = 0, n_stall = 0, n_b2b = 0, n_neg = 0, n_rst_pending = 0;

  cordic_rocc_accel dut (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd, .resp_valid, .resp_ready, .resp, .busy
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic rocc_resp_t expected(input rocc_cmd_t c);
    longint ce, se;
    rocc_resp_t r;
    ref_cordic(c.rs1, 8, ce, se);
    r.rd   = c.inst.rd;
    r.data = (c.inst.funct3 == FN_SIN) ? se : ce;
    return r;
  endfunction

  // ---------------------------------------------------------------- monitor
  rocc_resp_t exp_q [$];
  logic       accepted_last = 1'b0;
  logic       stalled_last  = 1'b0;
  rocc_resp_t resp_last;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (!rst_n) begin
      exp_q.delete();
      accepted_last <= 1'b0;
      stalled_last  <= 1'b0;
    end else begin
      // a command accepted in the previous cycle must be answered now
      if (accepted_last) begin
        checks++;
        if (!resp_valid || resp !== exp_q[0]) begin
          failures++;
          $display("FAIL cycle %0d: response valid=%0b rd=%0d data=%h, expected rd=%0d data=%h",
                   cycle, resp_valid, resp.rd, resp.data, exp_q[0].rd, exp_q[0].data);
        end
      end
      if (stalled_last) begin
        checks++;
        if (!resp_valid || resp !== resp_last) begin
          failures++;
          $display("FAIL cycle %0d: stalled response changed", cycle);
        end
      end
      if (resp_valid && resp_ready) begin
        checks++;
        if (exp_q.size() == 0 || resp !== exp_q[0]) begin
          failures++;
          $display("FAIL cycle %0d: unexpected response rd=%0d data=%h", cycle, resp.rd, resp.data);
        end
        if (exp_q.size() != 0) void'(exp_q.pop_front());
      end
      if (cmd_valid && !cmd_ready) n_stall++;
      if (cmd_valid && cmd_ready) begin
        exp_q.push_back(expected(cmd));
        if (accepted_last) n_b2b++;
        if (cmd.inst.funct3 == FN_SIN) n_sin++; else n_cos++;
        if ($signed(cmd.rs1) < 0) n_neg++;
      end
      accepted_last <= cmd_valid && cmd_ready;
      stalled_last  <= resp_valid && !resp_ready;
      resp_last     <= resp;
      checks++;
      if (busy !== resp_valid) begin
        failures++;
        $display("FAIL cycle %0d: busy does not follow a pending response", cycle);
      end
    end
  end

  // ---------------------------------------------------------------- driver
  int unsigned ready_pct = 100;   // chance of resp_ready in percent

  always @(negedge clk) resp_ready <= ($urandom_range(0, 99) < ready_pct);

  function automatic rocc_cmd_t make_cmd(input longint angle, input logic sine);
    rocc_cmd_t c;
    c.inst.imm    = '0;
    c.inst.rs1    = 5'($urandom_range(1, 31));
    c.inst.funct3 = sine ? FN_SIN : FN_COS;
    c.inst.rd     = 5'($urandom_range(1, 31));
    c.inst.opcode = OPC_CUSTOM2;
    c.rs1         = angle;
    c.rs2         = {$urandom, $urandom};
    return c;
  endfunction

  // Present one command from the next falling edge until it is accepted.
  task automatic issue(input rocc_cmd_t c);
    @(negedge clk);
    cmd_valid = 1'b1;
    cmd       = c;
    do @(posedge clk); while (!cmd_ready);
    #1;
    cmd_valid = 1'b0;
  endtask

  function automatic longint rand_angle();
    longint a;
    a = (longint'($urandom_range(0, 98)) <<< 32) | longint'($urandom);
    return ($urandom & 1) ? -a : a;
  endfunction

  task automatic drain();
    ready_pct = 100;
    repeat (3) @(posedge clk);
  endtask

  initial begin
    rst_n     = 1'b0;
    cmd_valid = 1'b0;
    cmd       = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // 1. accuracy sweep, back to back
    ready_pct = 100;
    for (int d = 0; d <= 90; d++) begin
      issue(make_cmd(longint'(d) <<< 32, 1'b1));
      issue(make_cmd(longint'(d) <<< 32, 1'b0));
    end
    drain();

    // 2. random traffic with back-pressure
    ready_pct = 60;
    for (int n = 0; n < 400; n++) begin
      if ($urandom_range(0, 3) == 0) @(negedge clk);
      issue(make_cmd(rand_angle(), 1'($urandom)));
    end
    drain();

    // 3. bursts of N consecutive sine instructions, N = 1..44
    ready_pct = 100;
    for (int nb = 1; nb <= 44; nb++) begin
      longint unsigned t0, t1;
      int got;
      @(negedge clk);
      t0  = cycle;
      got = 0;
      fork
        for (int k = 0; k < nb; k++) issue(make_cmd(longint'(k) <<< 32, 1'b1));
        while (got < nb) begin
          @(posedge clk);
          if (resp_valid && resp_ready) got++;
        end
      join
      t1 = cycle;
      checks++;
      if (t1 - t0 != longint'(nb + 1)) begin
        failures++;
        $display("FAIL burst of %0d sine instructions took %0d cycles, expected %0d",
                 nb, t1 - t0, nb + 1);
      end
    end
    drain();

    // 4. reset while a response is pending
    ready_pct = 0;
    issue(make_cmd(30 <<< 32, 1'b1));
    @(negedge clk);
    if (resp_valid) n_rst_pending++;
    rst_n = 1'b0;
    @(posedge clk);
    #1 rst_n = 1'b1;
    checks++;
    if (resp_valid || busy) begin
      failures++;
      $display("FAIL reset left a response pending");
    end
    ready_pct = 100;
    issue(make_cmd(60 <<< 32, 1'b0));
    drain();

    // every mechanism must have happened
    checks += 6;
    if (n_sin == 0)         begin failures++; $display("FAIL no sine instruction"); end
    if (n_cos == 0)         begin failures++; $display("FAIL no cosine instruction"); end
    if (n_stall == 0)       begin failures++; $display("FAIL no command stall"); end
    if (n_b2b == 0)         begin failures++; $display("FAIL no back-to-back issue"); end
    if (n_neg == 0)         begin failures++; $display("FAIL no negative angle"); end
    if (n_rst_pending == 0) begin failures++; $display("FAIL no reset with pending response"); end
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d responses missing", exp_q.size()); end
    $display("sine=%0d cosine=%0d stalls=%0d back-to-back=%0d negative=%0d reset-pending=%0d",
             n_sin, n_cos, n_stall, n_b2b, n_neg, n_rst_pending);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
