// tb_libdn_output_fsm: self-checking test of the LI-BDN output FSM.
// Drives random dependency-valid, ready and fire patterns (fire only when the
// FSM reports done, as a fire FSM would) and compares enq_valid and done with
// a one-bit reference model kept in the testbench.
module tb_libdn_output_fsm;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic deps_valid, enq_ready, fire, enq_valid, done;
  libdn_output_fsm dut (.*);

  bit ref_fired;
  int sent = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    deps_valid = 0; enq_ready = 0; fire = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      deps_valid = $urandom_range(0, 1);
      enq_ready  = $urandom_range(0, 1);
      #1;
      check(enq_valid == (deps_valid && !ref_fired), "enq_valid rule");
      check(done == (ref_fired || (deps_valid && !ref_fired && enq_ready)), "done rule");
      fire = done && $urandom_range(0, 1);
      @(posedge clk);
      if (enq_valid && enq_ready) sent++;
      if (fire) ref_fired = 0;
      else if (enq_valid && enq_ready) ref_fired = 1;
    end
    check(sent > 100, "tokens were sent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
