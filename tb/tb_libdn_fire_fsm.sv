// tb_libdn_fire_fsm: self-checking test of the LI-BDN fire FSM.
// Random input-valid and output-done vectors; the target advances exactly when
// all inputs are valid and all outputs done, dequeues every input then, and the
// target cycle counter counts those firings.
module tb_libdn_fire_fsm;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [2:0]  in_valid, in_deq;
  logic [1:0]  out_done;
  logic        fire;
  logic [31:0] target_cycle;
  libdn_fire_fsm #(.N_IN(3), .N_OUT(2)) dut (.*);

  int ref_cycles = 0;

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
    in_valid = 0; out_done = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      // bias towards all-ones so that firing happens often
      in_valid = ($urandom_range(0, 3) == 0) ? 3'($urandom) : 3'b111;
      out_done = ($urandom_range(0, 3) == 0) ? 2'($urandom) : 2'b11;
      #1;
      check(fire == (in_valid == 3'b111 && out_done == 2'b11), "fire rule");
      check(in_deq == {3{fire}}, "inputs dequeued on fire");
      check(target_cycle == 32'(ref_cycles), "target cycle count");
      @(posedge clk);
      if (in_valid == 3'b111 && out_done == 2'b11) ref_cycles++;
    end
    check(ref_cycles > 500, "target advanced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
