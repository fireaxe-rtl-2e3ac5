// tb_token_queue: self-checking test of token_queue.
// Random enqueue/dequeue traffic against a reference queue held in the
// testbench, checks of full/empty flags, and a second instance built with a
// seed token that must be available straight out of reset.
module tb_token_queue;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        enq_valid, enq_ready, deq_valid, deq_ready;
  logic [15:0] enq_data, deq_data;
  token_queue #(.W(16), .DEPTH(3)) dut (.*);

  logic        s_enq_ready, s_deq_valid, s_deq_ready;
  logic [15:0] s_deq_data;
  token_queue #(.W(16), .DEPTH(2), .SEED(1'b1), .SEED_VALUE(16'h00A5)) dut_seed (
    .clk, .rst, .enq_valid(1'b0), .enq_ready(s_enq_ready), .enq_data(16'h0),
    .deq_valid(s_deq_valid), .deq_ready(s_deq_ready), .deq_data(s_deq_data));

  logic [15:0] ref_q [$];

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
    enq_valid = 0; deq_ready = 0; enq_data = 0; s_deq_ready = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    @(negedge clk);
    check(s_deq_valid && s_deq_data == 16'h00A5, "seed token present after reset");
    check(!deq_valid && enq_ready, "unseeded queue empty after reset");
    s_deq_ready = 1;
    @(negedge clk);
    s_deq_ready = 0;
    check(!s_deq_valid, "seeded queue empty after taking the seed");
    for (int i = 0; i < 3000; i++) begin
      enq_valid = ($urandom_range(0, 99) < 60);
      enq_data  = 16'($urandom);
      deq_ready = ($urandom_range(0, 99) < 50);
      #1;
      check(enq_ready == (ref_q.size() < 3), "enq_ready matches occupancy");
      check(deq_valid == (ref_q.size() > 0), "deq_valid matches occupancy");
      if (deq_valid && ref_q.size() > 0) check(deq_data == ref_q[0], "head data in order");
      @(posedge clk);
      if (deq_valid && deq_ready) void'(ref_q.pop_front());
      if (enq_valid && enq_ready) ref_q.push_back(enq_data);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
