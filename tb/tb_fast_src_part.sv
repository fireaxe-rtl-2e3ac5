// tb_fast_src_part: self-checking test of the fast-mode source partition.
// The testbench plays the sink partition: it supplies a random ready token R
// for every target cycle after the first (the first uses the seed token R = 0)
// and checks each {V, D} token against its own model of the source queue and
// producer: V must equal (queue not empty) && R, D the queue head, and an entry
// must leave the queue exactly when it is sent.
module tb_fast_src_part;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        in_valid, in_ready, in_r, out_valid, out_ready, mon_sent, mon_blocked;
  logic [32:0] out_token;
  logic [31:0] mon_sent_data, target_cycle;
  fast_src_part dut (.*);

  int ref_q [$];
  int seq = 0, blocked = 0, sent = 0;
  bit r;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit v_exp, can_enq;
    in_valid = 0; in_r = 0; out_ready = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int k = 0; k < 1500; k++) begin
      @(negedge clk);
      if (k == 0) begin
        r = 0;
        check(out_valid, "first output produced from the seed token alone");
      end else begin
        r = ($urandom_range(0, 99) < 40);
        in_valid = 1; in_r = r;
        do @(posedge clk); while (!in_ready);
        @(negedge clk); in_valid = 0;
      end
      repeat ($urandom_range(0, 2)) @(negedge clk);
      out_ready = 1;
      #1;
      v_exp = (ref_q.size() > 0) && r;
      check(out_valid, "output token offered");
      check(out_token[32] == v_exp, "V = valid && delayed ready");
      if (v_exp) check(out_token[31:0] == 32'(ref_q[0]), "D = queue head");
      @(posedge clk);
      if (mon_blocked) blocked++;
      if (mon_sent) sent++;
      @(negedge clk); out_ready = 0;
      can_enq = (ref_q.size() < 3);
      if (v_exp) void'(ref_q.pop_front());
      if (can_enq) begin ref_q.push_back(seq); seq++; end
      check(target_cycle == 32'(k + 1), "one target cycle per token pair");
    end
    check(blocked > 50, "valid held back by a low ready");
    check(sent > 300, "entries sent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
