// tb_fast_sink_part: self-checking test of the fast-mode sink partition.
// The testbench plays a source that always has data and obeys the fast-mode
// rule through the seeded channels: the token it sends for sink cycle k has
// V = R of sink cycle k-2 (none before cycle 2). Checks: the consumer receives
// 0, 1, 2, ... with nothing lost or repeated, the sink queue fills so the skid
// buffer is used, and the consumer rate (one entry every 2 target cycles) is
// reached, i.e. backpressure costs no throughput.
module tb_fast_sink_part;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        in_valid, in_ready, out_valid, out_ready, out_r, mon_pop, mon_sink_full;
  logic [32:0] in_token;
  logic [31:0] mon_pop_data, target_cycle;
  logic [1:0]  mon_skid_occ;
  fast_sink_part dut (.*);

  bit r_hist [$];
  int next_d = 0, next_pop = 0, pops = 0, skid_used = 0, full_cycles = 0;

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

  always @(posedge clk) if (!rst && mon_pop) begin
    checks++;
    if (mon_pop_data != 32'(next_pop)) begin
      failures++; $display("FAIL: popped %0d expected %0d", mon_pop_data, next_pop);
    end
    next_pop++; pops++;
  end

  initial begin
    bit v;
    int p0;
    in_valid = 0; in_token = 0; out_ready = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int k = 0; k < 1200; k++) begin
      @(negedge clk);
      if (k > 0) begin
        v = (k >= 2) ? r_hist[k-2] : 1'b0;
        in_valid = 1; in_token = {v, 32'(next_d)};
        do @(posedge clk); while (!in_ready);
        @(negedge clk); in_valid = 0;
        if (v) next_d++;
      end
      repeat ($urandom_range(0, 2)) @(negedge clk);
      out_ready = 1;
      if (mon_skid_occ > 0 && mon_sink_full) skid_used++;
      if (mon_sink_full) full_cycles++;
      do @(posedge clk); while (!out_valid);
      r_hist.push_back(out_r);
      @(negedge clk); out_ready = 0;
      if (k == 200) p0 = pops;
      if (k == 1000) check(pops - p0 >= 398 && pops - p0 <= 401, "consumer rate of one per 2 cycles sustained");
    end
    check(target_cycle == 1200, "target cycles");
    check(pops > 500, "entries consumed");
    check(skid_used > 0, "skid buffer held beats while the sink was full");
    check(full_cycles > 0, "sink queue became full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
