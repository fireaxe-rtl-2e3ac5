// tb_fame5_threads: self-checking test of the FAME-5 multithreaded tiles.
// Six threads, each with its own input and output channel. The testbench
// feeds random input tokens to every thread, takes output tokens, and checks
// that threads are served strictly round robin, that thread t's k-th output is
// the sum of its first k inputs (state kept per thread, logic shared), and
// that with all tokens available one target cycle of six tiles takes exactly
// six host cycles.
module tb_fame5_threads;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int N = 6;
  logic [N-1:0]         in_valid, in_ready, out_valid, out_ready;
  logic [N-1:0][63:0]   in_data, out_data;
  logic [2:0]           cur_thread;
  logic [31:0]          target_cycle;
  fame5_threads dut (.*);

  logic [63:0] sent_in [N][$];
  int          nout [N];
  logic [63:0] ref_sum [N];
  int          expect_t = 0, gap_pct = 30;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Input drivers.
  always_ff @(posedge clk) begin
    if (rst) in_valid <= '0;
    else for (int t = 0; t < N; t++) begin
      if (in_valid[t] && in_ready[t]) begin
        sent_in[t].push_back(in_data[t]);
        in_valid[t] <= 1'b0;
      end
      if ((!in_valid[t] || in_ready[t]) && $urandom_range(0, 99) >= gap_pct) begin
        in_valid[t] <= 1'b1;
        in_data[t]  <= {$urandom, $urandom};
      end
    end
  end

  always_ff @(posedge clk) out_ready <= (gap_pct == 0) ? '1 : N'($urandom);

  // Output checker.
  always @(posedge clk) if (!rst) begin
    for (int t = 0; t < N; t++) if (out_valid[t] && out_ready[t]) begin
      checks += 2;
      if (t != expect_t) begin failures++; $display("FAIL: thread %0d out of turn", t); end
      // The k-th output of thread t is the sum of its first k inputs, all of
      // which were consumed by earlier firings of t.
      ref_sum[t] = 0;
      for (int i = 0; i < nout[t]; i++) ref_sum[t] += sent_in[t][i];
      if (out_data[t] != ref_sum[t]) begin failures++; $display("FAIL: thread %0d value", t); end
      nout[t]++;
      expect_t = (expect_t + 1) % N;
    end
  end

  initial begin
    int c0, h0;
    in_data = '0;
    foreach (ref_sum[t]) begin ref_sum[t] = 0; nout[t] = 0; end
    repeat (2) @(posedge clk);
    rst = 0;
    wait (target_cycle == 300);
    gap_pct = 0;
    wait (target_cycle == 320);
    @(negedge clk);
    c0 = target_cycle; h0 = 0;
    while (target_cycle < c0 + 50) begin @(negedge clk); h0++; end
    check(h0 == 50 * N, "N host cycles per target cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
