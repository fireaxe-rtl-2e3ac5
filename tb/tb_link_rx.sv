// tb_link_rx: self-checking test of the token deserializer.
// Three channels of 70-bit tokens arrive as 3 beats of 32 bits each, tdest
// naming the channel, with random gaps and random channel-side back-pressure.
// Every token must come out on its own channel, whole and in order.
module tb_link_rx;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int N = 3, TW = 70, LW = 32, BEATS = 3;
  logic                 s_tvalid, s_tready, s_tlast;
  logic [LW-1:0]        s_tdata;
  logic [1:0]           s_tdest;
  logic [N-1:0]         ch_valid, ch_ready;
  logic [N-1:0][TW-1:0] ch_data;
  link_rx #(.N_CH(N), .TOK_W(TW), .LINK_W(LW)) dut (.*);

  logic [TW-1:0] exp_q [N][$];
  int got = 0;

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

  always_ff @(posedge clk) ch_ready <= N'($urandom);

  always @(posedge clk) if (!rst) begin
    for (int c = 0; c < N; c++) if (ch_valid[c] && ch_ready[c]) begin
      checks++;
      if (exp_q[c].size() == 0 || exp_q[c][0] != ch_data[c]) begin
        failures++; $display("FAIL: channel %0d token mismatch", c);
      end else void'(exp_q[c].pop_front());
      got++;
    end
    checks++;
    if ($countones(ch_valid) > 1) begin failures++; $display("FAIL: two channels valid"); end
  end

  initial begin
    logic [TW-1:0]       tok;
    logic [BEATS*LW-1:0] wide;
    int d;
    s_tvalid = 0; s_tlast = 0; s_tdata = 0; s_tdest = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int t = 0; t < 500; t++) begin
      tok = {6'($urandom), $urandom, $urandom};
      d   = $urandom_range(0, N - 1);
      exp_q[d].push_back(tok);
      wide = (BEATS*LW)'(tok);
      for (int b = 0; b < BEATS; b++) begin
        @(negedge clk);
        repeat ($urandom_range(0, 1)) @(negedge clk);
        s_tvalid = 1; s_tdata = wide[b*LW +: LW]; s_tlast = (b == BEATS - 1); s_tdest = 2'(d);
        do @(posedge clk); while (!s_tready);
        @(negedge clk); s_tvalid = 0;
      end
    end
    repeat (50) @(posedge clk);
    check(got == 500, "all tokens delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
