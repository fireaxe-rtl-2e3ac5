// tb_link_tx: self-checking test of the token serializer.
// Three channels of 70-bit tokens over a 32-bit stream (3 beats per token),
// random token arrival and random stream back-pressure. The testbench
// reassembles beats by tdest and compares each channel's token sequence with
// what it offered, checks tlast framing and the one-idle-cycle-per-token cost.
module tb_link_tx;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int N = 3, TW = 70, LW = 32, BEATS = 3;
  logic [N-1:0]         ch_valid, ch_ready;
  logic [N-1:0][TW-1:0] ch_data;
  logic                 m_tvalid, m_tready, m_tlast;
  logic [LW-1:0]        m_tdata;
  logic [1:0]           m_tdest;
  link_tx #(.N_CH(N), .TOK_W(TW), .LINK_W(LW)) dut (.*);

  logic [TW-1:0] sent_q [N][$];
  logic [BEATS*LW-1:0] asm_buf;
  int beat = 0, got = 0, busy_cycles = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [TW-1:0] rnd_tok();
    return {6'($urandom), $urandom, $urandom};
  endfunction

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Producers: hold each offered token until taken.
  always_ff @(posedge clk) begin
    if (rst) begin
      ch_valid <= '0;
    end else begin
      for (int c = 0; c < N; c++) begin
        if (ch_valid[c] && ch_ready[c]) begin
          sent_q[c].push_back(ch_data[c]);
          ch_valid[c] <= 1'b0;
        end else if (!ch_valid[c] && $urandom_range(0, 3) == 0) begin
          ch_valid[c] <= 1'b1;
          ch_data[c]  <= rnd_tok();
        end
      end
    end
  end

  // Stream sink with random back-pressure (always ready in the rate phase).
  bit rate_phase = 0;
  always_ff @(posedge clk) m_tready <= rate_phase || ($urandom_range(0, 3) != 0);

  always @(posedge clk) if (!rst) begin
    if (m_tvalid && m_tready) begin
      asm_buf[beat*LW +: LW] = m_tdata;
      checks++;
      if (m_tlast != (beat == BEATS - 1)) begin failures++; $display("FAIL: tlast framing"); end
      if (m_tlast) begin
        checks++;
        if (sent_q[m_tdest].size() == 0 || sent_q[m_tdest][0] != asm_buf[TW-1:0]) begin
          failures++; $display("FAIL: token mismatch on channel %0d", m_tdest);
        end else void'(sent_q[m_tdest].pop_front());
        beat = 0; got++;
      end else beat++;
    end
  end

  initial begin
    m_tready = 0; ch_data = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    wait (got >= 600);
    check(1'b1, "600 tokens received");
    // Rate: with the stream always ready and tokens always waiting, one token
    // costs BEATS beats plus one capture cycle.
    rate_phase = 1;
    force ch_valid = '1;
    repeat (20) @(posedge clk);
    begin
      int g0;
      @(negedge clk); g0 = got;
      repeat (40 * (BEATS + 1)) @(negedge clk);
      check(got - g0 == 40, "one token per BEATS + 1 cycles");
    end
    release ch_valid;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
