// tb_fireaxe_top: end-to-end test of fireaxe_top at its default parameters.
//
// Each partition's streams are closed through a link model with a latency of
// LAT host cycles, standing in for the cable between two FPGAs; the FAME-5
// partition talks to a small behavioural partner that answers every tile's
// output token with an input token. The test runs all three partitioned
// targets at once and checks:
//  - exact mode: the source token C of every target cycle equals X, and after
//    the run X and Y match the reference recurrence X += 6, Y += X + 6; one
//    target cycle costs at least two link crossings (2 * LAT host cycles);
//  - fast mode: the sink's consumer sees 0, 1, 2, ... with nothing lost or
//    repeated; the seed tokens let both sides finish their first target cycle
//    before any token has crossed; the valid gate, the skid buffer and a full
//    sink queue each occur; a target cycle costs about one crossing, so fast
//    mode runs at least 1.5 times the exact-mode rate;
//  - FAME-5: threads answer in round-robin order with per-thread state;
//  - NIC counters: ten requests of latency 5 give a latency sum of 50.
module tb_fireaxe_top;
  import fireaxe_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int LAT = 20;
  localparam int LW = LINK_W_DEFAULT;
  localparam int NT = 6;

  // top ports
  logic ex_p1_tx_tvalid, ex_p1_tx_tready, ex_p1_tx_tlast, ex_p2_rx_tvalid, ex_p2_rx_tready, ex_p2_rx_tlast;
  logic ex_p2_tx_tvalid, ex_p2_tx_tready, ex_p2_tx_tlast, ex_p1_rx_tvalid, ex_p1_rx_tready, ex_p1_rx_tlast;
  logic [LW-1:0] ex_p1_tx_tdata, ex_p2_rx_tdata, ex_p2_tx_tdata, ex_p1_rx_tdata;
  logic [0:0] ex_p1_tx_tdest, ex_p2_rx_tdest, ex_p2_tx_tdest, ex_p1_rx_tdest;
  logic [31:0] ex_x, ex_y, ex_p1_cycle, ex_p2_cycle;
  logic fm_src_tx_tvalid, fm_src_tx_tready, fm_src_tx_tlast, fm_sink_rx_tvalid, fm_sink_rx_tready, fm_sink_rx_tlast;
  logic fm_sink_tx_tvalid, fm_sink_tx_tready, fm_sink_tx_tlast, fm_src_rx_tvalid, fm_src_rx_tready, fm_src_rx_tlast;
  logic [LW-1:0] fm_src_tx_tdata, fm_sink_rx_tdata, fm_sink_tx_tdata, fm_src_rx_tdata;
  logic [0:0] fm_src_tx_tdest, fm_sink_rx_tdest, fm_sink_tx_tdest, fm_src_rx_tdest;
  logic fm_sent, fm_blocked, fm_pop, fm_sink_full;
  logic [31:0] fm_sent_data, fm_pop_data, fm_src_cycle, fm_sink_cycle;
  logic [1:0] fm_skid_occ;
  logic f5_tx_tvalid, f5_tx_tready, f5_tx_tlast, f5_rx_tvalid, f5_rx_tready, f5_rx_tlast;
  logic [LW-1:0] f5_tx_tdata, f5_rx_tdata;
  logic [2:0] f5_tx_tdest, f5_rx_tdest;
  logic [2:0] f5_thread;
  logic [31:0] f5_cycle;
  logic lat_clear;
  logic [1:0] lat_req_fire, lat_resp_fire;
  logic [1:0][31:0] lat_req_count, lat_resp_count, lat_outstanding;
  logic [1:0][63:0] lat_sum;

  fireaxe_top dut (.*);

  // ---- links
  axis_link_model #(.LINK_W(LW), .DEST_W(1), .LAT(LAT)) u_l_ex12 (.clk, .rst,
    .s_tvalid(ex_p1_tx_tvalid), .s_tready(ex_p1_tx_tready), .s_tdata(ex_p1_tx_tdata), .s_tlast(ex_p1_tx_tlast), .s_tdest(ex_p1_tx_tdest),
    .m_tvalid(ex_p2_rx_tvalid), .m_tready(ex_p2_rx_tready), .m_tdata(ex_p2_rx_tdata), .m_tlast(ex_p2_rx_tlast), .m_tdest(ex_p2_rx_tdest));
  axis_link_model #(.LINK_W(LW), .DEST_W(1), .LAT(LAT)) u_l_ex21 (.clk, .rst,
    .s_tvalid(ex_p2_tx_tvalid), .s_tready(ex_p2_tx_tready), .s_tdata(ex_p2_tx_tdata), .s_tlast(ex_p2_tx_tlast), .s_tdest(ex_p2_tx_tdest),
    .m_tvalid(ex_p1_rx_tvalid), .m_tready(ex_p1_rx_tready), .m_tdata(ex_p1_rx_tdata), .m_tlast(ex_p1_rx_tlast), .m_tdest(ex_p1_rx_tdest));
  axis_link_model #(.LINK_W(LW), .DEST_W(1), .LAT(LAT)) u_l_fm12 (.clk, .rst,
    .s_tvalid(fm_src_tx_tvalid), .s_tready(fm_src_tx_tready), .s_tdata(fm_src_tx_tdata), .s_tlast(fm_src_tx_tlast), .s_tdest(fm_src_tx_tdest),
    .m_tvalid(fm_sink_rx_tvalid), .m_tready(fm_sink_rx_tready), .m_tdata(fm_sink_rx_tdata), .m_tlast(fm_sink_rx_tlast), .m_tdest(fm_sink_rx_tdest));
  axis_link_model #(.LINK_W(LW), .DEST_W(1), .LAT(LAT)) u_l_fm21 (.clk, .rst,
    .s_tvalid(fm_sink_tx_tvalid), .s_tready(fm_sink_tx_tready), .s_tdata(fm_sink_tx_tdata), .s_tlast(fm_sink_tx_tlast), .s_tdest(fm_sink_tx_tdest),
    .m_tvalid(fm_src_rx_tvalid), .m_tready(fm_src_rx_tready), .m_tdata(fm_src_rx_tdata), .m_tlast(fm_src_rx_tlast), .m_tdest(fm_src_rx_tdest));

  // FAME-5 partner: out to partner through one link, replies through another.
  logic p_tvalid, p_tlast;
  logic [LW-1:0] p_tdata;
  logic [2:0] p_tdest;
  logic r_tvalid;
  logic [LW-1:0] r_tdata;
  axis_link_model #(.LINK_W(LW), .DEST_W(3), .LAT(LAT)) u_l_f5out (.clk, .rst,
    .s_tvalid(f5_tx_tvalid), .s_tready(f5_tx_tready), .s_tdata(f5_tx_tdata), .s_tlast(f5_tx_tlast), .s_tdest(f5_tx_tdest),
    .m_tvalid(p_tvalid), .m_tready(1'b1), .m_tdata(p_tdata), .m_tlast(p_tlast), .m_tdest(p_tdest));
  function automatic logic [63:0] reply(logic [63:0] v, int t);
    return v * 64'd3 + 64'(t) + 64'd1;
  endfunction
  assign r_tvalid = p_tvalid;
  assign r_tdata  = LW'(reply(p_tdata[63:0], int'(p_tdest)));
  axis_link_model #(.LINK_W(LW), .DEST_W(3), .LAT(LAT)) u_l_f5in (.clk, .rst,
    .s_tvalid(r_tvalid), .s_tready(), .s_tdata(r_tdata), .s_tlast(p_tlast), .s_tdest(p_tdest),
    .m_tvalid(f5_rx_tvalid), .m_tready(f5_rx_tready), .m_tdata(f5_rx_tdata), .m_tlast(f5_rx_tlast), .m_tdest(f5_rx_tdest));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- monitors
  logic [31:0] xr = 1;
  int c_tokens = 0, ex_bad = 0;
  int next_pop = 0, pops = 0, fm_bad = 0, n_blocked = 0, n_skid = 0, n_full = 0;
  bit seed_seen = 0, first_rx_seen = 0;
  logic [63:0] f5_ref [NT];
  int f5_expect = 0, f5_bad = 0, f5_outs = 0;
  int host = 0;

  always @(posedge clk) if (!rst) begin
    host++;
    // exact mode: C tokens leave partition 1 on channel 0
    if (ex_p1_tx_tvalid && ex_p1_tx_tready && ex_p1_tx_tdest == 1'b0) begin
      if (ex_p1_tx_tdata[31:0] != xr) ex_bad++;
      xr = xr + 32'd6;
      c_tokens++;
    end
    // fast mode
    if (fm_pop) begin
      if (fm_pop_data != 32'(next_pop)) fm_bad++;
      next_pop++; pops++;
    end
    if (fm_blocked) n_blocked++;
    if (fm_skid_occ != 0 && fm_sink_full) n_skid++;
    if (fm_sink_full) n_full++;
    if (!first_rx_seen && fm_sink_rx_tvalid) begin
      first_rx_seen = 1;
      seed_seen = (fm_src_cycle >= 1) && (fm_sink_cycle >= 1);
    end
    // FAME-5
    if (f5_tx_tvalid && f5_tx_tready) begin
      if (int'(f5_tx_tdest) != f5_expect) f5_bad++;
      if (f5_tx_tdata[63:0] != f5_ref[f5_tx_tdest]) f5_bad++;
      f5_ref[f5_tx_tdest] = f5_ref[f5_tx_tdest] + reply(f5_ref[f5_tx_tdest], int'(f5_tx_tdest));
      f5_expect = (f5_expect + 1) % NT;
      f5_outs++;
    end
  end

  initial begin
    logic [31:0] x, y;
    int h_ex0, h_ex1, h_fm0, h_fm1;
    foreach (f5_ref[t]) f5_ref[t] = 0;
    lat_clear = 0; lat_req_fire = 0; lat_resp_fire = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    // NIC counters: ten reads, each answered 5 cycles later.
    for (int i = 0; i < 15; i++) begin
      @(negedge clk);
      lat_req_fire[0]  = (i < 10);
      lat_resp_fire[0] = (i >= 5);
    end
    @(negedge clk); lat_req_fire = 0; lat_resp_fire = 0;
    @(negedge clk);
    check(lat_resp_count[0] == 10 && lat_sum[0] == 64'd50, "NIC latency counters: 10 requests, sum 50");

    wait (ex_p1_cycle == 20 && fm_sink_cycle >= 20);
    h_ex0 = host; wait (ex_p1_cycle == 60); h_ex1 = host;
    wait (fm_sink_cycle >= 100); h_fm0 = host; wait (fm_sink_cycle >= 300); h_fm1 = host;
    wait (ex_p1_cycle >= 150 && ex_p2_cycle >= 150 && f5_cycle >= 40 && fm_sink_cycle >= 600);
    @(negedge clk);
    // exact-mode reference from the recurrence
    x = 1; y = 2;
    for (int k = 0; k < int'(ex_p1_cycle); k++) begin y = y + x + 6; x = x + 6; end
    check(ex_p1_cycle == ex_p2_cycle || ex_p1_cycle + 1 == ex_p2_cycle || ex_p2_cycle + 1 == ex_p1_cycle,
          "exact-mode partitions stay within one target cycle");
    check(ex_x == x, "exact mode: X matches reference");
    if (ex_p2_cycle == ex_p1_cycle) check(ex_y == y, "exact mode: Y matches reference");
    check(ex_bad == 0 && c_tokens >= 150, "exact mode: every C token equals X");
    check((h_ex1 - h_ex0) >= 40 * 2 * LAT, "exact mode: two link crossings per target cycle");
    check(fm_bad == 0 && pops > 200, "fast mode: consumer receives every entry once, in order");
    check(seed_seen, "fast mode: seed tokens let both sides run a cycle before any crossing");
    check(n_blocked > 0, "fast mode: valid gated by delayed ready");
    check(n_skid > 0, "fast mode: skid buffer held beats while the sink was full");
    check(n_full > 0, "fast mode: sink queue full (backpressure)");
    check(real'(h_ex1 - h_ex0) / 40.0 >= 1.5 * real'(h_fm1 - h_fm0) / 200.0,
          "fast mode at least 1.5x the exact-mode simulation rate");
    check(f5_bad == 0 && f5_outs >= 40 * NT, "FAME-5: round-robin threads with per-thread state");
    $display("host cycles per target cycle: exact %0.1f, fast %0.1f",
             real'(h_ex1 - h_ex0) / 40.0, real'(h_fm1 - h_fm0) / 200.0);
    $display("mechanisms: C tokens %0d, pops %0d, gated %0d, skid %0d, full %0d, f5 outputs %0d",
             c_tokens, pops, n_blocked, n_skid, n_full, f5_outs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
