// tb_wide_boundary: the exact-mode partition pair with a partition boundary
// wider than 7000 bits, the size of the boundary of the large out-of-order
// core split in half across two FPGAs.
//
// Both exact-mode partitions are built with 7000-bit tokens and connected by
// link_tx / link_rx over 512-bit streams and 20-cycle link models. Checks:
// every token is 14 beats long (ceil(7000 / 512)), the wide registers follow
// X <= X + 6, Y <= Y + X + 6 from wide reset values (carries across the whole
// width), and a target cycle costs two link crossings plus the serialization
// of two 14-beat tokens.
module tb_wide_boundary;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int W = 7000, LW = 512, LAT = 20, BEATS = 14;
  localparam logic [W-1:0] XI = {1'b1, {(W-33){1'b0}}, 32'hFFFF_FFFE};
  localparam logic [W-1:0] YI = {2'b01, {(W-34){1'b1}}, 32'h0000_0002};

  logic [1:0]        p1o_v, p1o_r, p1i_v, p1i_r, p2o_v, p2o_r, p2i_v, p2i_r;
  logic [1:0][W-1:0] p1o_d, p1i_d, p2o_d, p2i_d;
  logic [W-1:0]      x_value, y_value;
  logic [31:0]       c1, c2;

  exact_part1 #(.W(W), .X_INIT(XI)) u_p1 (.clk, .rst,
    .a_valid(p1i_v[0]), .a_ready(p1i_r[0]), .a_data(p1i_d[0]),
    .b_valid(p1i_v[1]), .b_ready(p1i_r[1]), .b_data(p1i_d[1]),
    .c_valid(p1o_v[0]), .c_ready(p1o_r[0]), .c_data(p1o_d[0]),
    .d_valid(p1o_v[1]), .d_ready(p1o_r[1]), .d_data(p1o_d[1]),
    .x_value, .target_cycle(c1));
  exact_part2 #(.W(W), .Y_INIT(YI)) u_p2 (.clk, .rst,
    .c_valid(p2i_v[0]), .c_ready(p2i_r[0]), .c_data(p2i_d[0]),
    .d_valid(p2i_v[1]), .d_ready(p2i_r[1]), .d_data(p2i_d[1]),
    .a_valid(p2o_v[0]), .a_ready(p2o_r[0]), .a_data(p2o_d[0]),
    .b_valid(p2o_v[1]), .b_ready(p2o_r[1]), .b_data(p2o_d[1]),
    .y_value, .target_cycle(c2));

  logic t12_v, t12_r, t12_l, r12_v, r12_r, r12_l, t21_v, t21_r, t21_l, r21_v, r21_r, r21_l;
  logic [LW-1:0] t12_d, r12_d, t21_d, r21_d;
  logic [0:0] t12_k, r12_k, t21_k, r21_k;

  link_tx #(.N_CH(2), .TOK_W(W), .LINK_W(LW)) u_tx1 (.clk, .rst, .ch_valid(p1o_v), .ch_ready(p1o_r),
    .ch_data(p1o_d), .m_tvalid(t12_v), .m_tready(t12_r), .m_tdata(t12_d), .m_tlast(t12_l), .m_tdest(t12_k));
  axis_link_model #(.LINK_W(LW), .DEST_W(1), .LAT(LAT)) u_l12 (.clk, .rst,
    .s_tvalid(t12_v), .s_tready(t12_r), .s_tdata(t12_d), .s_tlast(t12_l), .s_tdest(t12_k),
    .m_tvalid(r12_v), .m_tready(r12_r), .m_tdata(r12_d), .m_tlast(r12_l), .m_tdest(r12_k));
  link_rx #(.N_CH(2), .TOK_W(W), .LINK_W(LW)) u_rx2 (.clk, .rst, .s_tvalid(r12_v), .s_tready(r12_r),
    .s_tdata(r12_d), .s_tlast(r12_l), .s_tdest(r12_k), .ch_valid(p2i_v), .ch_ready(p2i_r), .ch_data(p2i_d));
  link_tx #(.N_CH(2), .TOK_W(W), .LINK_W(LW)) u_tx2 (.clk, .rst, .ch_valid(p2o_v), .ch_ready(p2o_r),
    .ch_data(p2o_d), .m_tvalid(t21_v), .m_tready(t21_r), .m_tdata(t21_d), .m_tlast(t21_l), .m_tdest(t21_k));
  axis_link_model #(.LINK_W(LW), .DEST_W(1), .LAT(LAT)) u_l21 (.clk, .rst,
    .s_tvalid(t21_v), .s_tready(t21_r), .s_tdata(t21_d), .s_tlast(t21_l), .s_tdest(t21_k),
    .m_tvalid(r21_v), .m_tready(r21_r), .m_tdata(r21_d), .m_tlast(r21_l), .m_tdest(r21_k));
  link_rx #(.N_CH(2), .TOK_W(W), .LINK_W(LW)) u_rx1 (.clk, .rst, .s_tvalid(r21_v), .s_tready(r21_r),
    .s_tdata(r21_d), .s_tlast(r21_l), .s_tdest(r21_k), .ch_valid(p1i_v), .ch_ready(p1i_r), .ch_data(p1i_d));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Beat counting on the partition-1 transmit stream.
  int beat_run = 0, tokens = 0, bad_len = 0, host = 0;
  always @(posedge clk) if (!rst) begin
    host++;
    if (t12_v && t12_r) begin
      beat_run++;
      if (t12_l) begin
        if (beat_run != BEATS) bad_len++;
        beat_run = 0; tokens++;
      end
    end
  end

  initial begin
    logic [W-1:0] x, y;
    int h0, h1;
    repeat (3) @(posedge clk);
    rst = 0;
    wait (c1 == 5); h0 = host;
    wait (c1 == 25); h1 = host;
    wait (c1 == 40 && c2 == 40);
    @(negedge clk);
    x = XI; y = YI;
    for (int k = 0; k < 40; k++) begin y = y + x + W'(6); x = x + W'(6); end
    check(x_value == x, "wide X follows X + 6");
    check(y_value == y, "wide Y follows Y + X + 6");
    check(bad_len == 0 && tokens >= 80, "every 7000-bit token is 14 beats of 512 bits");
    check((h1 - h0) >= 20 * 2 * (LAT + BEATS), "two crossings plus two 14-beat tokens per target cycle");
    $display("host cycles per target cycle at 7000 bits: %0.1f", real'(h1 - h0) / 20.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
