// fireaxe_top: the hardware side of partitioned FPGA-accelerated simulation,
// with three partitioned targets placed side by side.
//
//  1. Exact-mode pair (ex_*): exact_part1 and exact_part2, the two halves of a
//     target whose boundary has combinational paths in both directions. Each
//     half's source and sink channels are multiplexed onto one stream per
//     direction by link_tx / link_rx (channel 0 = source token, 1 = sink
//     token). One target cycle costs two crossings of the link.
//  2. Fast-mode pair (fm_*): fast_src_part and fast_sink_part, a ready-valid
//     interface split with one seeded channel per direction, valid gated by the
//     delayed ready on the source side and a skid buffer on the sink side. One
//     crossing per target cycle, both halves computing in parallel.
//  3. FAME-5 tile partition (f5_*): fame5_threads, N_THREADS duplicate tiles
//     sharing one datapath, one channel per thread in each direction, sent
//     over one stream each way. The partner partition is outside this top.
//  4. bus_latency_counter (lat_*): the NIC request-to-response counters,
//     standalone since the NIC they sit in is not part of this RTL.
//
// The FPGA-to-FPGA transport (Aurora core and QSFP cable, or PCIe peer-to-peer)
// is not part of this RTL: every partition's transmit stream leaves the top as
// an AXI4-Stream master (…_tx_*) and every receive stream enters as a slave
// (…_rx_*). Connect a tx to the matching rx, directly or through a model of a
// link with latency, to close the loop: ex_p1_tx to ex_p2_rx, ex_p2_tx to
// ex_p1_rx, fm_src_tx to fm_sink_rx, fm_sink_tx to fm_src_rx. The f5 streams
// talk to the other FPGA of that partition (the SoC side).
//
// Everything runs on one host clock with a synchronous active-high reset.
module fireaxe_top
  import fireaxe_pkg::*;
#(
  parameter int unsigned LINK_W    = LINK_W_DEFAULT,
  parameter int unsigned EX_W      = 32,
  parameter int unsigned FM_W      = 32,
  parameter int unsigned N_THREADS = 6,
  parameter int unsigned F5_W      = 64
) (
  input  logic clk,
  input  logic rst,

  // ---- exact-mode pair: partition 1 -> partition 2 stream (tokens C, D)
  output logic                ex_p1_tx_tvalid,
  input  logic                ex_p1_tx_tready,
  output logic [LINK_W-1:0]   ex_p1_tx_tdata,
  output logic                ex_p1_tx_tlast,
  output logic [0:0]          ex_p1_tx_tdest,
  input  logic                ex_p2_rx_tvalid,
  output logic                ex_p2_rx_tready,
  input  logic [LINK_W-1:0]   ex_p2_rx_tdata,
  input  logic                ex_p2_rx_tlast,
  input  logic [0:0]          ex_p2_rx_tdest,
  // ---- exact-mode pair: partition 2 -> partition 1 stream (tokens A, B)
  output logic                ex_p2_tx_tvalid,
  input  logic                ex_p2_tx_tready,
  output logic [LINK_W-1:0]   ex_p2_tx_tdata,
  output logic                ex_p2_tx_tlast,
  output logic [0:0]          ex_p2_tx_tdest,
  input  logic                ex_p1_rx_tvalid,
  output logic                ex_p1_rx_tready,
  input  logic [LINK_W-1:0]   ex_p1_rx_tdata,
  input  logic                ex_p1_rx_tlast,
  input  logic [0:0]          ex_p1_rx_tdest,
  output logic [EX_W-1:0]     ex_x,
  output logic [EX_W-1:0]     ex_y,
  output logic [31:0]         ex_p1_cycle,
  output logic [31:0]         ex_p2_cycle,

  // ---- fast-mode pair: source -> sink stream ({V, D}) and sink -> source (R)
  output logic                fm_src_tx_tvalid,
  input  logic                fm_src_tx_tready,
  output logic [LINK_W-1:0]   fm_src_tx_tdata,
  output logic                fm_src_tx_tlast,
  output logic [0:0]          fm_src_tx_tdest,
  input  logic                fm_sink_rx_tvalid,
  output logic                fm_sink_rx_tready,
  input  logic [LINK_W-1:0]   fm_sink_rx_tdata,
  input  logic                fm_sink_rx_tlast,
  input  logic [0:0]          fm_sink_rx_tdest,
  output logic                fm_sink_tx_tvalid,
  input  logic                fm_sink_tx_tready,
  output logic [LINK_W-1:0]   fm_sink_tx_tdata,
  output logic                fm_sink_tx_tlast,
  output logic [0:0]          fm_sink_tx_tdest,
  input  logic                fm_src_rx_tvalid,
  output logic                fm_src_rx_tready,
  input  logic [LINK_W-1:0]   fm_src_rx_tdata,
  input  logic                fm_src_rx_tlast,
  input  logic [0:0]          fm_src_rx_tdest,
  output logic                fm_sent,
  output logic [FM_W-1:0]     fm_sent_data,
  output logic                fm_blocked,
  output logic                fm_pop,
  output logic [FM_W-1:0]     fm_pop_data,
  output logic [1:0]          fm_skid_occ,
  output logic                fm_sink_full,
  output logic [31:0]         fm_src_cycle,
  output logic [31:0]         fm_sink_cycle,

  // ---- FAME-5 tile partition streams
  output logic                        f5_tx_tvalid,
  input  logic                        f5_tx_tready,
  output logic [LINK_W-1:0]           f5_tx_tdata,
  output logic                        f5_tx_tlast,
  output logic [idx_w(N_THREADS)-1:0] f5_tx_tdest,
  input  logic                        f5_rx_tvalid,
  output logic                        f5_rx_tready,
  input  logic [LINK_W-1:0]           f5_rx_tdata,
  input  logic                        f5_rx_tlast,
  input  logic [idx_w(N_THREADS)-1:0] f5_rx_tdest,
  output logic [$clog2(N_THREADS+1)-1:0] f5_thread,
  output logic [31:0]                 f5_cycle,

  // ---- NIC latency counters (index 0 = read, 1 = write)
  input  logic                lat_clear,
  input  logic [1:0]          lat_req_fire,
  input  logic [1:0]          lat_resp_fire,
  output logic [1:0][31:0]    lat_req_count,
  output logic [1:0][31:0]    lat_resp_count,
  output logic [1:0][31:0]    lat_outstanding,
  output logic [1:0][63:0]    lat_sum
);

  // ------------------------------------------------------------ exact mode
  logic [1:0]           p1_out_valid, p1_out_ready, p1_in_valid, p1_in_ready;
  logic [1:0][EX_W-1:0] p1_out_data, p1_in_data;
  logic [1:0]           p2_out_valid, p2_out_ready, p2_in_valid, p2_in_ready;
  logic [1:0][EX_W-1:0] p2_out_data, p2_in_data;

  // Partition 1: in ch0 = A (sink in), ch1 = B (source in); out ch0 = C, ch1 = D.
  exact_part1 #(.W(EX_W)) u_ex_p1 (
    .clk, .rst,
    .a_valid(p1_in_valid[0]), .a_ready(p1_in_ready[0]), .a_data(p1_in_data[0]),
    .b_valid(p1_in_valid[1]), .b_ready(p1_in_ready[1]), .b_data(p1_in_data[1]),
    .c_valid(p1_out_valid[0]), .c_ready(p1_out_ready[0]), .c_data(p1_out_data[0]),
    .d_valid(p1_out_valid[1]), .d_ready(p1_out_ready[1]), .d_data(p1_out_data[1]),
    .x_value(ex_x), .target_cycle(ex_p1_cycle));

  // Partition 2: in ch0 = C, ch1 = D; out ch0 = A, ch1 = B.
  exact_part2 #(.W(EX_W)) u_ex_p2 (
    .clk, .rst,
    .c_valid(p2_in_valid[0]), .c_ready(p2_in_ready[0]), .c_data(p2_in_data[0]),
    .d_valid(p2_in_valid[1]), .d_ready(p2_in_ready[1]), .d_data(p2_in_data[1]),
    .a_valid(p2_out_valid[0]), .a_ready(p2_out_ready[0]), .a_data(p2_out_data[0]),
    .b_valid(p2_out_valid[1]), .b_ready(p2_out_ready[1]), .b_data(p2_out_data[1]),
    .y_value(ex_y), .target_cycle(ex_p2_cycle));

  link_tx #(.N_CH(2), .TOK_W(EX_W), .LINK_W(LINK_W)) u_ex_p1_tx (
    .clk, .rst, .ch_valid(p1_out_valid), .ch_ready(p1_out_ready), .ch_data(p1_out_data),
    .m_tvalid(ex_p1_tx_tvalid), .m_tready(ex_p1_tx_tready), .m_tdata(ex_p1_tx_tdata),
    .m_tlast(ex_p1_tx_tlast), .m_tdest(ex_p1_tx_tdest));
  link_rx #(.N_CH(2), .TOK_W(EX_W), .LINK_W(LINK_W)) u_ex_p2_rx (
    .clk, .rst, .s_tvalid(ex_p2_rx_tvalid), .s_tready(ex_p2_rx_tready), .s_tdata(ex_p2_rx_tdata),
    .s_tlast(ex_p2_rx_tlast), .s_tdest(ex_p2_rx_tdest),
    .ch_valid(p2_in_valid), .ch_ready(p2_in_ready), .ch_data(p2_in_data));
  link_tx #(.N_CH(2), .TOK_W(EX_W), .LINK_W(LINK_W)) u_ex_p2_tx (
    .clk, .rst, .ch_valid(p2_out_valid), .ch_ready(p2_out_ready), .ch_data(p2_out_data),
    .m_tvalid(ex_p2_tx_tvalid), .m_tready(ex_p2_tx_tready), .m_tdata(ex_p2_tx_tdata),
    .m_tlast(ex_p2_tx_tlast), .m_tdest(ex_p2_tx_tdest));
  link_rx #(.N_CH(2), .TOK_W(EX_W), .LINK_W(LINK_W)) u_ex_p1_rx (
    .clk, .rst, .s_tvalid(ex_p1_rx_tvalid), .s_tready(ex_p1_rx_tready), .s_tdata(ex_p1_rx_tdata),
    .s_tlast(ex_p1_rx_tlast), .s_tdest(ex_p1_rx_tdest),
    .ch_valid(p1_in_valid), .ch_ready(p1_in_ready), .ch_data(p1_in_data));

  // ------------------------------------------------------------ fast mode
  logic             src_out_valid, src_out_ready, src_in_valid, src_in_ready;
  logic [FM_W:0]    src_out_token, sink_in_token;
  logic             sink_in_valid, sink_in_ready, sink_out_valid, sink_out_ready;
  logic             sink_out_r, src_in_r;

  fast_src_part #(.W(FM_W)) u_fm_src (
    .clk, .rst,
    .in_valid(src_in_valid), .in_ready(src_in_ready), .in_r(src_in_r),
    .out_valid(src_out_valid), .out_ready(src_out_ready), .out_token(src_out_token),
    .mon_sent(fm_sent), .mon_sent_data(fm_sent_data), .mon_blocked(fm_blocked),
    .target_cycle(fm_src_cycle));

  fast_sink_part #(.W(FM_W)) u_fm_sink (
    .clk, .rst,
    .in_valid(sink_in_valid), .in_ready(sink_in_ready), .in_token(sink_in_token),
    .out_valid(sink_out_valid), .out_ready(sink_out_ready), .out_r(sink_out_r),
    .mon_pop(fm_pop), .mon_pop_data(fm_pop_data), .mon_skid_occ(fm_skid_occ),
    .mon_sink_full(fm_sink_full), .target_cycle(fm_sink_cycle));

  link_tx #(.N_CH(1), .TOK_W(FM_W+1), .LINK_W(LINK_W)) u_fm_src_tx (
    .clk, .rst, .ch_valid(src_out_valid), .ch_ready(src_out_ready), .ch_data(src_out_token),
    .m_tvalid(fm_src_tx_tvalid), .m_tready(fm_src_tx_tready), .m_tdata(fm_src_tx_tdata),
    .m_tlast(fm_src_tx_tlast), .m_tdest(fm_src_tx_tdest));
  link_rx #(.N_CH(1), .TOK_W(FM_W+1), .LINK_W(LINK_W)) u_fm_sink_rx (
    .clk, .rst, .s_tvalid(fm_sink_rx_tvalid), .s_tready(fm_sink_rx_tready),
    .s_tdata(fm_sink_rx_tdata), .s_tlast(fm_sink_rx_tlast), .s_tdest(fm_sink_rx_tdest),
    .ch_valid(sink_in_valid), .ch_ready(sink_in_ready), .ch_data(sink_in_token));
  link_tx #(.N_CH(1), .TOK_W(1), .LINK_W(LINK_W)) u_fm_sink_tx (
    .clk, .rst, .ch_valid(sink_out_valid), .ch_ready(sink_out_ready), .ch_data(sink_out_r),
    .m_tvalid(fm_sink_tx_tvalid), .m_tready(fm_sink_tx_tready), .m_tdata(fm_sink_tx_tdata),
    .m_tlast(fm_sink_tx_tlast), .m_tdest(fm_sink_tx_tdest));
  link_rx #(.N_CH(1), .TOK_W(1), .LINK_W(LINK_W)) u_fm_src_rx (
    .clk, .rst, .s_tvalid(fm_src_rx_tvalid), .s_tready(fm_src_rx_tready),
    .s_tdata(fm_src_rx_tdata), .s_tlast(fm_src_rx_tlast), .s_tdest(fm_src_rx_tdest),
    .ch_valid(src_in_valid), .ch_ready(src_in_ready), .ch_data(src_in_r));

  // ------------------------------------------------------------ FAME-5 tiles
  logic [N_THREADS-1:0]           f5_in_valid, f5_in_ready, f5_out_valid, f5_out_ready;
  logic [N_THREADS-1:0][F5_W-1:0] f5_in_data, f5_out_data;

  fame5_threads #(.N_THREADS(N_THREADS), .W(F5_W)) u_f5 (
    .clk, .rst,
    .in_valid(f5_in_valid), .in_ready(f5_in_ready), .in_data(f5_in_data),
    .out_valid(f5_out_valid), .out_ready(f5_out_ready), .out_data(f5_out_data),
    .cur_thread(f5_thread), .target_cycle(f5_cycle));

  link_tx #(.N_CH(N_THREADS), .TOK_W(F5_W), .LINK_W(LINK_W)) u_f5_tx (
    .clk, .rst, .ch_valid(f5_out_valid), .ch_ready(f5_out_ready), .ch_data(f5_out_data),
    .m_tvalid(f5_tx_tvalid), .m_tready(f5_tx_tready), .m_tdata(f5_tx_tdata),
    .m_tlast(f5_tx_tlast), .m_tdest(f5_tx_tdest));
  link_rx #(.N_CH(N_THREADS), .TOK_W(F5_W), .LINK_W(LINK_W)) u_f5_rx (
    .clk, .rst, .s_tvalid(f5_rx_tvalid), .s_tready(f5_rx_tready), .s_tdata(f5_rx_tdata),
    .s_tlast(f5_rx_tlast), .s_tdest(f5_rx_tdest),
    .ch_valid(f5_in_valid), .ch_ready(f5_in_ready), .ch_data(f5_in_data));

  // ------------------------------------------------------------ NIC counters
  bus_latency_counter #(.CNT_W(32), .SUM_W(64)) u_lat (
    .clk, .rst, .clear(lat_clear), .req_fire(lat_req_fire), .resp_fire(lat_resp_fire),
    .req_count(lat_req_count), .resp_count(lat_resp_count),
    .outstanding(lat_outstanding), .lat_sum(lat_sum));
endmodule
