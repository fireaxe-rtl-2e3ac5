// link_tx: packs the tokens of N_CH LI-BDN channels onto one inter-FPGA stream.
//
// Tokens leave a partition over a streaming link (AXI4-Stream, as exposed by
// the Aurora core driving a QSFP cable). A token of TOK_W bits is cut into
// BEATS = ceil(TOK_W / LINK_W) beats, least significant beat first; the last
// beat carries tlast and every beat carries the channel index in tdest so the
// far side can route the token back to its channel. This serialization is the
// cost that grows with the width of the partition boundary.
//
// Operation: when idle, the transmitter takes one token from the next valid
// channel in round-robin order (ch_ready pulses for that channel in that cycle)
// and then sends its beats, one per cycle while m_tready is high. A token
// therefore occupies the stream for BEATS cycles plus one idle cycle for
// the capture. The round-robin choice, tdest routing and the beat order are
// this design's; the FireAxe description gives only that tokens are (de)serialized onto
// the AXI4-Stream.
module link_tx
  import fireaxe_pkg::*;
#(
  parameter int unsigned N_CH   = 2,
  parameter int unsigned TOK_W  = 32,
  parameter int unsigned LINK_W = LINK_W_DEFAULT
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic [N_CH-1:0]             ch_valid,
  output logic [N_CH-1:0]             ch_ready,
  input  logic [N_CH-1:0][TOK_W-1:0]  ch_data,
  output logic                        m_tvalid,
  input  logic                        m_tready,
  output logic [LINK_W-1:0]           m_tdata,
  output logic                        m_tlast,
  output logic [idx_w(N_CH)-1:0]      m_tdest
);
  localparam int unsigned BEATS = link_beats(TOK_W, LINK_W);
  localparam int unsigned IW    = idx_w(N_CH);
  localparam int unsigned BW    = (BEATS > 1) ? $clog2(BEATS) : 1;

  logic                    busy;
  logic [BEATS*LINK_W-1:0] sbuf;
  logic [BW-1:0]           beat;
  logic [IW-1:0]           dest, rr;

  // Round-robin pick starting at rr.
  logic          pick_any;
  logic [IW-1:0] pick;
  always_comb begin
    pick_any = 1'b0;
    pick     = '0;
    for (int unsigned k = 0; k < N_CH; k++) begin
      int unsigned c;
      c = (int'(rr) + k) % N_CH;
      if (!pick_any && ch_valid[c]) begin
        pick_any = 1'b1;
        pick     = IW'(c);
      end
    end
  end

  always_comb begin
    ch_ready = '0;
    if (!busy && pick_any) ch_ready[pick] = 1'b1;
  end

  assign m_tvalid = busy;
  assign m_tdata  = sbuf[LINK_W-1:0];
  assign m_tlast  = (beat == BW'(BEATS - 1));
  assign m_tdest  = dest;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0;
      beat <= '0;
      dest <= '0;
      rr   <= '0;
      sbuf <= '0;
    end else if (!busy) begin
      if (pick_any) begin
        busy <= 1'b1;
        beat <= '0;
        dest <= pick;
        rr   <= (pick == IW'(N_CH - 1)) ? '0 : pick + 1'b1;
        sbuf <= (BEATS*LINK_W)'(ch_data[pick]);
      end
    end else if (m_tready) begin
      if (m_tlast) begin
        busy <= 1'b0;
      end else begin
        beat <= beat + 1'b1;
        sbuf <= sbuf >> LINK_W;
      end
    end
  end

  // AXI4-Stream: a beat that is offered stays offered, unchanged, until taken.
  assert property (@(posedge clk) disable iff (rst)
    m_tvalid && !m_tready |=> m_tvalid && $stable(m_tdata) && $stable(m_tlast) && $stable(m_tdest));
endmodule
