// link_rx: rebuilds tokens from an inter-FPGA stream and hands each to its
// channel.
//
// The inverse of link_tx. Beats arrive least significant first and are stored
// at increasing offsets of a TOK_W-wide assembly register; the beat with tlast
// completes the token, whose channel is given by tdest. The finished token is
// then held and offered on ch_valid[tdest] until that channel takes it; while a
// token is held the stream is back-pressured (s_tready low). A token thus costs
// BEATS stream cycles plus one hand-off cycle.
//
// Framing (tdest, tlast on the final beat) matches link_tx and is this design's
// choice.
module link_rx
  import fireaxe_pkg::*;
#(
  parameter int unsigned N_CH   = 2,
  parameter int unsigned TOK_W  = 32,
  parameter int unsigned LINK_W = LINK_W_DEFAULT
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        s_tvalid,
  output logic                        s_tready,
  input  logic [LINK_W-1:0]           s_tdata,
  input  logic                        s_tlast,
  input  logic [idx_w(N_CH)-1:0]      s_tdest,
  output logic [N_CH-1:0]             ch_valid,
  input  logic [N_CH-1:0]             ch_ready,
  output logic [N_CH-1:0][TOK_W-1:0]  ch_data
);
  localparam int unsigned BEATS = link_beats(TOK_W, LINK_W);
  localparam int unsigned IW    = idx_w(N_CH);
  localparam int unsigned BW    = (BEATS > 1) ? $clog2(BEATS) : 1;

  logic                    hold;
  logic [IW-1:0]           dest;
  logic [BW-1:0]           beat;
  logic [BEATS*LINK_W-1:0] abuf;

  assign s_tready = !hold;

  always_comb begin
    for (int unsigned c = 0; c < N_CH; c++) begin
      ch_valid[c] = hold && (dest == IW'(c));
      ch_data[c]  = abuf[TOK_W-1:0];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      hold <= 1'b0;
      dest <= '0;
      beat <= '0;
      abuf <= '0;
    end else if (hold) begin
      if (ch_ready[dest]) hold <= 1'b0;
    end else if (s_tvalid) begin
      abuf[beat*LINK_W +: LINK_W] <= s_tdata;
      if (s_tlast) begin
        hold <= 1'b1;
        dest <= s_tdest;
        beat <= '0;
      end else begin
        beat <= beat + 1'b1;
      end
    end
  end

  // The final beat of a token is exactly the BEATS-th one.
  assert property (@(posedge clk) disable iff (rst)
    s_tvalid && s_tready |-> (s_tlast == (beat == BW'(BEATS - 1))));
endmodule
