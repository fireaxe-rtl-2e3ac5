// axis_link_model: behavioural model of one direction of an FPGA-to-FPGA link
// (transceiver core plus cable), for simulation only.
//
// Every beat offered on the slave side is accepted at once and delivered, in
// order, on the master side LAT clock cycles later (or later still if the
// receiver back-pressures). The buffer is unbounded. Not synthesizable.
module axis_link_model #(
  parameter int unsigned LINK_W = 512,
  parameter int unsigned DEST_W = 1,
  parameter int unsigned LAT    = 20
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              s_tvalid,
  output logic              s_tready,
  input  logic [LINK_W-1:0] s_tdata,
  input  logic              s_tlast,
  input  logic [DEST_W-1:0] s_tdest,
  output logic              m_tvalid,
  input  logic              m_tready,
  output logic [LINK_W-1:0] m_tdata,
  output logic              m_tlast,
  output logic [DEST_W-1:0] m_tdest
);
  typedef struct {
    longint            due;
    logic [LINK_W-1:0] data;
    logic              last;
    logic [DEST_W-1:0] dest;
  } beat_t;

  beat_t  q [$];
  longint now = 0;
  int unsigned beats = 0;

  assign s_tready = 1'b1;

  always_comb begin
    m_tvalid = 1'b0;
    m_tdata  = '0;
    m_tlast  = 1'b0;
    m_tdest  = '0;
    if (q.size() > 0 && q[0].due <= now) begin
      m_tvalid = 1'b1;
      m_tdata  = q[0].data;
      m_tlast  = q[0].last;
      m_tdest  = q[0].dest;
    end
  end

  always @(posedge clk) begin
    if (rst) begin
      q.delete();
    end else begin
      if (m_tvalid && m_tready) void'(q.pop_front());
      if (s_tvalid) begin
        q.push_back('{due: now + LAT, data: s_tdata, last: s_tlast, dest: s_tdest});
        beats++;
      end
    end
    now++;
  end
endmodule
