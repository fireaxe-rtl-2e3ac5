// bus_latency_counter: hardware counters that measure the average
// request-to-response latency of bus transactions, separately for reads and
// writes (index 0 = read, 1 = write), as placed in a NIC to see how long its
// DMA reads of transmit packets and writes of receive packets take in the
// last-level cache.
//
// For each kind the block counts requests issued (req_fire), responses received
// (resp_fire), the requests currently outstanding, and a latency sum that grows
// every cycle by the number of requests outstanding at the start of that cycle.
// A request issued in cycle a and answered in cycle b adds exactly b - a to the
// sum, so once nothing is outstanding
//     average latency = lat_sum / resp_count   (in cycles),
// computed by whoever reads the counters; no divider is built. clear zeroes
// everything. The FireAxe description gives what is measured; the outstanding-count
// method and the counter widths are this design's.
module bus_latency_counter #(
  parameter int unsigned CNT_W = 32,
  parameter int unsigned SUM_W = 64
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  clear,
  input  logic [1:0]            req_fire,
  input  logic [1:0]            resp_fire,
  output logic [1:0][CNT_W-1:0] req_count,
  output logic [1:0][CNT_W-1:0] resp_count,
  output logic [1:0][CNT_W-1:0] outstanding,
  output logic [1:0][SUM_W-1:0] lat_sum
);
  always_ff @(posedge clk) begin
    for (int k = 0; k < 2; k++) begin
      if (rst || clear) begin
        req_count[k]   <= '0;
        resp_count[k]  <= '0;
        outstanding[k] <= '0;
        lat_sum[k]     <= '0;
      end else begin
        req_count[k]   <= req_count[k] + CNT_W'(req_fire[k]);
        resp_count[k]  <= resp_count[k] + CNT_W'(resp_fire[k]);
        outstanding[k] <= outstanding[k] + CNT_W'(req_fire[k]) - CNT_W'(resp_fire[k]);
        lat_sum[k]     <= lat_sum[k] + SUM_W'(outstanding[k]);
      end
    end
  end

  // A response answers a request that was issued earlier (or in the same cycle).
  for (genvar k = 0; k < 2; k++) begin : g_chk
    assert property (@(posedge clk) disable iff (rst || clear)
      resp_fire[k] |-> (outstanding[k] != '0) || req_fire[k]);
  end
endmodule
