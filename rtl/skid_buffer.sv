// skid_buffer: the buffer fast-mode inserts on the sink side of a ready-valid
// interface that crosses a partition boundary.
//
// In fast-mode every channel between the two partitions is seeded with one
// token, so the ready a sink produces in target cycle n reaches the source in
// cycle n+1, and the valid the source then sends reaches the sink in cycle
// n+2. A sink that says "ready" must therefore be able to take a beat two
// cycles later, whatever happens meanwhile. This buffer makes that promise
// safe: it accepts every arriving beat (in_valid), drains one beat per target
// cycle into the target's sink queue when that queue can take it
// (out_valid && out_ready), and asserts grant (the ready sent back to the
// source) only if the entries it holds after this cycle, plus the beat still in
// flight from last cycle's grant, plus one more, fit in DEPTH entries.
//
// All state changes happen on step, the host cycle in which the target cycle
// advances; grant is valid in that cycle. DEPTH = 3 keeps a stream of one beat
// per target cycle flowing when the sink drains continuously; the FireAxe description
// does not size the buffer, so the depth and this exact grant rule are this
// design's.
module skid_buffer #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 3
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         step,
  input  logic         in_valid,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] out_data,
  output logic         grant,
  output logic [$clog2(DEPTH+1)-1:0] occupancy
);
  localparam int unsigned CW = $clog2(DEPTH+1);

  logic          grant_q;       // grant of the previous target cycle, still in flight
  logic          enq_ready_unused;
  logic [CW+1:0] occ_next;

  wire move = out_valid && out_ready;

  token_queue #(.W(W), .DEPTH(DEPTH)) u_q (
    .clk, .rst,
    .enq_valid(step && in_valid), .enq_ready(enq_ready_unused), .enq_data(in_data),
    .deq_valid(out_valid), .deq_ready(step && move), .deq_data(out_data));

  always_comb begin
    occ_next = (CW+2)'(occupancy) + (CW+2)'(in_valid) - (CW+2)'(move);
    grant    = (occ_next + (CW+2)'(grant_q) + (CW+2)'(1)) <= (CW+2)'(DEPTH);
  end

  always_ff @(posedge clk) begin
    if (rst)       grant_q <= 1'b0;
    else if (step) grant_q <= grant;
  end

  // Occupancy mirror for the grant rule and for observation.
  always_ff @(posedge clk) begin
    if (rst)       occupancy <= '0;
    else if (step) occupancy <= CW'(occ_next);
  end

  // A beat only arrives when it was granted, so the buffer never overflows.
  assert property (@(posedge clk) disable iff (rst)
    step && in_valid |-> (enq_ready_unused || move));
endmodule
