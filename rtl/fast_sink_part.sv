// fast_sink_part: the sink-side partition (LI-BDN 2) of a ready-valid
// interface split across two FPGAs in fast-mode.
//
// Target: a sink queue of SINK_DEPTH entries (two in the example) drained by a
// stand-in consumer that takes one entry every CONSUME_EVERY target cycles
// (this design's, chosen slower than the source so that the queue fills and
// backpressure is exercised).
//
// Fast-mode wrapping: one input channel carrying the token {V, D} and one
// output channel carrying R. The input queue comes out of reset holding the
// seed token {V = 0, D = 0}. Between the incoming beat and the sink queue sits
// the skid_buffer that fast-mode inserts; it moves a beat on when the sink
// queue has room (valid and not-full, the gate in front of the queue) and
// produces R, the ready promise sent back to the source.
//
// Timing: one target cycle per host cycle in which the {V, D} token is present
// and the R token is taken. Observation outputs report each entry the consumer
// takes, the skid buffer occupancy and whether the sink queue is full.
module fast_sink_part #(
  parameter int unsigned W             = 32,
  parameter int unsigned SINK_DEPTH    = 2,
  parameter int unsigned SKID_DEPTH    = 3,
  parameter int unsigned CONSUME_EVERY = 2
) (
  input  logic         clk,
  input  logic         rst,
  // input channel: {V, D}
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W:0]   in_token,
  // output channel: R
  output logic         out_valid,
  input  logic         out_ready,
  output logic         out_r,
  // observation
  output logic         mon_pop,
  output logic [W-1:0] mon_pop_data,
  output logic [$clog2(SKID_DEPTH+1)-1:0] mon_skid_occ,
  output logic         mon_sink_full,
  output logic [31:0]  target_cycle
);
  localparam int unsigned PW = (CONSUME_EVERY > 1) ? $clog2(CONSUME_EVERY) : 1;

  logic         tok_valid, fire, out_done, in_deq;
  logic [W:0]   tok;
  logic         skid_valid, sink_enq_ready, sink_valid;
  logic [W-1:0] skid_data, sink_head;
  logic [PW-1:0] phase;

  token_queue #(.W(W+1), .DEPTH(2), .SEED(1'b1), .SEED_VALUE('0)) u_qin (
    .clk, .rst, .enq_valid(in_valid), .enq_ready(in_ready), .enq_data(in_token),
    .deq_valid(tok_valid), .deq_ready(in_deq), .deq_data(tok));

  skid_buffer #(.W(W), .DEPTH(SKID_DEPTH)) u_skid (
    .clk, .rst, .step(fire),
    .in_valid(tok[W]), .in_data(tok[W-1:0]),
    .out_valid(skid_valid), .out_ready(sink_enq_ready), .out_data(skid_data),
    .grant(out_r), .occupancy(mon_skid_occ));

  wire pop = sink_valid && (phase == '0);

  token_queue #(.W(W), .DEPTH(SINK_DEPTH)) u_sink (
    .clk, .rst,
    .enq_valid(fire && skid_valid), .enq_ready(sink_enq_ready), .enq_data(skid_data),
    .deq_valid(sink_valid), .deq_ready(fire && pop), .deq_data(sink_head));

  libdn_output_fsm u_ofsm (
    .clk, .rst, .deps_valid(tok_valid), .enq_ready(out_ready), .fire,
    .enq_valid(out_valid), .done(out_done));
  libdn_fire_fsm #(.N_IN(1), .N_OUT(1)) u_fire (
    .clk, .rst, .in_valid(tok_valid), .out_done(out_done),
    .fire, .in_deq, .target_cycle);

  always_ff @(posedge clk) begin
    if (rst)       phase <= '0;
    else if (fire) phase <= (phase == PW'(CONSUME_EVERY - 1)) ? '0 : phase + 1'b1;
  end

  assign mon_pop       = fire && pop;
  assign mon_pop_data  = sink_head;
  assign mon_sink_full = !sink_enq_ready;
endmodule
