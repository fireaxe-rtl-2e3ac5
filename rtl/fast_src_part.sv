// fast_src_part: the source-side partition (LI-BDN 1) of a ready-valid
// interface split across two FPGAs in fast-mode.
//
// Target: a source queue of SRC_DEPTH entries whose head drives the data and
// valid of a ready-valid interface that leaves the partition. A stand-in
// producer (this design's, so that the example moves data) writes the
// sequence 0, 1, 2, ... into the queue whenever it has room.
//
// Fast-mode wrapping: all inputs of the partition form one channel (here the
// single ready bit R) and all outputs one channel (the token {V, D}); the
// input queue comes out of reset holding a seed token R = 0, so this side can
// simulate its first target cycle without waiting for the other FPGA. The
// seed adds one target cycle of latency in each direction, so fast-mode also
// rewrites the interface: the valid sent is valid && R (R being the ready the
// sink produced one cycle earlier), and the head entry leaves the queue exactly
// when that gated valid is sent. A request is thus sent once and only once
// the sink has promised room for it (see skid_buffer).
//
// Timing: one target cycle per host cycle in which the R token is present and
// the {V, D} token is taken. Observation outputs report each beat sent and
// each cycle the gate held a valid entry back.
module fast_src_part #(
  parameter int unsigned W         = 32,
  parameter int unsigned SRC_DEPTH = 3
) (
  input  logic         clk,
  input  logic         rst,
  // input channel: R
  input  logic         in_valid,
  output logic         in_ready,
  input  logic         in_r,
  // output channel: {V, D}
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W:0]   out_token,
  // observation
  output logic         mon_sent,
  output logic [W-1:0] mon_sent_data,
  output logic         mon_blocked,
  output logic [31:0]  target_cycle
);
  logic         r_valid, r_tok, fire, out_done;
  logic         in_deq;
  logic         src_valid, src_enq_ready;
  logic [W-1:0] src_head, seq_q;

  token_queue #(.W(1), .DEPTH(2), .SEED(1'b1), .SEED_VALUE(1'b0)) u_qin (
    .clk, .rst, .enq_valid(in_valid), .enq_ready(in_ready), .enq_data(in_r),
    .deq_valid(r_valid), .deq_ready(in_deq), .deq_data(r_tok));

  // Gated valid: the modification that keeps backpressure intact.
  wire v_send = src_valid && r_tok;

  token_queue #(.W(W), .DEPTH(SRC_DEPTH)) u_src (
    .clk, .rst,
    .enq_valid(fire), .enq_ready(src_enq_ready), .enq_data(seq_q),
    .deq_valid(src_valid), .deq_ready(fire && v_send), .deq_data(src_head));

  assign out_token = {v_send, src_head};

  // In fast-mode every output is treated as depending on every input.
  libdn_output_fsm u_ofsm (
    .clk, .rst, .deps_valid(r_valid), .enq_ready(out_ready), .fire,
    .enq_valid(out_valid), .done(out_done));
  libdn_fire_fsm #(.N_IN(1), .N_OUT(1)) u_fire (
    .clk, .rst, .in_valid(r_valid), .out_done(out_done),
    .fire, .in_deq, .target_cycle);

  // Stand-in producer: next sequence number goes in when the queue has room.
  always_ff @(posedge clk) begin
    if (rst)                        seq_q <= '0;
    else if (fire && src_enq_ready) seq_q <= seq_q + 1'b1;
  end

  assign mon_sent      = fire && v_send;
  assign mon_sent_data = src_head;
  assign mon_blocked   = fire && src_valid && !r_tok;
endmodule
