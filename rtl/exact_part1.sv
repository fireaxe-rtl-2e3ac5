// exact_part1: LI-BDN 1 of the exact-mode two-FPGA partition example.
//
// Target logic (the small circuit used to explain exact-mode): a register X
// (reset value 1) and an adder P.
//   port A (input,  "sink in")  : feeds adder P combinationally
//   port B (input,  "source in"): next value of X, feeds only the register
//   port C (output, "source out"): X, depends on no input
//   port D (output, "sink out")  : P = A + X, depends combinationally on A
// Per target cycle: X <= B.
//
// Exact-mode keeps the target cycle-exact by giving source ports and sink ports
// separate channels. The C token can leave as soon as the cycle starts (it
// needs no input), so the partner can compute its own sink output and send it
// back; D leaves once A has arrived. Simulating one target cycle therefore
// takes two token exchanges over the link. Each input channel has a
// token_queue; each output channel is driven by an oFSM; the fire FSM advances
// the cycle when A and B are present and C and D have been sent.
//
// Interface: input channels are valid/ready/data into the internal queues,
// output channels are valid/ready/data towards the link. x_value and
// target_cycle are observation outputs. Widths (W) and queue depth are this
// design's choice.
module exact_part1 #(
  parameter int unsigned  W      = 32,
  parameter logic [W-1:0] X_INIT = W'(1)
) (
  input  logic         clk,
  input  logic         rst,
  // A: sink in
  input  logic         a_valid,
  output logic         a_ready,
  input  logic [W-1:0] a_data,
  // B: source in
  input  logic         b_valid,
  output logic         b_ready,
  input  logic [W-1:0] b_data,
  // C: source out
  output logic         c_valid,
  input  logic         c_ready,
  output logic [W-1:0] c_data,
  // D: sink out
  output logic         d_valid,
  input  logic         d_ready,
  output logic [W-1:0] d_data,
  // observation
  output logic [W-1:0] x_value,
  output logic [31:0]  target_cycle
);
  logic         qa_valid, qb_valid;
  logic [W-1:0] qa_data, qb_data;
  logic         fire, c_done, d_done;
  logic [1:0]   in_deq;
  logic [W-1:0] x_q;

  token_queue #(.W(W)) u_qa (
    .clk, .rst, .enq_valid(a_valid), .enq_ready(a_ready), .enq_data(a_data),
    .deq_valid(qa_valid), .deq_ready(in_deq[0]), .deq_data(qa_data));
  token_queue #(.W(W)) u_qb (
    .clk, .rst, .enq_valid(b_valid), .enq_ready(b_ready), .enq_data(b_data),
    .deq_valid(qb_valid), .deq_ready(in_deq[1]), .deq_data(qb_data));

  // Target combinational logic.
  assign c_data = x_q;
  assign d_data = qa_data + x_q;   // adder P

  libdn_output_fsm u_ofsm_c (
    .clk, .rst, .deps_valid(1'b1), .enq_ready(c_ready), .fire,
    .enq_valid(c_valid), .done(c_done));
  libdn_output_fsm u_ofsm_d (
    .clk, .rst, .deps_valid(qa_valid), .enq_ready(d_ready), .fire,
    .enq_valid(d_valid), .done(d_done));

  libdn_fire_fsm #(.N_IN(2), .N_OUT(2)) u_fire (
    .clk, .rst, .in_valid({qb_valid, qa_valid}), .out_done({d_done, c_done}),
    .fire, .in_deq, .target_cycle);

  // Target register X.
  always_ff @(posedge clk) begin
    if (rst)       x_q <= X_INIT;
    else if (fire) x_q <= qb_data;
  end

  assign x_value = x_q;
endmodule
