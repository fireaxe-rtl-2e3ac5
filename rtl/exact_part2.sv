// exact_part2: LI-BDN 2 of the exact-mode two-FPGA partition example.
//
// Target logic: a register Y (reset value 2), a register holding the constant
// 6 (nothing writes it, so it is the parameter K), adder Q and a second adder.
//   port C (input,  sink for this side): feeds adder Q combinationally
//   port D (input,  source for this side): feeds only the Y adder
//   port A (output): Y, depends on no input
//   port B (output): Q = C + K, depends combinationally on C
// Per target cycle: Y <= D + K.
//
// Together with exact_part1 the pair computes, per target cycle,
//   X <= X + K  and  Y <= Y + X + K,
// starting from X = 1, Y = 2: the first cycle sends tokens A = 2, C = 1 and then
// D = 3, B = 7, after which X = 7 and Y = 9.
//
// Interface and channel machinery are as in exact_part1: one token_queue per
// input channel, one oFSM per output channel and a fire FSM. W is this
// design's choice.
module exact_part2 #(
  parameter int unsigned  W      = 32,
  parameter logic [W-1:0] Y_INIT = W'(2),
  parameter logic [W-1:0] K      = W'(6)
) (
  input  logic         clk,
  input  logic         rst,
  // C: input, combinationally feeds B
  input  logic         c_valid,
  output logic         c_ready,
  input  logic [W-1:0] c_data,
  // D: input, feeds register Y
  input  logic         d_valid,
  output logic         d_ready,
  input  logic [W-1:0] d_data,
  // A: output, register Y
  output logic         a_valid,
  input  logic         a_ready,
  output logic [W-1:0] a_data,
  // B: output, adder Q
  output logic         b_valid,
  input  logic         b_ready,
  output logic [W-1:0] b_data,
  // observation
  output logic [W-1:0] y_value,
  output logic [31:0]  target_cycle
);
  logic         qc_valid, qd_valid;
  logic [W-1:0] qc_data, qd_data;
  logic         fire, a_done, b_done;
  logic [1:0]   in_deq;
  logic [W-1:0] y_q;

  token_queue #(.W(W)) u_qc (
    .clk, .rst, .enq_valid(c_valid), .enq_ready(c_ready), .enq_data(c_data),
    .deq_valid(qc_valid), .deq_ready(in_deq[0]), .deq_data(qc_data));
  token_queue #(.W(W)) u_qd (
    .clk, .rst, .enq_valid(d_valid), .enq_ready(d_ready), .enq_data(d_data),
    .deq_valid(qd_valid), .deq_ready(in_deq[1]), .deq_data(qd_data));

  assign a_data = y_q;
  assign b_data = qc_data + K;     // adder Q

  libdn_output_fsm u_ofsm_a (
    .clk, .rst, .deps_valid(1'b1), .enq_ready(a_ready), .fire,
    .enq_valid(a_valid), .done(a_done));
  libdn_output_fsm u_ofsm_b (
    .clk, .rst, .deps_valid(qc_valid), .enq_ready(b_ready), .fire,
    .enq_valid(b_valid), .done(b_done));

  libdn_fire_fsm #(.N_IN(2), .N_OUT(2)) u_fire (
    .clk, .rst, .in_valid({qd_valid, qc_valid}), .out_done({b_done, a_done}),
    .fire, .in_deq, .target_cycle);

  always_ff @(posedge clk) begin
    if (rst)       y_q <= Y_INIT;
    else if (fire) y_q <= qd_data + K;
  end

  assign y_value = y_q;
endmodule
