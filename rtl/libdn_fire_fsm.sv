// libdn_fire_fsm: the fire FSM of an LI-BDN, which decides when the wrapped
// target advances one cycle.
//
// fire is asserted in a host cycle where every input channel holds a token
// (in_valid all ones) and every output channel has fired or is firing now
// (out_done all ones). In that host cycle the target's registers update, every
// input token is dequeued (in_deq) and the output FSMs re-arm. The FSM also
// counts the target cycles simulated so far (target_cycle), which a host reads
// to know how far the simulation has progressed.
//
// The firing rule is the LI-BDN rule; the cycle counter and its width are this
// design's additions.
module libdn_fire_fsm #(
  parameter int unsigned N_IN    = 2,
  parameter int unsigned N_OUT   = 2,
  parameter int unsigned CYCLE_W = 32
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [N_IN-1:0]    in_valid,
  input  logic [N_OUT-1:0]   out_done,
  output logic               fire,
  output logic [N_IN-1:0]    in_deq,
  output logic [CYCLE_W-1:0] target_cycle
);
  assign fire   = (&in_valid) && (&out_done);
  assign in_deq = {N_IN{fire}};

  always_ff @(posedge clk) begin
    if (rst)       target_cycle <= '0;
    else if (fire) target_cycle <= target_cycle + 1'b1;
  end
endmodule
