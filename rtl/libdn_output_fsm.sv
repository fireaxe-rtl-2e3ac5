// libdn_output_fsm: the one-bit output-channel FSM (oFSM) of an LI-BDN.
//
// Each output channel of an LI-BDN owns one of these. It offers the channel's
// token (enq_valid) as soon as every input channel the output depends on
// combinationally holds a token (deps_valid; tie it to 1 for an output driven
// only by registers). Once the token is taken (enq_valid && enq_ready) the FSM
// remembers that it has fired so the token is not sent twice, until the fire
// FSM advances the target cycle (fire), which re-arms it.
//
// done tells the fire FSM that this output has fired or is firing this cycle.
// Everything here follows the oFSM description of the LI-BDN; the port names
// are this design's.
module libdn_output_fsm (
  input  logic clk,
  input  logic rst,
  input  logic deps_valid,
  input  logic enq_ready,
  input  logic fire,
  output logic enq_valid,
  output logic done
);
  logic fired;

  assign enq_valid = deps_valid && !fired;
  assign done      = fired || (enq_valid && enq_ready);

  always_ff @(posedge clk) begin
    if (rst)                          fired <= 1'b0;
    else if (fire)                    fired <= 1'b0;
    else if (enq_valid && enq_ready)  fired <= 1'b1;
  end

  // The target cycle can only advance once this output has been produced.
  assert property (@(posedge clk) disable iff (rst) fire |-> done);
endmodule
