// token_queue: one latency-insensitive channel queue of an LI-BDN.
//
// A channel carries one token per simulated target cycle between a producer and
// a consumer that run on the host clock; the queue decouples the two. It is a
// plain synchronous FIFO with valid/ready on both sides: a token is written when
// enq_valid && enq_ready and removed when deq_valid && deq_ready, in the same
// cycle if both happen. deq_data is the head entry (no read latency).
//
// SEED = 1 makes the queue come out of reset already holding one token of value
// SEED_VALUE. This is how fast-mode seeds each side of a partition so that both
// sides can simulate their first target cycle in parallel; it injects one target
// cycle of latency into the channel. The queue depth (DEPTH) is not given by the
// design and is a parameter; two entries let producer and consumer overlap.
module token_queue #(
  parameter int unsigned   W          = 32,
  parameter int unsigned   DEPTH      = 2,
  parameter bit            SEED       = 1'b0,
  parameter logic [W-1:0]  SEED_VALUE = '0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         enq_valid,
  output logic         enq_ready,
  input  logic [W-1:0] enq_data,
  output logic         deq_valid,
  input  logic         deq_ready,
  output logic [W-1:0] deq_data
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] head, tail;
  logic [AW:0]   count;

  wire do_enq = enq_valid && enq_ready;
  wire do_deq = deq_valid && deq_ready;

  assign enq_ready = (count < (AW+1)'(DEPTH));
  assign deq_valid = (count != '0);
  assign deq_data  = mem[head];

  function automatic logic [AW-1:0] wrap_inc(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      head  <= '0;
      tail  <= SEED ? wrap_inc('0) : '0;
      count <= SEED ? (AW+1)'(1) : '0;
      mem[0] <= SEED_VALUE;
    end else begin
      if (do_enq) begin
        mem[tail] <= enq_data;
        tail      <= wrap_inc(tail);
      end
      if (do_deq) head <= wrap_inc(head);
      count <= count + (AW+1)'(do_enq) - (AW+1)'(do_deq);
    end
  end

  // A queue never holds more than DEPTH tokens.
  assert property (@(posedge clk) disable iff (rst) count <= (AW+1)'(DEPTH));
endmodule
