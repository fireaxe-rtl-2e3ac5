// fame5_threads: N_THREADS duplicate target tiles simulated by one shared copy
// of their logic (FAME-5 multithreading).
//
// Instead of instantiating N identical tiles, the state of each tile is kept in
// a per-thread register array while the combinational logic exists once. A
// round-robin scheduler (thread pointer tptr) selects which thread's state is
// read, computed on and written back in a host cycle, so one target cycle of
// all N tiles takes at least N host cycles. Across a partition boundary this is
// cheap: the N-1 extra host cycles are small against the inter-FPGA latency.
//
// Each thread keeps its own LI-BDN channels: an input channel (with a
// token_queue) and an output channel. The stand-in tile (this design's; FireAxe
// itself threads full core tiles) is an accumulator: its output token is its
// register acc (no combinational path from its input) and each target cycle
// acc <= acc + input token. For the selected thread the output token is sent
// first (oFSM bit fired[t]); the thread fires, and the pointer moves on, once
// its input token is present and its output has been sent.
//
// Timing: a thread fires at most once per host cycle; target_cycle counts
// completed rounds over all threads.
module fame5_threads #(
  parameter int unsigned N_THREADS = 6,
  parameter int unsigned W         = 64
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic [N_THREADS-1:0]          in_valid,
  output logic [N_THREADS-1:0]          in_ready,
  input  logic [N_THREADS-1:0][W-1:0]   in_data,
  output logic [N_THREADS-1:0]          out_valid,
  input  logic [N_THREADS-1:0]          out_ready,
  output logic [N_THREADS-1:0][W-1:0]   out_data,
  output logic [$clog2(N_THREADS+1)-1:0] cur_thread,
  output logic [31:0]                   target_cycle
);
  localparam int unsigned TW = (N_THREADS > 1) ? $clog2(N_THREADS) : 1;

  logic [N_THREADS-1:0]        q_valid, q_deq;
  logic [N_THREADS-1:0][W-1:0] q_data;
  logic [W-1:0]                acc [N_THREADS];
  logic [N_THREADS-1:0]        fired;
  logic [TW-1:0]               tptr;

  for (genvar t = 0; t < N_THREADS; t++) begin : g_in
    token_queue #(.W(W)) u_q (
      .clk, .rst, .enq_valid(in_valid[t]), .enq_ready(in_ready[t]), .enq_data(in_data[t]),
      .deq_valid(q_valid[t]), .deq_ready(q_deq[t]), .deq_data(q_data[t]));
  end

  // Shared datapath: one read port on the thread state, one adder.
  logic [W-1:0] cur_acc, sum;
  logic         send, done, fire;
  always_comb begin
    cur_acc = acc[tptr];
    sum     = cur_acc + q_data[tptr];
    send    = !fired[tptr] && out_ready[tptr];
    done    = fired[tptr] || send;
    fire    = q_valid[tptr] && done;
    for (int unsigned t = 0; t < N_THREADS; t++) begin
      out_valid[t] = (TW'(t) == tptr) && !fired[t];
      out_data[t]  = cur_acc;
      q_deq[t]     = fire && (TW'(t) == tptr);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int unsigned t = 0; t < N_THREADS; t++) acc[t] <= '0;
      fired        <= '0;
      tptr         <= '0;
      target_cycle <= '0;
    end else if (fire) begin
      acc[tptr]   <= sum;
      fired[tptr] <= 1'b0;
      if (tptr == TW'(N_THREADS - 1)) begin
        tptr         <= '0;
        target_cycle <= target_cycle + 1'b1;
      end else begin
        tptr <= tptr + 1'b1;
      end
    end else if (send) begin
      fired[tptr] <= 1'b1;
    end
  end

  assign cur_thread = ($clog2(N_THREADS+1))'(tptr);

  // Exactly one thread is scheduled: only its output channel may be offered.
  assert property (@(posedge clk) disable iff (rst) $onehot0(out_valid));
endmodule
