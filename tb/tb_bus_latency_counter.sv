// tb_bus_latency_counter: self-checking test of the request-to-response
// latency counters. Random read and write requests are answered in order after
// random delays of 1 to 20 cycles; the testbench records each request's issue
// cycle and adds up the true latencies. After the traffic drains, the request
// and response counts and the latency sums must match exactly. A clear is
// checked too.
module tb_bus_latency_counter;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic             clear;
  logic [1:0]       req_fire, resp_fire;
  logic [1:0][31:0] req_count, resp_count, outstanding;
  logic [1:0][63:0] lat_sum;
  bus_latency_counter dut (.*);

  int  issue_t [2][$];
  int  due_t   [2][$];
  longint ref_sum [2];
  int  nreq [2], cyc = 0;
  bit  issuing = 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (!rst) begin
    for (int k = 0; k < 2; k++) begin
      req_fire[k]  = issuing && ($urandom_range(0, 99) < 20);
      resp_fire[k] = (due_t[k].size() > 0) && (due_t[k][0] <= cyc);
      if (resp_fire[k]) begin
        ref_sum[k] += longint'(cyc - issue_t[k][0]);
        void'(issue_t[k].pop_front());
        void'(due_t[k].pop_front());
      end
      if (req_fire[k]) begin
        issue_t[k].push_back(cyc);
        due_t[k].push_back(cyc + $urandom_range(1, 20));
        nreq[k]++;
      end
    end
    cyc++;
  end

  initial begin
    clear = 0; req_fire = 0; resp_fire = 0;
    ref_sum[0] = 0; ref_sum[1] = 0; nreq[0] = 0; nreq[1] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 0;
    repeat (3000) @(posedge clk);
    issuing = 0;
    wait (due_t[0].size() == 0 && due_t[1].size() == 0);
    repeat (3) @(posedge clk);
    @(negedge clk);
    for (int k = 0; k < 2; k++) begin
      check(req_count[k] == 32'(nreq[k]), "request count");
      check(resp_count[k] == 32'(nreq[k]), "response count");
      check(outstanding[k] == 0, "nothing outstanding");
      check(lat_sum[k] == 64'(ref_sum[k]), "latency sum equals true latencies");
      $display("kind %0d: %0d transactions, average latency %0.2f cycles", k, nreq[k],
               real'(lat_sum[k]) / real'(resp_count[k]));
    end
    clear = 1; @(negedge clk); clear = 0;
    check(req_count == '0 && lat_sum == '0, "clear zeroes the counters");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
