// tb_skid_buffer: self-checking test of the fast-mode skid buffer.
// The testbench models the other partition as seen through the seeded
// channels: a grant given in target cycle n lets the source send one beat that
// arrives in cycle n+2. The sink queue behind the buffer takes beats at random.
// Checks: every beat is delivered once and in order (nothing lost or
// duplicated, the buffer never overflows) and, with the sink always ready, one
// beat flows per target cycle.
module tb_skid_buffer;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        step, in_valid, out_valid, out_ready, grant;
  logic [15:0] in_data, out_data;
  logic [1:0]  occupancy;
  skid_buffer #(.W(16), .DEPTH(3)) dut (.*);

  bit   g_d1, g_d2;       // grants of cycles n-1 and n-2
  int   next_send = 0, next_exp = 0, moved = 0;
  int   drain_pct = 50;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic target_cycle();
    @(negedge clk);
    step      = 1;
    in_valid  = g_d2;                    // beat granted two cycles ago
    in_data   = 16'(next_send);
    out_ready = ($urandom_range(0, 99) < drain_pct);
    #1;
    if (out_valid && out_ready) begin
      check(out_data == 16'(next_exp), "beats leave in order");
      next_exp++; moved++;
    end
    @(posedge clk);
    if (in_valid) next_send++;
    g_d2 = g_d1;
    g_d1 = grant;
  endtask

  initial begin
    int m0;
    step = 0; in_valid = 0; in_data = 0; out_ready = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 3000; i++) target_cycle();
    check(next_exp > 500, "beats delivered under random drain");
    drain_pct = 100;
    for (int i = 0; i < 20; i++) target_cycle();
    m0 = moved;
    for (int i = 0; i < 100; i++) target_cycle();
    check(moved - m0 == 100, "one beat per target cycle with a free sink");
    drain_pct = 0;
    for (int i = 0; i < 10; i++) target_cycle();
    check(occupancy == 3 && !grant, "full buffer withholds grant");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
