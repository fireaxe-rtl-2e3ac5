// tb_exact_part2: self-checking test of exact-mode partition 2.
// The testbench plays partition 1 from its own reference values of X and Y:
// it takes A (= Y, available without inputs), checks that B is withheld until
// C arrives, supplies C = X, checks B = C + 6, supplies D = Y + X and checks
// that Y becomes D + 6. The first cycle reproduces the worked example:
// tokens A = 2, C = 1, D = 3, B = 7, then Y = 9.
module tb_exact_part2;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        a_valid, a_ready, b_valid, b_ready, c_valid, c_ready, d_valid, d_ready;
  logic [31:0] a_data, b_data, c_data, d_data, y_value, target_cycle;
  exact_part2 dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send_c(input logic [31:0] v);
    c_valid = 1; c_data = v;
    do @(posedge clk); while (!c_ready);
    @(negedge clk); c_valid = 0;
  endtask

  task automatic send_d(input logic [31:0] v);
    d_valid = 1; d_data = v;
    do @(posedge clk); while (!d_ready);
    @(negedge clk); d_valid = 0;
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] xr, yr, atok, btok;
  initial begin
    a_ready = 0; b_ready = 0; c_valid = 0; d_valid = 0; c_data = 0; d_data = 0;
    xr = 1; yr = 2;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int k = 0; k < 200; k++) begin
      @(negedge clk);
      repeat ($urandom_range(0, 3)) @(negedge clk);
      check(a_valid, "A offered before any input token");
      check(!b_valid, "B withheld until C arrives");
      a_ready = 1;
      @(posedge clk); atok = a_data;
      @(negedge clk); a_ready = 0;
      check(atok == yr, "A = Y");
      send_c(xr);
      repeat ($urandom_range(0, 2)) @(negedge clk);
      check(b_valid, "B offered once C is present");
      b_ready = 1;
      @(posedge clk); btok = b_data;
      @(negedge clk); b_ready = 0;
      check(btok == xr + 32'd6, "B = C + 6");
      if (k == 0) check(atok == 2 && btok == 7, "worked example tokens A=2, B=7");
      send_d(atok + xr);
      @(negedge clk);
      check(target_cycle == 32'(k + 1), "target cycle advanced");
      check(y_value == atok + xr + 32'd6, "Y = D + 6");
      if (k == 0) check(y_value == 9, "worked example Y=9");
      xr = btok;
      yr = y_value;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
