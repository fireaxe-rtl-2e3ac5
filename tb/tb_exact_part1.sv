// tb_exact_part1: self-checking test of exact-mode partition 1.
// The testbench plays partition 2 from its own reference values of X and Y:
// it takes the source-out token C (which must be available before any input
// arrives), checks that the sink-out token D is withheld until A is given,
// then supplies A, checks D = A + X, supplies B = C + 6 and checks that the
// target register and cycle count advance.
module tb_exact_part1;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        a_valid, a_ready, b_valid, b_ready, c_valid, c_ready, d_valid, d_ready;
  logic [31:0] a_data, b_data, c_data, d_data, x_value, target_cycle;
  exact_part1 dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send_a(input logic [31:0] v);
    a_valid = 1; a_data = v;
    do @(posedge clk); while (!a_ready);
    @(negedge clk); a_valid = 0;
  endtask

  task automatic send_b(input logic [31:0] v);
    b_valid = 1; b_data = v;
    do @(posedge clk); while (!b_ready);
    @(negedge clk); b_valid = 0;
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] xr, yr, ctok, dtok;
  initial begin
    a_valid = 0; b_valid = 0; c_ready = 0; d_ready = 0; a_data = 0; b_data = 0;
    xr = 1; yr = 2;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int k = 0; k < 200; k++) begin
      @(negedge clk);
      repeat ($urandom_range(0, 3)) @(negedge clk);
      // Step 1: source-out token C needs no input.
      check(c_valid, "C offered before any input token");
      check(!d_valid, "D withheld until A arrives");
      c_ready = 1;
      @(posedge clk); ctok = c_data;
      @(negedge clk); c_ready = 0;
      check(ctok == xr, "C = X");
      check(!c_valid, "C sent only once per target cycle");
      send_a(yr);
      // Step 2: sink-out token D depends on A.
      repeat ($urandom_range(0, 2)) @(negedge clk);
      check(d_valid, "D offered once A is present");
      d_ready = 1;
      @(posedge clk); dtok = d_data;
      @(negedge clk); d_ready = 0;
      check(dtok == yr + xr, "D = A + X");
      // Step 3: partner's B closes the target cycle.
      check(target_cycle == 32'(k), "cycle not yet advanced");
      send_b(ctok + 32'd6);
      @(negedge clk);
      xr = ctok + 32'd6;
      yr = dtok + 32'd6;
      check(target_cycle == 32'(k + 1), "target cycle advanced");
      check(x_value == xr, "X updated from B");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
