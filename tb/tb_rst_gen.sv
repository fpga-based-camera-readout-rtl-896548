// tb_rst_gen -- self-checking test of the power-up reset generator.
//
// Two instances: one at the default timing (reset low from clock 25000 to
// clock 49900) and a short one (10 .. 30). For each the test records the
// clock edges at which reset_n falls and rises and checks there is exactly
// one low pulse, where it starts, how long it lasts, and that reset_n stays
// high for a long time afterwards.
module tb_rst_gen;

  logic clk = 0;
  logic rn_def, rn_small;
  int   checks = 0, failures = 0;
  int   cyc = 0;
  int   fall_def = -1, rise_def = -1, edges_def = 0;
  int   fall_small = -1, rise_small = -1, edges_small = 0;
  logic p_def = 1, p_small = 1;

  always #5 clk = !clk;

  rst_gen dut_def (.clk, .reset_n(rn_def));
  rst_gen #(.ASSERT_AT(10), .RELEASE_AT(30)) dut_small (.clk, .reset_n(rn_small));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // cyc counts clock edges; the value seen after edge k is sampled at negedge
  always @(negedge clk) begin
    if (rn_def != p_def) begin
      edges_def++;
      if (!rn_def) fall_def = cyc; else rise_def = cyc;
    end
    if (rn_small != p_small) begin
      edges_small++;
      if (!rn_small) fall_small = cyc; else rise_small = cyc;
    end
    p_def = rn_def;
    p_small = rn_small;
  end
  always @(posedge clk) cyc++;

  initial begin
    @(negedge clk);
    check(rn_def && rn_small, "reset_n high at power-up");
    repeat (80000) @(posedge clk);
    @(negedge clk);
    check(edges_def == 2, $sformatf("default: %0d edges", edges_def));
    check(fall_def == 25001, $sformatf("default: falls after edge %0d", fall_def));
    check(rise_def - fall_def == 49900 - 25000, $sformatf("default: low for %0d clocks", rise_def - fall_def));
    check(edges_small == 2, $sformatf("small: %0d edges", edges_small));
    check(fall_small == 11, $sformatf("small: falls after edge %0d", fall_small));
    check(rise_small - fall_small == 20, $sformatf("small: low for %0d clocks", rise_small - fall_small));
    check(rn_def && rn_small, "reset_n high at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
