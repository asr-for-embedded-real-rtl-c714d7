// Testbench of gmm_parallel_adder: random operand sets into the default 3-input adder and
// into a 5-input one (widths that do not fill the tree), sums compared with a plain
// sum and checked to arrive one cycle after their operands.
module tb_gmm_parallel_adder;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic signed [31:0] a4 [asr_gmm_pkg::N_LANES], a5 [5];
  logic v4, v5;
  logic signed [31:0] s4, s5;
  int exp4, exp5;

  gmm_parallel_adder                 dut4 (.clk, .rst_n, .in_valid, .in(a4), .out_valid(v4), .sum(s4));
  gmm_parallel_adder #(.N(5))        dut5 (.clk, .rst_n, .in_valid, .in(a5), .out_valid(v5), .sum(s5));

  always #5 clk = !clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (a4[i]) a4[i] = 0;
    foreach (a5[i]) a5[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      in_valid = 1;
      exp4 = 0; exp5 = 0;
      foreach (a4[i]) begin a4[i] = $signed($urandom_range(2000000)) - 1000000; exp4 += a4[i]; end
      foreach (a5[i]) begin a5[i] = $signed($urandom_range(2000000)) - 1000000; exp5 += a5[i]; end
      @(posedge clk); #1;
      checks += 2;
      if (!v4 || s4 != exp4) begin failures++; if (failures < 10) $display("FAIL default N sum=%0d exp=%0d", s4, exp4); end
      if (!v5 || s5 != exp5) begin failures++; if (failures < 10) $display("FAIL N=5 sum=%0d exp=%0d", s5, exp5); end
    end
    @(negedge clk); in_valid = 0;
    @(posedge clk); #1;
    checks++;
    if (v4 || v5) begin failures++; $display("FAIL valid stuck"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
