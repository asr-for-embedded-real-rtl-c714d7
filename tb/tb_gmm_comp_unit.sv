// Testbench of gmm_comp_unit: a random stream of (o, mu, v, en) with random gaps, every
// result compared with ((o - mu)^2 v) >>> 21 from the reference model and checked to
// arrive exactly 3 cycles after its operands. Includes the extreme operand values.
module tb_gmm_comp_unit;
  import asr_gmm_pkg::*;
  import tb_gmm_ref_pkg::*;

  localparam int LAT = 3;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, en = 0;
  logic signed [15:0] o = 0, mu = 0, v = 0;
  logic out_valid;
  logic signed [31:0] term;
  longint exp_q [$];
  int     t_q [$];
  int     cyc = 0;

  gmm_comp_unit dut (.clk, .rst_n, .in_valid, .en, .o, .mu, .v, .out_valid, .term);

  always #5 clk = !clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // scoreboard
  always @(posedge clk) if (rst_n && out_valid) begin
    longint e; int t;
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("FAIL unexpected output"); end
    else begin
      e = exp_q.pop_front(); t = t_q.pop_front();
      if (longint'(term) != e || cyc - t != LAT) begin
        failures++;
        if (failures < 10) $display("FAIL term=%0d exp=%0d latency=%0d", term, e, cyc - t);
      end
    end
  end

  task automatic drive(int oi, int mi, int vi, bit ei);
    @(negedge clk);
    in_valid = 1; o = 16'(oi); mu = 16'(mi); v = 16'(vi); en = ei;
    exp_q.push_back(ei ? ref_term(oi, mi, vi) : 0);
    t_q.push_back(cyc);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    drive(32767, -32768, -32768, 1);
    drive(-32768, 32767, 32767, 1);
    drive(256, 0, -256, 1);         // (1.0)^2 * -1.0 = -1.0 -> -8 in log units
    drive(1000, 3000, -100, 0);     // masked lane
    for (int i = 0; i < 3000; i++) begin
      if ($urandom_range(3) == 0) begin @(negedge clk); in_valid = 0; end
      drive(rnd(-32768, 32767), rnd(-32768, 32767), rnd(-32768, 0), $urandom_range(7) != 0);
    end
    @(negedge clk); in_valid = 0;
    repeat (10) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d results missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
