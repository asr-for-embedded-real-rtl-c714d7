// Testbench of gmm_logadd_unit: exhaustive over the table range for |x - y| < 20 around
// several operating points, plus random pairs over the whole 16-bit range, compared with
// the reference rule (tb_gmm_ref_pkg). Counts each of the four cases of the rule and
// also checks that the result stays within one LSB plus table rounding of the exact
// ln(e^x + e^y).
module tb_gmm_logadd_unit;
  import asr_gmm_pkg::*;
  import tb_gmm_ref_pkg::*;

  int checks = 0, failures = 0;
  int cases [4] = '{0, 0, 0, 0};
  logic signed [15:0] x, y, out;

  gmm_logadd_unit dut (.x, .y, .out);

  task automatic check(int xi, int yi);
    int exp_v;
    real ex, s;
    x = 16'(xi); y = 16'(yi);
    #1;
    exp_v = ref_logadd(xi, yi);
    cases[ref_logadd_case(xi, yi)]++;
    checks++;
    if (int'(out) != exp_v) begin
      failures++;
      if (failures < 10) $display("FAIL x=%0d y=%0d out=%0d exp=%0d", xi, yi, out, exp_v);
    end
    // closeness to the exact operator (away from saturation)
    if (xi < 32000 && yi < 32000 && xi > -32000 && yi > -32000) begin
      s  = real'(1 << LOG_FRAC);
      ex = s * $ln($exp(real'(xi) / s - real'(xi > yi ? xi : yi) / s) +
                   $exp(real'(yi) / s - real'(xi > yi ? xi : yi) / s)) + real'(xi > yi ? xi : yi);
      checks++;
      if ((real'(out) - ex) > 1.01 || (ex - real'(out)) > 1.01) begin
        failures++;
        if (failures < 10) $display("FAIL accuracy x=%0d y=%0d out=%0d exact=%f", xi, yi, out, ex);
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (cases[k]) cases[k] = 0;
    for (int base = -3000; base <= 3000; base += 1500)
      for (int z = -160; z <= 160; z++) check(base + z, base);
    for (int i = 0; i < 2000; i++) check(rnd(-32768, 32767), rnd(-32768, 32767));
    check(32767, 32767);      // saturation at the top of the range
    check(32767, 32760);
    check(-32768, -32768);
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (cases[k] == 0) begin failures++; $display("FAIL case %0d never exercised", k); end
    end
    $display("cases: y=%0d y+corr=%0d x+corr=%0d x=%0d", cases[0], cases[1], cases[2], cases[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
