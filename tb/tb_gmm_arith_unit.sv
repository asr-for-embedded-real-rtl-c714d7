// Testbench of gmm_arith_unit: random HMM states (39 dimensions, 4 mixtures) streamed
// group by group, with random idle cycles between groups and back-to-back states.
// Every mixture score log b_jm and every state result log b_j is compared with the
// reference model (tb_gmm_ref_pkg), and their latencies (5 and 6 cycles after the last
// group) are checked. The mixture constants are chosen so that the log-add sees all four
// cases of its rule; one state drives the accumulator into 16-bit saturation.
// The unit runs with N = 4 here, so the last group of every mixture holds three
// dimensions and one disabled lane carrying junk; the default N = 3 is exercised end to
// end by tb_gmm_accelerator.
module tb_gmm_arith_unit;
  import asr_gmm_pkg::*;
  import tb_gmm_ref_pkg::*;

  localparam int D = D_DIM, M = M_MIX, N = 4, G = (D + N - 1) / N;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, grp_first = 0, grp_last = 0, mix_first = 0, mix_last = 0;
  logic lane_en [N];
  logic signed [15:0] o [N], mu [N], v [N], c = 0, g = 0;
  logic mix_valid, out_valid;
  logic signed [15:0] mix_score, out_logb;
  int cyc = 0;
  int mix_q [$], mix_t [$], out_q [$], out_t [$];
  int cases [4] = '{0, 0, 0, 0};
  int saturated = 0;

  gmm_arith_unit #(.N(N)) dut (.clk, .rst_n, .in_valid, .lane_en, .o, .mu, .v, .grp_first, .grp_last,
                      .c, .g, .mix_first, .mix_last, .mix_valid, .mix_score, .out_valid, .out_logb);

  always #5 clk = !clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (mix_valid) begin
      checks++;
      if (mix_q.size() == 0) begin failures++; $display("FAIL unexpected mixture score"); end
      else begin
        int e, t;
        e = mix_q.pop_front(); t = mix_t.pop_front();
        if (int'(mix_score) != e || cyc - t != 5) begin
          failures++;
          if (failures < 10) $display("FAIL mix %0d exp %0d latency %0d", mix_score, e, cyc - t);
        end
      end
    end
    if (out_valid) begin
      checks++;
      if (out_q.size() == 0) begin failures++; $display("FAIL unexpected result"); end
      else begin
        int e, t;
        e = out_q.pop_front(); t = out_t.pop_front();
        if (int'(out_logb) != e || cyc - t != 6) begin
          failures++;
          if (failures < 10) $display("FAIL logb %0d exp %0d latency %0d", out_logb, e, cyc - t);
        end
      end
    end
  end

  // one state; spread sets how far apart the mixture constants are
  task automatic run_state(int spread, int amp, bit gaps);
    int ov [D], mv [M][D], vv [M][D], cv [M], gv [M], sc [M], run;
    foreach (ov[d]) ov[d] = rnd(-amp, amp);
    for (int m = 0; m < M; m++) begin
      foreach (ov[d]) begin mv[m][d] = rnd(-amp, amp); vv[m][d] = rnd(-256, 0); end
      cv[m] = rnd(-100, 0) - m * spread;
      gv[m] = rnd(-300, 0);
      sc[m] = ref_mix(ov, mv[m], vv[m], cv[m], gv[m]);
      if (sc[m] == -32768) saturated++;
      if (m == 0) run = sc[m];
      else begin cases[ref_logadd_case(run, sc[m])]++; run = ref_logadd(run, sc[m]); end
    end
    for (int m = 0; m < M; m++)
      for (int gi = 0; gi < G; gi++) begin
        if (gaps && $urandom_range(2) == 0) begin @(negedge clk); in_valid = 0; end
        @(negedge clk);
        in_valid = 1;
        grp_first = gi == 0; grp_last = gi == G - 1;
        mix_first = m == 0;  mix_last = m == M - 1;
        c = 16'(cv[m]); g = 16'(gv[m]);
        for (int i = 0; i < N; i++) begin
          int d;
          d = gi*N + i;
          lane_en[i] = d < D;
          o[i]  = d < D ? 16'(ov[d]) : 16'(rnd(-999, 999));     // disabled lanes carry junk
          mu[i] = d < D ? 16'(mv[m][d]) : 16'(rnd(-999, 999));
          v[i]  = d < D ? 16'(vv[m][d]) : 16'(rnd(-256, 0));
        end
        if (gi == G - 1) begin
          mix_q.push_back(sc[m]); mix_t.push_back(cyc);
          if (m == M - 1) begin out_q.push_back(run); out_t.push_back(cyc); end
        end
      end
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin lane_en[i] = 0; o[i] = 0; mu[i] = 0; v[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 200; s++) run_state(s % 4 == 0 ? 200 : (s % 4) * 20 - 30, 256, s % 2 == 1);
    run_state(0, 32000, 0);           // huge distances: saturation
    @(negedge clk); in_valid = 0;
    repeat (12) @(posedge clk);
    checks++;
    if (mix_q.size() != 0 || out_q.size() != 0) begin failures++; $display("FAIL results missing"); end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (cases[k] == 0) begin failures++; $display("FAIL log-add case %0d never exercised", k); end
    end
    checks++;
    if (saturated == 0) begin failures++; $display("FAIL saturation never exercised"); end
    $display("log-add cases %0d %0d %0d %0d, saturated mixtures %0d", cases[0], cases[1], cases[2], cases[3], saturated);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
