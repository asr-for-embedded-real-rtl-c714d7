// Testbench of gmm_param_buffer: fills one HMM state through both write ports at once
// (SRAM words: means and C; SDRAM words: weights and g), as the fetch unit does, then
// reads every (mixture, group) and checks all N means and weights and the two constants
// against the values written, including the zero lanes past dimension 38. Then a second
// state overwrites the first and is checked the same way. The buffer runs with N = 4 so
// that the last group of a mixture has a lane past dimension 38.
module tb_gmm_param_buffer;
  import asr_gmm_pkg::*;

  localparam int D = D_DIM, M = M_MIX, N = 4, G = (D + N - 1) / N, WPM = (D + 2) / 2;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic mc_we = 0, vg_we = 0, rd_en = 0;
  logic [1:0] mc_mix = 0, vg_mix = 0, rd_mix = 0;
  logic [4:0] mc_wi = 0, vg_wi = 0;
  logic [31:0] mc_wdata = 0, vg_wdata = 0;
  logic [3:0] rd_grp = 0;
  logic signed [15:0] rd_mu [N], rd_v [N], rd_c, rd_g;
  logic [15:0] mc_hw [M][2*WPM], vg_hw [M][2*WPM];   // halfwords as laid out in memory

  gmm_param_buffer #(.N(N)) dut (.clk, .mc_we, .mc_mix, .mc_wi, .mc_wdata, .vg_we, .vg_mix, .vg_wi,
                        .vg_wdata, .rd_en, .rd_mix, .rd_grp, .rd_mu, .rd_v, .rd_c, .rd_g);

  always #5 clk = !clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(logic [15:0] got, logic [15:0] e, string what);
    checks++;
    if (got != e) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %h exp %h", what, got, e);
    end
  endtask

  initial begin
    for (int rep = 0; rep < 2; rep++) begin
      foreach (mc_hw[m, h]) begin mc_hw[m][h] = 16'($urandom); vg_hw[m][h] = 16'($urandom); end
      for (int m = 0; m < M; m++)
        for (int w = 0; w < WPM; w++) begin
          @(negedge clk);
          mc_we = 1; mc_mix = 2'(m); mc_wi = 5'(w); mc_wdata = {mc_hw[m][2*w+1], mc_hw[m][2*w]};
          // the SDRAM stream runs a little behind, as two memories would
          vg_we = (w % 3) != 2; vg_mix = 2'(m); vg_wi = 5'(w); vg_wdata = {vg_hw[m][2*w+1], vg_hw[m][2*w]};
          if (!vg_we) begin @(negedge clk); mc_we = 0; vg_we = 1; end
        end
      @(negedge clk); mc_we = 0; vg_we = 0;
      for (int m = 0; m < M; m++)
        for (int gi = 0; gi < G; gi++) begin
          @(negedge clk); rd_en = 1; rd_mix = 2'(m); rd_grp = 4'(gi);
          @(negedge clk); rd_en = 0;
          for (int i = 0; i < N; i++) begin
            int d;
            d = gi*N + i;
            expect_eq(rd_mu[i], d < D ? mc_hw[m][d] : 16'h0, $sformatf("mu m%0d d%0d", m, d));
            expect_eq(rd_v[i],  d < D ? vg_hw[m][d] : 16'h0, $sformatf("v m%0d d%0d", m, d));
          end
          expect_eq(rd_c, mc_hw[m][D], $sformatf("C m%0d", m));
          expect_eq(rd_g, vg_hw[m][D], $sformatf("g m%0d", m));
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
