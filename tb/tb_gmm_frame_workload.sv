// Workload testbench: one speech frame of the size the adaptive-pruning thresholds allow.
// With the upper threshold of 2300 active tokens, a frame can ask for up to 2300 HMM
// state evaluations against one observation vector. The acoustic model here is 256
// random states (39 dimensions, 4 mixtures), stored in the memory models in the
// accelerator's layout. 2300 orders are drawn from them in random order, with the
// processor model always keeping one order ahead of the result it is reading, as the
// recognizer software would. Every result is checked against the reference model. The
// frame's cycle count is reported, with the clock frequency it implies for a 10 ms frame
// shift. The frame must take no more than 90 cycles per state when the memories do not
// wait.
module tb_gmm_frame_workload;
  import asr_gmm_pkg::*;
  import tb_gmm_ref_pkg::*;

  localparam int D = D_DIM, M = M_MIX, WPM = (D + 2) / 2;
  localparam int K = 256, STATES = 2300;
  localparam int SD_STATE_BASE = 0, SD_OBS_BASE = K * M * WPM;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [2:0] avs_address = 0;
  logic avs_read = 0, avs_write = 0;
  logic [31:0] avs_writedata = 0, avs_readdata;
  logic avs_readdatavalid, avs_waitrequest;
  avm_req_t sram_req, sdram_req;
  avm_rsp_t sram_rsp, sdram_rsp;

  gmm_accelerator dut (.clk, .rst_n, .avs_address, .avs_read, .avs_write, .avs_writedata,
                       .avs_readdata, .avs_readdatavalid, .avs_waitrequest,
                       .sram_req, .sram_rsp, .sdram_req, .sdram_rsp);
  tb_avalon_mem #(.WORDS(32768), .LATENCY(2)) u_sram  (.clk, .rst_n, .req(sram_req),  .rsp(sram_rsp));
  tb_avalon_mem #(.WORDS(32768), .LATENCY(3)) u_sdram (.clk, .rst_n, .req(sdram_req), .rsp(sdram_rsp));

  always #5 clk = !clk;

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (STATES * 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int mu_a [K][M][D], v_a [K][M][D], c_a [K][M], g_a [K][M];
  int obs [D];
  int exp_q [$];

  function automatic int ref_state(int k);
    int run, sc;
    for (int m = 0; m < M; m++) begin
      sc = ref_mix(obs, mu_a[k][m], v_a[k][m], c_a[k][m], g_a[k][m]);
      run = (m == 0) ? sc : ref_logadd(run, sc);
    end
    return run;
  endfunction

  task automatic build();
    for (int k = 0; k < K; k++)
      for (int m = 0; m < M; m++) begin
        for (int d = 0; d < D; d++) begin mu_a[k][m][d] = rnd(-384, 384); v_a[k][m][d] = rnd(-300, 0); end
        c_a[k][m] = rnd(-40, 0);
        g_a[k][m] = rnd(-200, 0);
        for (int w = 0; w < WPM; w++) begin
          u_sram.mem[k*M*WPM + m*WPM + w] = {(2*w + 1 < D) ? 16'(mu_a[k][m][2*w+1]) : 16'(c_a[k][m]), 16'(mu_a[k][m][2*w])};
          u_sdram.mem[SD_STATE_BASE + k*M*WPM + m*WPM + w] = {(2*w + 1 < D) ? 16'(v_a[k][m][2*w+1]) : 16'(g_a[k][m]), 16'(v_a[k][m][2*w])};
        end
      end
    for (int d = 0; d < D; d++) obs[d] = rnd(-384, 384);
    for (int w = 0; w < (D + 1) / 2; w++)
      u_sdram.mem[SD_OBS_BASE + w] = {(2*w + 1 < D) ? 16'(obs[2*w+1]) : 16'h0, 16'(obs[2*w])};
  endtask

  task automatic bus_write(logic [2:0] a, logic [31:0] d);
    @(negedge clk);
    avs_address = a; avs_write = 1; avs_writedata = d;
    forever begin @(posedge clk); if (!avs_waitrequest) break; end
    @(negedge clk);
    avs_write = 0;
  endtask

  task automatic bus_read(logic [2:0] a, output logic [31:0] d);
    @(negedge clk);
    avs_address = a; avs_read = 1;
    @(negedge clk);
    avs_read = 0;
    d = avs_readdata;
  endtask

  task automatic order(int k);
    bus_write(REG_SRAM_BASE, 32'(k*M*WPM*4));
    bus_write(REG_SDRAM_BASE, 32'((SD_STATE_BASE + k*M*WPM) * 4));
    exp_q.push_back(ref_state(k));
  endtask

  task automatic collect();
    logic [31:0] r;
    int e, polls = 0;
    do begin bus_read(REG_RESULT, r); polls++; end while (!r[31] && polls < 1000);
    checks++;
    e = exp_q.pop_front();
    if (!r[31] || int'($signed(r[15:0])) != e) begin
      failures++;
      if (failures < 10) $display("FAIL result %0d valid %0d, expected %0d", $signed(r[15:0]), r[31], e);
    end
  endtask

  initial begin
    int t0, t1;
    real per_state;
    build();
    repeat (3) @(posedge clk);
    rst_n = 1;
    t0 = cyc;
    bus_write(REG_OBS_ADDR, 32'(SD_OBS_BASE * 4));
    order(int'($urandom_range(K - 1)));
    for (int s = 1; s < STATES; s++) begin
      order(int'($urandom_range(K - 1)));
      collect();
    end
    collect();
    t1 = cyc;
    per_state = real'(t1 - t0) / real'(STATES);
    $display("frame of %0d states: %0d cycles, %.1f cycles per state", STATES, t1 - t0, per_state);
    $display("clock needed to finish it within a 10 ms frame shift: %.1f MHz", real'(t1 - t0) / 10.0e3);
    checks++;
    if (per_state > 90.0) begin failures++; $display("FAIL %.1f cycles per state", per_state); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
