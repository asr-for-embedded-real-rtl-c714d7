// End-to-end testbench of gmm_accelerator at its default parameters (D = 39, M = 4,
// N = 3). SRAM and SDRAM models hold 12 HMM states and 3 observation vectors in the
// layout of asr_gmm_pkg; a processor model drives the slave port the way the recognizer
// software would: load o_t, then for every active state queue an order and collect the
// previous state's result while the next one is fetched. Every log b_j(o_t) read back is
// compared with the reference model (tb_gmm_ref_pkg) computed from the memory contents.
//
// Phases: (1) one order at a time, memories without wait states; (2) a burst of four
// orders with results left unread, to measure the steady-state rate (one state per
// 80 + a few cycles, the parameter transfer at 8 bytes per cycle); (3) a burst of eight
// orders, which fills the order queue and the result queue; (4) all of it again with
// random wait states on both memories. Each mechanism is counted and must occur at
// least once: fetch overlapping computation, both buffers used, order write held
// (queue full), observation write held (earlier orders pending), computation held
// (result queue full), memory wait states, the four log-add cases, a saturated
// mixture score.
module tb_gmm_accelerator;
  import asr_gmm_pkg::*;
  import tb_gmm_ref_pkg::*;

  localparam int D = D_DIM, M = M_MIX, WPM = (D + 2) / 2;
  localparam int K = 12, F = 3;
  localparam int SD_STATE_BASE = 1024, SD_OBS_BASE = 3000;   // SDRAM word addresses

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
  tb_avalon_mem #(.WORDS(4096), .LATENCY(2)) u_sram  (.clk, .rst_n, .req(sram_req),  .rsp(sram_rsp));
  tb_avalon_mem #(.WORDS(4096), .LATENCY(3)) u_sdram (.clk, .rst_n, .req(sdram_req), .rsp(sdram_rsp));

  always #5 clk = !clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- model data ----------------
  int mu_a [K][M][D], v_a [K][M][D], c_a [K][M], g_a [K][M];
  int obs_a [F][D];
  int exp_q [$];
  int cur_frame;

  function automatic int ref_state(int f, int k);
    int run, sc;
    for (int m = 0; m < M; m++) begin
      sc = ref_mix(obs_a[f], mu_a[k][m], v_a[k][m], c_a[k][m], g_a[k][m]);
      run = (m == 0) ? sc : ref_logadd(run, sc);
    end
    return run;
  endfunction

  function automatic logic [15:0] hw(int x); return 16'(x); endfunction

  task automatic build_memories();
    for (int k = 0; k < K; k++) begin
      int spread, amp;
      spread = (k % 4 == 0) ? 200 : (k % 4) * 20 - 30;
      amp    = (k == K - 1) ? 32000 : 256;
      for (int m = 0; m < M; m++) begin
        for (int d = 0; d < D; d++) begin
          mu_a[k][m][d] = rnd(-amp, amp);
          v_a[k][m][d]  = rnd(-256, 0);
        end
        c_a[k][m] = rnd(-100, 0) - m * spread;
        g_a[k][m] = rnd(-300, 0);
        for (int w = 0; w < WPM; w++) begin
          logic [15:0] lo_mu, hi_mu, lo_v, hi_v;
          lo_mu = hw(mu_a[k][m][2*w]);
          lo_v  = hw(v_a[k][m][2*w]);
          hi_mu = (2*w + 1 < D) ? hw(mu_a[k][m][2*w+1]) : hw(c_a[k][m]);
          hi_v  = (2*w + 1 < D) ? hw(v_a[k][m][2*w+1])  : hw(g_a[k][m]);
          u_sram.mem[k*M*WPM + m*WPM + w]                  = {hi_mu, lo_mu};
          u_sdram.mem[SD_STATE_BASE + k*M*WPM + m*WPM + w] = {hi_v, lo_v};
        end
      end
    end
    for (int f = 0; f < F; f++) begin
      for (int d = 0; d < D; d++) obs_a[f][d] = rnd(-256, 256);
      for (int w = 0; w < (D + 1) / 2; w++)
        u_sdram.mem[SD_OBS_BASE + f*20 + w] = {(2*w + 1 < D) ? hw(obs_a[f][2*w+1]) : 16'hbeef, hw(obs_a[f][2*w])};
    end
  endtask

  // ---------------- processor model ----------------
  int order_waits = 0, obs_waits = 0;

  task automatic bus_write(logic [2:0] a, logic [31:0] d, output int waits);
    waits = 0;
    @(negedge clk);
    avs_address = a; avs_write = 1; avs_writedata = d;
    forever begin
      @(posedge clk);
      if (!avs_waitrequest) break;
      waits++;
    end
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

  task automatic load_obs(int f);
    int w;
    bus_write(REG_OBS_ADDR, 32'((SD_OBS_BASE + f*20) * 4), w);
    obs_waits += w;
    cur_frame = f;
  endtask

  task automatic order(int k);
    int w;
    bus_write(REG_SRAM_BASE, 32'(k*M*WPM*4), w);
    bus_write(REG_SDRAM_BASE, 32'((SD_STATE_BASE + k*M*WPM) * 4), w);
    order_waits += w;
    exp_q.push_back(ref_state(cur_frame, k));
  endtask

  // poll RESULT until a value arrives, then compare it
  task automatic collect();
    logic [31:0] r;
    int e;
    int polls = 0;
    do begin bus_read(REG_RESULT, r); polls++; end while (!r[31] && polls < 2000);
    checks++;
    if (!r[31] || exp_q.size() == 0) begin failures++; $display("FAIL no result"); return; end
    e = exp_q.pop_front();
    if (int'($signed(r[15:0])) != e) begin
      failures++;
      if (failures < 10) $display("FAIL log b = %0d, expected %0d", $signed(r[15:0]), e);
    end
  endtask

  // ---------------- mechanism counters ----------------
  int n_overlap = 0, n_fill [2] = '{0, 0}, n_res_full = 0, n_sat = 0;
  int la_case [4] = '{0, 0, 0, 0};
  int t_res [$];
  int cyc = 0;

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (dut.u_fetch.busy && dut.c_issue) n_overlap++;
    if (dut.f_done) n_fill[dut.fill_ptr]++;
    if (!dut.comp_busy && dut.buf_full[dut.comp_ptr] && dut.res_count == 3'(4)) n_res_full++;
    if (dut.u_arith.mix_valid && dut.u_arith.mix_score == -16'sd32768) n_sat++;
    if (dut.u_arith.mix_valid && !dut.u_arith.mix_first_q)
      la_case[ref_logadd_case(int'(dut.u_arith.run), int'(dut.u_arith.mix_score))]++;
    if (dut.res_valid) t_res.push_back(cyc);
  end

  task automatic need(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL mechanism never happened: %s", what); end
  endtask

  // ---------------- scenario ----------------
  task automatic run_phases(bit measure);
    // (1) one order at a time, result collected while the next state is fetched
    load_obs(0);
    order(0);
    for (int k = 1; k < K; k++) begin order(k); collect(); end
    collect();
    // (2) four orders back to back, results read afterwards
    load_obs(1);
    t_res.delete();
    for (int k = 0; k < 4; k++) order(k + 2);
    repeat (600) @(posedge clk);
    if (measure) begin
      checks++;
      if (t_res.size() != 4) begin failures++; $display("FAIL burst produced %0d results", t_res.size()); end
      else for (int i = 2; i < 4; i++) begin
        int dt;
        dt = t_res[i] - t_res[i-1];
        $display("steady-state interval between states: %0d cycles", dt);
        checks++;
        if (dt < M * WPM || dt > M * WPM + 10) begin failures++; $display("FAIL interval %0d", dt); end
      end
    end
    repeat (4) collect();
    // (3) eight orders, as many as the accelerator can hold (2 queued, 2 buffered,
    // 4 results): the order queue and the result queue fill up
    for (int k = 0; k < 8; k++) order((k * 5) % K);
    repeat (1000) @(posedge clk);
    repeat (8) collect();
    // next frame while orders are still outstanding: the observation write waits
    order(K - 1);
    order(3);
    load_obs(2);
    repeat (2) collect();
    for (int k = 0; k < K; k++) begin order(k); collect(); end
  endtask

  initial begin
    cur_frame = 0;
    build_memories();
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_phases(1);
    // (4) again with random wait states on both memories
    u_sram.wait_pct = 25; u_sdram.wait_pct = 40;
    run_phases(0);
    repeat (20) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d results never read", exp_q.size()); end
    need(n_overlap > 0, "fetch overlapping computation");
    need(n_fill[0] > 0 && n_fill[1] > 0, "both parameter buffers filled");
    need(order_waits > 0, "order write held, queue full");
    need(obs_waits > 0, "observation write held, orders pending");
    need(n_res_full > 0, "computation held, result queue full");
    need(u_sram.waits > 0 && u_sdram.waits > 0, "memory wait states");
    for (int i = 0; i < 4; i++) need(la_case[i] > 0, $sformatf("log-add case %0d", i));
    need(n_sat > 0, "saturated mixture score");
    $display("overlap cycles %0d, fills %0d/%0d, order waits %0d, obs waits %0d, result-full cycles %0d",
             n_overlap, n_fill[0], n_fill[1], order_waits, obs_waits, n_res_full);
    $display("memory waits %0d/%0d, log-add cases %0d %0d %0d %0d, saturated %0d",
             u_sram.waits, u_sdram.waits, la_case[0], la_case[1], la_case[2], la_case[3], n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
