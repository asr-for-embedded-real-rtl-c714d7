// Testbench of gmm_fetch_unit with two memory models. First without wait states: a state
// fetch must deliver all 80 SRAM and 80 SDRAM words, each to the right (mixture, word)
// slot, and finish in 80 + read latency + 2 cycles (8 bytes per cycle). Then with random
// waitrequest on both memories (different latencies), several state fetches and
// observation fetches in turn; every word written to the buffer ports is compared with
// the memory contents.
module tb_gmm_fetch_unit;
  import asr_gmm_pkg::*;

  localparam int D = D_DIM, M = M_MIX, WPM = (D + 2) / 2, NW = (D + 1) / 2;
  localparam int LAT_SR = 2, LAT_SD = 3;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic start_state = 0, start_obs = 0;
  state_cmd_t cmd = '0;
  logic [31:0] obs_addr = 0;
  logic busy, done, obs_done;
  avm_req_t sram_req, sdram_req;
  avm_rsp_t sram_rsp, sdram_rsp;
  logic mc_we, vg_we, obs_we;
  logic [1:0] mc_mix, vg_mix;
  logic [4:0] mc_wi, vg_wi, obs_widx;
  logic [31:0] mc_wdata, vg_wdata, obs_wdata;
  int n_mc, n_vg, n_obs;
  logic [31:0] cur_sr, cur_sd;

  gmm_fetch_unit dut (.clk, .rst_n, .start_state, .cmd, .start_obs, .obs_addr, .busy, .done,
                      .obs_done, .sram_req, .sram_rsp, .sdram_req, .sdram_rsp,
                      .mc_we, .mc_mix, .mc_wi, .mc_wdata, .vg_we, .vg_mix, .vg_wi, .vg_wdata,
                      .obs_we, .obs_widx, .obs_wdata);
  tb_avalon_mem #(.WORDS(1024), .LATENCY(LAT_SR)) u_sram  (.clk, .rst_n, .req(sram_req),  .rsp(sram_rsp));
  tb_avalon_mem #(.WORDS(1024), .LATENCY(LAT_SD)) u_sdram (.clk, .rst_n, .req(sdram_req), .rsp(sdram_rsp));

  always #5 clk = !clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // every buffer write must carry the word at its slot's address
  always @(posedge clk) if (rst_n) begin
    if (mc_we) begin
      checks++; n_mc++;
      if (mc_wdata != u_sram.mem[(cur_sr >> 2) + mc_mix * WPM + mc_wi]) begin
        failures++; if (failures < 10) $display("FAIL SRAM word m%0d w%0d", mc_mix, mc_wi);
      end
    end
    if (vg_we) begin
      checks++; n_vg++;
      if (vg_wdata != u_sdram.mem[(cur_sd >> 2) + vg_mix * WPM + vg_wi]) begin
        failures++; if (failures < 10) $display("FAIL SDRAM word m%0d w%0d", vg_mix, vg_wi);
      end
    end
    if (obs_we) begin
      checks++; n_obs++;
      if (obs_wdata != u_sdram.mem[(obs_addr >> 2) + obs_widx]) begin
        failures++; if (failures < 10) $display("FAIL obs word %0d", obs_widx);
      end
    end
  end

  task automatic fetch_state(int sr_word, int sd_word, int max_cycles);
    int t = 0;
    n_mc = 0; n_vg = 0;
    cur_sr = 32'(sr_word * 4); cur_sd = 32'(sd_word * 4);
    @(negedge clk);
    start_state = 1; cmd.sram_base = cur_sr; cmd.sdram_base = cur_sd;
    @(negedge clk); start_state = 0;
    while (!done) begin @(negedge clk); t++; end
    checks += 3;
    if (n_mc != M * WPM || n_vg != M * WPM) begin failures++; $display("FAIL word counts %0d %0d", n_mc, n_vg); end
    if (busy) begin failures++; $display("FAIL busy after done"); end
    if (max_cycles > 0 && t + 1 > max_cycles) begin failures++; $display("FAIL state fetch took %0d cycles", t + 1); end
    if (max_cycles > 0) $display("state fetch without wait states: %0d cycles", t + 1);
  endtask

  task automatic fetch_obs(int word);
    n_obs = 0;
    @(negedge clk);
    start_obs = 1; obs_addr = 32'(word * 4);
    @(negedge clk); start_obs = 0;
    while (!obs_done) @(negedge clk);
    checks++;
    if (n_obs != NW || n_mc != 0) begin failures++; $display("FAIL obs words %0d", n_obs); end
  endtask

  initial begin
    foreach (u_sram.mem[i])  u_sram.mem[i]  = $urandom;
    foreach (u_sdram.mem[i]) u_sdram.mem[i] = $urandom;
    repeat (3) @(posedge clk);
    rst_n = 1;
    fetch_state(0, 100, M * WPM + LAT_SD + 2);
    fetch_state(80, 7, M * WPM + LAT_SD + 2);
    n_mc = 0;
    fetch_obs(500);
    u_sram.wait_pct = 30; u_sdram.wait_pct = 45;
    for (int k = 0; k < 5; k++) begin
      fetch_state(k * 80, 900 - k * 80, 0);
      n_mc = 0;
      fetch_obs(300 + k * 20);
    end
    checks++;
    if (u_sram.waits == 0 || u_sdram.waits == 0) begin failures++; $display("FAIL no wait states seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
