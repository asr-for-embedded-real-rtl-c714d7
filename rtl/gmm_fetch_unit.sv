// Fetch unit: fills the GMM parameter buffers and the observation vector buffer from the
// two off-chip memories over two 32-bit Avalon-MM read masters.
//
// A state fetch (start_state with cmd) reads the state's M*ceil((D+1)/2) = 80 words of
// means and mixture constants C from SRAM and, at the same time, its 80 words of weights
// v and constants g from SDRAM: 8 bytes per cycle when neither memory waits, so one HMM
// state (640 bytes) arrives in about 80 cycles. Each returned word goes out on the mc_*
// (SRAM) or vg_* (SDRAM) buffer write port with its mixture and word index; `done`
// pulses when both memories have delivered everything. An observation fetch
// (start_obs with obs_addr) reads the ceil(D/2) = 20 words of o_t from SDRAM onto the
// obs_* port and pulses obs_done. Only one fetch runs at a time; a start while busy is
// ignored. The memory split (mu, C in SRAM; v, g and o_t in SDRAM) and the 8 bytes per
// cycle follow the published design; the fetch being done by the accelerator as a bus
// master, and the word layout, are this design's choice.
module gmm_fetch_unit
  import asr_gmm_pkg::*;
#(
  parameter int unsigned D = D_DIM,
  parameter int unsigned M = M_MIX,
  parameter int unsigned W = DATA_W,
  localparam int unsigned WPM   = (D + 2) / 2,
  localparam int unsigned OBS_W = (D + 1) / 2,
  localparam int unsigned MIX_W = (M > 1) ? $clog2(M) : 1,
  localparam int unsigned WI_W  = $clog2(WPM),
  localparam int unsigned OI_W  = $clog2(OBS_W),
  localparam int unsigned CNT_W = $clog2(M * WPM + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start_state,
  input  state_cmd_t        cmd,
  input  logic              start_obs,
  input  logic [ADDR_W-1:0] obs_addr,
  output logic              busy,
  output logic              done,
  output logic              obs_done,
  output avm_req_t          sram_req,
  input  avm_rsp_t          sram_rsp,
  output avm_req_t          sdram_req,
  input  avm_rsp_t          sdram_rsp,
  output logic              mc_we,
  output logic [MIX_W-1:0]  mc_mix,
  output logic [WI_W-1:0]   mc_wi,
  output logic [2*W-1:0]    mc_wdata,
  output logic              vg_we,
  output logic [MIX_W-1:0]  vg_mix,
  output logic [WI_W-1:0]   vg_wi,
  output logic [2*W-1:0]    vg_wdata,
  output logic              obs_we,
  output logic [OI_W-1:0]   obs_widx,
  output logic [2*W-1:0]    obs_wdata
);
  typedef enum logic [1:0] {F_IDLE, F_STATE, F_OBS} fmode_e;
  fmode_e mode;

  logic sr_done, sr_valid, sd_done, sd_valid;
  logic sr_fin, sd_fin;
  logic [BUS_W-1:0] sr_data, sd_data;
  logic go_state, go_obs;

  assign go_state = (mode == F_IDLE) && start_state;
  assign go_obs   = (mode == F_IDLE) && !start_state && start_obs;
  assign busy     = mode != F_IDLE;

  gmm_avm_reader #(.CNT_W(CNT_W)) u_sram (
    .clk, .rst_n,
    .start(go_state), .base(cmd.sram_base), .count(CNT_W'(M * WPM)),
    .busy(), .done(sr_done), .req(sram_req), .rsp(sram_rsp),
    .out_valid(sr_valid), .out_data(sr_data)
  );

  gmm_avm_reader #(.CNT_W(CNT_W)) u_sdram (
    .clk, .rst_n,
    .start(go_state || go_obs),
    .base (go_state ? cmd.sdram_base : obs_addr),
    .count(go_state ? CNT_W'(M * WPM) : CNT_W'(OBS_W)),
    .busy(), .done(sd_done), .req(sdram_req), .rsp(sdram_rsp),
    .out_valid(sd_valid), .out_data(sd_data)
  );

  // buffer write ports: the word stream is split into (mixture, word) coordinates
  assign mc_we     = (mode == F_STATE) && sr_valid;
  assign mc_wdata  = sr_data;
  assign vg_we     = (mode == F_STATE) && sd_valid;
  assign vg_wdata  = sd_data;
  assign obs_we    = (mode == F_OBS) && sd_valid;
  assign obs_wdata = sd_data;
  assign obs_widx  = OI_W'(vg_wi);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode     <= F_IDLE;
      mc_mix   <= '0; mc_wi <= '0;
      vg_mix   <= '0; vg_wi <= '0;
      sr_fin   <= 1'b0; sd_fin <= 1'b0;
      done     <= 1'b0;
      obs_done <= 1'b0;
    end else begin
      done     <= 1'b0;
      obs_done <= 1'b0;
      if (go_state || go_obs) begin
        mode   <= go_state ? F_STATE : F_OBS;
        mc_mix <= '0; mc_wi <= '0;
        vg_mix <= '0; vg_wi <= '0;
        sr_fin <= go_obs;   // an observation fetch uses SDRAM only
        sd_fin <= 1'b0;
      end else begin
        if (mc_we) begin
          if (mc_wi == WI_W'(WPM - 1)) begin mc_wi <= '0; mc_mix <= mc_mix + 1'b1; end
          else mc_wi <= mc_wi + 1'b1;
        end
        if (vg_we || obs_we) begin
          if (vg_wi == WI_W'(WPM - 1)) begin vg_wi <= '0; vg_mix <= vg_mix + 1'b1; end
          else vg_wi <= vg_wi + 1'b1;
        end
        if (sr_done) sr_fin <= 1'b1;
        if (sd_done) sd_fin <= 1'b1;
        if (mode != F_IDLE && (sr_fin || sr_done) && (sd_fin || sd_done)) begin
          mode     <= F_IDLE;
          done     <= mode == F_STATE;
          obs_done <= mode == F_OBS;
        end
      end
    end
  end
endmodule
