// GMM emission-probability accelerator, the hardware half of a processor + accelerator
// speech recognizer. The processor runs feature extraction and the Viterbi search; for
// every active HMM state j it asks this block for log b_j(o_t), the log-likelihood of the
// current feature vector under the state's mixture of M diagonal Gaussians.
//
// Blocks and data flow:
//   gmm_host_if      Avalon slave: the processor loads o_t, queues state orders (the
//                    two base addresses of a state's parameters) and pops results.
//   gmm_fetch_unit   two 32-bit Avalon read masters, one to SRAM (means, C) and one to
//                    SDRAM (weights v, g, and o_t): 8 bytes per cycle.
//   gmm_obs_buffer   o_t, 39 x 16 bit, loaded once per frame.
//   gmm_param_buffer x2, the double buffer: 640 bytes each, one HMM state.
//   gmm_arith_unit   N computation units, parallel adder, accumulator, log-add unit.
// Double buffering: while the arithmetic unit reads the state in one parameter buffer,
// the fetch unit fills the other with the next queued state, so the parameter transfer
// (80 cycles per state when the memories do not wait) hides the computation
// (M * ceil(D/N) = 52 cycles for N = 3). A buffer is "full" from the end of its fetch to
// the cycle its last group is read. The sequencer here starts a fetch when an order is
// queued and the fill buffer is empty, and a computation when the compute buffer is
// full and the result queue has room. An observation load waits until every earlier
// order is finished, so a state is always scored against the vector it was ordered with.
//
// Timing: the computation of one state issues one group read per cycle for
// M * ceil(D/N) cycles; its result reaches the result queue 7 cycles after the last read.
// In steady state a state completes every fetch time (about 80 cycles plus the memory
// read latency).
//
// The structure (buffers and sizes, two memories at 8 bytes per cycle, N parallel units,
// parallel adder, log-add, 16-bit result) follows the published design. N = 3 is this
// design's choice: the smallest N whose computation (52 cycles) hides behind the
// 80-cycle parameter fetch; N = 2 would need 80 cycles plus the pipeline. The register
// map, the sequencing and all handshakes are this design's choice too.
module gmm_accelerator
  import asr_gmm_pkg::*;
#(
  parameter int unsigned D         = D_DIM,
  parameter int unsigned M         = M_MIX,
  parameter int unsigned N         = N_LANES,
  parameter int unsigned CMD_DEPTH = 2,
  parameter int unsigned RES_DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  // processor slave port
  input  logic [2:0]       avs_address,
  input  logic             avs_read,
  input  logic             avs_write,
  input  logic [BUS_W-1:0] avs_writedata,
  output logic [BUS_W-1:0] avs_readdata,
  output logic             avs_readdatavalid,
  output logic             avs_waitrequest,
  // off-chip memory read masters
  output avm_req_t         sram_req,
  input  avm_rsp_t         sram_rsp,
  output avm_req_t         sdram_req,
  input  avm_rsp_t         sdram_rsp
);
  localparam int unsigned W     = DATA_W;
  localparam int unsigned WPM   = (D + 2) / 2;
  localparam int unsigned G     = (D + N - 1) / N;          // groups per mixture
  localparam int unsigned MIX_W = (M > 1) ? $clog2(M) : 1;
  localparam int unsigned WI_W  = $clog2(WPM);
  localparam int unsigned OI_W  = $clog2((D + 1) / 2);
  localparam int unsigned GRP_W = (G > 1) ? $clog2(G) : 1;
  localparam int unsigned RAW   = $clog2(RES_DEPTH);

  // ---------------- host interface ----------------
  logic              cmd_valid, cmd_ready, obs_valid, obs_ready;
  state_cmd_t        cmd;
  logic [ADDR_W-1:0] obs_addr;
  logic              res_valid;
  logic [W-1:0]      res_data;
  logic [RAW:0]      res_count;
  logic              engine_busy;

  gmm_host_if #(.CMD_DEPTH(CMD_DEPTH), .RES_DEPTH(RES_DEPTH), .W(W)) u_host (
    .clk, .rst_n,
    .avs_address, .avs_read, .avs_write, .avs_writedata,
    .avs_readdata, .avs_readdatavalid, .avs_waitrequest,
    .cmd_valid, .cmd, .cmd_ready,
    .obs_valid, .obs_addr, .obs_ready,
    .res_valid, .res_data, .res_count, .engine_busy
  );

  // ---------------- fetch unit ----------------
  logic             f_busy, f_done, f_obs_done;
  logic             mc_we, vg_we, obs_we;
  logic [MIX_W-1:0] mc_mix, vg_mix;
  logic [WI_W-1:0]  mc_wi, vg_wi;
  logic [OI_W-1:0]  obs_widx;
  logic [2*W-1:0]   mc_wdata, vg_wdata, obs_wdata;
  logic             start_state, start_obs;

  gmm_fetch_unit #(.D(D), .M(M), .W(W)) u_fetch (
    .clk, .rst_n,
    .start_state, .cmd, .start_obs, .obs_addr,
    .busy(f_busy), .done(f_done), .obs_done(f_obs_done),
    .sram_req, .sram_rsp, .sdram_req, .sdram_rsp,
    .mc_we, .mc_mix, .mc_wi, .mc_wdata,
    .vg_we, .vg_mix, .vg_wi, .vg_wdata,
    .obs_we, .obs_widx, .obs_wdata
  );

  // ---------------- double buffer bookkeeping ----------------
  logic [1:0] buf_full;
  logic       fill_ptr, comp_ptr;
  logic       comp_busy;     // a state is being read or is still in the pipeline
  logic       c_issue;       // group reads in progress
  logic [MIX_W-1:0] c_mix;
  logic [GRP_W-1:0] c_grp;
  logic       c_last_rd, comp_start;

  assign cmd_ready   = !f_busy && !f_done && !buf_full[fill_ptr];
  assign start_state = cmd_valid && cmd_ready;
  assign obs_ready   = !f_busy && !f_done && !cmd_valid && buf_full == 2'b00 && !comp_busy;
  assign start_obs   = obs_valid && obs_ready;
  assign engine_busy = f_busy || comp_busy || buf_full != 2'b00 || cmd_valid;

  assign comp_start  = !comp_busy && buf_full[comp_ptr] && res_count < (RAW+1)'(RES_DEPTH);
  assign c_last_rd   = c_issue && c_mix == MIX_W'(M - 1) && c_grp == GRP_W'(G - 1);

  // ---------------- buffers ----------------
  logic signed [W-1:0] pb_mu [2][N];
  logic signed [W-1:0] pb_v  [2][N];
  logic signed [W-1:0] pb_c  [2];
  logic signed [W-1:0] pb_g  [2];
  logic signed [W-1:0] ob_o  [N];
  logic                rd_sel;   // buffer whose read data is on the buffer outputs

  for (genvar b = 0; b < 2; b++) begin : g_pbuf
    gmm_param_buffer #(.D(D), .M(M), .N(N), .W(W)) u_pbuf (
      .clk,
      .mc_we   (mc_we && fill_ptr == 1'(b)),
      .mc_mix, .mc_wi, .mc_wdata,
      .vg_we   (vg_we && fill_ptr == 1'(b)),
      .vg_mix, .vg_wi, .vg_wdata,
      .rd_en   (c_issue && comp_ptr == 1'(b)),
      .rd_mix  (c_mix),
      .rd_grp  (c_grp),
      .rd_mu   (pb_mu[b]),
      .rd_v    (pb_v[b]),
      .rd_c    (pb_c[b]),
      .rd_g    (pb_g[b])
    );
  end

  gmm_obs_buffer #(.D(D), .N(N), .W(W)) u_obuf (
    .clk,
    .we(obs_we), .widx(obs_widx), .wdata(obs_wdata),
    .rd_en(c_issue), .rd_grp(c_grp), .rd_o(ob_o)
  );

  // ---------------- compute sequencer ----------------
  logic a_valid, a_grp_first, a_grp_last, a_mix_first, a_mix_last;
  logic a_lane_en [N];
  logic [GRP_W-1:0] a_grp;
  logic a_out_valid, a_mix_valid;
  logic signed [W-1:0] a_out, a_mix_score;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_full    <= 2'b00;
      fill_ptr    <= 1'b0;
      comp_ptr    <= 1'b0;
      comp_busy   <= 1'b0;
      c_issue     <= 1'b0;
      c_mix       <= '0;
      c_grp       <= '0;
      rd_sel      <= 1'b0;
      a_valid     <= 1'b0;
      a_grp       <= '0;
      a_grp_first <= 1'b0;
      a_grp_last  <= 1'b0;
      a_mix_first <= 1'b0;
      a_mix_last  <= 1'b0;
    end else begin
      // a finished fetch makes its buffer full and moves the fill pointer
      if (f_done) begin
        buf_full[fill_ptr] <= 1'b1;
        fill_ptr           <= !fill_ptr;
      end
      // walk the M mixtures x G groups of the compute buffer
      if (comp_start) begin
        comp_busy <= 1'b1;
        c_issue   <= 1'b1;
        c_mix     <= '0;
        c_grp     <= '0;
      end else if (c_issue) begin
        if (c_grp == GRP_W'(G - 1)) begin
          c_grp <= '0;
          c_mix <= c_mix + 1'b1;
        end else begin
          c_grp <= c_grp + 1'b1;
        end
        if (c_last_rd) begin
          c_issue            <= 1'b0;
          buf_full[comp_ptr] <= 1'b0;   // last group read: the buffer may be refilled
          comp_ptr           <= !comp_ptr;
        end
      end
      if (a_out_valid) comp_busy <= 1'b0;
      // group control, aligned with the buffers' registered read data
      rd_sel      <= comp_ptr;
      a_valid     <= c_issue;
      a_grp       <= c_grp;
      a_grp_first <= c_grp == '0;
      a_grp_last  <= c_grp == GRP_W'(G - 1);
      a_mix_first <= c_mix == '0;
      a_mix_last  <= c_mix == MIX_W'(M - 1);
    end
  end

  always_comb
    for (int i = 0; i < N; i++) a_lane_en[i] = int'(a_grp) * N + i < D;

  gmm_arith_unit #(.N(N), .W(W)) u_arith (
    .clk, .rst_n,
    .in_valid (a_valid),
    .lane_en  (a_lane_en),
    .o        (ob_o),
    .mu       (pb_mu[rd_sel]),
    .v        (pb_v[rd_sel]),
    .grp_first(a_grp_first),
    .grp_last (a_grp_last),
    .c        (pb_c[rd_sel]),
    .g        (pb_g[rd_sel]),
    .mix_first(a_mix_first),
    .mix_last (a_mix_last),
    .mix_valid(a_mix_valid),
    .mix_score(a_mix_score),
    .out_valid(a_out_valid),
    .out_logb (a_out)
  );

  assign res_valid = a_out_valid;
  assign res_data  = a_out;

  // a buffer is never written while it holds a state that is waiting or being read
  a_no_overwrite: assert property (@(posedge clk) disable iff (!rst_n)
    (mc_we || vg_we) |-> !buf_full[fill_ptr]);
  // a computation only reads a full buffer
  a_read_full: assert property (@(posedge clk) disable iff (!rst_n)
    c_issue |-> buf_full[comp_ptr]);
endmodule
