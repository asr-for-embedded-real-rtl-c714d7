// GMM parameter buffer: the parameters of one HMM state, M mixtures of
// D means mu, D weights v = -1/(2 sigma^2), the constant C = log c (mixture weight) and
// the constant g (normalisation). With D = 39, M = 4 and 16-bit values that is 640
// bytes. Two instances form the double buffer: one is filled from off-chip memory while
// the arithmetic unit reads the other.
//
// Two write ports, used in the same cycle, one per off-chip memory:
//   mc_*: a 32-bit word from SRAM holding two of mixture mc_mix's {mu_0..mu_D-1, C}
//   vg_*: a 32-bit word from SDRAM holding two of mixture vg_mix's {v_0..v_D-1, g}
// word wi of a mixture carries halfwords 2*wi (bits 15:0) and 2*wi+1 (bits 31:16);
// halfword D is the constant, halfwords past D are dropped.
// Read port: rd_en, rd_mix, rd_grp return one cycle later the N means and weights of
// dimensions rd_grp*N .. rd_grp*N+N-1 of mixture rd_mix (0 past D-1) together with that
// mixture's C and g. The size and the split of the parameters between SRAM and SDRAM
// follow the published design; the word layout and ports are this design's choice.
module gmm_param_buffer
  import asr_gmm_pkg::*;
#(
  parameter int unsigned D = D_DIM,
  parameter int unsigned M = M_MIX,
  parameter int unsigned N = N_LANES,
  parameter int unsigned W = DATA_W,
  localparam int unsigned WPM   = (D + 2) / 2,            // bus words per mixture
  localparam int unsigned MIX_W = (M > 1) ? $clog2(M) : 1,
  localparam int unsigned WI_W  = $clog2(WPM),
  localparam int unsigned GRP_W = ((D + N - 1) / N > 1) ? $clog2((D + N - 1) / N) : 1
) (
  input  logic                clk,
  input  logic                mc_we,
  input  logic [MIX_W-1:0]    mc_mix,
  input  logic [WI_W-1:0]     mc_wi,
  input  logic [2*W-1:0]      mc_wdata,
  input  logic                vg_we,
  input  logic [MIX_W-1:0]    vg_mix,
  input  logic [WI_W-1:0]     vg_wi,
  input  logic [2*W-1:0]      vg_wdata,
  input  logic                rd_en,
  input  logic [MIX_W-1:0]    rd_mix,
  input  logic [GRP_W-1:0]    rd_grp,
  output logic signed [W-1:0] rd_mu [N],
  output logic signed [W-1:0] rd_v  [N],
  output logic signed [W-1:0] rd_c,
  output logic signed [W-1:0] rd_g
);
  logic [W-1:0] mu_mem [M*D];
  logic [W-1:0] v_mem  [M*D];
  logic [W-1:0] c_mem  [M];
  logic [W-1:0] g_mem  [M];

  always_ff @(posedge clk) begin
    for (int k = 0; k < 2; k++) begin
      if (mc_we) begin
        if (2*int'(mc_wi) + k < D)       mu_mem[int'(mc_mix)*D + 2*int'(mc_wi) + k] <= mc_wdata[k*W +: W];
        else if (2*int'(mc_wi) + k == D) c_mem[mc_mix] <= mc_wdata[k*W +: W];
      end
      if (vg_we) begin
        if (2*int'(vg_wi) + k < D)       v_mem[int'(vg_mix)*D + 2*int'(vg_wi) + k] <= vg_wdata[k*W +: W];
        else if (2*int'(vg_wi) + k == D) g_mem[vg_mix] <= vg_wdata[k*W +: W];
      end
    end
    if (rd_en) begin
      for (int i = 0; i < N; i++) begin
        rd_mu[i] <= (int'(rd_grp)*N + i < D) ? mu_mem[int'(rd_mix)*D + int'(rd_grp)*N + i] : '0;
        rd_v[i]  <= (int'(rd_grp)*N + i < D) ? v_mem[int'(rd_mix)*D + int'(rd_grp)*N + i]  : '0;
      end
      rd_c <= c_mem[rd_mix];
      rd_g <= g_mem[rd_mix];
    end
  end
endmodule
