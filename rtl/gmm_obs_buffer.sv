// Observation vector buffer: holds the D = 39 16-bit coefficients of the current
// feature vector o_t (78 bytes), loaded once per speech frame and then read by every
// HMM state evaluated in that frame.
//
// Write port: one 32-bit bus word per cycle, word index widx, halfword k of the word
// (bits [16k+15:16k]) is dimension 2*widx + k; a halfword beyond dimension D-1 is
// dropped. Read port: rd_en with group index rd_grp returns, one cycle later, the N
// coefficients of dimensions rd_grp*N .. rd_grp*N+N-1 on rd_o; lanes past D-1 read 0.
// The size follows the published design; the port shapes are this design's choice.
module gmm_obs_buffer
  import asr_gmm_pkg::*;
#(
  parameter int unsigned D = D_DIM,
  parameter int unsigned N = N_LANES,
  parameter int unsigned W = DATA_W
) (
  input  logic                          clk,
  input  logic                          we,
  input  logic [$clog2((D+1)/2)-1:0]    widx,
  input  logic [2*W-1:0]                wdata,
  input  logic                          rd_en,
  input  logic [$clog2((D+N-1)/N)-1:0]  rd_grp,
  output logic signed [W-1:0]           rd_o [N]
);
  logic [W-1:0] mem [D];

  always_ff @(posedge clk) begin
    if (we)
      for (int k = 0; k < 2; k++)
        if (2*int'(widx) + k < D) mem[2*int'(widx) + k] <= wdata[k*W +: W];
    if (rd_en)
      for (int i = 0; i < N; i++)
        rd_o[i] <= (int'(rd_grp)*N + i < D) ? mem[int'(rd_grp)*N + i] : '0;
  end
endmodule
