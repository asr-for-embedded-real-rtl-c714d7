// Parallel adder: sum of the N interim values produced in one iteration by the N
// computation units, as a balanced binary tree of ceil(log2 N) adder levels. The
// published design names this block; the tree form and the single output register are
// this design's choice. Operands are ACC_W-bit two's complement; the sum wraps, which
// cannot happen for the formats used (see asr_gmm_pkg).
//
// Timing: combinational tree followed by one register; LATENCY = 1 cycle.
module gmm_parallel_adder
  import asr_gmm_pkg::*;
#(
  parameter int unsigned N = N_LANES,
  parameter int unsigned W = ACC_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] in [N],
  output logic                out_valid,
  output logic signed [W-1:0] sum
);
  localparam int unsigned LEVELS = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned P      = 1 << LEVELS;

  logic signed [W-1:0] tree [LEVELS+1][P];

  always_comb begin
    for (int i = 0; i < P; i++) tree[0][i] = (i < N) ? in[i] : '0;
    for (int l = 1; l <= LEVELS; l++)
      for (int i = 0; i < P; i++)
        tree[l][i] = (i < (P >> l)) ? tree[l-1][2*i] + tree[l-1][2*i+1] : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      sum       <= '0;
    end else begin
      out_valid <= in_valid;
      sum       <= tree[LEVELS][0];
    end
  end
endmodule
