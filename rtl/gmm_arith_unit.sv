// Arithmetic unit of the GMM accelerator: turns a stream of parameter groups into the
// log emission probability log b_j(o_t) of one HMM state.
//
// Each input beat carries N lanes (one feature dimension each) of one mixture:
// o, mu, v and a lane enable. N computation units form ((o - mu)^2 v) per lane, the
// parallel adder sums the N interim values, and an accumulator adds the ceil(D/N)
// beats of a mixture (grp_first starts a sum, grp_last ends it). On grp_last the
// accumulator adds the mixture constants C and g and saturates to 16 bits, giving
//   log b_jm = C_jm + g_jm + sum_d (o_d - mu_jmd)^2 v_jmd.
// The log-add unit then folds the mixtures in order,
//   log b_j = ((log b_j1 (+) log b_j2) (+) ...) (+) log b_jM,
// mix_first starting and mix_last ending a state; out_valid pulses with log b_j.
// The equations, the N parallel units, the parallel adder and the hardware log-add are
// the published design's; pipeline depth and number formats are this design's choice.
//
// Timing: one beat per cycle, no stalls. log b_jm appears on mix_score LATENCY_MIX = 5
// cycles after the grp_last beat; log b_j appears LATENCY_OUT = 6 cycles after the
// beat with grp_last and mix_last.
module gmm_arith_unit
  import asr_gmm_pkg::*;
#(
  parameter int unsigned N = N_LANES,
  parameter int unsigned W = DATA_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic                lane_en   [N],
  input  logic signed [W-1:0] o         [N],
  input  logic signed [W-1:0] mu        [N],
  input  logic signed [W-1:0] v         [N],
  input  logic                grp_first,
  input  logic                grp_last,
  input  logic signed [W-1:0] c,
  input  logic signed [W-1:0] g,
  input  logic                mix_first,
  input  logic                mix_last,
  output logic                mix_valid,
  output logic signed [W-1:0] mix_score,
  output logic                out_valid,
  output logic signed [W-1:0] out_logb
);
  localparam int unsigned PIPE = 4;  // computation units (3) + parallel adder (1)

  // side-band control and constants travel alongside the datapath
  typedef struct packed {
    logic                grp_first;
    logic                grp_last;
    logic                mix_first;
    logic                mix_last;
    logic signed [W-1:0] c;
    logic signed [W-1:0] g;
  } side_t;

  side_t side_q [PIPE];

  logic                    cu_valid [N];
  logic signed [ACC_W-1:0] cu_term  [N];
  logic                    add_valid;
  logic signed [ACC_W-1:0] add_sum;

  for (genvar i = 0; i < N; i++) begin : g_cu
    gmm_comp_unit #(.W(W), .OUT_W(ACC_W)) u_cu (
      .clk, .rst_n,
      .in_valid (in_valid),
      .en       (lane_en[i]),
      .o        (o[i]),
      .mu       (mu[i]),
      .v        (v[i]),
      .out_valid(cu_valid[i]),
      .term     (cu_term[i])
    );
  end

  gmm_parallel_adder #(.N(N), .W(ACC_W)) u_add (
    .clk, .rst_n,
    .in_valid (cu_valid[0]),
    .in       (cu_term),
    .out_valid(add_valid),
    .sum      (add_sum)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < PIPE; s++) side_q[s] <= '0;
    end else begin
      side_q[0] <= '{grp_first, grp_last, mix_first, mix_last, c, g};
      for (int s = 1; s < PIPE; s++) side_q[s] <= side_q[s-1];
    end
  end

  side_t                   sd;
  logic signed [ACC_W-1:0] acc, acc_next;
  logic                    mix_first_q, mix_last_q;
  logic signed [W-1:0]     run, run_next, la_out;

  assign sd = side_q[PIPE-1];

  always_comb acc_next = (sd.grp_first ? '0 : acc) + add_sum;

  gmm_logadd_unit #(.W(W)) u_logadd (.x(run), .y(mix_score), .out(la_out));

  always_comb run_next = mix_first_q ? mix_score : la_out;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc         <= '0;
      mix_valid   <= 1'b0;
      mix_score   <= '0;
      mix_first_q <= 1'b0;
      mix_last_q  <= 1'b0;
      run         <= '0;
      out_valid   <= 1'b0;
      out_logb    <= '0;
    end else begin
      // accumulate one mixture, then add its constants
      mix_valid <= add_valid && sd.grp_last;
      if (add_valid) begin
        acc <= acc_next;
        if (sd.grp_last) begin
          mix_score   <= sat16((ACC_W+2)'(acc_next) + (ACC_W+2)'(sd.c) + (ACC_W+2)'(sd.g));
          mix_first_q <= sd.mix_first;
          mix_last_q  <= sd.mix_last;
        end
      end
      // fold the mixtures with the log-add unit
      out_valid <= mix_valid && mix_last_q;
      if (mix_valid) begin
        run <= run_next;
        if (mix_last_q) out_logb <= run_next;
      end
    end
  end
endmodule
