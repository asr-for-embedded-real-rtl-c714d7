// Testbench of gmm_obs_buffer: loads random observation vectors word by word (in random
// order, with the spare halfword of the last word set to garbage), then reads every
// group and checks each lane against the vector, lanes past dimension 38 reading 0 and
// the data appearing one cycle after rd_en. Two vectors are loaded in turn. The buffer
// runs with N = 4 so that the last group has a lane past the vector.
module tb_gmm_obs_buffer;
  import asr_gmm_pkg::*;

  localparam int D = D_DIM, N = 4, G = (D + N - 1) / N, NW = (D + 1) / 2;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic we = 0, rd_en = 0;
  logic [4:0] widx = 0;
  logic [31:0] wdata = 0;
  logic [3:0] rd_grp = 0;
  logic signed [15:0] rd_o [N];
  logic [15:0] vec [D];

  gmm_obs_buffer #(.N(N)) dut (.clk, .we, .widx, .wdata, .rd_en, .rd_grp, .rd_o);

  always #5 clk = !clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 2; rep++) begin
      int order [NW];
      foreach (vec[d]) vec[d] = 16'($urandom);
      foreach (order[i]) order[i] = i;
      order.shuffle();
      foreach (order[i]) begin
        @(negedge clk);
        we = 1; widx = 5'(order[i]);
        wdata[15:0]  = vec[2*order[i]];
        wdata[31:16] = (2*order[i] + 1 < D) ? vec[2*order[i]+1] : 16'hdead;
      end
      @(negedge clk); we = 0;
      for (int gi = 0; gi < G; gi++) begin
        @(negedge clk); rd_en = 1; rd_grp = 4'(gi);
        @(negedge clk); rd_en = 0;
        for (int i = 0; i < N; i++) begin
          logic [15:0] e;
          e = (gi*N + i < D) ? vec[gi*N + i] : 16'h0000;
          checks++;
          if (rd_o[i] != e) begin
            failures++;
            if (failures < 10) $display("FAIL grp %0d lane %0d got %h exp %h", gi, i, rd_o[i], e);
          end
        end
        // output holds while rd_en is low
        @(negedge clk);
        checks++;
        if (rd_o[0] != vec[gi*N]) begin failures++; $display("FAIL output did not hold"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
