// Host interface: the Avalon-MM slave through which the processor instructs the GMM
// accelerator and collects the results. Register map (32-bit words, word address):
//   0 STATUS     (read)  [0] engine busy, [2:1] queued state orders, [5:3] queued
//                        results (field widths for the default queue depths)
//   1 OBS_ADDR   (write) SDRAM byte address of the new observation vector o_t; the
//                        write is held (waitrequest) until the engine has finished all
//                        earlier state orders and accepts the load
//   2 SRAM_BASE  (write) SRAM byte address of the next state's means and C
//   3 SDRAM_BASE (write) SDRAM byte address of the next state's weights and g; this
//                        write queues the state order {SRAM_BASE, SDRAM_BASE} and is
//                        held (waitrequest) while the order queue is full
//   4 RESULT     (read)  [31] valid, [15:0] log b_j(o_t) of the oldest finished state;
//                        reading pops it. Reads 0 (valid clear) when none is waiting.
// Reads have a fixed latency of one cycle (readdatavalid). The queue of CMD_DEPTH orders
// lets the processor name the next state while the current one is being computed,
// which is how the fetch of the next state's parameters overlaps with the GMM
// calculation and with the processor's own Viterbi search. That the processor instructs
// the accelerator and receives log b_j(o_t) follows the published design; the register
// map, queues and handshakes are this design's choice.
module gmm_host_if
  import asr_gmm_pkg::*;
#(
  parameter int unsigned CMD_DEPTH = 2,
  parameter int unsigned RES_DEPTH = 4,
  parameter int unsigned W         = DATA_W,
  localparam int unsigned CAW      = $clog2(CMD_DEPTH),
  localparam int unsigned RAW      = $clog2(RES_DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  // Avalon-MM slave
  input  logic [2:0]        avs_address,
  input  logic              avs_read,
  input  logic              avs_write,
  input  logic [BUS_W-1:0]  avs_writedata,
  output logic [BUS_W-1:0]  avs_readdata,
  output logic              avs_readdatavalid,
  output logic              avs_waitrequest,
  // state orders to the engine
  output logic              cmd_valid,
  output state_cmd_t        cmd,
  input  logic              cmd_ready,
  // observation load request to the engine
  output logic              obs_valid,
  output logic [ADDR_W-1:0] obs_addr,
  input  logic              obs_ready,
  // results from the engine
  input  logic              res_valid,
  input  logic [W-1:0]      res_data,
  output logic [RAW:0]      res_count,
  input  logic              engine_busy
);
  logic [ADDR_W-1:0] sram_base_q;
  logic              wr_cmd, wr_obs, rd_res;
  logic              cmd_empty, cmd_full, res_empty;
  logic [CAW:0]      cmd_count;
  logic [W-1:0]      res_head;

  assign wr_cmd = avs_write && avs_address == REG_SDRAM_BASE;
  assign wr_obs = avs_write && avs_address == REG_OBS_ADDR;
  assign rd_res = avs_read  && avs_address == REG_RESULT;

  assign avs_waitrequest = (wr_cmd && cmd_full) || (wr_obs && !obs_ready);
  assign obs_valid       = wr_obs;
  assign obs_addr        = avs_writedata;
  assign cmd_valid       = !cmd_empty;

  gmm_fifo #(.T(state_cmd_t), .DEPTH(CMD_DEPTH)) u_cmdq (
    .clk, .rst_n,
    .push (wr_cmd && !cmd_full),
    .din  ('{sram_base_q, avs_writedata}),
    .pop  (cmd_ready && cmd_valid),
    .dout (cmd),
    .empty(cmd_empty), .full(cmd_full), .count(cmd_count)
  );

  gmm_fifo #(.T(logic [W-1:0]), .DEPTH(RES_DEPTH)) u_resq (
    .clk, .rst_n,
    .push (res_valid),
    .din  (res_data),
    .pop  (rd_res),
    .dout (res_head),
    .empty(res_empty), .full(), .count(res_count)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sram_base_q       <= '0;
      avs_readdata      <= '0;
      avs_readdatavalid <= 1'b0;
    end else begin
      if (avs_write && avs_address == REG_SRAM_BASE) sram_base_q <= avs_writedata;
      avs_readdatavalid <= avs_read;
      if (avs_read) begin
        unique case (avs_address)
          REG_STATUS: avs_readdata <= BUS_W'({res_count, cmd_count, engine_busy});
          REG_RESULT: avs_readdata <= res_empty ? '0 : {1'b1, (BUS_W-1-W)'(0), res_head};
          default:    avs_readdata <= '0;
        endcase
      end
    end
  end

  // the engine never delivers a result the queue has no room for
  a_res_room: assert property (@(posedge clk) disable iff (!rst_n)
    res_valid |-> res_count < (RAW+1)'(RES_DEPTH) || rd_res);
endmodule
