// Behavioural model of an off-chip memory behind its Avalon-MM controller (the SRAM
// interface or the SDRAM controller), for simulation only. Pipelined reads: a read is
// accepted when read = 1 and waitrequest = 0; its word comes back LATENCY cycles later
// with readdatavalid. waitrequest is raised at random in WAIT_PCT percent of the cycles
// (0 = never waits). The array `mem` is filled by the testbench; the word at byte
// address a is mem[(a / 4) % WORDS]. Read-only: writes are not modelled.
module tb_avalon_mem
  import asr_gmm_pkg::*;
#(
  parameter int unsigned WORDS    = 1024,
  parameter int unsigned LATENCY  = 2,
  parameter int unsigned WAIT_PCT = 0
) (
  input  logic     clk,
  input  logic     rst_n,
  input  avm_req_t req,
  output avm_rsp_t rsp
);
  logic [BUS_W-1:0] mem [WORDS];
  logic             stall;
  logic             pv [LATENCY];
  logic [BUS_W-1:0] pd [LATENCY];
  int unsigned      wait_pct;
  longint           waits;      // cycles a read was held off

  initial wait_pct = WAIT_PCT;

  assign rsp.waitrequest   = req.read && stall;
  assign rsp.readdatavalid = pv[LATENCY-1];
  assign rsp.readdata      = pd[LATENCY-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stall <= 1'b0;
      waits <= 0;
      for (int i = 0; i < LATENCY; i++) begin pv[i] <= 1'b0; pd[i] <= '0; end
    end else begin
      stall <= ($urandom_range(99) < wait_pct);
      if (req.read && stall) waits <= waits + 1;
      pv[0] <= req.read && !stall;
      pd[0] <= mem[(req.address >> 2) % WORDS];
      for (int i = 1; i < LATENCY; i++) begin pv[i] <= pv[i-1]; pd[i] <= pd[i-1]; end
    end
  end

  // Avalon rule: a held read keeps its address
  avalon_mem_model_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (req.read && rsp.waitrequest) |=> (req.read && $stable(req.address)));
endmodule
