// Testbench of gmm_host_if: a processor model writes and reads the slave port while an
// engine model takes state orders and returns results. Checks: state orders come out in
// order with the right SRAM/SDRAM pair; the order write is held by waitrequest while the
// queue is full and completes once the engine takes an order; an observation write is
// held until the engine accepts it and passes its address; results pop in order with the
// valid bit, an empty queue reads 0; STATUS reports busy and the queue levels; reads
// answer one cycle later.
module tb_gmm_host_if;
  import asr_gmm_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [2:0] avs_address = 0;
  logic avs_read = 0, avs_write = 0;
  logic [31:0] avs_writedata = 0, avs_readdata;
  logic avs_readdatavalid, avs_waitrequest;
  logic cmd_valid, cmd_ready = 0, obs_valid, obs_ready = 0;
  state_cmd_t cmd;
  logic [31:0] obs_addr;
  logic res_valid = 0;
  logic [15:0] res_data = 0;
  logic [2:0] res_count;
  logic engine_busy = 0;
  int held;

  gmm_host_if dut (.clk, .rst_n, .avs_address, .avs_read, .avs_write, .avs_writedata,
                   .avs_readdata, .avs_readdatavalid, .avs_waitrequest, .cmd_valid, .cmd,
                   .cmd_ready, .obs_valid, .obs_addr, .obs_ready, .res_valid, .res_data,
                   .res_count, .engine_busy);

  always #5 clk = !clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(longint got, longint e, string what);
    checks++;
    if (got != e) begin failures++; $display("FAIL %s: got %0h exp %0h", what, got, e); end
  endtask

  // write; returns the number of cycles waitrequest held it
  task automatic bus_write(logic [2:0] a, logic [31:0] d, output int waits);
    waits = 0;
    @(negedge clk);
    avs_address = a; avs_write = 1; avs_writedata = d;
    // the write completes on the first rising edge with waitrequest low
    forever begin
      @(posedge clk);
      if (!avs_waitrequest) break;
      waits++;
    end
    @(negedge clk);
    avs_write = 0;
  endtask

  task automatic bus_read(logic [2:0] a, output logic [31:0] d);
    @(negedge clk);
    avs_address = a; avs_read = 1;
    @(negedge clk);
    avs_read = 0;
    expect_eq(avs_readdatavalid, 1, "readdatavalid one cycle after read");
    d = avs_readdata;
  endtask

  initial begin
    logic [31:0] r;
    int w;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // two orders fill the queue
    bus_write(REG_SRAM_BASE, 32'h100, w);
    bus_write(REG_SDRAM_BASE, 32'h2000, w);
    expect_eq(w, 0, "first order not held");
    bus_write(REG_SRAM_BASE, 32'h140, w);
    bus_write(REG_SDRAM_BASE, 32'h2140, w);
    expect_eq(w, 0, "second order not held");
    bus_read(REG_STATUS, r);
    expect_eq(r[2:1], 2, "status: two orders queued");
    expect_eq(cmd_valid, 1, "order visible");
    expect_eq(cmd.sram_base, 32'h100, "first order SRAM base");
    expect_eq(cmd.sdram_base, 32'h2000, "first order SDRAM base");
    // a third order is held until the engine takes one, 7 cycles later
    fork
      bus_write(REG_SDRAM_BASE, 32'h3000, held);
      begin
        repeat (7) @(negedge clk);
        cmd_ready = 1;
        @(negedge clk);
        cmd_ready = 0;
      end
    join
    expect_eq(held >= 6 && held <= 8, 1, "third order held while the queue is full");
    expect_eq(cmd.sram_base, 32'h140, "second order SRAM base");
    expect_eq(cmd.sdram_base, 32'h2140, "second order SDRAM base");
    @(negedge clk); cmd_ready = 1;
    @(negedge clk); cmd_ready = 0;
    expect_eq(cmd.sram_base, 32'h140, "third order keeps the last SRAM base");
    expect_eq(cmd.sdram_base, 32'h3000, "third order SDRAM base");
    @(negedge clk); cmd_ready = 1;
    @(negedge clk); cmd_ready = 0;
    expect_eq(cmd_valid, 0, "order queue drained");
    // observation load waits for the engine
    fork
      bus_write(REG_OBS_ADDR, 32'h8000, held);
      begin
        repeat (4) @(negedge clk);
        #2;
        expect_eq(obs_valid, 1, "obs request visible");
        expect_eq(obs_addr, 32'h8000, "obs address");
        obs_ready = 1;
        @(negedge clk);
        obs_ready = 0;
      end
    join
    expect_eq(held >= 3 && held <= 5, 1, "obs write held until accepted");
    // results
    bus_read(REG_RESULT, r);
    expect_eq(r, 0, "empty result queue reads 0");
    for (int i = 0; i < 3; i++) begin
      @(negedge clk); res_valid = 1; res_data = 16'(16'hff00 + i * 3);
    end
    @(negedge clk); res_valid = 0; engine_busy = 1;
    bus_read(REG_STATUS, r);
    expect_eq(r[0], 1, "status busy");
    expect_eq(r[5:3], 3, "status: three results");
    for (int i = 0; i < 3; i++) begin
      bus_read(REG_RESULT, r);
      expect_eq(r, {1'b1, 15'd0, 16'(16'hff00 + i * 3)}, "result in order");
    end
    bus_read(REG_RESULT, r);
    expect_eq(r[31], 0, "result queue empty again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
