// Avalon-MM pipelined read master: reads `count` consecutive 32-bit words starting at
// byte address `base` and hands each returned word on out_valid/out_data, in order.
//
// A read is accepted in a cycle where read = 1 and waitrequest = 0; address and read are
// held while waitrequest is high. Responses come back later, in order, with
// readdatavalid; any number may be outstanding. `done` pulses in the cycle after the
// last word was handed on. With a slave that never waits, one word is requested per
// cycle, so `count` words take count + (read latency) + 1 cycles.
module gmm_avm_reader
  import asr_gmm_pkg::*;
#(
  parameter int unsigned CNT_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [ADDR_W-1:0] base,
  input  logic [CNT_W-1:0]  count,
  output logic              busy,
  output logic              done,
  output avm_req_t          req,
  input  avm_rsp_t          rsp,
  output logic              out_valid,
  output logic [BUS_W-1:0]  out_data
);
  logic [CNT_W-1:0] to_issue, to_receive;

  assign out_valid = busy && rsp.readdatavalid;
  assign out_data  = rsp.readdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      done       <= 1'b0;
      req        <= '0;
      to_issue   <= '0;
      to_receive <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy        <= count != '0;
        done        <= count == '0;
        req.address <= base;
        req.read    <= count != '0;
        to_issue    <= count;
        to_receive  <= count;
      end else if (busy) begin
        if (req.read && !rsp.waitrequest) begin
          to_issue    <= to_issue - 1'b1;
          req.address <= req.address + ADDR_W'(BUS_W / 8);
          req.read    <= to_issue != CNT_W'(1);
        end
        if (rsp.readdatavalid) begin
          to_receive <= to_receive - 1'b1;
          if (to_receive == CNT_W'(1)) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end
    end
  end

  // a response never arrives for a read that was not issued
  a_no_spurious_data: assert property (@(posedge clk) disable iff (!rst_n)
    rsp.readdatavalid |-> busy && (to_receive > to_issue));
endmodule
