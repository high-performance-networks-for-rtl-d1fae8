// vc_queue: one virtual-channel buffer of a switch input port.
//
// A circular FIFO of DEPTH messages with one write and one read per cycle
// (a queue accepts at most one message per cycle, as in the design's
// bandwidth/queue studies). Besides the head it reports, for the adaptive
// router's queuing function, whether it is empty and the lowest
// dimension-reversal count among the messages it holds. The default depth of
// 2 is the design's best performance-per-area queue length.
//
// Interface: wr_en/wr_msg push (ignored when full), rd_en pops the head shown
// on head_valid/head_msg. count, full and min_dr describe the state before
// the clock edge. Reset empties the queue.
module vc_queue
  import noc_pkg::*;
#(
  parameter int unsigned DEPTH = 2
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            wr_en,
  input  msg_t            wr_msg,
  input  logic            rd_en,
  output logic            head_valid,
  output msg_t            head_msg,
  output logic            full,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic [DR_W-1:0] min_dr
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  msg_t             mem   [DEPTH];
  logic [DEPTH-1:0] slot_v;
  logic [PW-1:0]    wptr, rptr;

  assign head_valid = slot_v[rptr];
  assign head_msg   = mem[rptr];
  assign full       = &slot_v;

  always_comb begin
    count  = '0;
    min_dr = '1;
    for (int i = 0; i < DEPTH; i++) begin
      if (slot_v[i]) begin
        count = count + 1'b1;
        if (mem[i].dr < min_dr) min_dr = mem[i].dr;
      end
    end
  end

  function automatic logic [PW-1:0] inc(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot_v <= '0;
      wptr   <= '0;
      rptr   <= '0;
    end else begin
      if (rd_en && head_valid) begin
        slot_v[rptr] <= 1'b0;
        rptr         <= inc(rptr);
      end
      if (wr_en && !full) begin
        slot_v[wptr] <= 1'b1;
        wptr         <= inc(wptr);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en && !full) mem[wptr] <= wr_msg;
  end

endmodule
