// input_port: receiver side of one link of a switch.
//
// The link carries LANES messages per cycle (the link bandwidth). Each
// message names the virtual channel it is to be written into (deterministic,
// adaptive, to-memory or from-memory). A virtual channel takes at most one
// message per cycle; lanes are served in order, so a second message for the
// same channel in the same cycle, or a message for a full channel, is
// rejected. The accept or reject answer is registered and reaches the sender
// on the next cycle, as stop-channel flow control requires.
//
// The heads of the NVC queues are offered to the switch, which pops them
// with deq. adapt_st reports the adaptive channel to the upstream neighbour:
// whether it has space, whether it is empty and its lowest
// dimension-reversal count.
module input_port
  import noc_pkg::*;
#(
  parameter int unsigned LANES = 2,
  parameter int unsigned DEPTH = 2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  flit_t         in    [LANES],
  output rsp_t          rsp   [LANES],
  output logic          head_valid [NVC],
  output msg_t          head_msg   [NVC],
  input  logic          deq        [NVC],
  output adapt_status_t adapt_st
);

  logic             wr_en  [NVC];
  msg_t             wr_msg [NVC];
  logic             full   [NVC];
  logic [DR_W-1:0]  min_dr [NVC];
  logic [$clog2(DEPTH+1)-1:0] count [NVC];
  logic             acc    [LANES];

  always_comb begin
    for (int v = 0; v < NVC; v++) begin
      wr_en[v]  = 1'b0;
      wr_msg[v] = '0;
    end
    for (int l = 0; l < LANES; l++) begin
      acc[l] = 1'b0;
      if (in[l].valid && !full[in[l].msg.vc] && !wr_en[in[l].msg.vc]) begin
        acc[l]                  = 1'b1;
        wr_en[in[l].msg.vc]     = 1'b1;
        wr_msg[in[l].msg.vc]    = in[l].msg;
      end
    end
  end

  for (genvar v = 0; v < NVC; v++) begin : g_vc
    vc_queue #(.DEPTH(DEPTH)) u_q (
      .clk, .rst_n,
      .wr_en(wr_en[v]), .wr_msg(wr_msg[v]),
      .rd_en(deq[v]),
      .head_valid(head_valid[v]), .head_msg(head_msg[v]),
      .full(full[v]), .count(count[v]), .min_dr(min_dr[v])
    );
  end

  assign adapt_st.space  = !full[VC_ADAPT];
  assign adapt_st.empty  = (count[VC_ADAPT] == '0);
  assign adapt_st.min_dr = min_dr[VC_ADAPT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < LANES; l++) rsp[l] <= '0;
    end else begin
      for (int l = 0; l < LANES; l++) begin
        rsp[l].acc <= in[l].valid && acc[l];
        rsp[l].rej <= in[l].valid && !acc[l];
      end
    end
  end

endmodule
