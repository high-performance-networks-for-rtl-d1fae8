// link_relay: message relay placed on a long wrap-around link of the torus.
//
// The torus' wrap-around links are longer than the others; splitting each
// into two one-cycle segments keeps every sender and receiver one clock
// cycle apart, which stop-channel flow control relies on. Each lane of the
// relay receives like a switch input (a two-entry buffer, accept or reject
// answered on the next cycle) and sends like a switch output (stop_tx). The
// relay does not look at messages: lane order is kept and the channel a
// message names is passed on unchanged. The adaptive-channel status of the
// far switch, travelling the other way, is delayed by one register stage.
//
// The relay's buffer depth and its status register are this
// implementation's choices; the design only names relays.
module link_relay
  import noc_pkg::*;
#(
  parameter int unsigned LANES = 2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  flit_t         in      [LANES],
  output rsp_t          in_rsp  [LANES],
  output flit_t         out     [LANES],
  input  rsp_t          out_rsp [LANES],
  input  adapt_status_t st_in,   // from the far switch
  output adapt_status_t st_out   // to the near sender
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) st_out <= '0;
    else        st_out <= st_in;
  end

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    msg_t buf_q [2];
    logic [1:0] cnt;
    logic       take, fwd, free;

    assign take = in[l].valid && (cnt != 2'd2);
    assign fwd  = (cnt != 2'd0) && free;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        cnt       <= '0;
        in_rsp[l] <= '0;
      end else begin
        in_rsp[l].acc <= take;
        in_rsp[l].rej <= in[l].valid && !take;
        cnt <= cnt + {1'b0, take} - {1'b0, fwd};
      end
    end

    // buf_q[0] is the older entry.
    always_ff @(posedge clk) begin
      if (fwd) begin
        buf_q[0] <= (cnt == 2'd2) ? buf_q[1] : in[l].msg;
        if (take) buf_q[1] <= in[l].msg;
      end else if (take) begin
        buf_q[cnt[0]] <= in[l].msg;
      end
    end

    stop_tx u_tx (
      .clk, .rst_n,
      .load(fwd), .load_msg(buf_q[0]), .free,
      .out(out[l]), .rsp(out_rsp[l])
    );
  end

endmodule
