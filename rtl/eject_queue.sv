// eject_queue: a cluster's input queue, with the deadlock-breaking eviction.
//
// Operands arriving from the switch's local output (LANES lanes, one write
// per cycle, lane 0 first) are queued in arrival order and offered to the
// cluster's processing elements with a valid/ready handshake. A processing
// element may be unable to take an operand until its partner arrives, and
// the partner may be stuck behind this very queue. To break that cycle the
// queue evicts an operand: when it has been full for TIMEOUT cycles without
// the cluster taking anything, it removes one entry and sends it, as a
// to-memory message, over the memory channels to the memory node. Memory
// always accepts and later returns the operand to this cluster. To avoid
// livelock the eviction prefers right-hand operands: the oldest right-hand
// operand is evicted, and the head only when none is queued. Returned
// operands are stored as ordinary operands again.
//
// The eviction path is one stop_tx lane feeding lane 0 of the switch's MEM
// port. Queue depth, the full-and-stalled trigger and TIMEOUT are this
// implementation's choices; the design gives the mechanism and the bias.
module eject_queue
  import noc_pkg::*;
#(
  parameter int unsigned LANES   = 2,
  parameter int unsigned DEPTH   = 4,
  parameter int unsigned TIMEOUT = 16,
  parameter int unsigned MEM_X   = 0,
  parameter int unsigned MEM_Y   = 0
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [COORD_W-1:0] my_x,
  input  logic [COORD_W-1:0] my_y,
  input  flit_t              in     [LANES],
  output rsp_t               in_rsp [LANES],
  output logic               pe_valid,
  output msg_t               pe_msg,
  input  logic               pe_ready,
  output flit_t              ev_out,
  input  rsp_t               ev_rsp,
  output logic               evict_event
);

  localparam int unsigned NW = $clog2(DEPTH + 1);
  localparam int unsigned TW = $clog2(TIMEOUT + 1);

  msg_t          q [DEPTH];
  logic [NW-1:0] n;
  logic [TW-1:0] stall;
  logic          ev_free;

  assign pe_valid = (n != '0);
  assign pe_msg   = q[0];

  logic pop, evict, push;
  int unsigned ev_idx, rm_idx, push_lane;
  msg_t ev_msg, push_msg;

  always_comb begin
    ev_idx = 0;
    for (int i = DEPTH - 1; i >= 0; i--)
      if (i < int'(n) && q[i].right) ev_idx = i;
    ev_msg        = q[ev_idx];
    ev_msg.kind   = K_TOMEM;
    ev_msg.vc     = VC_TOMEM;
    ev_msg.det    = 1'b1;
    ev_msg.dr     = '0;
    ev_msg.dst_x  = COORD_W'(MEM_X);
    ev_msg.dst_y  = COORD_W'(MEM_Y);
    ev_msg.src_x  = my_x;
    ev_msg.src_y  = my_y;

    pop    = pe_valid && pe_ready;
    evict  = !pop && (n == NW'(DEPTH)) && (stall >= TW'(TIMEOUT)) && ev_free;
    rm_idx = pop ? 0 : ev_idx;

    push      = 1'b0;
    push_lane = 0;
    for (int l = LANES - 1; l >= 0; l--)
      if (in[l].valid) begin
        push      = (n != NW'(DEPTH));
        push_lane = l;
      end
    push_msg = in[push_lane].msg;
    if (push_msg.kind == K_FROMMEM) push_msg.kind = K_DATA;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n     <= '0;
      stall <= '0;
      for (int l = 0; l < LANES; l++) in_rsp[l] <= '0;
    end else begin
      n <= n - NW'(pop || evict) + NW'(push);
      if (pop || n != NW'(DEPTH)) stall <= '0;
      else if (stall < TW'(TIMEOUT)) stall <= stall + 1'b1;
      for (int l = 0; l < LANES; l++) begin
        in_rsp[l].acc <= in[l].valid && push && (push_lane == l);
        in_rsp[l].rej <= in[l].valid && !(push && (push_lane == l));
      end
    end
  end

  always_ff @(posedge clk) begin
    if (pop || evict) begin
      for (int i = 0; i < DEPTH - 1; i++)
        if (i >= int'(rm_idx)) q[i] <= q[i+1];
      if (push) q[int'(n) - 1] <= push_msg;
    end else if (push) begin
      q[int'(n)] <= push_msg;
    end
  end

  assign evict_event = evict;

  stop_tx u_ev (
    .clk, .rst_n,
    .load(evict), .load_msg(ev_msg), .free(ev_free),
    .out(ev_out), .rsp(ev_rsp)
  );

endmodule
