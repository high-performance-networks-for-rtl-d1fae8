// network_switch: one router of the dataflow network.
//
// Six ports: N, E, S, W to the neighbouring switches, LOC to the cluster
// (injection in, cluster input queue out) and MEM for the memory channels
// (evicted operands in on lane 0, memory returns in on lane LANES-1 at the
// memory node, traffic to the L2 out). Every port carries LANES messages per
// cycle in each direction.
//
// Pipeline, two cycles per hop: a message arriving on a lane is written into
// the virtual channel it names (input_port). Next cycle the head of every
// channel is routed (route_unit: adaptive selection for the adaptive
// channel, dimension order for the others) and the switch allocator grants,
// per output port, up to one message per free output lane, serving the
// requesting channels round robin from a per-port pointer. A granted head is
// popped and loaded into the output lane (stop_tx), which drives it on the
// link the following cycle and keeps the copy until the receiver answers.
//
// The separate adaptive and deterministic channels, the reserved memory
// channels, stop-channel lanes and round-robin fairness follow the design;
// the allocator structure and the two-stage timing are this
// implementation's choices.
module network_switch
  import noc_pkg::*;
#(
  parameter int unsigned R      = 4,
  parameter int unsigned C      = 4,
  parameter bit          TORUS  = 1'b1,
  parameter int unsigned LANES  = 2,
  parameter int unsigned QDEPTH = 2,
  parameter int unsigned MAX_DR = 3
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [COORD_W-1:0] my_x,
  input  logic [COORD_W-1:0] my_y,
  input  flit_t              in_flit  [NPORT][LANES],
  output rsp_t               in_rsp   [NPORT][LANES],
  output flit_t              out_flit [NPORT][LANES],
  input  rsp_t               out_rsp  [NPORT][LANES],
  output adapt_status_t      adapt_st [4],  // our N,E,S,W input ports
  input  adapt_status_t      nbr_st   [4],  // neighbour's port facing us
  input  logic               nbr_ok   [4]   // a working link exists that way
);

  localparam int unsigned NREQ = NPORT * NVC;
  localparam int unsigned RW   = $clog2(NREQ);

  logic          head_valid [NPORT][NVC];
  msg_t          head_msg   [NPORT][NVC];
  logic          deq        [NPORT][NVC];
  adapt_status_t port_st    [NPORT];

  for (genvar p = 0; p < NPORT; p++) begin : g_in
    input_port #(.LANES(LANES), .DEPTH(QDEPTH)) u_in (
      .clk, .rst_n,
      .in(in_flit[p]), .rsp(in_rsp[p]),
      .head_valid(head_valid[p]), .head_msg(head_msg[p]),
      .deq(deq[p]), .adapt_st(port_st[p])
    );
  end

  for (genvar d = 0; d < 4; d++) begin : g_st
    assign adapt_st[d] = port_st[d];
  end

  // Route every head.
  logic       req_v    [NREQ];
  logic       req_ok   [NREQ];
  logic [2:0] req_port [NREQ];
  msg_t       req_msg  [NREQ];

  for (genvar p = 0; p < NPORT; p++) begin : g_rp
    for (genvar v = 0; v < NVC; v++) begin : g_rv
      route_unit #(.R(R), .C(C), .TORUS(TORUS), .MAX_DR(MAX_DR)) u_rt (
        .my_x, .my_y, .in_port(3'(p)), .msg(head_msg[p][v]),
        .nbr_st, .nbr_ok, .route_ok(req_ok[p*NVC+v]),
        .out_port(req_port[p*NVC+v]), .out_msg(req_msg[p*NVC+v])
      );
      assign req_v[p*NVC+v] = head_valid[p][v] && req_ok[p*NVC+v];
    end
  end

  // Output lanes.
  logic lane_free [NPORT][LANES];
  logic lane_load [NPORT][LANES];
  msg_t lane_msg  [NPORT][LANES];

  for (genvar o = 0; o < NPORT; o++) begin : g_out
    for (genvar l = 0; l < LANES; l++) begin : g_lane
      stop_tx u_tx (
        .clk, .rst_n,
        .load(lane_load[o][l]), .load_msg(lane_msg[o][l]), .free(lane_free[o][l]),
        .out(out_flit[o][l]), .rsp(out_rsp[o][l])
      );
    end
  end

  // Round-robin switch allocation: per output port, walk the requesters from
  // the pointer and give each one the next free lane.
  logic [RW-1:0] rr_ptr  [NPORT];
  logic [RW-1:0] rr_next [NPORT];
  logic          rr_adv  [NPORT];
  logic          grant   [NREQ];

  always_comb begin
    int unsigned r;
    logic        placed;
    logic        used [LANES];
    for (int q = 0; q < NREQ; q++) grant[q] = 1'b0;
    for (int o = 0; o < NPORT; o++) begin
      rr_adv[o]  = 1'b0;
      rr_next[o] = rr_ptr[o];
      for (int l = 0; l < LANES; l++) begin
        lane_load[o][l] = 1'b0;
        lane_msg[o][l]  = '0;
        used[l]         = 1'b0;
      end
      for (int k = 0; k < NREQ; k++) begin
        r = (int'(rr_ptr[o]) + k) % NREQ;
        placed = 1'b0;
        if (req_v[r] && req_port[r] == 3'(o)) begin
          for (int l = 0; l < LANES; l++) begin
            if (!placed && !used[l] && lane_free[o][l]) begin
              placed          = 1'b1;
              used[l]         = 1'b1;
              lane_load[o][l] = 1'b1;
              lane_msg[o][l]  = req_msg[r];
              grant[r]        = 1'b1;
              rr_adv[o]       = 1'b1;
              rr_next[o]      = RW'((r + 1) % NREQ);
            end
          end
        end
      end
    end
  end

  for (genvar p = 0; p < NPORT; p++) begin : g_deq
    for (genvar v = 0; v < NVC; v++) begin : g_dv
      assign deq[p][v] = grant[p*NVC+v];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int o = 0; o < NPORT; o++) rr_ptr[o] <= '0;
    end else begin
      for (int o = 0; o < NPORT; o++) if (rr_adv[o]) rr_ptr[o] <= rr_next[o];
    end
  end

endmodule
