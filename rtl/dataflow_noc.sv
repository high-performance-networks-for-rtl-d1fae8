// dataflow_noc: the on-chip network of a tiled dataflow processor.
//
// R x C clusters, each with a network_switch and an eject_queue (the
// cluster's input queue). Switches are joined in a torus (TORUS = 1, the
// main configuration) or a grid (TORUS = 0). On the torus every
// wrap-around link runs through a link_relay, so all sender/receiver pairs
// are one cycle apart. Every link carries LANES messages per cycle in each
// direction with stop-channel flow control.
//
// The clusters themselves are outside this module: cluster n = y*C + x
// injects on pe_in[n] (LANES lanes; each message must name VC_ADAPT as its
// channel and carry det = 0, dr = 0) and gets an accept/reject per lane on
// pe_in_rsp[n] one cycle later. It takes operands from pe_valid/pe_msg with
// pe_ready. Memory (the L2) is attached at cluster (MEM_X, MEM_Y): mem_out
// carries the to-memory messages (evicted operands) and mem_in brings them
// back (kind K_FROMMEM, destination = the message's source field), on the
// memory node's MEM port, lane LANES-1. evict_event pulses when a cluster's
// input queue evicts an operand. link_fault[n][d] marks the link leaving
// cluster n in direction d (N, E, S, W) as known broken: the routers stop
// sending on it (set both directions of a physical link). It is a static
// configuration input, like a fault map loaded at start-up.
//
// Defaults follow the design's chosen configuration: 4 x 4 torus, link
// bandwidth 2, two operand channels (one adaptive, one deterministic) of
// queue length 2. The memory attachment point, the input queue depth and the
// eviction timeout are this implementation's choices.
module dataflow_noc
  import noc_pkg::*;
#(
  parameter int unsigned R        = 4,
  parameter int unsigned C        = 4,
  parameter bit          TORUS    = 1'b1,
  parameter int unsigned LANES    = 2,
  parameter int unsigned QDEPTH   = 2,
  parameter int unsigned IQ_DEPTH = 4,
  parameter int unsigned TIMEOUT  = 16,
  parameter int unsigned MAX_DR   = 3,
  parameter int unsigned MEM_X    = 0,
  parameter int unsigned MEM_Y    = 0
) (
  input  logic   clk,
  input  logic   rst_n,
  input  flit_t  pe_in       [R*C][LANES],
  output rsp_t   pe_in_rsp   [R*C][LANES],
  output logic   pe_valid    [R*C],
  output msg_t   pe_msg      [R*C],
  input  logic   pe_ready    [R*C],
  output flit_t  mem_out     [LANES],
  input  rsp_t   mem_out_rsp [LANES],
  input  flit_t  mem_in,
  output rsp_t   mem_in_rsp,
  output logic   evict_event [R*C],
  input  logic   link_fault  [R*C][4]
);

  localparam int unsigned N    = R * C;
  localparam int unsigned MEMN = MEM_Y * C + MEM_X;

  flit_t         sw_in      [N][NPORT][LANES];
  rsp_t          sw_in_rsp  [N][NPORT][LANES];
  flit_t         sw_out     [N][NPORT][LANES];
  rsp_t          sw_out_rsp [N][NPORT][LANES];
  adapt_status_t sw_st      [N][4];
  adapt_status_t sw_nbr_st  [N][4];
  logic          sw_nbr_ok  [N][4];
  flit_t         ev_out     [N];

  for (genvar y = 0; y < R; y++) begin : g_y
    for (genvar x = 0; x < C; x++) begin : g_x
      localparam int unsigned n = y * C + x;

      network_switch #(
        .R(R), .C(C), .TORUS(TORUS), .LANES(LANES), .QDEPTH(QDEPTH), .MAX_DR(MAX_DR)
      ) u_sw (
        .clk, .rst_n,
        .my_x(COORD_W'(x)), .my_y(COORD_W'(y)),
        .in_flit(sw_in[n]), .in_rsp(sw_in_rsp[n]),
        .out_flit(sw_out[n]), .out_rsp(sw_out_rsp[n]),
        .adapt_st(sw_st[n]), .nbr_st(sw_nbr_st[n]), .nbr_ok(sw_nbr_ok[n])
      );

      eject_queue #(
        .LANES(LANES), .DEPTH(IQ_DEPTH), .TIMEOUT(TIMEOUT), .MEM_X(MEM_X), .MEM_Y(MEM_Y)
      ) u_iq (
        .clk, .rst_n,
        .my_x(COORD_W'(x)), .my_y(COORD_W'(y)),
        .in(sw_out[n][P_LOC]), .in_rsp(sw_out_rsp[n][P_LOC]),
        .pe_valid(pe_valid[n]), .pe_msg(pe_msg[n]), .pe_ready(pe_ready[n]),
        .ev_out(ev_out[n]), .ev_rsp(sw_in_rsp[n][P_MEM][0]),
        .evict_event(evict_event[n])
      );

      // Cluster injection and memory-channel inputs.
      for (genvar l = 0; l < LANES; l++) begin : g_lane
        assign sw_in[n][P_LOC][l] = pe_in[n][l];
        assign pe_in_rsp[n][l]    = sw_in_rsp[n][P_LOC][l];
        if (l == 0) begin : g_ev
          assign sw_in[n][P_MEM][l] = ev_out[n];
        end else if (n == MEMN && l == LANES - 1) begin : g_l2
          assign sw_in[n][P_MEM][l] = mem_in;
        end else begin : g_none
          assign sw_in[n][P_MEM][l] = '0;
        end
        if (n == MEMN) begin : g_mo
          assign mem_out[l]              = sw_out[n][P_MEM][l];
          assign sw_out_rsp[n][P_MEM][l] = mem_out_rsp[l];
        end else begin : g_mz
          assign sw_out_rsp[n][P_MEM][l] = '0;
        end
      end
      if (n == MEMN) begin : g_mrsp
        assign mem_in_rsp = sw_in_rsp[n][P_MEM][LANES-1];
      end

      // Neighbour links, organised by the receiving port p of this switch.
      for (genvar p = 0; p < 4; p++) begin : g_link
        localparam bit EDGE =
          (p == P_N && y == 0) || (p == P_S && y == R - 1) ||
          (p == P_W && x == 0) || (p == P_E && x == C - 1);
        localparam int unsigned SX = (p == P_E) ? ((x + 1) % C) :
                                     (p == P_W) ? ((x + C - 1) % C) : x;
        localparam int unsigned SY = (p == P_S) ? ((y + 1) % R) :
                                     (p == P_N) ? ((y + R - 1) % R) : y;
        localparam int unsigned SN = SY * C + SX;
        localparam int unsigned SP = (p == P_N) ? int'(P_S) : (p == P_S) ? int'(P_N) :
                                     (p == P_E) ? int'(P_W) : int'(P_E);

        if (!EDGE) begin : g_direct
          assign sw_in[n][p]           = sw_out[SN][SP];
          assign sw_out_rsp[SN][SP]    = sw_in_rsp[n][p];
          assign sw_nbr_st[SN][SP]     = sw_st[n][p];
          assign sw_nbr_ok[SN][SP]     = !link_fault[SN][SP];
        end else if (TORUS) begin : g_wrap
          link_relay #(.LANES(LANES)) u_relay (
            .clk, .rst_n,
            .in(sw_out[SN][SP]), .in_rsp(sw_out_rsp[SN][SP]),
            .out(sw_in[n][p]), .out_rsp(sw_in_rsp[n][p]),
            .st_in(sw_st[n][p]), .st_out(sw_nbr_st[SN][SP])
          );
          assign sw_nbr_ok[SN][SP] = !link_fault[SN][SP];
        end else begin : g_edge
          for (genvar l = 0; l < LANES; l++) begin : g_tie
            assign sw_in[n][p][l]       = '0;
            assign sw_out_rsp[SN][SP][l] = '0;
          end
          assign sw_nbr_st[SN][SP] = '0;
          assign sw_nbr_ok[SN][SP] = 1'b0;
        end
      end
    end
  end

  initial begin
    assert (LANES >= 2) else $error("dataflow_noc needs LANES >= 2 (memory returns use the last MEM lane)");
    assert (MEM_X < C && MEM_Y < R) else $error("memory node outside the array");
  end

endmodule
