// route_unit: route computation for the message at the head of one virtual
// channel.
//
// Operands in the adaptive channel use the selection function: every
// direction except the one the message came from is a candidate, candidates
// are ranked by the distance from that neighbour to the destination, and the
// first one whose adaptive channel is available wins. A neighbour's adaptive
// channel is available when it has space and every message queued in it has
// a dimension-reversal count strictly greater than this message's (the
// queuing function that keeps adaptive routing deadlock free). Taking a
// direction that dimension-order routing would not have taken increments the
// message's dimension-reversal count. If no adaptive route exists the
// message is marked deterministic and from then on follows dimension-order
// routing (x first, then y) in the deterministic channel. Memory traffic
// always follows dimension order in its own reserved channels.
//
// Known broken links: a neighbour whose nbr_ok is low is never chosen. A
// deterministic or memory message whose dimension-order link is broken
// takes the productive direction in y instead when it still has distance to
// cover there. A deterministic operand may also rejoin the adaptive channel
// (det cleared) if the selection function finds a route, and otherwise takes
// the open direction nearest to its destination (not back where it came
// from) in the deterministic channel. When no way is open route_ok is low
// and the message waits.
//
// Ties between candidates at equal distance go to the dimension-order
// direction, then to the lower port number; on a torus a destination exactly
// half way round is reached by going E or S. The cap MAX_DR on dimension
// reversals bounds detours; a detour forced by a broken link is taken even
// past MAX_DR, the count then saturating at its field's maximum. These are
// this implementation's choices. Purely combinational.
module route_unit
  import noc_pkg::*;
#(
  parameter int unsigned R      = 4,  // rows (y)
  parameter int unsigned C      = 4,  // columns (x)
  parameter bit          TORUS  = 1'b1,
  parameter int unsigned MAX_DR = 3
) (
  input  logic [COORD_W-1:0] my_x,
  input  logic [COORD_W-1:0] my_y,
  input  logic [2:0]         in_port,   // port the message arrived on
  input  msg_t               msg,
  input  adapt_status_t      nbr_st [4], // neighbours' adaptive channels (N,E,S,W)
  input  logic               nbr_ok [4], // link in that direction exists
  output logic               route_ok,   // a usable output exists
  output logic [2:0]         out_port,
  output msg_t               out_msg
);

  // Distance along one dimension of size K.
  function automatic int unsigned dist1(input int unsigned a, input int unsigned b,
                                        input int unsigned k);
    int unsigned d;
    d = (a > b) ? a - b : b - a;
    if (TORUS && (k - d) < d) d = k - d;
    return d;
  endfunction

  // Coordinate one step from a in direction dir (+1 or -1) on a ring/line of K.
  function automatic int unsigned step(input int unsigned a, input bit plus,
                                       input int unsigned k);
    if (plus) return (a == k - 1) ? 0 : a + 1;
    else      return (a == 0) ? k - 1 : a - 1;
  endfunction

  logic [2:0] dor_dir, ydir;
  logic       at_dst, dor_ok, alt_ok;

  always_comb begin
    int unsigned dx, dy;
    dx = 0;
    dy = 0;
    at_dst = (msg.dst_x == my_x) && (msg.dst_y == my_y);
    dor_dir = P_LOC;
    ydir = P_LOC;
    if (msg.dst_y != my_y) begin
      if (TORUS) ydir = (((int'(msg.dst_y) - int'(my_y) + R) % R) <= R / 2) ? P_S : P_N;
      else       ydir = (msg.dst_y > my_y) ? P_S : P_N;
    end
    if (msg.dst_x != my_x) begin
      if (TORUS) begin
        dx = (int'(msg.dst_x) - int'(my_x) + C) % C;
        dor_dir = (dx <= C / 2) ? P_E : P_W;
      end else begin
        dor_dir = (msg.dst_x > my_x) ? P_E : P_W;
      end
    end else if (msg.dst_y != my_y) begin
      if (TORUS) begin
        dy = (int'(msg.dst_y) - int'(my_y) + R) % R;
        dor_dir = (dy <= R / 2) ? P_S : P_N;
      end else begin
        dor_dir = (msg.dst_y > my_y) ? P_S : P_N;
      end
    end
  end

  assign dor_ok = (dor_dir > P_W) || nbr_ok[dor_dir[1:0]];
  assign alt_ok = (ydir <= P_W) && nbr_ok[ydir[1:0]];

  // Selection + queuing function.
  logic       found, open_ok;
  logic [2:0] best, open_dir;

  always_comb begin
    int unsigned best_key, key, nd, nx, ny, open_key;
    found    = 1'b0;
    best     = dor_dir;
    best_key = '1;
    open_ok  = 1'b0;
    open_dir = dor_dir;
    open_key = '1;
    for (int d = 0; d < 4; d++) begin
      nx = int'(my_x);
      ny = int'(my_y);
      case (3'(d))
        P_N: ny = step(int'(my_y), 1'b0, R);
        P_S: ny = step(int'(my_y), 1'b1, R);
        P_E: nx = step(int'(my_x), 1'b1, C);
        default: nx = step(int'(my_x), 1'b0, C);
      endcase
      nd  = dist1(nx, int'(msg.dst_x), C) + dist1(ny, int'(msg.dst_y), R);
      key = nd * 16 + ((3'(d) == dor_dir) ? 0 : 8) + d;
      if (nbr_ok[d] && (3'(d) != in_port) &&
          ((3'(d) == dor_dir) || (msg.dr < DR_W'(MAX_DR)) || !dor_ok) &&
          nbr_st[d].space && (nbr_st[d].empty || nbr_st[d].min_dr > msg.dr) &&
          key < best_key) begin
        found    = 1'b1;
        best     = 3'(d);
        best_key = key;
      end
      if (nbr_ok[d] && (3'(d) != in_port) && key < open_key) begin
        open_ok  = 1'b1;
        open_dir = 3'(d);
        open_key = key;
      end
    end
  end

  always_comb begin
    out_msg  = msg;
    out_port = dor_dir;
    route_ok = 1'b1;
    unique case (msg.kind)
      K_TOMEM, K_FROMMEM: begin
        out_msg.vc = (msg.kind == K_TOMEM) ? VC_TOMEM : VC_FROMMEM;
        if (at_dst)      out_port = (msg.kind == K_TOMEM) ? P_MEM : P_LOC;
        else if (dor_ok) out_port = dor_dir;
        else if (alt_ok) out_port = ydir;
        else             route_ok = 1'b0;
      end
      default: begin
        if (at_dst) begin
          out_port = P_LOC;
        end else if ((!msg.det || !dor_ok) && found) begin
          out_port    = best;
          out_msg.vc  = VC_ADAPT;
          out_msg.det = 1'b0;
          if (best != dor_dir && msg.dr != '1) out_msg.dr = msg.dr + 1'b1;
        end else begin
          out_msg.det = 1'b1;
          out_msg.vc  = VC_DET;
          if (dor_ok)       out_port = dor_dir;
          else if (alt_ok)  out_port = ydir;
          else if (open_ok) out_port = open_dir;
          else              route_ok = 1'b0;
        end
      end
    endcase
  end

endmodule
