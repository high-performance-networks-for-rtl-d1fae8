// tb_route_unit: exhaustive sweep over source, destination and arrival port
// on a 4 x 4 torus and a 4 x 4 grid with random neighbour status and
// randomly broken links. An
// independent model ranks the candidate directions and applies the
// adaptive-channel availability rule; the test compares the chosen port,
// channel, dimension-reversal count, deterministic flag and whether any
// route is open.
module tb_route_unit;
  import noc_pkg::*;
  int checks = 0, failures = 0;
  int adaptive_hits = 0, reversals = 0, fallbacks = 0;

  logic [COORD_W-1:0] my_x, my_y;
  logic [2:0] in_port;
  msg_t msg;
  adapt_status_t nbr_st [4];
  logic nbr_ok [4];
  logic [2:0] op_t, op_g;
  logic ok_t, ok_g;
  int blocked = 0, fault_detours = 0;
  msg_t om_t, om_g;

  route_unit #(.R(4), .C(4), .TORUS(1'b1), .MAX_DR(3)) dut_t (
    .my_x, .my_y, .in_port, .msg, .nbr_st, .nbr_ok, .route_ok(ok_t), .out_port(op_t), .out_msg(om_t));
  route_unit #(.R(4), .C(4), .TORUS(1'b0), .MAX_DR(3)) dut_g (
    .my_x, .my_y, .in_port, .msg, .nbr_st, .nbr_ok, .route_ok(ok_g), .out_port(op_g), .out_msg(om_g));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s x=%0d y=%0d dst=%0d,%0d in=%0d", what, my_x, my_y, msg.dst_x, msg.dst_y, in_port);
    end
  endtask

  function automatic int rd(int a, int b, bit torus);
    int d = (a > b) ? a - b : b - a;
    if (torus && 4 - d < d) d = 4 - d;
    return d;
  endfunction

  // Reference: dimension-order direction.
  function automatic int dor(int x, int y, int dx, int dy, bit torus);
    if (dx != x) begin
      if (torus) return (((dx - x + 4) % 4) <= 2) ? 1 : 3;
      return (dx > x) ? 1 : 3;
    end
    if (dy != y) begin
      if (torus) return (((dy - y + 4) % 4) <= 2) ? 2 : 0;
      return (dy > y) ? 2 : 0;
    end
    return 4;
  endfunction

  task automatic expect_route(input bit torus, output int ep, output msg_t em, output bit eok);
    int x = my_x, y = my_y, dx = msg.dst_x, dy = msg.dst_y;
    int dd = dor(x, y, dx, dy, torus);
    int yd = (dy == y) ? 4 : dor(x, y, x, dy, torus);
    bit dok = (dd >= 4) || nbr_ok[dd];
    bit aok = (yd < 4) && nbr_ok[yd];
    int best = -1, bestd = 99, bestpri = 99;
    int open_d = -1, opend = 99, openpri = 99;
    em = msg;
    eok = 1;
    if (msg.kind == K_TOMEM || msg.kind == K_FROMMEM) begin
      em.vc = (msg.kind == K_TOMEM) ? VC_TOMEM : VC_FROMMEM;
      if (dd == 4) ep = (msg.kind == K_TOMEM) ? 5 : 4;
      else if (dok) ep = dd;
      else if (aok) ep = yd;
      else begin eok = 0; ep = dd; end
      return;
    end
    if (dd == 4) begin ep = 4; return; end
    if (!msg.det || !dok) begin
      // try directions in order: distance, then dimension-order first, then index
      for (int d = 0; d < 4; d++) begin
        int nx = x, ny = y, nd, pri;
        bit ok;
        case (d)
          0: ny = (y + 3) % 4;
          1: nx = (x + 1) % 4;
          2: ny = (y + 1) % 4;
          default: nx = (x + 3) % 4;
        endcase
        nd = rd(nx, dx, torus) + rd(ny, dy, torus);
        pri = (d == dd) ? d : d + 4;
        ok = nbr_ok[d] && d != in_port && (d == dd || msg.dr < 3 || !dok) && nbr_st[d].space &&
             (nbr_st[d].empty || nbr_st[d].min_dr > msg.dr);
        if (ok && (nd < bestd || (nd == bestd && pri < bestpri))) begin
          best = d; bestd = nd; bestpri = pri;
        end
        if (nbr_ok[d] && d != in_port && (nd < opend || (nd == opend && pri < openpri))) begin
          open_d = d; opend = nd; openpri = pri;
        end
      end
    end
    if (best >= 0) begin
      ep = best; em.vc = VC_ADAPT; em.det = 0;
      if (best != dd && msg.dr != 7) em.dr = msg.dr + 1;
    end else begin
      em.vc = VC_DET; em.det = 1;
      if (dok) ep = dd;
      else if (aok) ep = yd;
      else if (open_d >= 0) ep = open_d;
      else begin eok = 0; ep = dd; end
    end
  endtask

  initial begin
    int ep; msg_t em; bit eok;
    for (int torus = 0; torus < 2; torus++)
    for (int x = 0; x < 4; x++) for (int y = 0; y < 4; y++)
    for (int dx = 0; dx < 4; dx++) for (int dy = 0; dy < 4; dy++)
    for (int ip = 0; ip < 6; ip++) for (int rep = 0; rep < 4; rep++) begin
      my_x = 3'(x); my_y = 3'(y); in_port = 3'(ip);
      msg = '0;
      msg.dst_x = 3'(dx); msg.dst_y = 3'(dy);
      msg.dr = DR_W'($urandom_range(0, 7));
      msg.det = ($urandom_range(0, 5) == 0);
      case ($urandom_range(0, 7))
        0: msg.kind = K_TOMEM;
        1: msg.kind = K_FROMMEM;
        default: msg.kind = K_DATA;
      endcase
      msg.vc = 2'($urandom);
      for (int d = 0; d < 4; d++) begin
        nbr_st[d].space = ($urandom_range(0, 3) != 0);
        nbr_st[d].empty = ($urandom_range(0, 1) == 0);
        nbr_st[d].min_dr = DR_W'($urandom_range(0, 4));
        // links off the grid's edge do not exist; any link may be broken
        nbr_ok[d] = ($urandom_range(0, 7) != 0);
        if (!torus && ((d == 0 && y == 0) || (d == 2 && y == 3) ||
                       (d == 3 && x == 0) || (d == 1 && x == 3))) nbr_ok[d] = 0;
      end
      #1;
      expect_route(torus[0], ep, em, eok);
      if (!eok) blocked++;
      if (eok && ep < 4 && ep != dor(x, y, dx, dy, torus[0]) && em.vc != VC_ADAPT) fault_detours++;
      if (torus) begin
        check(ok_t == eok, "torus route_ok");
        if (eok) check(int'(op_t) == ep, "torus port");
        check(om_t == em, "torus msg");
        if (msg.kind == K_DATA && em.vc == VC_ADAPT) adaptive_hits++;
        if (om_t.dr != msg.dr) reversals++;
        if (msg.kind == K_DATA && !msg.det && em.det) fallbacks++;
      end else begin
        check(ok_g == eok, "grid route_ok");
        if (eok) check(int'(op_g) == ep, "grid port");
        check(om_g == em, "grid msg");
      end
    end
    check(adaptive_hits > 100 && reversals > 20 && fallbacks > 20 && blocked > 5 && fault_detours > 5,
          "all routing cases exercised");
    $display("adaptive=%0d reversals=%0d fallbacks=%0d blocked=%0d detours=%0d",
             adaptive_hits, reversals, fallbacks, blocked, fault_detours);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
