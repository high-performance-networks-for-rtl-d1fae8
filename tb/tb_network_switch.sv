// tb_network_switch: one switch at (1,1) of a 4 x 4 torus, every input lane
// fed by a stop-channel sender, every output lane drained by a receiver that
// rejects at random, neighbour adaptive-channel status random.
// Checks: two-cycle hop latency through an idle switch; both lanes of one
// output used in the same cycle; every message leaves exactly once; each
// departure obeys the routing rules (local delivery at the destination,
// memory traffic on dimension order in its reserved channel, deterministic
// messages on dimension order, adaptive messages never sent back where they
// came from and counting a dimension reversal exactly when leaving the
// dimension-order direction).
module tb_network_switch;
  import noc_pkg::*;
  localparam int unsigned LANES = 2;
  logic clk = 0, rst_n = 0;
  logic [COORD_W-1:0] my_x = 1, my_y = 1;
  flit_t in_flit [NPORT][LANES], out_flit [NPORT][LANES];
  rsp_t in_rsp [NPORT][LANES], out_rsp [NPORT][LANES];
  adapt_status_t adapt_st [4], nbr_st [4];
  logic nbr_ok [4];
  logic load [NPORT][LANES], free [NPORT][LANES];
  msg_t load_msg [NPORT][LANES];
  int checks = 0, failures = 0, sent = 0, got = 0, dual = 0, adapt = 0, rev = 0, det = 0;
  int inport_of [int];
  bit gone [int];
  bit rej_enable = 0;

  network_switch #(.R(4), .C(4), .TORUS(1'b1), .LANES(LANES), .QDEPTH(2), .MAX_DR(3)) dut (.*);
  for (genvar p = 0; p < NPORT; p++) begin : g_p
    for (genvar l = 0; l < LANES; l++) begin : g_l
      stop_tx u_src (.clk, .rst_n, .load(load[p][l]), .load_msg(load_msg[p][l]),
                     .free(free[p][l]), .out(in_flit[p][l]), .rsp(in_rsp[p][l]));
    end
  end
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int dor(int dx, int dy);
    if (dx != 1) return (((dx - 1 + 4) % 4) <= 2) ? 1 : 3;
    if (dy != 1) return (((dy - 1 + 4) % 4) <= 2) ? 2 : 0;
    return 4;
  endfunction

  // sinks
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int o = 0; o < NPORT; o++) for (int l = 0; l < LANES; l++) out_rsp[o][l] <= '0;
    end else begin
      for (int o = 0; o < NPORT; o++) begin
        if (out_flit[o][0].valid && out_flit[o][1].valid) dual++;
        for (int l = 0; l < LANES; l++) begin
          logic r;
          msg_t m;
          int id, d;
          m = out_flit[o][l].msg;
          r = out_flit[o][l].valid && rej_enable && ($urandom_range(0, 3) == 0);
          out_rsp[o][l].acc <= out_flit[o][l].valid && !r;
          out_rsp[o][l].rej <= r;
          if (out_flit[o][l].valid && !r) begin
            id = int'(m.data[31:0]);
            got++;
            check(inport_of.exists(id) && !gone.exists(id), "delivered once");
            gone[id] = 1;
            d = dor(m.dst_x, m.dst_y);
            if (m.kind == K_TOMEM) check(o == ((d == 4) ? 5 : d) && m.vc == VC_TOMEM, "to-mem route");
            else if (m.kind == K_FROMMEM) check(o == d && m.vc == VC_FROMMEM, "from-mem route");
            else if (d == 4) check(o == 4, "local delivery");
            else if (m.vc == VC_DET) begin
              det++;
              check(o == d && m.det, "deterministic route");
            end else begin
              adapt++;
              check(m.vc == VC_ADAPT && o < 4 && o != inport_of[id], "adaptive route");
              check(int'(m.dr) == (m.data[63:32] + ((o != d) ? 1 : 0)), "dimension reversal count");
              if (o != d) rev++;
            end
          end
        end
      end
    end
  end

  task automatic send(input int p, input int l, input msg_t m);
    load[p][l] = 1; load_msg[p][l] = m;
    inport_of[int'(m.data[31:0])] = p;
    sent++;
  endtask

  function automatic msg_t mk(input int id, input int dx, input int dy, input kind_e k, input int vcsel);
    msg_t m = '0;
    m.kind = k; m.dst_x = 3'(dx); m.dst_y = 3'(dy);
    m.dr = DR_W'($urandom_range(0, 2));
    m.vc = (k == K_TOMEM) ? VC_TOMEM : (k == K_FROMMEM) ? VC_FROMMEM : 2'(vcsel);
    m.det = (m.vc == VC_DET);
    m.data = {64'($urandom), 32'(m.dr), 32'(id)};
    return m;
  endfunction

  initial begin
    int id = 0, t0;
    for (int p = 0; p < NPORT; p++) for (int l = 0; l < LANES; l++) begin load[p][l] = 0; load_msg[p][l] = '0; end
    for (int d = 0; d < 4; d++) begin nbr_st[d] = '{space: 1'b1, empty: 1'b1, min_dr: '1}; nbr_ok[d] = 1; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // hop latency: message on the W input link at cycle t leaves on E at t+2
    @(negedge clk);
    send(P_W, 0, mk(id++, 3, 1, K_DATA, VC_DET));
    @(negedge clk);
    load[P_W][0] = 0;
    check(in_flit[P_W][0].valid, "on input link");
    @(negedge clk);
    check(!out_flit[P_E][0].valid && !out_flit[P_E][1].valid, "not yet out");
    @(negedge clk);
    check(out_flit[P_E][0].valid || out_flit[P_E][1].valid, "two-cycle hop");
    repeat (5) @(negedge clk);
    // burst: all inputs to the east
    for (int p = 0; p < 5; p++) send(p, 0, mk(id++, 2, 1, K_DATA, VC_DET));
    @(negedge clk);
    for (int p = 0; p < 5; p++) load[p][0] = 0;
    repeat (10) @(negedge clk);
    check(dual > 0, "both lanes of one output in one cycle");
    // random traffic with random rejects and random neighbour status
    rej_enable = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      for (int d = 0; d < 4; d++) begin
        nbr_st[d].space = ($urandom_range(0, 3) != 0);
        nbr_st[d].empty = $urandom_range(0, 1);
        nbr_st[d].min_dr = DR_W'($urandom_range(0, 4));
      end
      for (int p = 0; p < NPORT; p++) for (int l = 0; l < LANES; l++) begin
        load[p][l] = 0;
        if (free[p][l] && $urandom_range(0, 5) == 0) begin
          kind_e k;
          int dx, dy;
          k = (p == P_MEM) ? (($urandom_range(0, 1) == 0) ? K_TOMEM : K_FROMMEM) :
              (($urandom_range(0, 9) == 0) ? K_TOMEM : K_DATA);
          dx = $urandom_range(0, 3); dy = $urandom_range(0, 3);
          send(p, l, mk(id++, dx, dy, k, $urandom_range(0, 1)));
        end
      end
    end
    @(negedge clk);
    for (int p = 0; p < NPORT; p++) for (int l = 0; l < LANES; l++) load[p][l] = 0;
    rej_enable = 0;
    for (int d = 0; d < 4; d++) nbr_st[d] = '{space: 1'b1, empty: 1'b1, min_dr: '1};
    repeat (100) @(negedge clk);
    check(got == sent, "all messages left the switch");
    check(adapt > 50 && rev > 10 && det > 50, "adaptive, reversal and deterministic routes seen");
    $display("sent=%0d got=%0d dual=%0d adapt=%0d rev=%0d det=%0d", sent, got, dual, adapt, rev, det);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
