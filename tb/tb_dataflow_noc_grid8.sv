// tb_dataflow_noc_grid8: the same end-to-end test on the 8 x 8 grid
// configuration (TORUS = 0), the array size used to illustrate routing
// congestion. Latencies checked: one hop (5 cycles), two hops (7), seven
// hops along a row (17) and corner to corner, 14 hops (31). Random traffic
// with one stalled cluster; every operand must arrive once, unchanged, at
// its destination, and rejection, dimension reversal, deterministic
// fallback, dual-lane use, right-hand eviction and memory return must all
// happen, and one link marked broken (as in the broken-link example) must
// stay unused while operands between its two ends still arrive.
module tb_dataflow_noc_grid8;
  import noc_pkg::*;
  localparam int unsigned R = 8, C = 8, N = 64, LANES = 2;
  logic clk = 0, rst_n = 0;
  flit_t pe_in [N][LANES];
  rsp_t  pe_in_rsp [N][LANES];
  logic  pe_valid [N], pe_ready [N], evict_event [N];
  msg_t  pe_msg [N];
  flit_t mem_out [LANES], mem_in;
  rsp_t  mem_out_rsp [LANES], mem_in_rsp;
  int    l2_stored, l2_returned;
  logic  link_fault [N][4];
  int    broken_use = 0, across_break = 0;

  logic load [N][LANES], free [N][LANES];
  msg_t load_msg [N][LANES];

  int checks = 0, failures = 0;
  int sent = 0, got = 0, rejects = 0, reversals = 0, det_fallback = 0;
  int relay_use = 0, dual_lane = 0, evictions = 0, right_evictions = 0;
  int dst_of [int];
  msg_t orig [int];
  bit gone [int];
  bit traffic = 0, stall5 = 0, latency_mode = 0;
  longint cyc = 0;

  dataflow_noc #(.R(R), .C(C), .TORUS(1'b0)) dut (.*);

  l2_model #(.LANES(LANES), .LATENCY(20)) u_l2 (
    .clk, .rst_n, .to_mem(mem_out), .to_mem_rsp(mem_out_rsp),
    .from_mem(mem_in), .from_mem_rsp(mem_in_rsp), .stored(l2_stored), .returned(l2_returned));

  for (genvar n = 0; n < N; n++) begin : g_pe
    for (genvar l = 0; l < LANES; l++) begin : g_l
      stop_tx u_src (.clk, .rst_n, .load(load[n][l]), .load_msg(load_msg[n][l]),
                     .free(free[n][l]), .out(pe_in[n][l]), .rsp(pe_in_rsp[n][l]));
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
    #20000000;
    failures++;
    $display("watchdog expired: sent=%0d got=%0d", sent, got);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Observation: deliveries, rejects, evictions, relay and lane use.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      cyc <= cyc + 1;
      for (int n = 0; n < N; n++) begin
        for (int l = 0; l < LANES; l++) if (pe_in_rsp[n][l].rej) rejects++;
        if (evict_event[n]) evictions++;
        if (pe_valid[n] && pe_ready[n]) begin
          int id;
          msg_t e;
          id = int'(pe_msg[n].data[31:0]);
          got++;
          check(dst_of.exists(id) && !gone.exists(id), "delivered once");
          if (dst_of.exists(id)) begin
            e = orig[id];
            check(dst_of[id] == n, "delivered at destination");
            check(pe_msg[n].data == e.data && pe_msg[n].right == e.right &&
                  pe_msg[n].tag == e.tag && pe_msg[n].kind == K_DATA, "operand intact");
          end
          gone[id] = 1;
          if (n == 28 && pe_msg[n].src_x == 3'(27 % C) && pe_msg[n].src_y == 3'(27 / C)) across_break++;
          if (pe_msg[n].dr != 0) reversals++;
          if (pe_msg[n].det && pe_msg[n].vc == VC_DET) det_fallback++;
        end
      end
      if (dut.sw_out[27][1][0].valid || dut.sw_out[27][1][1].valid ||
          dut.sw_out[28][3][0].valid || dut.sw_out[28][3][1].valid) broken_use++;
      for (int l = 0; l < LANES; l++) if (mem_out[l].valid && mem_out[l].msg.right) right_evictions++;
      for (int n = 0; n < N; n++)
        for (int p = 0; p < 4; p++)
          if (dut.sw_out[n][p][0].valid && dut.sw_out[n][p][1].valid) dual_lane++;
    end
  end

  // Cluster models.
  always @(negedge clk) begin
    for (int n = 0; n < N; n++) begin
      pe_ready[n] = latency_mode ? 1'b1 :
                    (n == 5 && stall5) ? 1'b0 : ($urandom_range(0, 3) != 0);
      for (int l = 0; l < LANES; l++) begin
        load[n][l] = 0;
        if (traffic && free[n][l] && $urandom_range(0, 19) == 0) begin
          msg_t m;
          int d;
          d = (n != 5 && $urandom_range(0, 5) == 0) ? 5 : $urandom_range(0, N - 1);
          m = '0;
          m.kind = K_DATA; m.vc = VC_ADAPT;
          m.right = $urandom_range(0, 1);
          m.dst_x = 3'(d % C); m.dst_y = 3'(d / C);
          m.src_x = 3'(n % C); m.src_y = 3'(n / C);
          m.tag = TAG_W'($urandom);
          m.data = {{3{$urandom}}, 32'(sent)};
          dst_of[sent] = d; orig[sent] = m;
          sent++;
          load[n][l] = 1; load_msg[n][l] = m;
        end
      end
    end
  end

  task automatic one_message(input int s, input int d, input int expect_cycles);
    msg_t m;
    longint t0;
    int id;
    @(negedge clk);
    m = '0; m.kind = K_DATA; m.vc = VC_ADAPT;
    m.dst_x = 3'(d % C); m.dst_y = 3'(d / C); m.src_x = 3'(s % C); m.src_y = 3'(s / C);
    id = sent;
    m.data = 128'(id);
    dst_of[id] = d; orig[id] = m; sent++;
    #1 load[s][0] = 1; load_msg[s][0] = m;
    @(negedge clk);
    t0 = cyc;   // message is on the injection link in this cycle
    #1 load[s][0] = 0;
    while (!pe_valid[d]) @(negedge clk);
    check(cyc - t0 == expect_cycles, $sformatf("latency %0d -> %0d", s, d));
    $display("latency %0d -> %0d: %0d cycles", s, d, cyc - t0);
    repeat (3) @(negedge clk);
  endtask

  initial begin
    for (int n = 0; n < N; n++) for (int l = 0; l < LANES; l++) begin load[n][l] = 0; load_msg[n][l] = '0; end
    // one known broken link, between clusters 27 and 28 (both directions)
    for (int n = 0; n < N; n++) for (int d = 0; d < 4; d++) link_fault[n][d] = 1'b0;
    link_fault[27][1] = 1'b1;
    link_fault[28][3] = 1'b1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    latency_mode = 1;
    repeat (2) @(negedge clk);
    one_message(0, 1, 5);   // one hop
    one_message(0, 2, 7);   // two hops
    one_message(0, 7, 17);  // seven hops along the top row
    one_message(63, 0, 31); // corner to corner
    latency_mode = 0;
    // heavy traffic, cluster 5 stalled for the first part
    stall5 = 1;
    traffic = 1;
    repeat (800) @(negedge clk);
    stall5 = 0;
    repeat (800) @(negedge clk);
    traffic = 0;
    repeat (1500) @(negedge clk);
    check(got == sent, "every operand delivered");
    check(rejects > 0, "stop-channel rejection happened");
    check(reversals > 0, "dimension reversal happened");
    check(det_fallback > 0, "deterministic fallback happened");
    check(dual_lane > 0, "both lanes of a link used in one cycle");
    check(evictions > 0, "eviction happened");
    check(broken_use == 0, "broken link never used");
    check(across_break > 0, "operands routed around the broken link");
    check(right_evictions > 0, "right-hand operand evicted");
    check(l2_returned > 0 && l2_returned == l2_stored, "memory returned every evicted operand");
    $display("sent=%0d got=%0d rejects=%0d reversals=%0d det=%0d relay=%0d dual=%0d evict=%0d right=%0d l2=%0d/%0d",
             sent, got, rejects, reversals, det_fallback, relay_use, dual_lane, evictions,
             right_evictions, l2_stored, l2_returned);
    $display("broken link uses=%0d operands across it=%0d", broken_use, across_break);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
