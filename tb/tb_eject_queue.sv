// tb_eject_queue: random arrivals on both lanes and a processing element
// that stalls for long stretches. A reference model tracks the queue, the
// stall counter and the eviction choice (oldest right-hand operand, else the
// head) and checks accept/reject answers, the operand offered to the cluster,
// the eviction pulse and the to-memory message sent one cycle later.
module tb_eject_queue;
  import noc_pkg::*;
  localparam int unsigned LANES = 2, DEPTH = 4, TIMEOUT = 16, MEM_X = 2, MEM_Y = 1;
  logic clk = 0, rst_n = 0;
  logic [COORD_W-1:0] my_x = 3, my_y = 2;
  flit_t in [LANES];
  rsp_t in_rsp [LANES];
  logic pe_valid, pe_ready, evict_event;
  msg_t pe_msg;
  flit_t ev_out;
  rsp_t ev_rsp;
  int checks = 0, failures = 0;
  int ev_right = 0, ev_head = 0, returns = 0, popped = 0;

  eject_queue #(.LANES(LANES), .DEPTH(DEPTH), .TIMEOUT(TIMEOUT), .MEM_X(MEM_X), .MEM_Y(MEM_Y))
    dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // memory always accepts
  always_ff @(posedge clk) begin
    ev_rsp.acc <= rst_n && ev_out.valid;
    ev_rsp.rej <= 1'b0;
  end

  initial begin
    msg_t model [$];
    int stall = 0, n, ev_idx, push_lane, sz;
    bit pop, evict, push, exp_ev_v;
    msg_t exp_ev, m;
    bit exp_acc [LANES], exp_v [LANES];
    int seq = 0, phase = 0;
    for (int l = 0; l < LANES; l++) begin in[l] = '0; exp_v[l] = 0; exp_acc[l] = 0; end
    pe_ready = 0; exp_ev_v = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 6000; i++) begin
      @(negedge clk);
      for (int l = 0; l < LANES; l++) begin
        check(in_rsp[l].acc == (exp_v[l] && exp_acc[l]), "acc");
        check(in_rsp[l].rej == (exp_v[l] && !exp_acc[l]), "rej");
      end
      if (exp_ev_v) check(ev_out.valid && ev_out.msg == exp_ev, "evicted message");
      else          check(!ev_out.valid, "no eviction message");
      check(pe_valid == (model.size() != 0), "pe_valid");
      if (model.size() != 0) check(pe_msg == model[0], "pe_msg");
      // stimulus: phases of stalled and running cluster
      if (i % 200 == 0) phase = $urandom_range(0, 1);
      pe_ready = phase ? ($urandom_range(0, 1) == 1) : 1'b0;
      for (int l = 0; l < LANES; l++) begin
        in[l].valid = ($urandom_range(0, 2) == 0);
        in[l].msg = '0;
        in[l].msg.kind = ($urandom_range(0, 3) == 0) ? K_FROMMEM : K_DATA;
        in[l].msg.right = $urandom_range(0, 1);
        in[l].msg.data = {{3{$urandom}}, 32'(seq)};
        in[l].msg.dst_x = my_x; in[l].msg.dst_y = my_y;
        seq++;
      end
      // model
      n = model.size();
      pop = n != 0 && pe_ready;
      ev_idx = 0;
      for (int k = n - 1; k >= 0; k--) if (model[k].right) ev_idx = k;
      evict = !pop && n == DEPTH && stall >= TIMEOUT;
      push = 0; push_lane = 0;
      for (int l = LANES - 1; l >= 0; l--) if (in[l].valid) begin push = n < DEPTH; push_lane = l; end
      #1;
      check(evict_event == evict, "evict_event");
      @(posedge clk);
      #1;
      exp_ev_v = evict;
      if (evict) begin
        exp_ev = model[ev_idx];
        exp_ev.kind = K_TOMEM; exp_ev.vc = VC_TOMEM; exp_ev.det = 1; exp_ev.dr = 0;
        exp_ev.dst_x = MEM_X; exp_ev.dst_y = MEM_Y; exp_ev.src_x = my_x; exp_ev.src_y = my_y;
        if (model[ev_idx].right) ev_right++; else ev_head++;
        model.delete(ev_idx);
      end
      if (pop) begin void'(model.pop_front()); popped++; end
      for (int l = 0; l < LANES; l++) begin
        exp_v[l] = in[l].valid;
        exp_acc[l] = push && push_lane == l;
      end
      if (push) begin
        m = in[push_lane].msg;
        if (m.kind == K_FROMMEM) begin m.kind = K_DATA; returns++; end
        model.push_back(m);
      end
      stall = (pop || n != DEPTH) ? 0 : (stall < TIMEOUT ? stall + 1 : stall);
    end
    check(ev_right > 3 && ev_head > 0 && returns > 10 && popped > 100, "all cases exercised");
    $display("evict right=%0d head=%0d returns=%0d popped=%0d", ev_right, ev_head, returns, popped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
