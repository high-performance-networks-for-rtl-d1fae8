// tb_input_port: random traffic on both lanes of a link, random pops.
// A reference model applies the acceptance rule (lanes in order, one write
// per channel per cycle, no write into a full channel) and checks the
// registered accept/reject answers one cycle later, every channel head, and
// the adaptive-channel status.
module tb_input_port;
  import noc_pkg::*;
  localparam int unsigned LANES = 2, DEPTH = 2;
  logic clk = 0, rst_n = 0;
  flit_t in [LANES];
  rsp_t rsp [LANES];
  logic head_valid [NVC];
  msg_t head_msg [NVC];
  logic deq [NVC];
  adapt_status_t adapt_st;
  int checks = 0, failures = 0, rejects = 0;
  msg_t model [NVC][$];
  logic exp_acc [LANES], exp_v [LANES];

  input_port #(.LANES(LANES), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit wrote [NVC];
    int sz [NVC];
    logic [DR_W-1:0] m;
    for (int l = 0; l < LANES; l++) begin in[l] = '0; exp_v[l] = 0; end
    for (int v = 0; v < NVC; v++) deq[v] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      // answers to last cycle's messages
      for (int l = 0; l < LANES; l++) begin
        check(rsp[l].acc == (exp_v[l] && exp_acc[l]), "acc");
        check(rsp[l].rej == (exp_v[l] && !exp_acc[l]), "rej");
      end
      for (int v = 0; v < NVC; v++) begin
        check(head_valid[v] == (model[v].size() != 0), "head_valid");
        if (model[v].size() != 0) check(head_msg[v] == model[v][0], "head_msg");
      end
      m = '1;
      foreach (model[VC_ADAPT][k]) if (model[VC_ADAPT][k].dr < m) m = model[VC_ADAPT][k].dr;
      check(adapt_st.space == (model[VC_ADAPT].size() < DEPTH), "space");
      check(adapt_st.empty == (model[VC_ADAPT].size() == 0), "empty");
      check(adapt_st.min_dr == m, "min_dr");
      for (int l = 0; l < LANES; l++) begin
        in[l].valid = $urandom_range(0, 1);
        in[l].msg = '0;
        in[l].msg.vc = 2'($urandom);
        in[l].msg.dr = DR_W'($urandom);
        in[l].msg.tag = TAG_W'(i * LANES + l);
      end
      for (int v = 0; v < NVC; v++) deq[v] = ($urandom_range(0, 2) == 0);
      @(posedge clk);
      #1;
      for (int v = 0; v < NVC; v++) begin wrote[v] = 0; sz[v] = model[v].size(); end
      for (int l = 0; l < LANES; l++) begin
        exp_v[l] = in[l].valid;
        exp_acc[l] = in[l].valid && sz[in[l].msg.vc] < DEPTH && !wrote[in[l].msg.vc];
        if (exp_acc[l]) wrote[in[l].msg.vc] = 1;
        if (in[l].valid && !exp_acc[l]) rejects++;
      end
      for (int v = 0; v < NVC; v++) if (deq[v] && sz[v] != 0) void'(model[v].pop_front());
      for (int l = 0; l < LANES; l++) if (exp_acc[l]) model[in[l].msg.vc].push_back(in[l].msg);
    end
    check(rejects > 20, "rejections exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
