// tb_link_relay: each lane is fed by a stop-channel sender and drained by a
// receiver that rejects at random. Checks that every message crosses the
// relay exactly once (a rejected message is resent after a later one, so order
// within a lane is not kept), that an unloaded relay adds two
// cycles (one into its buffer, one out of its sender), that it rejects when
// its buffer is full, and that the status sideband is delayed by one cycle.
module tb_link_relay;
  import noc_pkg::*;
  localparam int unsigned LANES = 2;
  logic clk = 0, rst_n = 0;
  flit_t in [LANES], out [LANES];
  rsp_t in_rsp [LANES], out_rsp [LANES];
  adapt_status_t st_in, st_out, st_prev;
  int checks = 0, failures = 0, upstream_rejects = 0;
  int sent [LANES], got [LANES];
  logic load [LANES], free [LANES];
  msg_t load_msg [LANES];
  bit sink_stall;
  bit seen [LANES][int];

  link_relay #(.LANES(LANES)) dut (.*);
  for (genvar l = 0; l < LANES; l++) begin : g_src
    stop_tx u_src (.clk, .rst_n, .load(load[l]), .load_msg(load_msg[l]), .free(free[l]),
                   .out(in[l]), .rsp(in_rsp[l]));
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
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sink with random rejects, checks per-lane order
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int l = 0; l < LANES; l++) begin out_rsp[l] <= '0; got[l] = 0; end
    end else begin
      for (int l = 0; l < LANES; l++) begin
        logic r;
        r = out[l].valid && (sink_stall || $urandom_range(0, 3) == 0);
        out_rsp[l].acc <= out[l].valid && !r;
        out_rsp[l].rej <= r;
        if (in_rsp[l].rej) upstream_rejects++;
        if (out[l].valid && !r) begin
          check(!seen[l].exists(int'(out[l].msg.data[31:0])) && int'(out[l].msg.data[31:0]) < sent[l],
                "delivered once");
          seen[l][int'(out[l].msg.data[31:0])] = 1;
          got[l]++;
        end
      end
      check(st_out == st_prev, "status delayed one cycle");
      st_prev <= st_in;
    end
  end

  initial begin
    for (int l = 0; l < LANES; l++) begin load[l] = 0; load_msg[l] = '0; sent[l] = 0; end
    st_in = '0; st_prev = '0; sink_stall = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // latency of an empty relay: load at cycle 0, relay input at 1, output at 3
    @(negedge clk);
    load[0] = 1; load_msg[0] = '0; load_msg[0].tag = 0; sent[0] = 1;
    @(negedge clk);
    load[0] = 0;
    check(in[0].valid, "source sends");
    @(negedge clk);
    check(!out[0].valid, "not yet out");
    @(negedge clk);
    check(out[0].valid && out[0].msg.tag == 0, "relay adds two cycles");
    repeat (5) @(negedge clk);
    sink_stall = 1'b1;  // fill the relay so that it must reject
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      if (i == 200) sink_stall = 1'b0;
      st_in = adapt_status_t'($urandom);
      for (int l = 0; l < LANES; l++) begin
        load[l] = free[l] && ($urandom_range(0, 2) != 0);
        load_msg[l] = '0;
        load_msg[l].tag = TAG_W'(sent[l]);
        load_msg[l].data = {{3{$urandom}}, 32'(sent[l])};
      end
      @(posedge clk);
      for (int l = 0; l < LANES; l++) if (load[l]) sent[l]++;
    end
    @(negedge clk);
    for (int l = 0; l < LANES; l++) load[l] = 0;
    repeat (60) @(posedge clk);
    for (int l = 0; l < LANES; l++) check(got[l] == sent[l], "all delivered");
    for (int l = 0; l < LANES; l++) for (int k = 0; k < sent[l]; k++) if (!seen[l].exists(k)) $display("missing lane %0d idx %0d", l, k);
    check(upstream_rejects > 10, "relay rejected when full");
    $display("sent=%0d/%0d got=%0d/%0d rejects=%0d", sent[0], sent[1], got[0], got[1], upstream_rejects);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
