// tb_stop_tx: drives a stop-channel lane with a receiver model that rejects
// at random. Checks that every loaded message is delivered exactly once, in
// order of acceptance by the receiver, that a rejected message is sent again
// two cycles after its first send, that `free` drops exactly in the cycle a
// reject returns, and that an idle lane sends on the cycle after a load.
module tb_stop_tx;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic load, free;
  msg_t load_msg;
  flit_t out;
  rsp_t rsp;
  int checks = 0, failures = 0;
  int loaded = 0, delivered = 0, rejects = 0;
  bit seen [int];

  stop_tx dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Receiver: answer registered on the next cycle. A rejected message must
  // be on the lane again two cycles after it was sent.
  logic rej_now;
  logic [1:0] pend_v;
  msg_t pend_m [2];
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rsp <= '0;
      pend_v <= '0;
    end else begin
      rej_now = out.valid && ($urandom_range(0, 2) == 0);
      rsp.acc <= out.valid && !rej_now;
      rsp.rej <= rej_now;
      if (out.valid && !rej_now) begin
        delivered++;
        check(!seen.exists(int'(out.msg.data[31:0])), "duplicate delivery");
        seen[int'(out.msg.data[31:0])] = 1;
      end
      if (rej_now) rejects++;
      if (pend_v[1]) check(out.valid && out.msg == pend_m[1], "resend after reject");
      pend_v[1] <= pend_v[0];
      pend_m[1] <= pend_m[0];
      pend_v[0] <= rej_now;
      pend_m[0] <= out.msg;
    end
  end

  initial begin
    load = 0; load_msg = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // latency: idle lane sends the cycle after a load
    @(negedge clk);
    load = 1; load_msg = '0; load_msg.tag = TAG_W'(loaded); loaded++;
    @(posedge clk); #1 load = 0;
    @(negedge clk);
    check(out.valid && out.msg.tag == 0, "send one cycle after load");
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      check(free == !(rsp.rej), "free follows reject");
      load = free && ($urandom_range(0, 3) != 0);
      load_msg = '0;
      load_msg.tag = TAG_W'(loaded);
      load_msg.data = {{3{$urandom}}, 32'(loaded)};
      @(posedge clk);
      if (load) loaded++;
      #1 load = 0;
    end
    repeat (40) @(posedge clk);
    check(delivered == loaded, "all delivered");
    check(rejects > 50, "rejections exercised");
    $display("loaded=%0d delivered=%0d rejects=%0d", loaded, delivered, rejects);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
