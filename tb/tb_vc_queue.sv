// tb_vc_queue: random pushes and pops against a reference queue; checks the
// head, full, count and lowest dimension-reversal count every cycle.
module tb_vc_queue;
  import noc_pkg::*;
  localparam int unsigned DEPTH = 2;
  logic clk = 0, rst_n = 0;
  logic wr_en, rd_en, head_valid, full;
  msg_t wr_msg, head_msg;
  logic [$clog2(DEPTH+1)-1:0] count;
  logic [DR_W-1:0] min_dr;
  int checks = 0, failures = 0;
  msg_t model [$];

  vc_queue #(.DEPTH(DEPTH)) dut (.*);

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

  initial begin
    logic [DR_W-1:0] m;
    int sz;
    wr_en = 0; rd_en = 0; wr_msg = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      // compare state
      m = '1;
      foreach (model[k]) if (model[k].dr < m) m = model[k].dr;
      check(head_valid == (model.size() != 0), "head_valid");
      if (model.size() != 0) check(head_msg == model[0], "head_msg");
      check(full == (model.size() == DEPTH), "full");
      check(int'(count) == model.size(), "count");
      check(min_dr == m, "min_dr");
      wr_en = $urandom_range(0, 1);
      rd_en = $urandom_range(0, 1);
      wr_msg = '0;
      wr_msg.dr = DR_W'($urandom);
      wr_msg.data = {4{$urandom}};
      wr_msg.tag = TAG_W'(i);
      @(posedge clk);
      #1;
      sz = model.size();
      if (rd_en && sz != 0) void'(model.pop_front());
      if (wr_en && sz < DEPTH) model.push_back(wr_msg);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
