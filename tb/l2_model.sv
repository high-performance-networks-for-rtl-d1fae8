// l2_model: behavioural model of the memory (L2) side of the network, for
// testbenches only. It accepts every to-memory message on every lane (memory
// is treated as unbounded), keeps it for LATENCY cycles and then sends it
// back on a single stop-channel lane as a from-memory message addressed to
// the cluster that evicted it. Not synthesizable (uses a dynamic queue).
module l2_model
  import noc_pkg::*;
#(
  parameter int unsigned LANES   = 2,
  parameter int unsigned LATENCY = 20
) (
  input  logic  clk,
  input  logic  rst_n,
  input  flit_t to_mem     [LANES],
  output rsp_t  to_mem_rsp [LANES],
  output flit_t from_mem,
  input  rsp_t  from_mem_rsp,
  output int    stored,
  output int    returned
);
  typedef struct { msg_t m; longint due; } entry_t;
  entry_t q [$];
  longint cyc = 0;
  logic load, free;
  msg_t load_msg;

  always_comb begin
    load = free && q.size() != 0 && q[0].due <= cyc;
    load_msg = (q.size() != 0) ? q[0].m : '0;
    load_msg.kind  = K_FROMMEM;
    load_msg.vc    = VC_FROMMEM;
    load_msg.det   = 1'b1;
    load_msg.dr    = '0;
    load_msg.dst_x = load_msg.src_x;
    load_msg.dst_y = load_msg.src_y;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int l = 0; l < LANES; l++) to_mem_rsp[l] <= '0;
      stored <= 0;
      returned <= 0;
    end else begin
      cyc <= cyc + 1;
      if (load) begin
        void'(q.pop_front());
        returned <= returned + 1;
      end
      for (int l = 0; l < LANES; l++) begin
        to_mem_rsp[l].acc <= to_mem[l].valid;
        to_mem_rsp[l].rej <= 1'b0;
        if (to_mem[l].valid) begin
          q.push_back('{m: to_mem[l].msg, due: cyc + LATENCY});
          stored <= stored + 1;
        end
      end
    end
  end

  stop_tx u_ret (.clk, .rst_n, .load, .load_msg, .free, .out(from_mem), .rsp(from_mem_rsp));
endmodule
