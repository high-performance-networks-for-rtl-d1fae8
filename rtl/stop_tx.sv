// stop_tx: sender side of one lane of a stop-channel link.
//
// Stop-channel flow control never reserves space ahead: a message is sent as
// soon as it is ready and a copy is kept until the receiver answers, one
// cycle later, with accept or reject. Here the output queue is the register
// `hold` (what is driven on the lane this cycle) and the retransmit buffer is
// the register `infl` (what was sent last cycle and awaits its answer). Each
// cycle the sent message moves from hold to infl. A rejected message in infl
// is swapped back into hold and sent again; while that happens the lane
// cannot take a new message (free = 0), which is the "stop" of the scheme.
// An accept, or no answer at all, simply drops the copy.
//
// Interface: load/load_msg from the switch (only taken when free), out to
// the link, rsp from the link. Reset empties both registers. The exact
// one-output-register, one-retransmit-register arrangement is this
// implementation's choice; the design only asks for a small buffer.
module stop_tx
  import noc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  load,
  input  msg_t  load_msg,
  output logic  free,
  output flit_t out,
  input  rsp_t  rsp
);

  flit_t hold, infl;
  logic  rejected;

  assign rejected = infl.valid && rsp.rej;
  assign free     = !rejected;
  assign out      = hold;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold <= '0;
      infl <= '0;
    end else begin
      infl <= hold;
      if (rejected)  hold <= infl;
      else if (load) hold <= '{valid: 1'b1, msg: load_msg};
      else           hold <= '0;
    end
  end

  // An answer belongs to a message sent the cycle before.
  a_rsp_has_msg: assert property (@(posedge clk) disable iff (!rst_n)
    (rsp.acc || rsp.rej) |-> infl.valid);
  a_rsp_onehot: assert property (@(posedge clk) disable iff (!rst_n)
    !(rsp.acc && rsp.rej));
  a_load_free: assert property (@(posedge clk) disable iff (!rst_n)
    load |-> free);

endmodule
