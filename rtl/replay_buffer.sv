// replay_buffer: the wide cluster's separate scheduler port for replays.
//
// Holds, in arrival order, the payload of instructions that were
// mis-predicted in the fast cluster. The head is offered to the wide
// cluster's lane 0, which takes it with priority over its own queue as soon
// as the head's sources are available in the Long file (pop). count lets the
// fast cluster stop issuing before the buffer could overflow.
// A first-in first-out buffer of DEPTH entries; push and pop may happen in
// the same cycle. Highest priority and the separate port follow the document;
// the FIFO form and its depth are this design's.
module replay_buffer
  import acp_pkg::*;
#(
  parameter int DEPTH = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       push,
  input  uop_t                       push_uop,
  input  logic                       pop,
  output logic                       head_valid,
  output uop_t                       head_uop,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int PW = $clog2(DEPTH);
  uop_t          buf_q [DEPTH];
  logic [PW-1:0] rp_q, wp_q;
  logic [$clog2(DEPTH+1)-1:0] cnt_q;

  assign head_valid = (cnt_q != '0);
  assign head_uop   = buf_q[rp_q];
  assign count      = cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rp_q  <= '0;
      wp_q  <= '0;
      cnt_q <= '0;
      for (int i = 0; i < DEPTH; i++) buf_q[i] <= '0;
    end else begin
      if (push) begin
        buf_q[wp_q] <= push_uop;
        wp_q <= (wp_q == PW'(DEPTH-1)) ? '0 : wp_q + 1'b1;
      end
      if (pop && head_valid)
        rp_q <= (rp_q == PW'(DEPTH-1)) ? '0 : rp_q + 1'b1;
      cnt_q <= cnt_q + ($clog2(DEPTH+1))'(push) - ($clog2(DEPTH+1))'(pop && head_valid);
    end
  end

  no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                push |-> (cnt_q < ($clog2(DEPTH+1))'(DEPTH)) || pop)
    else $error("replay_buffer: overflow");
endmodule
