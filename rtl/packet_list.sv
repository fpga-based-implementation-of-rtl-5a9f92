// packet_list: Packet List Unit of one output port.
//
// Three FIFO queues of packet pointers {block, length}, one per traffic
// class (synchronous, asynchronous, non real-time). The Reception Control
// Unit pushes a pointer into the queue of the packet's class; the
// Transmission Control Unit reads the heads (first-word-fall-through) and
// pops the one it starts to send. A push into a full queue is refused
// (full is checked by the pusher). Three queues per port follow the
// architecture; the depth is this design's choice.
module packet_list
  import ftt_pkg::*;
#(
  parameter int QDEPTH = 32          // power of two
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     push,
  input  tclass_e  push_cls,
  input  pkt_ptr_t push_ptr,
  output logic     full  [3],
  output logic     empty [3],
  output pkt_ptr_t head  [3],
  input  logic     pop   [3]
);
  localparam int QW = $clog2(QDEPTH);
  pkt_ptr_t    q [3][QDEPTH];
  logic [QW:0] wp [3];
  logic [QW:0] rp [3];

  always_comb begin
    for (int c = 0; c < 3; c++) begin
      empty[c] = (wp[c] == rp[c]);
      full[c]  = (wp[c] - rp[c]) == (QW+1)'(QDEPTH);
      head[c]  = q[c][rp[c][QW-1:0]];
    end
  end

  always_ff @(posedge clk) begin
    for (int c = 0; c < 3; c++)
      if (push && push_cls == tclass_e'(c) && !full[c]) q[c][wp[c][QW-1:0]] <= push_ptr;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < 3; c++) begin wp[c] <= '0; rp[c] <= '0; end
    end else begin
      for (int c = 0; c < 3; c++) begin
        if (push && push_cls == tclass_e'(c) && !full[c]) wp[c] <= wp[c] + 1'b1;
        if (pop[c] && !empty[c]) rp[c] <= rp[c] + 1'b1;
      end
    end
  end
endmodule
