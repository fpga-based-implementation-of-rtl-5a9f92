// reception_control: Reception Control Unit.
//
// Serves the packet descriptors of the NPORTS Reception Buffer Units, one
// per cycle, in round-robin order, and decides where each packet goes:
//   - FTT packets (synchronous and asynchronous) to the output ports named
//     by their EC-schedule entry, i.e. by the Trigger Message only;
//   - non-FTT packets by the Forwarding Table: a known unicast address to
//     its port, broadcast, multicast and unknown addresses to all ports,
//     never back to the input port; the source address is learned.
// It then pushes the pointer {block, length} into the queue of the
// packet's class in the Packet List Unit of every chosen port, skipping
// ports whose queue is full, and commits the block to the buffer manager
// with the number of ports as its reference count. A packet of a class
// whose memory subdivision is exhausted (quota_ok low) is dropped.
// The forwarding rules follow the architecture; round-robin service and
// the full-queue rule are this design's choices.
module reception_control
  import ftt_pkg::*;
#(
  parameter int NPORTS = NPORTS_DEF
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              desc_valid [NPORTS],
  input  rx_desc_t          desc       [NPORTS],
  output logic              desc_ready [NPORTS],
  // Forwarding Table
  output logic [47:0]       lk_mac,
  input  logic              lk_hit,
  input  logic [PORT_W-1:0] lk_port,
  output logic              learn_valid,
  output logic [47:0]       learn_mac,
  output logic [PORT_W-1:0] learn_port,
  // buffer manager
  input  logic              quota_ok [3],
  output logic              commit_valid,
  output logic [BLK_W-1:0]  commit_blk,
  output tclass_e           commit_cls,
  output logic [3:0]        commit_refs,
  // Packet List Units
  output logic              pl_push [NPORTS],
  output tclass_e           pl_cls,
  output pkt_ptr_t          pl_ptr,
  input  logic              pl_full [NPORTS][3],
  // events
  output logic              ev_flood,
  output logic              ev_quota_drop
);
  localparam int SW = (NPORTS > 1) ? $clog2(NPORTS) : 1;
  logic [SW-1:0] rr;

  logic          any;
  logic [SW-1:0] sel;
  always_comb begin
    any = 1'b0; sel = '0;
    for (int i = NPORTS - 1; i >= 0; i--) begin
      if (desc_valid[(int'(rr) + i) % NPORTS]) begin any = 1'b1; sel = SW'((int'(rr) + i) % NPORTS); end
    end
  end

  rx_desc_t d;
  assign d = desc[sel];

  logic [NPORTS-1:0] all_ports, in_bit, mask;
  logic              flood;
  assign all_ports = '1;
  assign in_bit    = NPORTS'(1) << sel;

  assign lk_mac = d.dst;

  always_comb begin
    flood = 1'b0;
    if (d.by_mac) begin
      if (d.dst[40] || !lk_hit) begin
        flood = 1'b1;
        mask  = all_ports & ~in_bit;
      end else mask = (NPORTS'(1) << lk_port) & ~in_bit;
    end else mask = d.out_mask[NPORTS-1:0] & ~in_bit;
    if (!quota_ok[d.cls]) mask = '0;
    for (int p = 0; p < NPORTS; p++)
      if (pl_full[p][d.cls]) mask[p] = 1'b0;
  end

  always_comb begin
    for (int p = 0; p < NPORTS; p++) begin
      desc_ready[p] = any && (sel == SW'(p));
      pl_push[p]    = any && mask[p];
    end
    pl_cls       = d.cls;
    pl_ptr       = '{blk: d.blk, len: d.len};
    commit_valid = any;
    commit_blk   = d.blk;
    commit_cls   = d.cls;
    commit_refs  = '0;
    for (int p = 0; p < NPORTS; p++) commit_refs = commit_refs + 4'(mask[p]);
    learn_valid  = any && d.by_mac && !d.src[40];
    learn_mac    = d.src;
    learn_port   = PORT_W'(sel);
    ev_flood      = any && flood;
    ev_quota_drop = any && !quota_ok[d.cls];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rr <= '0;
    else if (any) rr <= (sel == SW'(NPORTS - 1)) ? '0 : sel + 1'b1;
  end
endmodule
