// switching_control: Switching and Control Logic.
//
// The central unit of the switch core (main clock). It holds
//   sync_unit            - Elementary Cycle timing and schedule requests,
//   reception_control    - forwarding of received packets,
//   forwarding_table     - MAC learning table for non-FTT traffic,
//   buffer_manager       - block allocation and per-class memory quotas,
//   packet_list (x N)    - three pointer queues per output port,
//   transmission_control - phase-confined, blocking-free transmission.
// Descriptors come in from the ports' Reception Buffer Units; read jobs go
// out to the TX Demultiplexing Unit. The window ends sync_end and
// async_end (byte times from the EC start) are configuration inputs; the
// composition follows the architecture.
module switching_control
  import ftt_pkg::*;
#(
  parameter int NPORTS     = NPORTS_DEF,
  parameter int EC_CYCLES  = 125000,
  parameter int NBLOCKS    = 72,
  parameter int SYNC_Q     = 16,
  parameter int ASYNC_Q    = 16,
  parameter int NRT_Q      = 32,
  parameter int QDEPTH     = 32,
  parameter int FT_ENTRIES = 16,
  localparam int TW        = $clog2(EC_CYCLES + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enable,
  input  logic [TW-1:0]     sync_end,
  input  logic [TW-1:0]     async_end,
  // EC timing
  output logic              ec_start,
  output logic [TW-1:0]     ec_time,
  output logic [15:0]       ec_num,
  output logic              ec_req,
  input  logic              tm_go,
  input  logic [LEN_W-1:0]  tm_len,
  // ports' reception buffers
  input  logic              alloc_req [NPORTS],
  output logic              alloc_gnt [NPORTS],
  output logic [BLK_W-1:0]  alloc_blk,
  input  logic              desc_valid [NPORTS],
  input  rx_desc_t          desc       [NPORTS],
  output logic              desc_ready [NPORTS],
  // TX Demultiplexing Unit
  output logic              start     [NPORTS],
  output logic              start_tm  [NPORTS],
  output logic [BLK_W-1:0]  start_blk [NPORTS],
  output logic [LEN_W-1:0]  start_len [NPORTS],
  input  logic              busy      [NPORTS],
  input  logic              done      [NPORTS],
  // status and events
  output logic [BLK_W:0]    free_count,
  output logic              ev_flood,
  output logic              ev_quota_drop,
  output logic [NPORTS-1:0] ev_tm,
  output logic [NPORTS-1:0] ev_sync,
  output logic [NPORTS-1:0] ev_async,
  output logic [NPORTS-1:0] ev_nrt,
  output logic [NPORTS-1:0] ev_hold
);
  sync_unit #(.EC_CYCLES(EC_CYCLES)) u_sync (
    .clk, .rst_n, .enable, .ec_start, .ec_time, .ec_num, .ec_req);

  logic [47:0]       lk_mac, learn_mac;
  logic              lk_hit, learn_valid;
  logic [PORT_W-1:0] lk_port, learn_port;

  forwarding_table #(.FT_ENTRIES(FT_ENTRIES)) u_ft (
    .clk, .rst_n, .lk_mac, .lk_hit, .lk_port, .learn_valid, .learn_mac, .learn_port);

  logic             quota_ok [3];
  logic             commit_valid;
  logic [BLK_W-1:0] commit_blk;
  tclass_e          commit_cls;
  logic [3:0]       commit_refs;
  logic             rel_valid [NPORTS];
  logic [BLK_W-1:0] rel_blk   [NPORTS];
  logic [BLK_W:0]   class_count [3];

  buffer_manager #(.NPORTS(NPORTS), .NBLOCKS(NBLOCKS), .SYNC_Q(SYNC_Q), .ASYNC_Q(ASYNC_Q),
                   .NRT_Q(NRT_Q)) u_bm (
    .clk, .rst_n, .alloc_req, .alloc_gnt, .alloc_blk, .commit_valid, .commit_blk,
    .commit_cls, .commit_refs, .rel_valid, .rel_blk, .quota_ok, .free_count, .class_count);

  logic     pl_push [NPORTS];
  tclass_e  pl_cls;
  pkt_ptr_t pl_ptr;
  logic     pl_full  [NPORTS][3];
  logic     pl_empty [NPORTS][3];
  pkt_ptr_t pl_head  [NPORTS][3];
  logic     pl_pop   [NPORTS][3];

  reception_control #(.NPORTS(NPORTS)) u_rxc (
    .clk, .rst_n, .desc_valid, .desc, .desc_ready, .lk_mac, .lk_hit, .lk_port,
    .learn_valid, .learn_mac, .learn_port, .quota_ok, .commit_valid, .commit_blk,
    .commit_cls, .commit_refs, .pl_push, .pl_cls, .pl_ptr, .pl_full, .ev_flood, .ev_quota_drop);

  for (genvar p = 0; p < NPORTS; p++) begin : g_pl
    packet_list #(.QDEPTH(QDEPTH)) u_pl (
      .clk, .rst_n, .push(pl_push[p]), .push_cls(pl_cls), .push_ptr(pl_ptr),
      .full(pl_full[p]), .empty(pl_empty[p]), .head(pl_head[p]), .pop(pl_pop[p]));
  end

  transmission_control #(.NPORTS(NPORTS), .TW(TW)) u_txc (
    .clk, .rst_n, .ec_time, .ec_len(TW'(EC_CYCLES)), .sync_end, .async_end, .tm_go, .tm_len,
    .pl_empty, .pl_head, .pl_pop, .start, .start_tm, .start_blk, .start_len, .busy, .done,
    .rel_valid, .rel_blk, .ev_tm, .ev_sync, .ev_async, .ev_nrt, .ev_hold);
endmodule
