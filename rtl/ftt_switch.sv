// ftt_switch: Switching Module of an FTT-enabled real-time Ethernet switch.
//
// The switch runs the Flexible Time-Triggered (FTT) protocol with the FTT
// master's timing inside the switch: every Elementary Cycle (EC) starts
// with a Trigger Message (TM), broadcast on all ports, that carries the
// EC-schedule of the synchronous messages; asynchronous and non real-time
// (NRT) traffic follow in their own windows. The FTT master itself
// (scheduler, admission control, QoS manager, requirements database) runs
// in software outside this module and is reached through the Master
// Interface's byte streams (tm_in_* in, rq_* and ec_req out). The Ethernet
// MAC cores and PHYs are outside as well: each port's MAC client interface
// is brought out.
//
// Data path: per port, a MAC Interface Unit receives, classifies and
// validates frames and packs them into NPORTS-byte words; the Rx
// Multiplexing Unit (TDMA wheel) writes the words of all ports into the
// Memory Pool, one block per frame. The Switching and Control Logic
// forwards each packet by queuing a pointer in the output ports' packet
// lists, and transmits it in its EC window through the Tx Demultiplexing
// Unit (TDMA wheel) and the port's MAC Interface Unit. The memory runs at
// the byte rate of one port: clk must deliver at least one cycle per byte
// time of a port (125 MHz for 1 Gb/s), and all EC times are in clk cycles.
//
// The block structure follows the architecture; widths, frame formats and
// the defaults of the sizes marked in each submodule are this design's own.
module ftt_switch
  import ftt_pkg::*;
#(
  parameter int NPORTS     = NPORTS_DEF,
  parameter int EC_CYCLES  = 125000,      // 1 ms at 125 MHz
  parameter int WPB        = 512,         // words per block (2048 bytes)
  parameter int NBLOCKS    = 72,
  parameter int SYNC_Q     = 16,
  parameter int ASYNC_Q    = 16,
  parameter int NRT_Q      = 32,
  parameter int QDEPTH     = 32,
  parameter int FT_ENTRIES = 16,
  parameter int REQ_MAX    = 64,
  parameter int TM_WORDS   = 32,
  localparam int TW        = $clog2(EC_CYCLES + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enable,
  input  logic [TW-1:0]     cfg_sync_end,
  input  logic [TW-1:0]     cfg_async_end,
  // MAC client interfaces
  input  logic              mac_rx_clk        [NPORTS],
  input  logic [7:0]        mac_rx_data       [NPORTS],
  input  logic              mac_rx_data_valid [NPORTS],
  input  logic              mac_rx_good_frame [NPORTS],
  input  logic              mac_rx_bad_frame  [NPORTS],
  input  logic              mac_tx_clk        [NPORTS],
  output logic [7:0]        mac_tx_data       [NPORTS],
  output logic              mac_tx_data_valid [NPORTS],
  input  logic              mac_tx_ack        [NPORTS],
  output logic              mac_tx_underrun   [NPORTS],
  output logic [1:0]        host_opcode       [NPORTS],
  output logic [9:0]        host_addr         [NPORTS],
  output logic [31:0]       host_wr_data      [NPORTS],
  output logic              host_miim_sel     [NPORTS],
  output logic              host_req          [NPORTS],
  output logic              cfg_done          [NPORTS],
  // Master Unit link
  input  logic              tm_in_valid,
  input  logic [7:0]        tm_in_data,
  input  logic              tm_in_last,
  output logic              rq_valid,
  output logic [7:0]        rq_data,
  output logic              rq_last,
  output logic [PORT_W-1:0] rq_port,
  input  logic              rq_ready,
  output logic              ec_req,
  // status and events (one-cycle pulses)
  output logic [15:0]       ec_num,
  output logic [BLK_W:0]    free_blocks,
  output logic [NPORTS-1:0] ev_trash,
  output logic [NPORTS-1:0] ev_drop,
  output logic [NPORTS-1:0] ev_rx_overflow,
  output logic              ev_flood,
  output logic              ev_quota_drop,
  output logic [NPORTS-1:0] ev_tm,
  output logic [NPORTS-1:0] ev_sync,
  output logic [NPORTS-1:0] ev_async,
  output logic [NPORTS-1:0] ev_nrt,
  output logic [NPORTS-1:0] ev_hold,
  output logic              ev_tm_missing,
  output logic              ev_req_drop
);
  localparam int AW = $clog2(NBLOCKS * WPB);

  // EC timing and schedule
  logic             ec_start, tm_go;
  logic [TW-1:0]    ec_time;
  logic [LEN_W-1:0] tm_len;
  sched_entry_t     sched [SCHED_MAX];
  logic [$clog2(SCHED_MAX):0] sched_cnt;

  // per-port signals
  logic              alloc_req [NPORTS], alloc_gnt [NPORTS];
  logic [BLK_W-1:0]  alloc_blk;
  logic              wr_valid [NPORTS], wr_ack [NPORTS];
  logic [BLK_W-1:0]  wr_blk [NPORTS];
  logic [$clog2(WPB)-1:0] wr_widx [NPORTS];
  logic [8*NPORTS-1:0] wr_data [NPORTS];
  logic              desc_valid [NPORTS], desc_ready [NPORTS];
  rx_desc_t          desc [NPORTS];
  logic              req_we [NPORTS], req_commit [NPORTS];
  logic [$clog2(REQ_MAX)-1:0] req_idx [NPORTS];
  logic [7:0]        req_data [NPORTS];
  logic [LEN_W-1:0]  req_len [NPORTS];
  logic              w_valid [NPORTS], w_ready [NPORTS];
  logic [8*NPORTS-1:0] w_data;
  logic              w_first, w_last;
  logic [$clog2(NPORTS):0] w_nbytes;
  logic [LEN_W-1:0]  w_len;

  // memory
  logic              mem_we, mem_re, tm_re;
  logic [AW-1:0]     mem_waddr, mem_raddr;
  logic [8*NPORTS-1:0] mem_wdata, mem_rdata, tm_rdata;
  logic [$clog2(TM_WORDS)-1:0] tm_raddr;

  // transmission jobs
  logic              start [NPORTS], start_tm [NPORTS], busy [NPORTS], done [NPORTS];
  logic [BLK_W-1:0]  start_blk [NPORTS];
  logic [LEN_W-1:0]  start_len [NPORTS];

  for (genvar p = 0; p < NPORTS; p++) begin : g_port
    mac_interface #(.NPORTS(NPORTS), .PORT(p), .WPB(WPB), .REQ_MAX(REQ_MAX)) u_mi (
      .clk, .rst_n,
      .rx_clk(mac_rx_clk[p]), .rx_data(mac_rx_data[p]), .rx_data_valid(mac_rx_data_valid[p]),
      .rx_good_frame(mac_rx_good_frame[p]), .rx_bad_frame(mac_rx_bad_frame[p]),
      .tx_clk(mac_tx_clk[p]), .tx_data(mac_tx_data[p]), .tx_data_valid(mac_tx_data_valid[p]),
      .tx_ack(mac_tx_ack[p]), .tx_underrun(mac_tx_underrun[p]),
      .host_opcode(host_opcode[p]), .host_addr(host_addr[p]), .host_wr_data(host_wr_data[p]),
      .host_miim_sel(host_miim_sel[p]), .host_req(host_req[p]), .cfg_done(cfg_done[p]),
      .alloc_req(alloc_req[p]), .alloc_gnt(alloc_gnt[p]), .alloc_blk,
      .wr_valid(wr_valid[p]), .wr_blk(wr_blk[p]), .wr_widx(wr_widx[p]), .wr_data(wr_data[p]),
      .wr_ack(wr_ack[p]),
      .desc_valid(desc_valid[p]), .desc(desc[p]), .desc_ready(desc_ready[p]),
      .sched, .sched_cnt, .ec_start, .ec_num,
      .req_we(req_we[p]), .req_idx(req_idx[p]), .req_data(req_data[p]),
      .req_commit(req_commit[p]), .req_len(req_len[p]),
      .w_valid(w_valid[p]), .w_data, .w_first, .w_nbytes, .w_len, .w_ready(w_ready[p]),
      .ev_trash(ev_trash[p]), .ev_drop(ev_drop[p]), .ev_rx_overflow(ev_rx_overflow[p]));
  end

  rx_mux #(.NPORTS(NPORTS), .WPB(WPB), .NBLOCKS(NBLOCKS)) u_rx_mux (
    .clk, .rst_n, .wr_valid, .wr_blk, .wr_widx, .wr_data, .wr_ack,
    .mem_we, .mem_waddr, .mem_wdata);

  memory_pool #(.NPORTS(NPORTS), .NBLOCKS(NBLOCKS), .WPB(WPB)) u_mem (
    .wclk(clk), .we(mem_we), .waddr(mem_waddr), .wdata(mem_wdata),
    .rclk(clk), .re(mem_re), .raddr(mem_raddr), .rdata(mem_rdata));

  tx_demux #(.NPORTS(NPORTS), .WPB(WPB), .NBLOCKS(NBLOCKS), .TM_WORDS(TM_WORDS)) u_tx_demux (
    .clk, .rst_n, .start, .start_tm, .start_blk, .start_len, .busy, .done,
    .mem_re, .mem_raddr, .mem_rdata, .tm_re, .tm_raddr, .tm_rdata,
    .txb_ready(w_ready), .w_valid, .w_data, .w_first, .w_last, .w_nbytes, .w_len);

  switching_control #(.NPORTS(NPORTS), .EC_CYCLES(EC_CYCLES), .NBLOCKS(NBLOCKS),
                      .SYNC_Q(SYNC_Q), .ASYNC_Q(ASYNC_Q), .NRT_Q(NRT_Q), .QDEPTH(QDEPTH),
                      .FT_ENTRIES(FT_ENTRIES)) u_sc (
    .clk, .rst_n, .enable, .sync_end(cfg_sync_end), .async_end(cfg_async_end),
    .ec_start, .ec_time, .ec_num, .ec_req, .tm_go, .tm_len,
    .alloc_req, .alloc_gnt, .alloc_blk, .desc_valid, .desc, .desc_ready,
    .start, .start_tm, .start_blk, .start_len, .busy, .done,
    .free_count(free_blocks), .ev_flood, .ev_quota_drop,
    .ev_tm, .ev_sync, .ev_async, .ev_nrt, .ev_hold);

  master_interface #(.NPORTS(NPORTS), .REQ_MAX(REQ_MAX), .TM_WORDS(TM_WORDS)) u_master_if (
    .clk, .rst_n, .tm_in_valid, .tm_in_data, .tm_in_last, .ec_start, .tm_go, .tm_len,
    .sched, .sched_cnt, .tm_re, .tm_raddr, .tm_rdata,
    .req_we, .req_idx, .req_data, .req_commit, .req_len,
    .rq_valid, .rq_data, .rq_last, .rq_port, .rq_ready, .ev_tm_missing, .ev_req_drop);
endmodule
