// mac_interface: MAC Interface Unit of one switch port.
//
// Everything between one port's Ethernet MAC core and the switch core:
//   receive:  reception_unit (MAC receive clock) -> dual-clock FIFO ->
//             classifier_validation -> reception_buffer (main clock),
//             which writes N-byte words into the Memory Pool and hands
//             packet descriptors to the Switching and Control Logic;
//   transmit: transmission_buffer (main clock) -> dual-clock FIFO ->
//             transmission_unit (MAC transmit clock);
//   configuration_unit, which sets up the MAC core after reset (it runs
//   on the transmit clock, used here as the management clock).
// The dual-clock FIFOs are the only crossings between the port's clocks
// and the main clock. The chain follows the architecture; FIFO depths are
// this design's choice.
module mac_interface
  import ftt_pkg::*;
#(
  parameter int NPORTS     = NPORTS_DEF,
  parameter int PORT       = 0,
  parameter int WPB        = 512,
  parameter int REQ_MAX    = 64,
  parameter int RX_FIFO    = 64,
  parameter int TX_FIFO    = 256
) (
  input  logic              clk,
  input  logic              rst_n,
  // MAC client receive interface
  input  logic              rx_clk,
  input  logic [7:0]        rx_data,
  input  logic              rx_data_valid,
  input  logic              rx_good_frame,
  input  logic              rx_bad_frame,
  // MAC client transmit interface
  input  logic              tx_clk,
  output logic [7:0]        tx_data,
  output logic              tx_data_valid,
  input  logic              tx_ack,
  output logic              tx_underrun,
  // MAC management interface
  output logic [1:0]        host_opcode,
  output logic [9:0]        host_addr,
  output logic [31:0]       host_wr_data,
  output logic              host_miim_sel,
  output logic              host_req,
  output logic              cfg_done,
  // block allocation
  output logic              alloc_req,
  input  logic              alloc_gnt,
  input  logic [BLK_W-1:0]  alloc_blk,
  // memory writes
  output logic              wr_valid,
  output logic [BLK_W-1:0]  wr_blk,
  output logic [$clog2(WPB)-1:0] wr_widx,
  output logic [8*NPORTS-1:0] wr_data,
  input  logic              wr_ack,
  // descriptors
  output logic              desc_valid,
  output rx_desc_t          desc,
  input  logic              desc_ready,
  // EC-schedule
  input  sched_entry_t      sched [SCHED_MAX],
  input  logic [$clog2(SCHED_MAX):0] sched_cnt,
  input  logic              ec_start,
  input  logic [15:0]       ec_num,
  // FTT requests
  output logic              req_we,
  output logic [$clog2(REQ_MAX)-1:0] req_idx,
  output logic [7:0]        req_data,
  output logic              req_commit,
  output logic [LEN_W-1:0]  req_len,
  // words to transmit
  input  logic              w_valid,
  input  logic [8*NPORTS-1:0] w_data,
  input  logic              w_first,
  input  logic [$clog2(NPORTS):0] w_nbytes,
  input  logic [LEN_W-1:0]  w_len,
  output logic              w_ready,
  // events
  output logic              ev_trash,
  output logic              ev_drop,
  output logic              ev_rx_overflow
);
  // receive chain
  logic       rfw_en;
  logic [9:0] rfw_data, rfr_data;
  logic [$clog2(RX_FIFO):0] rfw_level, rfr_level;
  logic       rfw_full, rfr_en, rfr_empty;

  reception_unit #(.FIFO_DEPTH(RX_FIFO)) u_rxu (
    .clk(rx_clk), .rst_n, .rx_data, .rx_data_valid, .rx_good_frame, .rx_bad_frame,
    .fw_en(rfw_en), .fw_data(rfw_data), .fw_level(rfw_level), .overflow(ev_rx_overflow));

  async_fifo #(.WIDTH(10), .DEPTH(RX_FIFO)) u_rx_fifo (
    .wr_clk(rx_clk), .wr_rst_n(rst_n), .wr_en(rfw_en), .wr_data(rfw_data), .wr_full(rfw_full),
    .wr_level(rfw_level), .rd_clk(clk), .rd_rst_n(rst_n), .rd_en(rfr_en), .rd_data(rfr_data),
    .rd_empty(rfr_empty), .rd_level(rfr_level));

  logic              ob_valid, ob_ready, end_valid, end_accept, end_by_mac;
  logic [7:0]        ob_data;
  tclass_e           end_cls;
  logic [MASK_W-1:0] end_mask;
  logic [47:0]       end_dst, end_src;

  classifier_validation #(.PORT(PORT), .REQ_MAX(REQ_MAX)) u_cls (
    .clk, .rst_n, .fi_data(rfr_data), .fi_empty(rfr_empty), .fi_en(rfr_en),
    .ob_valid, .ob_data, .ob_ready, .end_valid, .end_accept, .end_cls, .end_by_mac,
    .end_mask, .end_dst, .end_src, .req_we, .req_idx, .req_data, .req_commit, .req_len,
    .sched, .sched_cnt, .ec_start, .ec_num, .ev_trash);

  reception_buffer #(.NPORTS(NPORTS), .WPB(WPB)) u_rxb (
    .clk, .rst_n, .ib_valid(ob_valid), .ib_data(ob_data), .ib_ready(ob_ready),
    .end_valid, .end_accept, .end_cls, .end_by_mac, .end_mask, .end_dst, .end_src,
    .alloc_req, .alloc_gnt, .alloc_blk, .wr_valid, .wr_blk, .wr_widx, .wr_data, .wr_ack,
    .desc_valid, .desc, .desc_ready, .ev_drop);

  // transmit chain
  logic       tfw_en, tfw_full, tfr_en, tfr_empty;
  logic [7:0] tfw_data, tfr_data;
  logic [$clog2(TX_FIFO):0] tfw_level, tfr_level;

  transmission_buffer #(.NPORTS(NPORTS)) u_txb (
    .clk, .rst_n, .w_valid, .w_data, .w_first, .w_nbytes, .w_len, .w_ready,
    .fw_en(tfw_en), .fw_data(tfw_data), .fw_full(tfw_full));

  async_fifo #(.WIDTH(8), .DEPTH(TX_FIFO)) u_tx_fifo (
    .wr_clk(clk), .wr_rst_n(rst_n), .wr_en(tfw_en), .wr_data(tfw_data), .wr_full(tfw_full),
    .wr_level(tfw_level), .rd_clk(tx_clk), .rd_rst_n(rst_n), .rd_en(tfr_en), .rd_data(tfr_data),
    .rd_empty(tfr_empty), .rd_level(tfr_level));

  transmission_unit #(.FIFO_DEPTH(TX_FIFO)) u_txu (
    .clk(tx_clk), .rst_n, .fr_data(tfr_data), .fr_empty(tfr_empty), .fr_level(tfr_level),
    .fr_en(tfr_en), .tx_data, .tx_data_valid, .tx_ack, .tx_underrun);

  configuration_unit u_cfg (
    .clk(tx_clk), .rst_n, .host_opcode, .host_addr, .host_wr_data, .host_miim_sel,
    .host_req, .done(cfg_done));
endmodule
