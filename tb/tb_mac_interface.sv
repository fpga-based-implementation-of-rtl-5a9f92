// tb_mac_interface: one port's MAC Interface Unit between a MAC model and
// models of the shared units (block allocator, memory write wheel,
// descriptor sink, request buffer). Checks:
//  - the four management writes of the configuration sequence and cfg_done;
//  - an NRT frame is stored word by word in its block and described with
//    its class, length and addresses;
//  - a frame the MAC marks bad gives no descriptor;
//  - a scheduled synchronous frame is described with its output mask;
//  - an unscheduled FTT frame is trashed;
//  - an FTT request is handed to the request buffer whole;
//  - a frame given as words on the transmit side leaves the MAC port
//    byte for byte.
module tb_mac_interface;
  import ftt_pkg::*;
  localparam int N = 4, WPB = 32, RQ = 64;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #4 clk = ~clk;
  logic [7:0] rx_data = 0, tx_data, req_data;
  logic rx_data_valid = 0, rx_good_frame = 0, rx_bad_frame = 0, tx_data_valid, tx_ack = 0, tx_underrun;
  logic [1:0] host_opcode; logic [9:0] host_addr; logic [31:0] host_wr_data;
  logic host_miim_sel, host_req, cfg_done;
  logic alloc_req, alloc_gnt, wr_valid, wr_ack, desc_valid, desc_ready, req_we, req_commit;
  logic [BLK_W-1:0] alloc_blk = 0, wr_blk;
  logic [4:0] wr_widx;
  logic [31:0] wr_data, w_data = 0;
  rx_desc_t desc;
  sched_entry_t sched [SCHED_MAX];
  logic [4:0] sched_cnt = 1;
  logic ec_start = 0;
  logic [15:0] ec_num = 0;
  logic [5:0] req_idx;
  logic [LEN_W-1:0] req_len, w_len = 0;
  logic w_valid = 0, w_first = 0, w_ready, ev_trash, ev_drop, ev_rx_overflow;
  logic [2:0] w_nbytes = 0;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  mac_interface #(.NPORTS(N), .PORT(0), .WPB(WPB), .REQ_MAX(RQ), .RX_FIFO(64), .TX_FIFO(64)) dut (
    .clk, .rst_n, .rx_clk(clk), .rx_data, .rx_data_valid, .rx_good_frame, .rx_bad_frame,
    .tx_clk(clk), .tx_data, .tx_data_valid, .tx_ack, .tx_underrun,
    .host_opcode, .host_addr, .host_wr_data, .host_miim_sel, .host_req, .cfg_done,
    .alloc_req, .alloc_gnt, .alloc_blk, .wr_valid, .wr_blk, .wr_widx, .wr_data, .wr_ack,
    .desc_valid, .desc, .desc_ready, .sched, .sched_cnt, .ec_start, .ec_num,
    .req_we, .req_idx, .req_data, .req_commit, .req_len,
    .w_valid, .w_data, .w_first, .w_nbytes, .w_len, .w_ready, .ev_trash, .ev_drop, .ev_rx_overflow);

  // shared-unit models
  logic [31:0] mem [8][WPB];
  logic [7:0] rbuf [RQ];
  int n_host = 0, n_trash = 0, n_req = 0, rlen = 0;
  int phase = 0;
  rx_desc_t descs [$];
  assign alloc_gnt = alloc_req;
  assign wr_ack = wr_valid && phase[0];
  assign desc_ready = desc_valid;
  always @(posedge clk) if (rst_n) begin
    phase++;
    if (alloc_gnt) alloc_blk <= BLK_W'((int'(alloc_blk) + 1) % 8);
    if (wr_ack) mem[wr_blk % 8][wr_widx] <= wr_data;
    if (desc_valid && desc_ready) descs.push_back(desc);
    if (host_opcode == 2'b01) begin
      n_host++;
      check(!host_req && !host_miim_sel, "management write");
    end
    if (ev_trash) n_trash++;
    if (req_we) rbuf[req_idx] <= req_data;
    if (req_commit) begin n_req++; rlen = int'(req_len); end
  end

  typedef byte unsigned bq_t [$];
  task automatic send(bq_t f, bit good = 1);
    foreach (f[i]) begin @(negedge clk); rx_data = f[i]; rx_data_valid = 1; end
    @(negedge clk); rx_data_valid = 0;
    @(negedge clk); rx_good_frame = good; rx_bad_frame = !good;
    @(negedge clk); rx_good_frame = 0; rx_bad_frame = 0;
    repeat (60) @(negedge clk);
  endtask
  function automatic bq_t mk(int len, logic [47:0] dst, bit ftt, int typ, int id);
    bq_t f;
    for (int i = 0; i < len; i++) f.push_back(8'($urandom));
    for (int i = 0; i < 6; i++) f[i] = dst[47 - 8*i -: 8];
    f[6] = 8'h02;
    if (ftt) begin f[12] = 8'h8F; f[13] = 8'hF0; f[14] = 8'(typ); f[15] = 8'(id); end
    else begin f[12] = 8'h08; f[13] = 8'h00; end
    return f;
  endfunction
  function automatic bit stored(bq_t f, int blk);
    for (int i = 0; i < f.size(); i++) if (mem[blk][i / 4][8*(i%4) +: 8] != f[i]) return 0;
    return 1;
  endfunction

  // MAC transmit model: acknowledges the first byte two cycles after it
  // appears, then takes one byte per cycle
  bq_t txq;
  int tst = 0, tk = 0;
  always @(posedge clk) begin
    check(!tx_underrun, "no transmit underrun");
    case (tst)
      0: if (tx_data_valid) begin tst = 1; tk = 0; end
      1: begin tk++; if (tk == 2) begin tx_ack <= 1; tst = 2; end end
      2: begin tx_ack <= 0; txq.push_back(tx_data); tst = 3; end
      default: if (tx_data_valid) txq.push_back(tx_data); else tst = 0;
    endcase
  end

  initial begin
    bq_t f1, f2, f3, f4, f5, f6;
    int t0;
    sched[0] = '{msg_id: 8'd5, async: 1'b0, in_port: '0, out_mask: 8'h06, min_iat: 8'd0};
    for (int i = 1; i < SCHED_MAX; i++) sched[i] = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    repeat (40) @(negedge clk);
    check(cfg_done && n_host == 4, $sformatf("configuration: %0d writes", n_host));
    @(negedge clk); ec_start = 1; @(negedge clk); ec_start = 0;
    // NRT frame
    f1 = mk(100, 48'h0200_0000_0001, 0, 0, 0);
    send(f1);
    check(descs.size() == 1, "NRT frame described");
    if (descs.size() == 1) begin
      check(descs[0].cls == CL_NRT && descs[0].by_mac && descs[0].len == 100
            && descs[0].dst == 48'h0200_0000_0001 && descs[0].src[47:40] == 8'h02, "NRT descriptor");
      check(stored(f1, int'(descs[0].blk)), "NRT frame stored in its block");
    end
    // bad frame
    f2 = mk(80, 48'h0200_0000_0002, 0, 0, 0);
    send(f2, 0);
    check(descs.size() == 1, "bad frame not described");
    // scheduled synchronous frame
    f3 = mk(64, 48'h0100_5E00_0001, 1, FT_SYNC, 5);
    send(f3);
    check(descs.size() == 2, "synchronous frame described");
    if (descs.size() == 2) begin
      check(descs[1].cls == CL_SYNC && !descs[1].by_mac && descs[1].out_mask == 8'h06 && descs[1].len == 64, "synchronous descriptor");
      check(stored(f3, int'(descs[1].blk)), "synchronous frame stored");
    end
    // unscheduled FTT frame
    t0 = n_trash;
    f4 = mk(64, 48'h0100_5E00_0001, 1, FT_SYNC, 9);
    send(f4);
    check(descs.size() == 2 && n_trash == t0 + 1, $sformatf("unscheduled frame trashed (%0d %0d)", descs.size(), n_trash));
    // request
    f5 = mk(30, 48'h0200_0000_00AA, 1, FT_REQ, 0);
    send(f5);
    check(n_req == 1 && rlen == 30, "request handed over");
    for (int i = 0; i < 30; i++) check(rbuf[i] == f5[i], $sformatf("request byte %0d", i));
    // transmit a 70-byte frame
    f6 = mk(70, 48'h0200_0000_0003, 0, 0, 0);
    for (int i = 0; i < 70; i += 4) begin
      @(negedge clk);
      while (!w_ready) @(negedge clk);
      w_valid = 1; w_first = (i == 0); w_len = 70; w_nbytes = 3'((70 - i < 4) ? 70 - i : 4);
      for (int b = 0; b < 4; b++) w_data[8*b +: 8] = (i + b < 70) ? f6[i + b] : 8'h00;
      @(negedge clk); w_valid = 0;
    end
    repeat (200) @(negedge clk);
    check(txq.size() == 70, $sformatf("70 bytes sent (%0d)", txq.size()));
    if (txq.size() == 70) for (int i = 0; i < 70; i++) check(txq[i] == f6[i], $sformatf("sent byte %0d", i));
    check(!ev_rx_overflow, "no overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #200000; failures++; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
