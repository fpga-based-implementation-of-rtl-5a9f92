// tb_classifier_validation: frames entering port 1 through a FIFO model,
// with a random ready from the reception buffer. Every byte must pass
// through unchanged, and each frame must get the expected verdict:
// non-FTT accepted as NRT with its addresses; a scheduled synchronous
// frame accepted once per EC with its output mask; an unscheduled one or
// one scheduled for another port trashed; an asynchronous frame accepted
// only when min_iat ECs have passed; an FTT request committed to the
// master with its bytes; bad, runt and TM frames trashed.
module tb_classifier_validation;
  import ftt_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #4 clk = ~clk;
  logic [9:0] q[$];
  logic [9:0] fi_data;
  logic fi_empty, fi_en, ob_valid, ob_ready = 0, end_valid, end_accept, end_by_mac;
  logic [7:0] ob_data;
  tclass_e end_cls;
  logic [MASK_W-1:0] end_mask;
  logic [47:0] end_dst, end_src;
  logic req_we, req_commit, ev_trash;
  logic [5:0] req_idx;
  logic [7:0] req_data;
  logic [LEN_W-1:0] req_len;
  sched_entry_t sched [SCHED_MAX];
  logic [$clog2(SCHED_MAX):0] sched_cnt = 3;
  logic ec_start = 0;
  logic [15:0] ec_num = 0;
  assign fi_data  = q.size() > 0 ? q[0] : 10'd0;
  assign fi_empty = q.size() == 0;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  classifier_validation #(.PORT(1), .REQ_MAX(64)) dut (.clk, .rst_n, .fi_data, .fi_empty, .fi_en,
    .ob_valid, .ob_data, .ob_ready, .end_valid, .end_accept, .end_cls, .end_by_mac, .end_mask,
    .end_dst, .end_src, .req_we, .req_idx, .req_data, .req_commit, .req_len, .sched, .sched_cnt,
    .ec_start, .ec_num, .ev_trash);

  logic pop_d = 0;
  always @(posedge clk) pop_d <= fi_en;
  always @(negedge clk) begin
    if (pop_d && q.size() > 0) void'(q.pop_front());
    ob_ready <= ($urandom % 4 != 0);
  end

  logic [7:0] seen[$];
  logic [7:0] reqbuf [64];
  int nends = 0, ncommit = 0, ntrash = 0;
  logic [LEN_W-1:0] clen;
  logic acc; tclass_e cls; logic bymac; logic [7:0] msk; logic [47:0] d, s;
  always @(posedge clk) begin
    if (ob_valid && ob_ready) seen.push_back(ob_data);
    if (req_we) reqbuf[req_idx] = req_data;
    if (req_commit) begin ncommit++; clen = req_len; end
    if (ev_trash) ntrash++;
    if (end_valid && ob_ready) begin
      nends++; acc = end_accept; cls = end_cls; bymac = end_by_mac; msk = end_mask; d = end_dst; s = end_src;
    end
  end

  typedef byte unsigned bq_t[$];
  function automatic bq_t mk(logic [15:0] et, byte unsigned ft, byte unsigned id, int len);
    bq_t f = {};
    for (int i = 0; i < 6; i++) f.push_back(8'h10 + i);
    for (int i = 0; i < 6; i++) f.push_back(8'h20 + i);
    f.push_back(et[15:8]); f.push_back(et[7:0]); f.push_back(ft); f.push_back(id);
    while (f.size() < len) f.push_back(8'(f.size() * 3));
    return f;
  endfunction

  task automatic run(bq_t f, bit good, bit exp_acc, tclass_e exp_cls, logic [7:0] exp_mask, string name);
    int n0 = nends;
    seen = {};
    foreach (f[i]) q.push_back({2'b00, f[i]});
    q.push_back({1'b1, 8'd0, good});
    wait (nends == n0 + 1);
    @(negedge clk);
    check(seen.size() == f.size(), {name, ": all bytes passed"});
    foreach (f[i]) if (i < seen.size() && seen[i] != f[i]) check(0, {name, ": byte value"});
    check(acc == exp_acc, {name, ": verdict"});
    if (exp_acc) begin
      check(cls == exp_cls, {name, ": class"});
      check(msk == exp_mask, {name, ": output mask"});
      check(bymac == (exp_cls == CL_NRT), {name, ": forwarding by MAC"});
    end
  endtask

  task automatic new_ec();
    @(negedge clk); ec_num = ec_num + 1; ec_start = 1;
    @(negedge clk); ec_start = 0;
  endtask

  initial begin
    for (int i = 0; i < SCHED_MAX; i++) sched[i] = '0;
    sched[0] = '{msg_id: 5, async: 0, in_port: 1, out_mask: 8'h06, min_iat: 0};
    sched[1] = '{msg_id: 7, async: 1, in_port: 1, out_mask: 8'h08, min_iat: 2};
    sched[2] = '{msg_id: 6, async: 0, in_port: 2, out_mask: 8'h01, min_iat: 0};
    repeat (3) @(negedge clk); rst_n = 1;
    run(mk(16'h0800, 0, 0, 30), 1, 1, CL_NRT, 0, "NRT");
    check(d == 48'h1011_1213_1415 && s == 48'h2021_2223_2425, "NRT addresses");
    run(mk(FTT_ETYPE, FT_SYNC, 5, 40), 1, 1, CL_SYNC, 8'h06, "sync scheduled");
    run(mk(FTT_ETYPE, FT_SYNC, 5, 40), 1, 0, CL_SYNC, 0, "sync twice in an EC");
    run(mk(FTT_ETYPE, FT_SYNC, 6, 40), 1, 0, CL_SYNC, 0, "sync of another port");
    run(mk(FTT_ETYPE, FT_SYNC, 9, 40), 1, 0, CL_SYNC, 0, "sync unscheduled");
    run(mk(FTT_ETYPE, FT_ASYNC, 7, 50), 1, 1, CL_ASYNC, 8'h08, "async first");
    new_ec();
    run(mk(FTT_ETYPE, FT_ASYNC, 7, 50), 1, 0, CL_ASYNC, 0, "async too early");
    run(mk(FTT_ETYPE, FT_SYNC, 5, 40), 1, 1, CL_SYNC, 8'h06, "sync in the next EC");
    new_ec();
    run(mk(FTT_ETYPE, FT_ASYNC, 7, 50), 1, 1, CL_ASYNC, 8'h08, "async on time");
    begin
      bq_t r = mk(FTT_ETYPE, FT_REQ, 3, 20);
      int c0 = ncommit;
      run(r, 1, 0, CL_NRT, 0, "request");
      check(ncommit == c0 + 1 && clen == 20, "request committed");
      foreach (r[i]) check(reqbuf[i] == r[i], "request byte");
    end
    run(mk(16'h0800, 0, 0, 30), 0, 0, CL_NRT, 0, "bad FCS");
    begin bq_t r = mk(16'h0800, 0, 0, 30); r = r[0:9]; run(r, 1, 0, CL_NRT, 0, "runt"); end
    run(mk(FTT_ETYPE, FT_TM, 2, 40), 1, 0, CL_NRT, 0, "TM from a node");
    check(ntrash == 7, $sformatf("seven frames trashed (%0d)", ntrash));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #200000; failures++; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
