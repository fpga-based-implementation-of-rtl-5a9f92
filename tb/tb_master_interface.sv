// tb_master_interface: Trigger Message side and request side.
//  - A 28-byte Trigger Message with three schedule entries is received;
//    at the next cycle start tm_go must pulse with its length, the
//    schedule must hold the three entries, and the buffer must read back
//    the bytes, first byte in the low lane.
//  - A second message received during the cycle must not change what the
//    buffer reads until the following cycle start (double buffering).
//  - A cycle start with no new message must give ev_tm_missing and an
//    empty schedule.
//  - Requests written by two ports must come out whole, with their port
//    number, while rq_ready is randomly low; a request arriving while the
//    port's buffer is still full must be dropped with ev_req_drop.
module tb_master_interface;
  import ftt_pkg::*;
  localparam int N = 4, RQ = 16, TMW = 8;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #4 clk = ~clk;
  logic tm_in_valid = 0, tm_in_last = 0, ec_start = 0, tm_go, tm_re = 0;
  logic [7:0] tm_in_data = 0;
  logic [LEN_W-1:0] tm_len;
  sched_entry_t sched [SCHED_MAX];
  logic [4:0] sched_cnt;
  logic [2:0] tm_raddr = 0;
  logic [31:0] tm_rdata;
  logic req_we [N], req_commit [N];
  logic [3:0] req_idx [N];
  logic [7:0] req_data [N];
  logic [LEN_W-1:0] req_len [N];
  logic rq_valid, rq_last, rq_ready = 0, ev_tm_missing, ev_req_drop;
  logic [7:0] rq_data;
  logic [PORT_W-1:0] rq_port;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  master_interface #(.NPORTS(N), .REQ_MAX(RQ), .TM_WORDS(TMW)) dut (.clk, .rst_n, .tm_in_valid, .tm_in_data,
    .tm_in_last, .ec_start, .tm_go, .tm_len, .sched, .sched_cnt, .tm_re, .tm_raddr, .tm_rdata, .req_we,
    .req_idx, .req_data, .req_commit, .req_len, .rq_valid, .rq_data, .rq_last, .rq_port, .rq_ready,
    .ev_tm_missing, .ev_req_drop);

  byte unsigned tm [28];
  int n_go = 0, n_miss = 0, n_drop = 0;
  always @(posedge clk) if (rst_n) begin
    if (tm_go) n_go++;
    if (ev_tm_missing) n_miss++;
    if (ev_req_drop) n_drop++;
  end
  task automatic make_tm(int seed);
    for (int i = 0; i < 28; i++) tm[i] = 8'(seed * 7 + i * 13);
    tm[12] = 8'h8F; tm[13] = 8'hF0; tm[14] = 8'(FT_TM); tm[15] = 3;
    for (int e = 0; e < 3; e++) begin
      tm[16 + 4*e] = 8'(10 * seed + e); tm[17 + 4*e] = 8'(((e == 2) ? 8'h80 : 0) | e);
      tm[18 + 4*e] = 8'(4'hF >> e);      tm[19 + 4*e] = 8'(e + 1);
    end
  endtask
  task automatic send_tm();
    for (int i = 0; i < 28; i++) begin
      @(negedge clk); tm_in_valid = 1; tm_in_data = tm[i]; tm_in_last = (i == 27);
    end
    @(negedge clk); tm_in_valid = 0; tm_in_last = 0;
  endtask
  task automatic pulse_ec();
    @(negedge clk); ec_start = 1; @(negedge clk); ec_start = 0; @(negedge clk);
  endtask
  task automatic read_tm(input byte unsigned ref_tm [28], input string what);
    for (int w = 0; w < 7; w++) begin
      @(negedge clk); tm_re = 1; tm_raddr = 3'(w);
      @(negedge clk); tm_re = 0;
      check(tm_rdata == {ref_tm[4*w+3], ref_tm[4*w+2], ref_tm[4*w+1], ref_tm[4*w]}, $sformatf("%s word %0d", what, w));
    end
  endtask
  task automatic write_req(int p, int len, int seed);
    for (int i = 0; i < len; i++) begin
      @(negedge clk); req_we[p] = 1; req_idx[p] = 4'(i); req_data[p] = 8'(seed + i);
    end
    @(negedge clk); req_we[p] = 0; req_commit[p] = 1; req_len[p] = LEN_W'(len);
    @(negedge clk); req_commit[p] = 0;
  endtask

  byte unsigned first_tm [28];
  typedef struct { int port; byte unsigned b; bit last; } rb_t;
  rb_t got [$];
  always @(posedge clk) if (rst_n && rq_valid && rq_ready) got.push_back('{int'(rq_port), rq_data, rq_last});

  initial begin
    for (int p = 0; p < N; p++) begin req_we[p] = 0; req_commit[p] = 0; req_idx[p] = 0; req_data[p] = 0; req_len[p] = 0; end
    repeat (2) @(negedge clk); rst_n = 1;
    make_tm(1); first_tm = tm;
    send_tm();
    check(n_go == 0, "no tm_go before the cycle start");
    pulse_ec();
    check(n_go == 1 && tm_len == 28 && sched_cnt == 3, "message taken at the cycle start");
    for (int e = 0; e < 3; e++)
      check(sched[e].msg_id == 8'(10 + e) && sched[e].async == (e == 2) && sched[e].in_port == PORT_W'(e)
            && sched[e].out_mask == 8'(4'hF >> e) && sched[e].min_iat == 8'(e + 1), $sformatf("schedule entry %0d", e));
    read_tm(first_tm, "first message");
    make_tm(2);
    send_tm();
    read_tm(first_tm, "active message kept while the next arrives");
    pulse_ec();
    check(n_go == 2 && sched[0].msg_id == 8'd20, "second message taken");
    read_tm(tm, "second message");
    pulse_ec();
    check(n_miss == 1 && sched_cnt == 0 && n_go == 2, "cycle start without a message");
    // requests
    write_req(1, 10, 8'h40);
    write_req(2, 5, 8'h90);
    write_req(1, 3, 8'h10);   // port 1 still full: dropped
    @(negedge clk);
    check(n_drop == 1, "request dropped while the buffer is full");
    for (int i = 0; i < 60; i++) begin @(negedge clk); rq_ready = ($urandom % 3) != 0; end
    check(got.size() == 15, $sformatf("15 request bytes sent (%0d)", got.size()));
    if (got.size() == 15) begin
      for (int i = 0; i < 10; i++) check(got[i].port == 1 && got[i].b == 8'(8'h40 + i) && got[i].last == (i == 9), $sformatf("port 1 byte %0d", i));
      for (int i = 0; i < 5; i++) check(got[10+i].port == 2 && got[10+i].b == 8'(8'h90 + i) && got[10+i].last == (i == 4), $sformatf("port 2 byte %0d", i));
    end
    got = {}; rq_ready = 1;
    write_req(1, 3, 8'h10);
    repeat (20) @(negedge clk);
    check(got.size() == 3 && got[0].b == 8'h10 && got[2].last, "buffer usable again after sending");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
