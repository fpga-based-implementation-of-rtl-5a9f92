// tb_reception_control: four ports offer random descriptors (FTT frames
// with an output mask, NRT frames by MAC address, unicast and group). The
// testbench answers the forwarding lookup from its own table and sets the
// quota and queue-full inputs at random. For every descriptor taken it
// works out the output ports: FTT frames go to their mask, NRT frames to
// the learned port or, for group or unknown addresses, to every port; the
// input port is never included; a class over its quota goes nowhere and a
// full queue is left out. It checks the pushes, the commit and its
// reference count, learning of the source address, the events, and that
// no offered descriptor waits more than four cycles.
module tb_reception_control;
  import ftt_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #4 clk = ~clk;
  logic desc_valid [N], desc_ready [N];
  rx_desc_t desc [N];
  logic [47:0] lk_mac, learn_mac;
  logic lk_hit, learn_valid, commit_valid, ev_flood, ev_quota_drop;
  logic [PORT_W-1:0] lk_port, learn_port;
  logic quota_ok [3], pl_push [N], pl_full [N][3];
  logic [BLK_W-1:0] commit_blk;
  tclass_e commit_cls, pl_cls;
  logic [3:0] commit_refs;
  pkt_ptr_t pl_ptr;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  reception_control #(.NPORTS(N)) dut (.clk, .rst_n, .desc_valid, .desc, .desc_ready, .lk_mac, .lk_hit,
    .lk_port, .learn_valid, .learn_mac, .learn_port, .quota_ok, .commit_valid, .commit_blk, .commit_cls,
    .commit_refs, .pl_push, .pl_cls, .pl_ptr, .pl_full, .ev_flood, .ev_quota_drop);

  // the testbench's forwarding table: stations 0..5, station k at port k%4
  logic [47:0] station [6];
  always_comb begin
    lk_hit = 0; lk_port = 0;
    for (int k = 0; k < 4; k++) if (lk_mac == station[k]) begin lk_hit = 1; lk_port = PORT_W'(k % N); end
  end

  int wait_c [N];
  int n_served = 0, n_flood = 0, n_qdrop = 0, n_learn = 0, n_full = 0;
  always @(posedge clk) if (rst_n) begin
    int served, exp_refs; logic [N-1:0] m; bit fl;
    served = -1;
    for (int p = 0; p < N; p++) if (desc_ready[p]) begin
      check(served < 0 && desc_valid[p], "one offered descriptor taken per cycle");
      served = p;
    end
    check(commit_valid == (served >= 0), "commit with every descriptor");
    if (served >= 0) begin
      rx_desc_t d; d = desc[served];
      fl = 0;
      if (d.by_mac) begin
        int at; at = -1;
        for (int k = 0; k < 4; k++) if (d.dst == station[k]) at = k % N;
        if (d.dst[40] || at < 0) begin m = '1; fl = 1; end else m = N'(1) << at;
      end else m = d.out_mask[N-1:0];
      m[served] = 0;
      if (!quota_ok[d.cls]) m = 0;
      for (int p = 0; p < N; p++) if (pl_full[p][d.cls] && m[p]) begin m[p] = 0; n_full++; end
      exp_refs = $countones(m);
      for (int p = 0; p < N; p++) check(pl_push[p] == m[p], $sformatf("push to port %0d", p));
      check(pl_cls == d.cls && pl_ptr.blk == d.blk && pl_ptr.len == d.len, "queued pointer");
      check(commit_blk == d.blk && commit_cls == d.cls && int'(commit_refs) == exp_refs, "commit");
      check(ev_flood == fl && ev_quota_drop == !quota_ok[d.cls], "events");
      check(learn_valid == (d.by_mac && !d.src[40]), "learning");
      if (learn_valid) check(learn_mac == d.src && int'(learn_port) == served, "learned entry");
      n_served++; if (fl) n_flood++; if (!quota_ok[d.cls]) n_qdrop++; if (learn_valid) n_learn++;
    end else for (int p = 0; p < N; p++) check(!pl_push[p], "no push without a descriptor");
    for (int p = 0; p < N; p++) begin
      if (desc_valid[p] && !desc_ready[p]) wait_c[p]++; else wait_c[p] = 0;
      check(wait_c[p] < N, "descriptor served within four cycles");
    end
  end

  bit taken [N];
  always @(posedge clk) for (int p = 0; p < N; p++) taken[p] <= desc_valid[p] && desc_ready[p];
  task automatic new_desc(int p);
    rx_desc_t d;
    d.cls = tclass_e'($urandom % 3);
    d.blk = BLK_W'($urandom);
    d.len = LEN_W'(60 + $urandom % 1400);
    d.by_mac = (d.cls == CL_NRT);
    d.out_mask = MASK_W'($urandom);
    d.dst = ($urandom % 5 == 0) ? 48'hFFFF_FFFF_FFFF : station[$urandom % 6];
    d.src = station[$urandom % 6];
    desc[p] = d;
    desc_valid[p] = ($urandom % 3) != 0;
  endtask
  initial begin
    for (int k = 0; k < 6; k++) station[k] = {8'h02, 8'(k), $urandom};
    for (int p = 0; p < N; p++) begin desc_valid[p] = 0; desc[p] = '0; wait_c[p] = 0; for (int c = 0; c < 3; c++) pl_full[p][c] = 0; end
    for (int c = 0; c < 3; c++) quota_ok[c] = 1;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 1500; i++) begin
      @(negedge clk);
      for (int p = 0; p < N; p++) if (taken[p] || !desc_valid[p]) new_desc(p);
      for (int c = 0; c < 3; c++) quota_ok[c] = ($urandom % 8) != 0;
      for (int p = 0; p < N; p++) for (int c = 0; c < 3; c++) pl_full[p][c] = ($urandom % 10) == 0;
    end
    check(n_flood > 0 && n_qdrop > 0 && n_learn > 0 && n_full > 0, $sformatf("all cases met (%0d %0d %0d %0d)", n_flood, n_qdrop, n_learn, n_full));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #200000; failures++; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
