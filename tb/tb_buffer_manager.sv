// tb_buffer_manager: 10 blocks, quotas of 2 synchronous, 2 asynchronous and
// 3 NRT blocks. Checks: every block granted once and never twice; grants
// stop when the pool is empty; commits charge their class and quota_ok
// falls when a class holds its quota; a multicast block is freed only
// after its last release, including two releases in the same cycle; a
// commit with no ports frees the block at once.
module tb_buffer_manager;
  import ftt_pkg::*;
  localparam int N = 4, NB = 10;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #4 clk = ~clk;
  logic alloc_req [N], alloc_gnt [N], rel_valid [N], quota_ok [3];
  logic [BLK_W-1:0] alloc_blk, rel_blk [N];
  logic commit_valid = 0;
  logic [BLK_W-1:0] commit_blk = 0;
  tclass_e commit_cls = CL_NRT;
  logic [3:0] commit_refs = 0;
  logic [BLK_W:0] free_count, class_count [3];
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  buffer_manager #(.NPORTS(N), .NBLOCKS(NB), .SYNC_Q(2), .ASYNC_Q(2), .NRT_Q(3)) dut (.clk, .rst_n,
    .alloc_req, .alloc_gnt, .alloc_blk, .commit_valid, .commit_blk, .commit_cls, .commit_refs,
    .rel_valid, .rel_blk, .quota_ok, .free_count, .class_count);

  int got[$];
  always @(posedge clk) if (rst_n) begin
    int ng; ng = 0;
    for (int p = 0; p < N; p++) if (alloc_gnt[p]) begin
      ng++;
      check(alloc_req[p], "grant only to a requester");
      foreach (got[i]) if (got[i] == int'(alloc_blk)) check(0, "block granted twice");
      got.push_back(int'(alloc_blk));
    end
    check(ng <= 1, $sformatf("one grant per cycle (%0d at %0t)", ng, $time));
  end
  task automatic commit(int blk, tclass_e c, int refs);
    @(negedge clk); commit_valid = 1; commit_blk = BLK_W'(blk); commit_cls = c; commit_refs = 4'(refs);
    @(negedge clk); commit_valid = 0;
  endtask
  task automatic release2(int p0, int b0, int p1 = -1, int b1 = 0);
    @(negedge clk); rel_valid[p0] = 1; rel_blk[p0] = BLK_W'(b0);
    if (p1 >= 0) begin rel_valid[p1] = 1; rel_blk[p1] = BLK_W'(b1); end
    @(negedge clk); for (int p = 0; p < N; p++) rel_valid[p] = 0;
  endtask

  initial begin
    for (int p = 0; p < N; p++) begin alloc_req[p] = 0; rel_valid[p] = 0; rel_blk[p] = 0; end
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk);
    check(free_count == NB, "all blocks free after reset");
    for (int p = 0; p < N; p++) alloc_req[p] = 1;
    repeat (12) @(negedge clk);
    for (int p = 0; p < N; p++) alloc_req[p] = 0;
    check(got.size() == NB && free_count == 0, $sformatf("all %0d blocks granted once (%0d)", NB, got.size()));
    // charge classes
    commit(got[0], CL_SYNC, 1);
    check(quota_ok[CL_SYNC], "sync below quota");
    commit(got[1], CL_SYNC, 3);
    check(!quota_ok[CL_SYNC] && quota_ok[CL_NRT] && class_count[CL_SYNC] == 2, "sync quota reached");
    commit(got[2], CL_NRT, 2);
    commit(got[3], CL_NRT, 0);
    check(free_count == 1 && class_count[CL_NRT] == 1, "commit without ports frees the block");
    // multicast release
    release2(0, got[1]);
    check(free_count == 1, "block with references left is kept");
    release2(1, got[1], 2, got[1]);
    check(free_count == 2 && quota_ok[CL_SYNC] && class_count[CL_SYNC] == 1, "freed after its last two releases in one cycle");
    release2(3, got[0], 0, got[2]);
    check(free_count == 3 && class_count[CL_SYNC] == 0 && class_count[CL_NRT] == 1, "releases of two blocks in one cycle");
    release2(1, got[2]);
    check(free_count == 4 && class_count[CL_NRT] == 0, "NRT block freed");
    got = {};
    alloc_req[2] = 1;
    repeat (8) @(negedge clk);
    alloc_req[2] = 0;
    check(got.size() == 4, "freed blocks can be granted again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
