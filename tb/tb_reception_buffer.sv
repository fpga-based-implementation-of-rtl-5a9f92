// tb_reception_buffer: byte stream into the Reception Buffer Unit with a
// block allocator, a randomly granting write wheel and a random descriptor
// ready. Accepted frames must land in their block as 4-byte words (first
// byte in the low lane) and produce one descriptor with block and length;
// a rejected frame must keep the spare block; a frame longer than a block
// or arriving while no spare is held must be dropped.
module tb_reception_buffer;
  import ftt_pkg::*;
  localparam int N = 4, WPB = 16;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #4 clk = ~clk;
  logic [9:0] q[$];                       // {end, accept, byte}
  logic ib_valid, ib_ready, end_valid, end_accept;
  logic [7:0] ib_data;
  logic alloc_req, alloc_gnt = 0, wr_valid, wr_ack, desc_valid, desc_ready = 0, ev_drop;
  logic [BLK_W-1:0] alloc_blk = 0, wr_blk;
  logic [3:0] wr_widx;
  logic [31:0] wr_data;
  rx_desc_t desc;
  logic slot = 0;
  assign ib_valid   = q.size() > 0 && !q[0][9];
  assign end_valid  = q.size() > 0 && q[0][9];
  assign ib_data    = q.size() > 0 ? q[0][7:0] : 8'd0;
  assign end_accept = q.size() > 0 && q[0][8];
  assign wr_ack     = wr_valid && slot;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  reception_buffer #(.NPORTS(N), .WPB(WPB)) dut (.clk, .rst_n, .ib_valid, .ib_data, .ib_ready,
    .end_valid, .end_accept, .end_cls(CL_NRT), .end_by_mac(1'b1), .end_mask(8'h0),
    .end_dst(48'h1), .end_src(48'h2), .alloc_req, .alloc_gnt, .alloc_blk, .wr_valid, .wr_blk,
    .wr_widx, .wr_data, .wr_ack, .desc_valid, .desc, .desc_ready, .ev_drop);

  logic [31:0] mem [256][WPB];
  rx_desc_t descs[$];
  int ndrop = 0, nreq = 0;
  bit grant_on = 1;
  int next_blk = 5;
  logic pop_d = 0;
  always @(posedge clk) begin
    pop_d <= (ib_valid || end_valid) && ib_ready;
    if (wr_valid && wr_ack) mem[wr_blk][wr_widx] = wr_data;
    if (desc_valid && desc_ready) descs.push_back(desc);
    if (ev_drop) ndrop++;
    if (alloc_gnt) nreq++;
  end
  always @(negedge clk) begin
    if (pop_d && q.size() > 0) void'(q.pop_front());
    slot <= ($urandom % 4 == 0);
    desc_ready <= ($urandom % 2 == 0);
    alloc_gnt <= 0;
    if (alloc_req && !alloc_gnt && grant_on && rst_n && ($urandom % 3 == 0)) begin
      alloc_gnt <= 1; alloc_blk <= BLK_W'(next_blk); next_blk++;
    end
  end

  task automatic frame(int len, int seed, bit acc);
    for (int i = 0; i < len; i++) q.push_back({2'b00, 8'(seed + i)});
    q.push_back({1'b1, acc, 8'd0});
    wait (q.size() == 0);
    repeat (30) @(negedge clk);
  endtask
  task automatic check_block(int blk, int len, int seed);
    for (int i = 0; i < len; i++)
      if (mem[blk][i / N][8 * (i % N) +: 8] != 8'(seed + i)) begin
        check(0, $sformatf("byte %0d of block %0d", i, blk)); return;
      end
    check(1, "block contents");
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (10) @(negedge clk);
    frame(30, 1, 1);
    check(descs.size() == 1 && descs[0].blk == 5 && descs[0].len == 30, "first descriptor");
    check_block(5, 30, 1);
    frame(20, 40, 0);
    check(descs.size() == 1, "rejected frame gives no descriptor");
    frame(17, 80, 1);
    check(descs.size() == 2 && descs[1].blk == 6 && descs[1].len == 17, "spare kept after rejection");
    check_block(6, 17, 80);
    check(next_blk == 8, "one new block per accepted frame");
    frame(70, 3, 1);
    check(descs.size() == 2 && ndrop == 1, "frame longer than a block dropped");
    grant_on = 0;
    frame(25, 9, 1);
    frame(25, 9, 1);
    check(descs.size() == 3 && ndrop == 2, "frame without a spare dropped");
    grant_on = 1;
    repeat (20) @(negedge clk);
    frame(64, 100, 1);
    check(descs.size() == 4 && descs[3].len == 64, "frame filling a whole block");
    check_block(int'(descs[3].blk), 64, 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #200000; failures++; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
