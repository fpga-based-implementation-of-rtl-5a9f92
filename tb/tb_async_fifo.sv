// tb_async_fifo: the dual-clock FIFO with unrelated write (10 ns) and read
// (14 ns) clocks. 300 numbered entries are written and read with random
// pauses on both sides; the read order must be the write order, full and
// empty must hold back the writer and the reader, and the FIFO must be
// empty again at the end.
module tb_async_fifo;
  localparam int W = 10, D = 8;
  logic wclk = 0, rclk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 wclk = ~wclk;
  always #7 rclk = ~rclk;
  logic wr_en = 0, rd_en, wr_full, rd_empty;
  logic [W-1:0] wr_data = 0, rd_data;
  logic [$clog2(D):0] wr_level, rd_level;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  async_fifo #(.WIDTH(W), .DEPTH(D)) dut (.wr_clk(wclk), .wr_rst_n(rst_n), .wr_en, .wr_data,
    .wr_full, .wr_level, .rd_clk(rclk), .rd_rst_n(rst_n), .rd_en, .rd_data, .rd_empty, .rd_level);

  int nw = 0, nr = 0;
  bit full_seen = 0;
  always @(posedge wclk) if (rst_n) begin
    if (wr_en && !wr_full) nw++;
    if (wr_full) full_seen = 1;
    check(wr_level <= D, "write level within depth");
    wr_en <= (nw < 300) && ($urandom % 4 != 0);
    wr_data <= W'(nw);
  end
  logic go = 0;
  assign rd_en = go && !rd_empty;
  always @(posedge rclk) if (rst_n) begin
    if (rd_en) begin check(rd_data == W'(nr), $sformatf("entry %0d in order (got %0d)", nr, rd_data)); nr++; end
    go <= ($urandom % 3 == 0) || (nr > 150);
  end
  initial begin
    repeat (3) @(posedge wclk);
    check(rd_empty && !wr_full, "empty after reset");
    rst_n = 1;
    wait (nr == 300);
    repeat (10) @(posedge rclk);
    check(rd_empty && rd_level == 0, "empty at the end");
    check(full_seen, "FIFO became full at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #200000; failures++; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
