// tb_rx_mux: four ports offer words at random. Each cycle exactly the port
// whose slot it is (slots rotate 0,1,2,3) may be acknowledged, only if it
// offers a word, and then the memory write must carry that port's block,
// word index and data. A port that always offers a word gets one write
// every four cycles.
module tb_rx_mux;
  import ftt_pkg::*;
  localparam int N = 4, WPB = 16, NB = 8;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #4 clk = ~clk;
  logic wr_valid [N], wr_ack [N];
  logic [BLK_W-1:0] wr_blk [N];
  logic [3:0] wr_widx [N];
  logic [31:0] wr_data [N];
  logic mem_we;
  logic [6:0] mem_waddr;
  logic [31:0] mem_wdata;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  rx_mux #(.NPORTS(N), .WPB(WPB), .NBLOCKS(NB)) dut (.clk, .rst_n, .wr_valid, .wr_blk, .wr_widx,
    .wr_data, .wr_ack, .mem_we, .mem_waddr, .mem_wdata);
  int slot = 0, cyc = 0, acks0 = 0;
  always @(negedge clk) begin
    for (int p = 0; p < N; p++) begin
      wr_valid[p] <= (p == 0) ? 1'b1 : ($urandom % 2 == 0);
      wr_blk[p]   <= BLK_W'($urandom % NB);
      wr_widx[p]  <= 4'($urandom);
      wr_data[p]  <= $urandom;
    end
  end
  always @(posedge clk) if (rst_n) begin
    int nack; nack = 0;
    cyc++;
    for (int p = 0; p < N; p++) if (wr_ack[p]) begin
      nack++;
      check(p == slot, "ack only in the port's slot");
      check(mem_we && mem_waddr == 7'(wr_blk[p] * WPB + wr_widx[p]) && mem_wdata == wr_data[p], "write carries the port's word");
      if (p == 0) acks0++;
    end
    check(mem_we == wr_valid[slot] && nack == int'(wr_valid[slot]), $sformatf("write exactly when the slot owner offers (slot %0d we %0d v %0d nack %0d)", slot, mem_we, wr_valid[slot], nack));
    slot = (slot + 1) % N;
  end
  initial begin
    for (int p = 0; p < N; p++) begin wr_valid[p] = 0; wr_blk[p] = 0; wr_widx[p] = 0; wr_data[p] = 0; end
    repeat (2) @(negedge clk); rst_n = 1;
    repeat (400) @(posedge clk);
    check(acks0 == (cyc + N - 1) / N, $sformatf("port 0 written every 4th cycle (%0d of %0d)", acks0, cyc));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
