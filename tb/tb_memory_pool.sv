// tb_memory_pool: random writes on one port while reading on the other,
// with separate write and read clocks. Every read must return, one read
// clock later, the last word written to that address.
module tb_memory_pool;
  localparam int N = 4, NB = 6, WPB = 16, DEPTH = NB * WPB;
  logic wclk = 0, rclk = 0;
  always #4 wclk = ~wclk;
  always #5 rclk = ~rclk;
  logic we = 0, re = 0;
  logic [6:0] waddr = 0, raddr = 0;
  logic [31:0] wdata = 0, rdata;
  logic [31:0] model [DEPTH];
  bit written [DEPTH];
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  memory_pool #(.NPORTS(N), .NBLOCKS(NB), .WPB(WPB)) dut (.wclk, .we, .waddr, .wdata, .rclk, .re, .raddr, .rdata);
  initial begin
    for (int i = 0; i < DEPTH; i++) written[i] = 0;
    // fill everything first
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge wclk); we = 1; waddr = 7'(i); wdata = $urandom; model[i] = wdata; written[i] = 1;
    end
    @(negedge wclk); we = 0;
    // read everything back
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge rclk); re = 1; raddr = 7'(DEPTH - 1 - i);
      @(negedge rclk); re = 0;
      check(rdata == model[DEPTH - 1 - i], $sformatf("word %0d", DEPTH - 1 - i));
    end
    // overwrite part of it and read again
    for (int i = 0; i < 20; i++) begin
      @(negedge wclk); we = 1; waddr = 7'($urandom % DEPTH); wdata = $urandom; model[waddr] = wdata;
    end
    @(negedge wclk); we = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge rclk); re = 1; raddr = 7'(i);
      @(negedge rclk); re = 0;
      check(rdata == model[i], $sformatf("word %0d after rewrite", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
