// tb_sync_unit: with a 50-cycle Elementary Cycle, no cycle may start
// before enable; after it, ec_start (and ec_req) must pulse exactly every
// 50 cycles, ec_time must count 0..49 and ec_num must count the cycles.
module tb_sync_unit;
  localparam int EC = 50;
  logic clk = 0, rst_n = 1, enable = 0;
  initial #1 rst_n = 0;
  always #4 clk = ~clk;
  logic ec_start, ec_req;
  logic [5:0] ec_time;
  logic [15:0] ec_num;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  sync_unit #(.EC_CYCLES(EC)) dut (.clk, .rst_n, .enable, .ec_start, .ec_time, .ec_num, .ec_req);
  int cyc = 0, first = -1, starts = 0, last = -1;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    check(ec_req == ec_start, "request to the master with every cycle start");
    if (ec_start) begin
      check(enable, "no start before enable");
      if (first < 0) first = cyc;
      else check(cyc - last == EC, $sformatf("period %0d", cyc - last));
      check(ec_num == 16'(starts), "cycle number");
      starts++; last = cyc;
    end
    if (first >= 0) check(int'(ec_time) == (cyc - first) % EC, "time within the cycle");
  end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    repeat (30) @(negedge clk);
    check(starts == 0, "idle while disabled");
    enable = 1;
    repeat (EC * 6 + 5) @(negedge clk);
    check(starts == 7, $sformatf("7 cycles started (%0d)", starts));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
