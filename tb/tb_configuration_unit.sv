// tb_configuration_unit: after reset the unit must issue exactly the four
// MAC configuration writes (receiver, transmitter, flow control, speed),
// WRITE_GAP cycles apart, and then raise done and stay quiet.
module tb_configuration_unit;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #4 clk = ~clk;
  logic [1:0] host_opcode; logic [9:0] host_addr; logic [31:0] host_wr_data;
  logic host_miim_sel, host_req, done;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  configuration_unit #(.WRITE_GAP(5)) dut (.clk, .rst_n, .host_opcode, .host_addr, .host_wr_data,
    .host_miim_sel, .host_req, .done);
  logic [9:0] a[$]; logic [31:0] d[$]; int t[$]; int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && host_opcode == 2'b01) begin a.push_back(host_addr); d.push_back(host_wr_data); t.push_back(cyc); end
  end
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    repeat (60) @(posedge clk);
    check(done, "done raised");
    check(a.size() == 4, $sformatf("four writes (%0d)", a.size()));
    if (a.size() == 4) begin
      check(a[0] == 10'h240 && d[0] == 32'h1000_0000, "receiver enabled");
      check(a[1] == 10'h280 && d[1] == 32'h1000_0000, "transmitter enabled");
      check(a[2] == 10'h2C0 && d[2] == 32'h0, "flow control off");
      check(a[3] == 10'h300 && d[3] == 32'h8000_0000, "1 Gb/s selected");
      check(t[1] - t[0] == 5 && t[3] - t[2] == 5, "writes WRITE_GAP apart");
    end
    check(!host_miim_sel && !host_req, "configuration access, not MDIO");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000; failures++; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
