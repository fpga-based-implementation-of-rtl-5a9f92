// tb_reception_unit: frames from a MAC client receive interface must appear
// in the FIFO as data entries closed by one status entry (good or bad). A
// FIFO that fills during a frame must truncate it and close it as bad.
module tb_reception_unit;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #4 clk = ~clk;
  logic [7:0] rx_data = 0;
  logic rx_data_valid = 0, rx_good_frame = 0, rx_bad_frame = 0;
  logic fw_en, overflow;
  logic [9:0] fw_data;
  logic [4:0] fw_level;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  logic [9:0] q[$];
  int hold_level = 0;     // extra fake occupancy to provoke an overflow
  assign fw_level = 5'(q.size() + hold_level);
  reception_unit #(.FIFO_DEPTH(16)) dut (.clk, .rst_n, .rx_data, .rx_data_valid, .rx_good_frame,
    .rx_bad_frame, .fw_en, .fw_data, .fw_level, .overflow);
  int novf = 0;
  always @(posedge clk) begin
    if (fw_en) q.push_back(fw_data);
    if (overflow) novf++;
  end
  task automatic frame(int n, int seed, bit good);
    for (int i = 0; i < n; i++) begin
      @(posedge clk); rx_data <= 8'(seed + i); rx_data_valid <= 1;
    end
    @(posedge clk); rx_data_valid <= 0;
    @(posedge clk); rx_good_frame <= good; rx_bad_frame <= !good;
    @(posedge clk); rx_good_frame <= 0; rx_bad_frame <= 0;
    repeat (2) @(posedge clk);
  endtask
  task automatic expect_frame(int n, int seed, bit good);
    for (int i = 0; i < n; i++) begin
      check(q.size() > 0 && q[0] == {2'b00, 8'(seed + i)}, $sformatf("data byte %0d", i));
      if (q.size() > 0) void'(q.pop_front());
    end
    check(q.size() > 0 && q[0][9] && q[0][0] == good, "status entry");
    if (q.size() > 0) void'(q.pop_front());
  endtask
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    frame(6, 10, 1); expect_frame(6, 10, 1);
    frame(4, 50, 0); expect_frame(4, 50, 0);
    hold_level = 10;   // room for 5 data bytes (one slot kept for status)
    frame(9, 90, 1);
    expect_frame(5, 90, 0);
    check(novf == 1, $sformatf("one overflow pulse (%0d)", novf));
    check(q.size() == 0, "nothing more in the FIFO");
    hold_level = 0;
    frame(3, 7, 1); expect_frame(3, 7, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
