// tb_transmission_unit: frames written to the transmit FIFO as two length
// bytes plus data must reach the MAC client transmit interface intact,
// with data valid held until ack. Transmission must not start before
// min(length, TX_START) bytes are present, and a FIFO that runs dry
// mid-frame must raise tx_underrun.
module tb_transmission_unit;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #4 clk = ~clk;
  logic [7:0] q[$];
  logic [7:0] fr_data, tx_data;
  logic fr_empty, fr_en, tx_data_valid, tx_underrun;
  logic tx_ack = 0;
  logic [4:0] fr_level;
  assign fr_data  = q.size() > 0 ? q[0] : 8'h00;
  assign fr_empty = q.size() == 0;
  assign fr_level = 5'(q.size() > 16 ? 16 : q.size());
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  transmission_unit #(.FIFO_DEPTH(16), .TX_START(8)) dut (.clk, .rst_n, .fr_data, .fr_empty,
    .fr_level, .fr_en, .tx_data, .tx_data_valid, .tx_ack, .tx_underrun);
  logic pop_d = 0;
  always @(posedge clk) pop_d <= fr_en;
  always @(negedge clk) if (pop_d && q.size() > 0) void'(q.pop_front());

  logic [7:0] got[$];
  int st = 0, k = 0, nunder = 0;
  always @(posedge clk) begin
    if (tx_underrun) nunder++;
    case (st)
      0: if (tx_data_valid) begin k = 0; st = 1; end
      1: begin k++; if (k == 3) begin tx_ack <= 1; st = 2; end end
      2: begin tx_ack <= 0; got.push_back(tx_data); st = 3; end
      default: if (tx_data_valid) got.push_back(tx_data); else st = 0;
    endcase
  end
  task automatic push_frame(int n, int seed, int stop_at = 1 << 20);
    q.push_back(8'(n >> 8)); q.push_back(8'(n));
    for (int i = 0; i < n && i < stop_at; i++) begin q.push_back(8'(seed + i)); @(negedge clk); end
  endtask
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk);
    // slow writer: 20-byte frame, one byte every 3 cycles
    q.push_back(8'd0); q.push_back(8'd20);
    for (int i = 0; i < 7; i++) begin q.push_back(8'(100 + i)); repeat (3) @(negedge clk); end
    check(!tx_data_valid && st == 0, "no start below the threshold");
    for (int i = 7; i < 20; i++) begin q.push_back(8'(100 + i)); @(negedge clk); end
    repeat (40) @(posedge clk);
    check(got.size() == 20, $sformatf("20 bytes sent (%0d)", got.size()));
    foreach (got[i]) check(got[i] == 8'(100 + i), $sformatf("byte %0d", i));
    got = {};
    // short frame below the threshold
    push_frame(3, 40);
    repeat (20) @(posedge clk);
    check(got.size() == 3 && got[0] == 40 && got[2] == 42, "3-byte frame sent");
    got = {};
    // underrun: 30-byte frame of which only 12 bytes arrive in time
    push_frame(30, 60, 12);
    repeat (30) @(posedge clk);
    check(nunder >= 1, "underrun reported");
    for (int i = 12; i < 30; i++) q.push_back(8'(60 + i));
    repeat (40) @(posedge clk);
    check(q.size() == 0, "rest of the broken frame drained");
    got = {};
    push_frame(10, 5);
    repeat (30) @(posedge clk);
    check(got.size() == 10 && got[9] == 14, "next frame after underrun intact");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
