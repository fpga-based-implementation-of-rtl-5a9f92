// tb_transmission_buffer: frames of 1..40 bytes arrive as 4-byte words
// with gaps, while the transmit FIFO is randomly full. The byte stream
// written to the FIFO must be, per frame, the length high byte, the length
// low byte and then the frame bytes in order.
module tb_transmission_buffer;
  import ftt_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #4 clk = ~clk;
  logic w_valid = 0, w_first = 0, w_ready, fw_en, fw_full = 0;
  logic [31:0] w_data = 0;
  logic [2:0] w_nbytes = 0;
  logic [LEN_W-1:0] w_len = 0;
  logic [7:0] fw_data;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  transmission_buffer #(.NPORTS(N)) dut (.clk, .rst_n, .w_valid, .w_data, .w_first, .w_nbytes, .w_len,
    .w_ready, .fw_en, .fw_data, .fw_full);
  byte unsigned exp_q [$];
  typedef struct { logic [31:0] d; bit f; int nb; int len; } wd_t;
  wd_t words [$];
  int got = 0;
  bit acc;
  always @(posedge clk) if (rst_n) begin
    acc = w_valid && w_ready;
    if (fw_en) begin
      check(!fw_full, "no write while full");
      if (exp_q.size() == 0) check(0, "unexpected byte");
      else begin check(fw_data == exp_q[0], $sformatf("byte %0d", got)); void'(exp_q.pop_front()); end
      got++;
    end
  end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int f = 0; f < 60; f++) begin
      int len = 1 + $urandom % 40;
      exp_q.push_back(8'(len >> 8)); exp_q.push_back(8'(len));
      for (int i = 0; i < len; i += N) begin
        wd_t w; w.d = 0; w.f = (i == 0); w.len = len; w.nb = (len - i < N) ? len - i : N;
        for (int k = 0; k < w.nb; k++) begin w.d[8*k +: 8] = 8'($urandom); exp_q.push_back(w.d[8*k +: 8]); end
        words.push_back(w);
      end
    end
    while (words.size() != 0) begin
      @(negedge clk);
      fw_full = ($urandom % 4) == 0;
      if (acc) void'(words.pop_front());
      acc = 0;
      if (words.size() != 0 && ($urandom % 5) != 0) begin
        w_valid = 1; w_data = words[0].d; w_first = words[0].f; w_nbytes = 3'(words[0].nb); w_len = LEN_W'(words[0].len);
      end else w_valid = 0;
    end
    w_valid = 0;
    @(negedge clk); fw_full = 0;
    repeat (40) @(negedge clk);
    check(exp_q.size() == 0, $sformatf("all bytes written (%0d left)", exp_q.size()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #200000; failures++; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
