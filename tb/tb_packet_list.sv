// tb_packet_list: random pushes into the three class queues and random
// pops, against a queue model. Checks the head of each queue every cycle,
// the empty and full flags, that a push into a full queue is refused and
// that the classes never mix.
module tb_packet_list;
  import ftt_pkg::*;
  localparam int QD = 4;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #4 clk = ~clk;
  logic push = 0;
  tclass_e push_cls = CL_SYNC;
  pkt_ptr_t push_ptr = '0;
  logic full [3], empty [3], pop [3];
  pkt_ptr_t head [3];
  pkt_ptr_t m [3][$];
  int checks = 0, failures = 0, nfull = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  packet_list #(.QDEPTH(QD)) dut (.clk, .rst_n, .push, .push_cls, .push_ptr, .full, .empty, .head, .pop);
  int sz [3];
  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < 3; c++) begin
      check(empty[c] == (m[c].size() == 0), $sformatf("empty flag of class %0d", c));
      check(full[c] == (m[c].size() == QD), $sformatf("full flag of class %0d", c));
      if (m[c].size() != 0) check(head[c] == m[c][0], $sformatf("head of class %0d", c));
    end
    // push and pop are both judged by the fill level before this cycle
    for (int c = 0; c < 3; c++) sz[c] = m[c].size();
    if (push) begin
      if (m[push_cls].size() < QD) m[push_cls].push_back(push_ptr);
      else nfull++;
    end
    for (int c = 0; c < 3; c++) if (pop[c] && sz[c] != 0) void'(m[c].pop_front());
  end
  initial begin
    for (int c = 0; c < 3; c++) pop[c] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      push = ($urandom % 3) != 0;
      push_cls = tclass_e'($urandom % 3);
      push_ptr = pkt_ptr_t'($urandom);
      for (int c = 0; c < 3; c++) pop[c] = ($urandom % 4) == 0;
    end
    @(negedge clk); push = 0;
    check(nfull > 0, "some pushes met a full queue");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
