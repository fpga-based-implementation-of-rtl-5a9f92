// tb_forwarding_table: an 4-entry table. Learns addresses, looks up known
// and unknown ones, moves an address to another port, and fills the table
// so that the oldest slot is replaced. Expected results come from a list
// of (address, port) kept in slot order.
module tb_forwarding_table;
  import ftt_pkg::*;
  localparam int E = 4;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #4 clk = ~clk;
  logic [47:0] lk_mac = 0, learn_mac = 0;
  logic lk_hit, learn_valid = 0;
  logic [PORT_W-1:0] lk_port, learn_port = 0;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  forwarding_table #(.FT_ENTRIES(E)) dut (.clk, .rst_n, .lk_mac, .lk_hit, .lk_port, .learn_valid, .learn_mac, .learn_port);
  logic [47:0] smac [E];
  int sport [E];
  bit sval [E];
  int next = 0;
  task automatic learn(logic [47:0] a, int p);
    int idx = -1;
    @(negedge clk); learn_valid = 1; learn_mac = a; learn_port = PORT_W'(p);
    @(negedge clk); learn_valid = 0;
    for (int i = 0; i < E; i++) if (sval[i] && smac[i] == a) idx = i;
    if (idx < 0) begin idx = next; next = (next + 1) % E; end
    sval[idx] = 1; smac[idx] = a; sport[idx] = p;
  endtask
  task automatic lookup(logic [47:0] a);
    int idx = -1;
    lk_mac = a; #1;
    for (int i = 0; i < E; i++) if (sval[i] && smac[i] == a) idx = i;
    check(lk_hit == (idx >= 0), $sformatf("hit for %h", a));
    if (idx >= 0) check(int'(lk_port) == sport[idx], $sformatf("port for %h", a));
  endtask
  logic [47:0] addrs [8];
  initial begin
    for (int i = 0; i < E; i++) sval[i] = 0;
    for (int i = 0; i < 8; i++) addrs[i] = {16'h0200 + 16'(i), $urandom};
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk);
    lookup(addrs[0]);
    learn(addrs[0], 1); learn(addrs[1], 2);
    lookup(addrs[0]); lookup(addrs[1]); lookup(addrs[2]);
    learn(addrs[0], 3);
    lookup(addrs[0]);
    for (int i = 2; i < 8; i++) begin learn(addrs[i], i % 4); for (int j = 0; j < 8; j++) lookup(addrs[j]); end
    for (int k = 0; k < 40; k++) begin
      learn(addrs[$urandom % 8], $urandom % 4);
      for (int j = 0; j < 8; j++) lookup(addrs[j]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
