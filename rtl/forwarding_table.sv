// forwarding_table: MAC address table for non-FTT traffic.
//
// FT_ENTRIES fully associative entries {valid, MAC address, port}. The
// look-up is combinational: lk_hit/lk_port give the port on which lk_mac
// was last seen. A learn request updates the entry that already holds the
// address, or else overwrites the entry under a round-robin pointer.
// The table is updated dynamically by source-address learning, as in
// common switches; its size, the replacement rule and the absence of
// ageing are this design's choices.
module forwarding_table
  import ftt_pkg::*;
#(
  parameter int FT_ENTRIES = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [47:0]       lk_mac,
  output logic              lk_hit,
  output logic [PORT_W-1:0] lk_port,
  input  logic              learn_valid,
  input  logic [47:0]       learn_mac,
  input  logic [PORT_W-1:0] learn_port
);
  localparam int EW = $clog2(FT_ENTRIES);
  logic              valid [FT_ENTRIES];
  logic [47:0]       mac   [FT_ENTRIES];
  logic [PORT_W-1:0] port  [FT_ENTRIES];
  logic [EW-1:0]     rr;

  always_comb begin
    lk_hit = 1'b0; lk_port = '0;
    for (int i = 0; i < FT_ENTRIES; i++)
      if (valid[i] && mac[i] == lk_mac) begin lk_hit = 1'b1; lk_port = port[i]; end
  end

  logic          l_hit;
  logic [EW-1:0] l_idx;
  always_comb begin
    l_hit = 1'b0; l_idx = rr;
    for (int i = 0; i < FT_ENTRIES; i++)
      if (valid[i] && mac[i] == learn_mac) begin l_hit = 1'b1; l_idx = EW'(i); end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr <= '0;
      for (int i = 0; i < FT_ENTRIES; i++) begin valid[i] <= 1'b0; mac[i] <= '0; port[i] <= '0; end
    end else if (learn_valid) begin
      valid[l_idx] <= 1'b1;
      mac[l_idx]   <= learn_mac;
      port[l_idx]  <= learn_port;
      if (!l_hit) rr <= rr + 1'b1;
    end
  end
endmodule
