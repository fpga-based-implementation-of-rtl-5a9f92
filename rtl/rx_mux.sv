// rx_mux: Rx Multiplexing Unit, shared by all ports.
//
// A TDMA wheel: in cycle c the write port of the Memory Pool belongs to
// port c mod NPORTS. If that port's Reception Buffer Unit offers a word,
// it is written at address block * WPB + word index and the port gets
// wr_ack in the same cycle. Every port thus has a guaranteed write slot
// every NPORTS cycles, which matches one N-byte word per N byte times.
// The wheel follows the architecture; the fixed slot order is this
// design's choice.
module rx_mux
  import ftt_pkg::*;
#(
  parameter int NPORTS  = NPORTS_DEF,
  parameter int WPB     = 512,
  parameter int NBLOCKS = 72
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              wr_valid [NPORTS],
  input  logic [BLK_W-1:0]  wr_blk   [NPORTS],
  input  logic [$clog2(WPB)-1:0] wr_widx [NPORTS],
  input  logic [8*NPORTS-1:0] wr_data [NPORTS],
  output logic              wr_ack   [NPORTS],
  output logic              mem_we,
  output logic [$clog2(NBLOCKS*WPB)-1:0] mem_waddr,
  output logic [8*NPORTS-1:0] mem_wdata
);
  localparam int SW = (NPORTS > 1) ? $clog2(NPORTS) : 1;
  localparam int AW = $clog2(NBLOCKS*WPB);
  logic [SW-1:0] slot;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) slot <= '0;
    else slot <= (slot == SW'(NPORTS - 1)) ? '0 : slot + 1'b1;
  end

  always_comb begin
    for (int p = 0; p < NPORTS; p++) wr_ack[p] = wr_valid[p] && (slot == SW'(p));
    mem_we    = wr_valid[slot];
    mem_waddr = AW'(wr_blk[slot]) * AW'(WPB) + AW'(wr_widx[slot]);
    mem_wdata = wr_data[slot];
  end
endmodule
