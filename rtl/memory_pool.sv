// memory_pool: the switch's packet memory.
//
// A simple dual-port synchronous RAM of NBLOCKS blocks of WPB words, each
// word NPORTS bytes wide. The write port (write only) is shared by all
// input ports through the Rx Multiplexing Unit, the read port (read only)
// by all output ports through the Tx Demultiplexing Unit; each port has its
// own clock. One block holds one frame of up to WPB*NPORTS bytes, which is
// wasteful for short frames but simple to manage. Reads are registered:
// rdata shows the word addressed in the previous rclk cycle with re high.
// Structure follows the architecture; block count and size are this
// design's choice (a 2048-byte block holds a maximum-size frame).
module memory_pool
  import ftt_pkg::*;
#(
  parameter int NPORTS  = NPORTS_DEF,
  parameter int NBLOCKS = 72,
  parameter int WPB     = 512
) (
  input  logic                           wclk,
  input  logic                           we,
  input  logic [$clog2(NBLOCKS*WPB)-1:0] waddr,
  input  logic [8*NPORTS-1:0]            wdata,
  input  logic                           rclk,
  input  logic                           re,
  input  logic [$clog2(NBLOCKS*WPB)-1:0] raddr,
  output logic [8*NPORTS-1:0]            rdata
);
  logic [8*NPORTS-1:0] ram [NBLOCKS*WPB];

  always_ff @(posedge wclk) begin
    if (we) ram[waddr] <= wdata;
  end

  always_ff @(posedge rclk) begin
    if (re) rdata <= ram[raddr];
  end
endmodule
