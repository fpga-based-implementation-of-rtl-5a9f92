// async_fifo: dual-clock FIFO that separates a MAC clock domain from the
// switch's main clock domain (one on the receive side and one on the
// transmit side of every port).
//
// Binary read and write pointers, one bit wider than the address, are
// converted to Gray code and passed through two-flop synchronisers into the
// opposite domain. Full and empty are therefore conservative: a write or a
// read becomes visible on the other side two to three cycles later.
// The read side is first-word-fall-through: rd_data shows the head entry
// whenever rd_empty is low, and rd_en pops it. rd_level is the number of
// entries seen from the read side, wr_level from the write side.
// Writing while full and reading while empty are ignored.
// The dual-clock FIFO itself follows the architecture; the Gray-code
// construction is this design's choice.
module async_fifo #(
  parameter int WIDTH = 10,
  parameter int DEPTH = 64            // power of two
) (
  input  logic             wr_clk,
  input  logic             wr_rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             wr_full,
  output logic [$clog2(DEPTH):0] wr_level,
  input  logic             rd_clk,
  input  logic             rd_rst_n,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             rd_empty,
  output logic [$clog2(DEPTH):0] rd_level
);
  localparam int AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] wq1, wq2;   // write pointer (Gray) in the read domain
  logic [AW:0] rq1, rq2;   // read pointer (Gray) in the write domain

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction
  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    for (int i = AW; i >= 0; i--)
      b[i] = (i == AW) ? g[i] : (b[i+1] ^ g[i]);
    return b;
  endfunction

  // write domain
  logic [AW:0] rbin_w;
  assign rbin_w   = gray2bin(rq2);
  assign wr_level = wbin - rbin_w;
  assign wr_full  = (wr_level == (AW+1)'(DEPTH));

  always_ff @(posedge wr_clk) begin
    if (wr_en && !wr_full) mem[wbin[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge wr_clk or negedge wr_rst_n) begin
    if (!wr_rst_n) begin
      wbin <= '0; wgray <= '0; rq1 <= '0; rq2 <= '0;
    end else begin
      rq1 <= rgray; rq2 <= rq1;
      if (wr_en && !wr_full) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end
  end

  // read domain
  logic [AW:0] wbin_r;
  assign wbin_r   = gray2bin(wq2);
  assign rd_level = wbin_r - rbin;
  assign rd_empty = (rd_level == '0);
  assign rd_data  = mem[rbin[AW-1:0]];

  always_ff @(posedge rd_clk or negedge rd_rst_n) begin
    if (!rd_rst_n) begin
      rbin <= '0; rgray <= '0; wq1 <= '0; wq2 <= '0;
    end else begin
      wq1 <= wgray; wq2 <= wq1;
      if (rd_en && !rd_empty) begin
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
      end
    end
  end
endmodule
