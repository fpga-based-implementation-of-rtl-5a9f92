// transmission_buffer: Transmission Buffer Unit of one port.
//
// Receives N-byte words of a frame from the TX Demultiplexing Unit and
// writes them, one byte per cycle, into the port's transmit clock-domain
// FIFO. Before the first byte of each frame it writes the frame length as
// two bytes (high byte first) so that the Transmission Unit on the MAC side
// knows how much to expect. A two-word queue decouples the two sides;
// w_ready is high while the queue has room, which is always enough because
// the wheel serves this port at most once every NPORTS (>= 2) cycles and
// its word arrives one cycle after the read.
// Word-to-byte conversion follows the architecture; the length prefix is
// this design's choice.
module transmission_buffer
  import ftt_pkg::*;
#(
  parameter int NPORTS = NPORTS_DEF
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              w_valid,
  input  logic [8*NPORTS-1:0] w_data,
  input  logic              w_first,
  input  logic [$clog2(NPORTS):0] w_nbytes,
  input  logic [LEN_W-1:0]  w_len,
  output logic              w_ready,
  // transmit FIFO write side
  output logic              fw_en,
  output logic [7:0]        fw_data,
  input  logic              fw_full
);
  typedef struct packed {
    logic [8*NPORTS-1:0]     data;
    logic                    first;
    logic [$clog2(NPORTS):0] nb;
    logic [LEN_W-1:0]        len;
  } word_t;

  word_t     q [2];
  logic [1:0] cnt;
  logic       rd;       // queue head slot
  logic [1:0] hdr;      // length bytes still to write for the head word
  logic [$clog2(NPORTS):0] pos;   // next byte of the head word

  assign w_ready = (cnt < 2'd2);

  word_t head;
  assign head = q[rd];

  logic pop;
  always_comb begin
    fw_en = 1'b0; fw_data = '0; pop = 1'b0;
    if (cnt != '0 && !fw_full) begin
      fw_en = 1'b1;
      if (head.first && hdr == 2'd0)      fw_data = {5'd0, head.len[LEN_W-1:8]};
      else if (head.first && hdr == 2'd1) fw_data = head.len[7:0];
      else begin
        fw_data = head.data[8*pos[$clog2(NPORTS)-1:0] +: 8];
        pop = (pos + 1'b1 == head.nb);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; rd <= 1'b0; hdr <= '0; pos <= '0;
      q[0] <= '0; q[1] <= '0;
    end else begin
      if (w_valid && w_ready) q[rd ^ cnt[0]] <= '{data: w_data, first: w_first, nb: w_nbytes, len: w_len};
      cnt <= cnt + (w_valid && w_ready) - pop;
      if (fw_en) begin
        if (head.first && hdr != 2'd2) hdr <= hdr + 1'b1;
        else if (pop) begin
          pos <= '0; hdr <= '0; rd <= ~rd;
        end else pos <= pos + 1'b1;
      end
    end
  end
endmodule
