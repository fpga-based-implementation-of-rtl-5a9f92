// tx_demux: TX Demultiplexing Unit, shared by all ports.
//
// Holds one read job per output port, started by the Transmission Control
// Unit: a frame in a Memory Pool block (start_tm low) or the current
// Trigger Message in the Master Interface's TM buffer (start_tm high).
// A TDMA wheel gives port c mod NPORTS the memory read port in cycle c;
// when that port has a job and its Transmission Buffer Unit can take a
// word, the next word is read. Memory and TM buffer both answer one cycle
// later, and the word goes out on the shared w_* bus with w_valid set for
// its port only, marked first/last with the number of valid bytes and the
// frame length. done pulses for a port when its last word has been read,
// so its block can be released. Each port gets a read slot every NPORTS
// cycles, i.e. one N-byte word per N byte times, which is the port's byte
// rate. The wheel follows the architecture; the job interface is this
// design's choice.
module tx_demux
  import ftt_pkg::*;
#(
  parameter int NPORTS   = NPORTS_DEF,
  parameter int WPB      = 512,
  parameter int NBLOCKS  = 72,
  parameter int TM_WORDS = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  // jobs from the Transmission Control Unit
  input  logic              start     [NPORTS],
  input  logic              start_tm  [NPORTS],
  input  logic [BLK_W-1:0]  start_blk [NPORTS],
  input  logic [LEN_W-1:0]  start_len [NPORTS],
  output logic              busy      [NPORTS],
  output logic              done      [NPORTS],
  // Memory Pool read port
  output logic              mem_re,
  output logic [$clog2(NBLOCKS*WPB)-1:0] mem_raddr,
  input  logic [8*NPORTS-1:0] mem_rdata,
  // Trigger Message buffer read port
  output logic              tm_re,
  output logic [$clog2(TM_WORDS)-1:0] tm_raddr,
  input  logic [8*NPORTS-1:0] tm_rdata,
  // words to the Transmission Buffer Units
  input  logic              txb_ready [NPORTS],
  output logic              w_valid   [NPORTS],
  output logic [8*NPORTS-1:0] w_data,
  output logic              w_first,
  output logic              w_last,
  output logic [$clog2(NPORTS):0] w_nbytes,
  output logic [LEN_W-1:0]  w_len
);
  localparam int SW = (NPORTS > 1) ? $clog2(NPORTS) : 1;
  localparam int AW = $clog2(NBLOCKS*WPB);
  localparam int WW = $clog2(WPB);
  localparam int KW = $clog2(NPORTS);

  logic [SW-1:0]     slot;
  logic              j_tm   [NPORTS];
  logic [BLK_W-1:0]  j_blk  [NPORTS];
  logic [LEN_W-1:0]  j_len  [NPORTS];
  logic [WW:0]       j_widx [NPORTS];
  logic [WW:0]       j_nw   [NPORTS];

  // issue stage (combinational)
  logic issue, is_last;
  assign issue   = busy[slot] && txb_ready[slot];
  assign is_last = (j_widx[slot] + 1'b1 == j_nw[slot]);
  assign mem_re    = issue && !j_tm[slot];
  assign mem_raddr = AW'(j_blk[slot]) * AW'(WPB) + AW'(j_widx[slot]);
  assign tm_re     = issue && j_tm[slot];
  assign tm_raddr  = j_widx[slot][$clog2(TM_WORDS)-1:0];

  // data stage (registered)
  logic              p_valid, p_tm, p_first, p_last;
  logic [SW-1:0]     p_port;
  logic [$clog2(NPORTS):0] p_nb;
  logic [LEN_W-1:0]  p_len;

  always_comb begin
    for (int p = 0; p < NPORTS; p++) w_valid[p] = p_valid && (p_port == SW'(p));
    w_data   = p_tm ? tm_rdata : mem_rdata;
    w_first  = p_first;
    w_last   = p_last;
    w_nbytes = p_nb;
    w_len    = p_len;
  end

  logic [LEN_W-1:0] tail;   // bytes in the last word
  assign tail = j_len[slot] - LEN_W'((j_nw[slot] - 1'b1) * (WW+1)'(NPORTS));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot <= '0;
      for (int p = 0; p < NPORTS; p++) begin
        busy[p] <= 1'b0; done[p] <= 1'b0; j_tm[p] <= 1'b0; j_blk[p] <= '0;
        j_len[p] <= '0; j_widx[p] <= '0; j_nw[p] <= '0;
      end
      p_valid <= 1'b0; p_tm <= 1'b0; p_first <= 1'b0; p_last <= 1'b0;
      p_port <= '0; p_nb <= '0; p_len <= '0;
    end else begin
      slot <= (slot == SW'(NPORTS - 1)) ? '0 : slot + 1'b1;
      for (int p = 0; p < NPORTS; p++) begin
        done[p] <= 1'b0;
        if (start[p] && !busy[p] && start_len[p] != '0) begin
          busy[p]   <= 1'b1;
          j_tm[p]   <= start_tm[p];
          j_blk[p]  <= start_blk[p];
          j_len[p]  <= start_len[p];
          j_widx[p] <= '0;
          j_nw[p]   <= (WW+1)'((start_len[p] + LEN_W'(NPORTS - 1)) >> KW);
        end
      end
      p_valid <= issue;
      if (issue) begin
        p_port  <= slot;
        p_tm    <= j_tm[slot];
        p_first <= (j_widx[slot] == '0);
        p_last  <= is_last;
        p_nb    <= is_last ? ($clog2(NPORTS)+1)'(tail) : ($clog2(NPORTS)+1)'(NPORTS);
        p_len   <= j_len[slot];
        j_widx[slot] <= j_widx[slot] + 1'b1;
        if (is_last) begin
          busy[slot] <= 1'b0;
          done[slot] <= 1'b1;
        end
      end
    end
  end
endmodule
