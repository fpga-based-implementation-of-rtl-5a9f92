// master_interface: Master Interface Unit, the link to the FTT Master Unit.
//
// Trigger Messages: the Master Unit answers each EC-schedule request with
// a complete TM frame on the tm_in_* byte stream. The unit stores the frame
// in the idle bank of a two-bank TM buffer (N-byte words, one byte lane per
// byte) and decodes its EC-schedule as it arrives: byte 15 holds the entry
// count, entries of four bytes follow from byte 16 (see ftt_pkg). At the
// next EC start (ec_start) a complete pending TM becomes the active one:
// its schedule drives the validation and the forwarding of FTT packets
// during that EC, and one cycle later tm_go tells the Transmission Control
// Unit to broadcast it; the TX Demultiplexing Unit reads it through the
// tm_re/tm_raddr port (data one cycle later). If no TM arrived in time,
// the EC runs with an empty schedule, no TM is sent and ev_tm_missing
// pulses.
// FTT requests: each port's Classifier & Validation Unit writes the first
// REQ_MAX bytes of every frame into that port's request buffer and commits
// it when the frame is an FTT request. Committed requests are sent to the
// Master Unit one at a time, round robin, on rq_* (rq_port gives the input
// port, rq_last marks the last byte). While a port's buffer is waiting to
// be sent, further requests from that port are dropped (ev_req_drop).
// Buffering TMs and passing requests follow the architecture; the byte
// stream interface, the TM layout and the buffer sizes are this design's
// choices.
module master_interface
  import ftt_pkg::*;
#(
  parameter int NPORTS   = NPORTS_DEF,
  parameter int REQ_MAX  = 64,
  parameter int TM_WORDS = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  // Trigger Messages from the Master Unit
  input  logic              tm_in_valid,
  input  logic [7:0]        tm_in_data,
  input  logic              tm_in_last,
  // EC timing
  input  logic              ec_start,
  output logic              tm_go,
  output logic [LEN_W-1:0]  tm_len,
  output sched_entry_t      sched [SCHED_MAX],
  output logic [$clog2(SCHED_MAX):0] sched_cnt,
  // TM buffer read port
  input  logic              tm_re,
  input  logic [$clog2(TM_WORDS)-1:0] tm_raddr,
  output logic [8*NPORTS-1:0] tm_rdata,
  // request buffer writes from the classifiers
  input  logic              req_we     [NPORTS],
  input  logic [$clog2(REQ_MAX)-1:0] req_idx [NPORTS],
  input  logic [7:0]        req_data   [NPORTS],
  input  logic              req_commit [NPORTS],
  input  logic [LEN_W-1:0]  req_len    [NPORTS],
  // FTT requests to the Master Unit
  output logic              rq_valid,
  output logic [7:0]        rq_data,
  output logic              rq_last,
  output logic [PORT_W-1:0] rq_port,
  input  logic              rq_ready,
  // events
  output logic              ev_tm_missing,
  output logic              ev_req_drop
);
  localparam int KW = $clog2(NPORTS);
  localparam int SW = (NPORTS > 1) ? $clog2(NPORTS) : 1;
  localparam int RW = $clog2(REQ_MAX);
  localparam int MAXB = TM_WORDS * NPORTS;

  // ---------------- Trigger Messages ----------------
  logic [8*NPORTS-1:0] tm_mem [2*TM_WORDS];
  logic              act_bank;
  logic [LEN_W-1:0]  wcnt;          // bytes of the TM being received
  logic              pend_ready;
  logic [LEN_W-1:0]  pend_len;
  sched_entry_t      pend [SCHED_MAX];
  logic [$clog2(SCHED_MAX):0] pend_cnt;

  logic [LEN_W-1:0]  eoff;          // offset inside the entry area
  assign eoff = wcnt - LEN_W'(16);

  always_ff @(posedge clk) begin
    if (tm_in_valid && wcnt < LEN_W'(MAXB))
      tm_mem[{~act_bank, wcnt[KW +: $clog2(TM_WORDS)]}][8*wcnt[KW-1:0] +: 8] <= tm_in_data;
    if (tm_re) tm_rdata <= tm_mem[{act_bank, tm_raddr}];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      act_bank <= 1'b0; wcnt <= '0; pend_ready <= 1'b0; pend_len <= '0; pend_cnt <= '0;
      tm_go <= 1'b0; tm_len <= '0; sched_cnt <= '0; ev_tm_missing <= 1'b0;
      for (int i = 0; i < SCHED_MAX; i++) begin pend[i] <= '0; sched[i] <= '0; end
    end else begin
      tm_go <= 1'b0;
      ev_tm_missing <= 1'b0;
      if (tm_in_valid) begin
        wcnt <= tm_in_last ? '0 : wcnt + 1'b1;
        if (wcnt == LEN_W'(15))
          pend_cnt <= (tm_in_data > 8'(SCHED_MAX)) ? ($clog2(SCHED_MAX)+1)'(SCHED_MAX)
                                                  : ($clog2(SCHED_MAX)+1)'(tm_in_data);
        if (wcnt >= LEN_W'(16) && eoff[LEN_W-1:2] < LEN_W'(SCHED_MAX)) begin
          unique case (eoff[1:0])
            2'd0: pend[eoff[2 +: $clog2(SCHED_MAX)]].msg_id   <= tm_in_data;
            2'd1: begin
              pend[eoff[2 +: $clog2(SCHED_MAX)]].async   <= tm_in_data[7];
              pend[eoff[2 +: $clog2(SCHED_MAX)]].in_port <= tm_in_data[PORT_W-1:0];
            end
            2'd2: pend[eoff[2 +: $clog2(SCHED_MAX)]].out_mask <= tm_in_data;
            default: pend[eoff[2 +: $clog2(SCHED_MAX)]].min_iat <= tm_in_data;
          endcase
        end
        if (tm_in_last) begin
          pend_ready <= 1'b1;
          pend_len   <= (wcnt + 1'b1 > LEN_W'(MAXB)) ? LEN_W'(MAXB) : wcnt + 1'b1;
        end
      end
      if (ec_start) begin
        if (pend_ready && !tm_in_valid) begin
          act_bank   <= ~act_bank;
          sched      <= pend;
          sched_cnt  <= pend_cnt;
          tm_len     <= pend_len;
          tm_go      <= 1'b1;
          pend_ready <= 1'b0;
        end else begin
          sched_cnt     <= '0;
          ev_tm_missing <= 1'b1;
        end
      end
    end
  end

  // ---------------- FTT requests ----------------
  logic [7:0]       rbuf [NPORTS][REQ_MAX];
  logic             rfull [NPORTS];
  logic             rok   [NPORTS];     // current frame may use the buffer
  logic [LEN_W-1:0] rlen  [NPORTS];
  logic             sending;
  logic [SW-1:0]    sport;
  logic [RW:0]      spos;

  logic             pick_any;
  logic [SW-1:0]    pick;
  logic [SW-1:0]    rr;
  always_comb begin
    pick_any = 1'b0; pick = '0;
    for (int i = NPORTS - 1; i >= 0; i--) begin
      if (rfull[(int'(rr) + i) % NPORTS]) begin pick_any = 1'b1; pick = SW'((int'(rr) + i) % NPORTS); end
    end
  end

  assign rq_valid = sending;
  assign rq_data  = rbuf[sport][spos[RW-1:0]];
  assign rq_last  = sending && (LEN_W'(spos) + 1'b1 == rlen[sport]);
  assign rq_port  = PORT_W'(sport);

  always_ff @(posedge clk) begin
    for (int p = 0; p < NPORTS; p++)
      if (req_we[p] && !rfull[p] && (rok[p] || req_idx[p] == '0)) rbuf[p][req_idx[p]] <= req_data[p];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sending <= 1'b0; sport <= '0; spos <= '0; rr <= '0; ev_req_drop <= 1'b0;
      for (int p = 0; p < NPORTS; p++) begin rfull[p] <= 1'b0; rok[p] <= 1'b0; rlen[p] <= '0; end
    end else begin
      ev_req_drop <= 1'b0;
      for (int p = 0; p < NPORTS; p++) begin
        if (req_we[p] && req_idx[p] == '0) rok[p] <= !rfull[p];
        if (req_commit[p]) begin
          if (rok[p] && !rfull[p]) begin rfull[p] <= 1'b1; rlen[p] <= req_len[p]; end
          else ev_req_drop <= 1'b1;
          rok[p] <= 1'b0;
        end
      end
      if (!sending) begin
        if (pick_any) begin sending <= 1'b1; sport <= pick; spos <= '0; end
      end else if (rq_ready) begin
        if (rq_last) begin
          sending <= 1'b0;
          rfull[sport] <= 1'b0;
          rr <= (sport == SW'(NPORTS - 1)) ? '0 : sport + 1'b1;
        end else spos <= spos + 1'b1;
      end
    end
  end
endmodule
