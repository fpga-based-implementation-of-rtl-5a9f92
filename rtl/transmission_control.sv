// transmission_control: Transmission Control Unit.
//
// Decides, for every output port, when each packet is sent, so that the
// traffic classes stay confined to their phases of the Elementary Cycle:
//   [0, sync_end)        Trigger Message, then synchronous window
//   [sync_end, async_end) asynchronous window
//   [async_end, ec_len)  non real-time (NRT) window
// One cycle after each EC start the Master Interface pulses tm_go if a
// Trigger Message is ready; every port then sends it first (broadcast).
// A port starts a new packet only when its previous one has left the wire;
// the wire time of a packet of L bytes is max(L,60)+24 byte times (FCS,
// preamble and inter-frame gap), counted down in wire_cnt. Synchronous
// packets are sent in the synchronous window as scheduled by the master.
// Asynchronous and NRT packets are started only if they end before their
// window closes, so they can never block the Trigger Message or the
// synchronous traffic of the next EC. Starting a packet pops its pointer
// and hands a read job to the TX Demultiplexing Unit; when the job has
// read the whole block, the block is released to the buffer manager.
// Phases, blocking-free TM and the time-left check follow the
// architecture; times in byte times and the wire-time formula are this
// design's choices.
module transmission_control
  import ftt_pkg::*;
#(
  parameter int NPORTS = NPORTS_DEF,
  parameter int TW     = 17          // width of EC times
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [TW-1:0]     ec_time,
  input  logic [TW-1:0]     ec_len,
  input  logic [TW-1:0]     sync_end,
  input  logic [TW-1:0]     async_end,
  input  logic              tm_go,
  input  logic [LEN_W-1:0]  tm_len,
  // Packet List Units
  input  logic              pl_empty [NPORTS][3],
  input  pkt_ptr_t          pl_head  [NPORTS][3],
  output logic              pl_pop   [NPORTS][3],
  // TX Demultiplexing Unit
  output logic              start     [NPORTS],
  output logic              start_tm  [NPORTS],
  output logic [BLK_W-1:0]  start_blk [NPORTS],
  output logic [LEN_W-1:0]  start_len [NPORTS],
  input  logic              busy      [NPORTS],
  input  logic              done      [NPORTS],
  // buffer manager
  output logic              rel_valid [NPORTS],
  output logic [BLK_W-1:0]  rel_blk   [NPORTS],
  // events, one bit per port
  output logic [NPORTS-1:0] ev_tm,
  output logic [NPORTS-1:0] ev_sync,
  output logic [NPORTS-1:0] ev_async,
  output logic [NPORTS-1:0] ev_nrt,
  output logic [NPORTS-1:0] ev_hold      // packet held back: not enough time left
);
  logic [LEN_W+1:0] wire_cnt [NPORTS];
  logic             tm_pend  [NPORTS];
  logic             cur_mem  [NPORTS];
  logic [BLK_W-1:0] cur_blk  [NPORTS];

  logic in_sync, in_async, in_nrt;
  assign in_sync  = ec_time < sync_end;
  assign in_async = !in_sync && ec_time < async_end;
  assign in_nrt   = !in_sync && !in_async;

  function automatic logic fits(input logic [TW-1:0] now, input logic [LEN_W-1:0] len,
                                input logic [TW-1:0] limit);
    return (TW+1)'(now) + (TW+1)'(wire_time(len)) <= (TW+1)'(limit);
  endfunction

  logic fa [NPORTS], fn [NPORTS];
  always_comb begin
    for (int p = 0; p < NPORTS; p++) begin
      fa[p] = fits(ec_time, pl_head[p][CL_ASYNC].len, async_end);
      fn[p] = fits(ec_time, pl_head[p][CL_NRT].len, ec_len);
    end
  end

  always_comb begin
    for (int p = 0; p < NPORTS; p++) begin
      for (int c = 0; c < 3; c++) pl_pop[p][c] = 1'b0;
      start[p] = 1'b0; start_tm[p] = 1'b0; start_blk[p] = '0; start_len[p] = '0;
      ev_tm[p] = 1'b0; ev_sync[p] = 1'b0; ev_async[p] = 1'b0; ev_nrt[p] = 1'b0; ev_hold[p] = 1'b0;
      if (wire_cnt[p] == '0 && !busy[p]) begin
        if (tm_pend[p] || tm_go) begin
          start[p] = 1'b1; start_tm[p] = 1'b1; start_len[p] = tm_len; ev_tm[p] = 1'b1;
        end else if (in_sync && !pl_empty[p][CL_SYNC]) begin
          start[p] = 1'b1; start_blk[p] = pl_head[p][CL_SYNC].blk;
          start_len[p] = pl_head[p][CL_SYNC].len; pl_pop[p][CL_SYNC] = 1'b1; ev_sync[p] = 1'b1;
        end else if (in_async && !pl_empty[p][CL_ASYNC]) begin
          if (fa[p]) begin
            start[p] = 1'b1; start_blk[p] = pl_head[p][CL_ASYNC].blk;
            start_len[p] = pl_head[p][CL_ASYNC].len; pl_pop[p][CL_ASYNC] = 1'b1; ev_async[p] = 1'b1;
          end else ev_hold[p] = 1'b1;
        end else if (in_nrt && !pl_empty[p][CL_NRT]) begin
          if (fn[p]) begin
            start[p] = 1'b1; start_blk[p] = pl_head[p][CL_NRT].blk;
            start_len[p] = pl_head[p][CL_NRT].len; pl_pop[p][CL_NRT] = 1'b1; ev_nrt[p] = 1'b1;
          end else ev_hold[p] = 1'b1;
        end
      end
    end
  end

  always_comb begin
    for (int p = 0; p < NPORTS; p++) begin
      rel_valid[p] = done[p] && cur_mem[p];
      rel_blk[p]   = cur_blk[p];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NPORTS; p++) begin
        wire_cnt[p] <= '0; tm_pend[p] <= 1'b0; cur_mem[p] <= 1'b0; cur_blk[p] <= '0;
      end
    end else begin
      for (int p = 0; p < NPORTS; p++) begin
        if (tm_go) tm_pend[p] <= 1'b1;
        if (start[p]) begin
          wire_cnt[p] <= wire_time(start_len[p]) - 1'b1;
          cur_mem[p]  <= !start_tm[p];
          cur_blk[p]  <= start_blk[p];
          if (start_tm[p]) tm_pend[p] <= 1'b0;
        end else if (wire_cnt[p] != '0) wire_cnt[p] <= wire_cnt[p] - 1'b1;
      end
    end
  end
endmodule
