// buffer_manager: block allocation and per-class memory subdivision.
//
// Keeps a free map of the Memory Pool's blocks and, for each block in use,
// its traffic class and a reference count (the number of output ports that
// still have to send it). It
//   - grants one free block per cycle to a Reception Buffer Unit that asks
//     for a spare (alloc_req), rotating the priority among ports;
//   - takes commits from the Reception Control Unit: a block with refs > 0
//     is charged to its class, a block with refs = 0 is freed at once;
//   - takes releases from the Transmission Control Unit (one per port per
//     cycle) and frees a block when its count reaches zero.
// quota_ok[c] is high while class c holds fewer blocks than its quota, so
// each class lives in its own subdivision of a shared pool and cannot
// exhaust the memory of another. With NBLOCKS >= SYNC_Q + ASYNC_Q + NRT_Q
// + 2*NPORTS every port can always get a spare. The per-class subdivision
// follows the architecture; realising it with quotas and reference counts
// is this design's choice.
module buffer_manager
  import ftt_pkg::*;
#(
  parameter int NPORTS  = NPORTS_DEF,
  parameter int NBLOCKS = 72,
  parameter int SYNC_Q  = 16,
  parameter int ASYNC_Q = 16,
  parameter int NRT_Q   = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              alloc_req [NPORTS],
  output logic              alloc_gnt [NPORTS],
  output logic [BLK_W-1:0]  alloc_blk,
  input  logic              commit_valid,
  input  logic [BLK_W-1:0]  commit_blk,
  input  tclass_e           commit_cls,
  input  logic [3:0]        commit_refs,
  input  logic              rel_valid [NPORTS],
  input  logic [BLK_W-1:0]  rel_blk   [NPORTS],
  output logic              quota_ok  [3],
  output logic [BLK_W:0]    free_count,
  output logic [BLK_W:0]    class_count [3]
);
  localparam int SW = (NPORTS > 1) ? $clog2(NPORTS) : 1;

  logic [NBLOCKS-1:0] free_map;
  logic [3:0]         refcnt [NBLOCKS];
  tclass_e            cls_of [NBLOCKS];
  logic [SW-1:0]      rr;

  // lowest free block
  logic              any_free;
  logic [BLK_W-1:0]  first_free;
  always_comb begin
    any_free = 1'b0; first_free = '0;
    for (int b = NBLOCKS - 1; b >= 0; b--)
      if (free_map[b]) begin any_free = 1'b1; first_free = BLK_W'(b); end
  end

  // grant to the first requesting port at or after rr
  logic gdone;
  always_comb begin
    gdone = 1'b0;
    for (int p = 0; p < NPORTS; p++) alloc_gnt[p] = 1'b0;
    for (int i = 0; i < NPORTS; i++) begin
      if (!gdone && any_free && alloc_req[(int'(rr) + i) % NPORTS]) begin
        alloc_gnt[(int'(rr) + i) % NPORTS] = 1'b1; gdone = 1'b1;
      end
    end
  end
  assign alloc_blk = first_free;

  // releases per block this cycle, and blocks freed by them
  logic [3:0]         dec  [NBLOCKS];
  logic [NBLOCKS-1:0] freed;
  logic [BLK_W:0]     freed_in [3];
  always_comb begin
    for (int c = 0; c < 3; c++) freed_in[c] = '0;
    for (int b = 0; b < NBLOCKS; b++) begin
      dec[b] = '0;
      for (int p = 0; p < NPORTS; p++)
        if (rel_valid[p] && rel_blk[p] == BLK_W'(b)) dec[b] = dec[b] + 1'b1;
      freed[b] = (dec[b] != '0) && (dec[b] >= refcnt[b]);
      if (freed[b]) freed_in[cls_of[b]] = freed_in[cls_of[b]] + 1'b1;
    end
  end

  logic any_gnt;
  always_comb begin
    any_gnt = 1'b0;
    for (int p = 0; p < NPORTS; p++) any_gnt = any_gnt | alloc_gnt[p];
  end

  always_comb begin
    quota_ok[CL_SYNC]  = class_count[CL_SYNC]  < (BLK_W+1)'(SYNC_Q);
    quota_ok[CL_ASYNC] = class_count[CL_ASYNC] < (BLK_W+1)'(ASYNC_Q);
    quota_ok[CL_NRT]   = class_count[CL_NRT]   < (BLK_W+1)'(NRT_Q);
  end

  always_comb begin
    free_count = '0;
    for (int b = 0; b < NBLOCKS; b++) free_count = free_count + (BLK_W+1)'(free_map[b]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      free_map <= '1;
      rr <= '0;
      for (int b = 0; b < NBLOCKS; b++) begin refcnt[b] <= '0; cls_of[b] <= CL_NRT; end
      for (int c = 0; c < 3; c++) class_count[c] <= '0;
    end else begin
      rr <= (rr == SW'(NPORTS - 1)) ? '0 : rr + 1'b1;
      for (int b = 0; b < NBLOCKS; b++) begin
        if (freed[b]) begin
          free_map[b] <= 1'b1;
          refcnt[b]   <= '0;
        end else if (dec[b] != '0) refcnt[b] <= refcnt[b] - dec[b];
      end
      if (any_gnt) free_map[first_free] <= 1'b0;
      if (commit_valid) begin
        if (commit_refs == '0) free_map[commit_blk] <= 1'b1;
        else begin
          refcnt[commit_blk] <= commit_refs;
          cls_of[commit_blk] <= commit_cls;
        end
      end
      for (int c = 0; c < 3; c++)
        class_count[c] <= class_count[c] - freed_in[c]
                          + (BLK_W+1)'(commit_valid && commit_refs != '0 && commit_cls == tclass_e'(c));
    end
  end
endmodule
