// classifier_validation: Classifier & Validation Unit of one port.
//
// Reads the port's receive FIFO in the main clock domain ({status, byte}
// entries, see reception_unit) and streams the bytes unchanged to the
// Reception Buffer Unit, one per cycle while ob_ready is high. While the
// bytes go by it captures the destination and source MAC addresses, the
// EtherType, the FTT frame type and the message id. When the closing status
// entry arrives it issues the frame's verdict on the end_* signals:
//   - non-FTT frame (EtherType other than FTT_ETYPE): accepted as NRT,
//     to be forwarded by MAC address;
//   - FTT request (control frame for the master): not stored in memory;
//     its first REQ_MAX bytes, written to the Master Interface as they pass
//     (req_we/req_idx/req_data), are committed with req_commit;
//   - FTT synchronous frame: accepted only if the active EC-schedule holds a
//     synchronous entry for this message id and this input port that has
//     not been used in the current EC (unscheduled periodic traffic is
//     trashed);
//   - FTT asynchronous frame: accepted only if the EC-schedule holds an
//     asynchronous entry for it and at least min_iat ECs have passed since
//     the last accepted instance (minimum inter-arrival time policing);
//   - anything else, a bad frame or a runt: trashed.
// The classes and the validation against the EC-schedule follow the
// architecture; the frame format, the per-EC "used" bits and the inter-
// arrival bookkeeping in EC units are this design's choices.
module classifier_validation
  import ftt_pkg::*;
#(
  parameter int PORT    = 0,
  parameter int REQ_MAX = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  // receive FIFO (first-word-fall-through)
  input  logic [9:0]        fi_data,
  input  logic              fi_empty,
  output logic              fi_en,
  // byte stream to the Reception Buffer Unit
  output logic              ob_valid,
  output logic [7:0]        ob_data,
  input  logic              ob_ready,
  // frame verdict, valid on the cycle the status entry is consumed
  output logic              end_valid,
  output logic              end_accept,
  output tclass_e           end_cls,
  output logic              end_by_mac,
  output logic [MASK_W-1:0] end_mask,
  output logic [47:0]       end_dst,
  output logic [47:0]       end_src,
  // FTT requests toward the Master Interface
  output logic              req_we,
  output logic [$clog2(REQ_MAX)-1:0] req_idx,
  output logic [7:0]        req_data,
  output logic              req_commit,
  output logic [LEN_W-1:0]  req_len,
  // EC-schedule and EC timing
  input  sched_entry_t      sched [SCHED_MAX],
  input  logic [$clog2(SCHED_MAX):0] sched_cnt,
  input  logic              ec_start,
  input  logic [15:0]       ec_num,
  // events
  output logic              ev_trash
);
  typedef enum logic [2:0] {V_TRASH, V_NRT, V_SYNC, V_ASYNC, V_REQ} verdict_e;

  logic [LEN_W-1:0]   cnt;
  logic [47:0]        dst, src;
  logic [15:0]        etype;
  logic [7:0]         ftype;
  logic [MSGID_W-1:0] msgid;
  logic [SCHED_MAX-1:0] seen;
  logic [(1<<MSGID_W)-1:0] ever;
  logic [15:0]        last_ec [1<<MSGID_W];

  logic fire_byte, fire_end, is_status, good;
  assign is_status = fi_data[9];
  assign good      = fi_data[0];
  assign ob_valid  = !fi_empty && !is_status;
  assign ob_data   = fi_data[7:0];
  assign end_valid = !fi_empty && is_status;
  assign fi_en     = !fi_empty && ob_ready;
  assign fire_byte = ob_valid && ob_ready;
  assign fire_end  = end_valid && ob_ready;

  assign req_we   = fire_byte && (cnt < LEN_W'(REQ_MAX));
  assign req_idx  = cnt[$clog2(REQ_MAX)-1:0];
  assign req_data = fi_data[7:0];
  assign req_len  = cnt;

  // schedule look-up
  logic hit_s, hit_a;
  logic [$clog2(SCHED_MAX)-1:0] idx_s;
  logic [MASK_W-1:0] mask_s, mask_a;
  logic [7:0] iat_a;
  always_comb begin
    hit_s = 1'b0; hit_a = 1'b0; idx_s = '0;
    mask_s = '0; mask_a = '0; iat_a = '0;
    for (int i = SCHED_MAX - 1; i >= 0; i--) begin
      if (($clog2(SCHED_MAX)+1)'(i) < sched_cnt && sched[i].msg_id == msgid &&
          sched[i].in_port == PORT_W'(PORT)) begin
        if (!sched[i].async && !seen[i]) begin
          hit_s = 1'b1; idx_s = ($clog2(SCHED_MAX))'(i); mask_s = sched[i].out_mask;
        end
        if (sched[i].async) begin
          hit_a = 1'b1; mask_a = sched[i].out_mask; iat_a = sched[i].min_iat;
        end
      end
    end
  end

  logic [15:0] since;
  logic        iat_ok;
  assign since  = ec_num - last_ec[msgid];
  assign iat_ok = !ever[msgid] || (since >= {8'd0, iat_a});

  verdict_e verdict;
  always_comb begin
    verdict = V_TRASH;
    if (good && cnt >= LEN_W'(14)) begin
      if (etype != FTT_ETYPE)                       verdict = V_NRT;
      else if (cnt < LEN_W'(16))                    verdict = V_TRASH;
      else if (ftype == FT_REQ)                     verdict = (cnt <= LEN_W'(REQ_MAX)) ? V_REQ : V_TRASH;
      else if (ftype == FT_SYNC && hit_s)           verdict = V_SYNC;
      else if (ftype == FT_ASYNC && hit_a && iat_ok) verdict = V_ASYNC;
    end
  end

  assign end_accept = verdict inside {V_NRT, V_SYNC, V_ASYNC};
  assign end_cls    = (verdict == V_SYNC) ? CL_SYNC : (verdict == V_ASYNC) ? CL_ASYNC : CL_NRT;
  assign end_by_mac = (verdict == V_NRT);
  assign end_mask   = (verdict == V_SYNC) ? mask_s : (verdict == V_ASYNC) ? mask_a : '0;
  assign end_dst    = dst;
  assign end_src    = src;
  assign req_commit = fire_end && verdict == V_REQ;
  assign ev_trash   = fire_end && verdict == V_TRASH;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; dst <= '0; src <= '0; etype <= '0; ftype <= '0; msgid <= '0;
      seen <= '0; ever <= '0;
    end else begin
      if (ec_start) seen <= '0;
      if (fire_byte) begin
        if (cnt != '1) cnt <= cnt + 1'b1;
        if (cnt < LEN_W'(6))       dst   <= {dst[39:0], fi_data[7:0]};
        else if (cnt < LEN_W'(12)) src   <= {src[39:0], fi_data[7:0]};
        else if (cnt < LEN_W'(14)) etype <= {etype[7:0], fi_data[7:0]};
        else if (cnt == LEN_W'(14)) ftype <= fi_data[7:0];
        else if (cnt == LEN_W'(15)) msgid <= fi_data[7:0];
      end
      if (fire_end) begin
        cnt <= '0; etype <= '0; ftype <= '0;
        if (verdict == V_SYNC)  seen[idx_s] <= 1'b1;
        if (verdict == V_ASYNC) ever[msgid] <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (fire_end && verdict == V_ASYNC) last_ec[msgid] <= ec_num;
  end
endmodule
