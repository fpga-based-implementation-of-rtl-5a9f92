// reception_buffer: Reception Buffer Unit of one port.
//
// Packs the byte stream from the Classifier & Validation Unit into words of
// NPORTS bytes (first byte in the low lane) and writes them into a memory
// block of the Memory Pool through the Rx Multiplexing Unit, which grants
// each port one write slot every NPORTS cycles. With one byte arriving per
// cycle this is exactly the rate at which the port produces words, so the
// memory runs at the byte rate and no faster clock is needed.
// The unit always holds one free block (the spare, requested from the
// buffer manager with alloc_req) so that writing can begin with the first
// byte, before the frame is classified. When the verdict arrives:
//   accepted -> the last partial word is flushed, then a descriptor
//               (class, block, length, addresses, output mask) is offered
//               to the Reception Control Unit and a new spare is requested;
//   rejected -> the spare is kept and simply overwritten by the next frame.
// A frame that starts while no spare is held, or that is longer than a
// block, is dropped (ev_drop). Bytes are refused (ob_ready low) only while
// a finished word waits for its slot and while a frame is being closed.
// Word packing per port and one block per frame follow the architecture;
// the spare-block scheme is this design's own.
module reception_buffer
  import ftt_pkg::*;
#(
  parameter int NPORTS = NPORTS_DEF,
  parameter int WPB    = 512           // words per block
) (
  input  logic              clk,
  input  logic              rst_n,
  // from the Classifier & Validation Unit
  input  logic              ib_valid,
  input  logic [7:0]        ib_data,
  output logic              ib_ready,
  input  logic              end_valid,
  input  logic              end_accept,
  input  tclass_e           end_cls,
  input  logic              end_by_mac,
  input  logic [MASK_W-1:0] end_mask,
  input  logic [47:0]       end_dst,
  input  logic [47:0]       end_src,
  // block allocation
  output logic              alloc_req,
  input  logic              alloc_gnt,
  input  logic [BLK_W-1:0]  alloc_blk,
  // word writes toward the Rx Multiplexing Unit
  output logic              wr_valid,
  output logic [BLK_W-1:0]  wr_blk,
  output logic [$clog2(WPB)-1:0] wr_widx,
  output logic [8*NPORTS-1:0] wr_data,
  input  logic              wr_ack,
  // descriptor to the Reception Control Unit
  output logic              desc_valid,
  output rx_desc_t          desc,
  input  logic              desc_ready,
  output logic              ev_drop
);
  localparam int KW = $clog2(NPORTS);
  localparam int WW = $clog2(WPB);
  localparam int MAXB = WPB * NPORTS;

  typedef enum logic [1:0] {S_RX, S_FLUSH, S_DESC} state_e;
  state_e state;

  logic              spare_valid;
  logic [BLK_W-1:0]  spare_blk;
  logic [8*NPORTS-1:0] asm_data;
  logic [KW-1:0]     k;
  logic [WW:0]       widx;
  logic [LEN_W:0]    len;
  logic              dropping;
  logic              out_valid;
  logic [8*NPORTS-1:0] out_data;
  logic [WW-1:0]     out_widx;
  rx_desc_t          held;

  logic out_free, fire_byte, fire_end, word_done;
  assign out_free  = !out_valid || wr_ack;
  assign ib_ready  = (state == S_RX) && (out_free || k != KW'(NPORTS - 1));
  assign fire_byte = ib_valid && ib_ready;
  assign fire_end  = end_valid && ib_ready;
  assign word_done = (k == KW'(NPORTS - 1));

  assign alloc_req  = !spare_valid;
  assign wr_valid   = out_valid;
  assign wr_blk     = spare_blk;
  assign wr_widx    = out_widx;
  assign wr_data    = out_data;
  assign desc_valid = (state == S_DESC);
  assign desc       = held;

  logic drop_now;   // this byte starts a dropped frame or overruns the block
  assign drop_now = (len == '0 && !spare_valid) || (len >= (LEN_W+1)'(MAXB));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_RX; spare_valid <= 1'b0; spare_blk <= '0;
      asm_data <= '0; k <= '0; widx <= '0; len <= '0; dropping <= 1'b0;
      out_valid <= 1'b0; out_data <= '0; out_widx <= '0; held <= '0;
      ev_drop <= 1'b0;
    end else begin
      ev_drop <= 1'b0;
      if (wr_ack) out_valid <= 1'b0;
      if (alloc_gnt) begin
        spare_valid <= 1'b1;
        spare_blk   <= alloc_blk;
      end
      unique case (state)
        S_RX: begin
          if (fire_byte) begin
            if (len != '1) len <= len + 1'b1;
            if (dropping || drop_now) dropping <= 1'b1;
            else begin
              asm_data[8*k +: 8] <= ib_data;
              if (word_done) begin
                out_valid <= 1'b1;
                out_data  <= asm_data;
                out_data[8*(NPORTS-1) +: 8] <= ib_data;
                out_widx  <= widx[WW-1:0];
                widx      <= widx + 1'b1;
                k         <= '0;
              end else k <= k + 1'b1;
            end
          end
          if (fire_end) begin
            if (end_accept && !dropping && spare_valid && len != '0) begin
              held.cls      <= end_cls;
              held.blk      <= spare_blk;
              held.len      <= len[LEN_W-1:0];
              held.by_mac   <= end_by_mac;
              held.out_mask <= end_mask;
              held.dst      <= end_dst;
              held.src      <= end_src;
              state         <= S_FLUSH;
            end else begin
              if (dropping) ev_drop <= 1'b1;
              k <= '0; widx <= '0; len <= '0; dropping <= 1'b0;
            end
          end
        end
        S_FLUSH: begin
          if (k != '0) begin
            if (out_free) begin
              out_valid <= 1'b1;
              out_data  <= asm_data;
              out_widx  <= widx[WW-1:0];
              k         <= '0;
            end
          end else if (out_free && !(out_valid && !wr_ack)) begin
            state <= S_DESC;
          end
        end
        S_DESC: if (desc_ready) begin
          spare_valid <= 1'b0;
          k <= '0; widx <= '0; len <= '0; dropping <= 1'b0;
          state <= S_RX;
        end
        default: state <= S_RX;
      endcase
    end
  end
endmodule
