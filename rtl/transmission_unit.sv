// transmission_unit: transmit side of a port in the MAC clock domain.
//
// Reads frames from the transmit clock-domain FIFO and hands them to the
// client transmit interface of the MAC core: tx_data_valid is raised with
// the first byte and held until the MAC answers tx_ack; from then on one
// byte is taken every clock and tx_data_valid falls after the last byte
// (the Xilinx Tri-Mode MAC client protocol). The MAC appends the FCS.
// Each frame in the FIFO is preceded by two length bytes (high byte first),
// written by the Transmission Buffer Unit. Transmission starts once
// min(length, TX_START) bytes are in the FIFO, so the frame is forwarded
// cut-through but cannot run dry when both clocks carry one byte per cycle.
// If the FIFO runs empty in the middle of a frame, tx_underrun is pulsed
// and the rest of that frame is discarded as it arrives.
// The length prefix, the start threshold and the underrun rule are this
// design's own choices.
module transmission_unit #(
  parameter int FIFO_DEPTH = 256,
  parameter int TX_START   = 32
) (
  input  logic       clk,          // MAC transmit clock
  input  logic       rst_n,
  // transmit FIFO read side
  input  logic [7:0] fr_data,
  input  logic       fr_empty,
  input  logic [$clog2(FIFO_DEPTH):0] fr_level,
  output logic       fr_en,
  // MAC client transmit interface
  output logic [7:0] tx_data,
  output logic       tx_data_valid,
  input  logic       tx_ack,
  output logic       tx_underrun
);
  typedef enum logic [2:0] {S_IDLE, S_LEN_LO, S_WAIT, S_FIRST, S_SEND, S_DRAIN} state_e;
  state_e state;
  logic [10:0] remaining;     // bytes of the frame not yet taken from FIFO
  logic [10:0] start_level;

  assign start_level = (remaining < 11'(TX_START)) ? remaining : 11'(TX_START);

  always_comb begin
    fr_en         = 1'b0;
    tx_data       = fr_data;
    tx_data_valid = 1'b0;
    tx_underrun   = 1'b0;
    unique case (state)
      S_IDLE, S_LEN_LO: fr_en = !fr_empty;
      S_FIRST: begin
        tx_data_valid = 1'b1;
        fr_en         = tx_ack;
      end
      S_SEND: begin
        tx_data_valid = !fr_empty;
        tx_underrun   = fr_empty;
        fr_en         = !fr_empty;
      end
      S_DRAIN: fr_en = !fr_empty;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      remaining <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (!fr_empty) begin
          remaining[10:8] <= fr_data[2:0];
          state <= S_LEN_LO;
        end
        S_LEN_LO: if (!fr_empty) begin
          remaining[7:0] <= fr_data;
          state <= S_WAIT;
        end
        S_WAIT: begin
          if (remaining == '0) state <= S_IDLE;
          else if (fr_level >= ($clog2(FIFO_DEPTH)+1)'(start_level)) state <= S_FIRST;
        end
        S_FIRST: if (tx_ack) begin
          remaining <= remaining - 1'b1;
          state     <= (remaining == 11'd1) ? S_IDLE : S_SEND;
        end
        S_SEND: begin
          if (fr_empty) state <= S_DRAIN;
          else begin
            remaining <= remaining - 1'b1;
            if (remaining == 11'd1) state <= S_IDLE;
          end
        end
        S_DRAIN: if (!fr_empty) begin
          remaining <= remaining - 1'b1;
          if (remaining == 11'd1) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
