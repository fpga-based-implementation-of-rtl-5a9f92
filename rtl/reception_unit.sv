// reception_unit: receive side of a port in the MAC clock domain.
//
// Takes frames from the client receive interface of the Ethernet MAC core
// (rx_data / rx_data_valid, then a one-cycle rx_good_frame or rx_bad_frame
// after the last byte, as on the Xilinx Tri-Mode MAC) and writes them into
// the receive clock-domain FIFO. Each FIFO entry is {status, byte}: data
// entries carry status = 0; every frame is closed by one entry with
// status = 1 whose bit 0 is 1 for a good frame and 0 for a bad one.
// One FIFO slot is always kept free for that closing entry: if the FIFO
// fills up during a frame the remaining bytes are dropped and the frame is
// closed as bad. The entry format and the overflow rule are this design's
// choice; the unit's role follows the architecture.
module reception_unit #(
  parameter int FIFO_DEPTH = 64
) (
  input  logic       clk,          // MAC receive clock
  input  logic       rst_n,
  input  logic [7:0] rx_data,
  input  logic       rx_data_valid,
  input  logic       rx_good_frame,
  input  logic       rx_bad_frame,
  // receive FIFO write side
  output logic       fw_en,
  output logic [9:0] fw_data,
  input  logic [$clog2(FIFO_DEPTH):0] fw_level,
  output logic       overflow      // one-cycle pulse per truncated frame
);
  logic truncated;   // bytes of the current frame were dropped
  logic room;        // room for a data byte, keeping one slot for status

  assign room = fw_level < ($clog2(FIFO_DEPTH)+1)'(FIFO_DEPTH - 1);

  always_comb begin
    fw_en   = 1'b0;
    fw_data = '0;
    if (rx_good_frame || rx_bad_frame) begin
      fw_en   = 1'b1;
      fw_data = {2'b10, 7'd0, rx_good_frame && !rx_bad_frame && !truncated};
    end else if (rx_data_valid && room && !truncated) begin
      fw_en   = 1'b1;
      fw_data = {2'b00, rx_data};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      truncated <= 1'b0;
      overflow  <= 1'b0;
    end else begin
      overflow <= 1'b0;
      if (rx_good_frame || rx_bad_frame) truncated <= 1'b0;
      else if (rx_data_valid && !room && !truncated) begin
        truncated <= 1'b1;
        overflow  <= 1'b1;
      end
    end
  end
endmodule
