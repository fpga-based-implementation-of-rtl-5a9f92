// sync_unit: Synchronization Unit, the switch's Elementary Cycle clock.
//
// Counts main-clock cycles (byte times) inside the Elementary Cycle (EC):
// ec_time runs from 0 to EC_CYCLES-1, ec_start pulses when it is 0 and
// ec_num counts ECs. At each EC start the unit also pulses ec_req, the
// request to the Master Unit for the EC-schedule of the next EC; that
// schedule's Trigger Message is then sent at the following EC start, so
// the TM timing depends only on this counter and not on the master.
// The EC length defaults to 1 ms at 125 MHz. Counting and requesting
// follow the architecture; requesting exactly at EC start is this design's
// choice. Nothing runs until enable is high.
module sync_unit #(
  parameter int EC_CYCLES = 125000
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       enable,
  output logic       ec_start,
  output logic [$clog2(EC_CYCLES+1)-1:0] ec_time,
  output logic [15:0] ec_num,
  output logic       ec_req
);
  localparam int TW = $clog2(EC_CYCLES + 1);
  logic running;

  assign ec_start = running && (ec_time == '0);
  assign ec_req   = ec_start;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0; ec_time <= '0; ec_num <= '0;
    end else if (!running) begin
      running <= enable;
    end else begin
      if (ec_time == TW'(EC_CYCLES - 1)) begin
        ec_time <= '0;
        ec_num  <= ec_num + 1'b1;
      end else ec_time <= ec_time + 1'b1;
    end
  end
endmodule
