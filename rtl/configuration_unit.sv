// configuration_unit: configures the port's MAC core after reset.
//
// Walks a short list of register writes over the MAC core's management
// (host) interface, one write every WRITE_GAP clocks, then raises done.
// The list enables the receiver and the transmitter and selects 1 Gb/s:
// receiver configuration word 1 (0x240) = 0x1000_0000 (receiver enable),
// transmitter configuration (0x280) = 0x1000_0000 (transmitter enable),
// flow control (0x2C0) = 0 (pause frames off), MAC mode (0x300) =
// 0x8000_0000 (1000 Mb/s). Addresses and values follow the configuration
// register map of the Xilinx Tri-Mode MAC; the architecture only says that
// this unit configures the core at startup, so the list is this design's
// choice. host_opcode = 2'b01 marks a configuration write with
// host_miim_sel low.
module configuration_unit #(
  parameter int WRITE_GAP = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic [1:0]  host_opcode,
  output logic [9:0]  host_addr,
  output logic [31:0] host_wr_data,
  output logic        host_miim_sel,
  output logic        host_req,
  output logic        done
);
  localparam int NREGS = 4;
  localparam logic [9:0]  ADDR [NREGS] = '{10'h240, 10'h280, 10'h2C0, 10'h300};
  localparam logic [31:0] DATA [NREGS] = '{32'h1000_0000, 32'h1000_0000, 32'h0, 32'h8000_0000};

  logic [$clog2(NREGS):0]   idx;
  logic [$clog2(WRITE_GAP):0] gap;

  assign host_miim_sel = 1'b0;
  assign host_req      = 1'b0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx <= '0; gap <= '0; done <= 1'b0;
      host_opcode <= 2'b11; host_addr <= '0; host_wr_data <= '0;
    end else begin
      host_opcode <= 2'b11;               // idle / read: no write
      if (!done) begin
        if (gap != '0) gap <= gap - 1'b1;
        else begin
          host_opcode  <= 2'b01;
          host_addr    <= ADDR[idx[$clog2(NREGS)-1:0]];
          host_wr_data <= DATA[idx[$clog2(NREGS)-1:0]];
          gap          <= ($clog2(WRITE_GAP)+1)'(WRITE_GAP - 1);
          idx          <= idx + 1'b1;
          if (idx == ($clog2(NREGS)+1)'(NREGS - 1)) done <= 1'b1;
        end
      end
    end
  end
endmodule
