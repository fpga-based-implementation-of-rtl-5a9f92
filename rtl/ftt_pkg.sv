// ftt_pkg: constants and types shared by the FTT-enabled switch.
//
// The switch moves frames as N-byte words (N = number of ports) through a
// block-segmented memory pool. Frames are classified into three traffic
// classes (synchronous real-time, asynchronous real-time, non real-time);
// the synchronous and asynchronous ones are validated against the
// EC-schedule carried by the Trigger Message (TM).
//
// The FTT frame layout is this design's own choice (none is fixed by the
// architecture): EtherType FTT_ETYPE at bytes 12-13, the FTT frame type at
// byte 14 and the message id at byte 15. In a TM, byte 15 holds the number
// of schedule entries and the entries follow from byte 16, four bytes each:
// message id, {async flag, 3'b0, input port}, output port mask, minimum
// inter-arrival time in ECs (asynchronous entries only).
package ftt_pkg;

  localparam int NPORTS_DEF  = 4;      // ports of the switch
  localparam int BLK_W       = 8;      // block index width (up to 256 blocks)
  localparam int LEN_W       = 11;     // frame length in bytes (< 2048)
  localparam int MSGID_W     = 8;      // FTT message identifier
  localparam int SCHED_MAX   = 16;     // entries in one EC-schedule
  localparam int MASK_W      = 8;      // port masks (up to 8 ports)
  localparam int PORT_W      = 4;      // port index fields

  localparam logic [15:0] FTT_ETYPE = 16'h8FF0;
  localparam logic [7:0]  FT_TM     = 8'h01;
  localparam logic [7:0]  FT_SYNC   = 8'h02;
  localparam logic [7:0]  FT_ASYNC  = 8'h03;
  localparam logic [7:0]  FT_REQ    = 8'h04;

  typedef enum logic [1:0] {
    CL_SYNC  = 2'd0,
    CL_ASYNC = 2'd1,
    CL_NRT   = 2'd2
  } tclass_e;

  // One EC-schedule entry, as decoded from a Trigger Message.
  typedef struct packed {
    logic [MSGID_W-1:0] msg_id;
    logic               async;
    logic [PORT_W-1:0]  in_port;
    logic [MASK_W-1:0]  out_mask;
    logic [7:0]         min_iat;
  } sched_entry_t;

  // Packet descriptor handed from a Reception Buffer Unit to the
  // Reception Control Unit once the whole frame sits in its block.
  typedef struct packed {
    tclass_e            cls;
    logic [BLK_W-1:0]   blk;
    logic [LEN_W-1:0]   len;
    logic               by_mac;     // forward with the Forwarding Table
    logic [MASK_W-1:0]  out_mask;   // output ports from the EC-schedule
    logic [47:0]        dst;
    logic [47:0]        src;
  } rx_desc_t;

  // Entry of a packet list queue.
  typedef struct packed {
    logic [BLK_W-1:0]   blk;
    logic [LEN_W-1:0]   len;
  } pkt_ptr_t;

  // Wire time in byte times of a frame of len bytes (FCS excluded):
  // padding to 60 bytes, 4 bytes FCS, 8 bytes preamble/SFD, 12 bytes gap.
  function automatic logic [LEN_W+1:0] wire_time(input logic [LEN_W-1:0] len);
    logic [LEN_W+1:0] l;
    l = (len < LEN_W'(60)) ? (LEN_W+2)'(60) : (LEN_W+2)'(len);
    return l + (LEN_W+2)'(24);
  endfunction

endpackage
