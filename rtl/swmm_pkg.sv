// swmm_pkg: shared constants and types of the single wire multi-master bus.
//
// Every frame on the wire is 93 bit slots long and is sent most significant
// field first, most significant bit first:
//
//   slot  0..7   SOF  start-of-frame / sync field      (8 bits)
//   slot  8..17  MPN  master priority number           (10 bits)
//   slot 18..27  SID  addressed slave ID               (10 bits)
//   slot 28      RW   0 = data frame, 1 = command (read)
//   slot 29..92  DATA 64-bit payload
//
// The field order and widths follow the protocol's frame format. In a data
// frame the master drives all 93 slots; in a command frame it drives slots
// 0..28 and the addressed slave drives the 64 data slots. So the wire time of
// both frame kinds is the same, which lets every node track frame boundaries
// by counting bit slots.
//
// Design choices made here (the protocol does not fix them): the SOF bit
// pattern SOF_PATTERN, which starts with a 1 so that it leaves the idle
// (pulled-low) level at once; and IFS_BITS idle slots between frames.
package swmm_pkg;

  localparam int SOF_BITS     = 8;
  localparam int MPN_BITS     = 10;
  localparam int SID_BITS     = 10;
  localparam int RW_BITS      = 1;
  localparam int DATA_BITS    = 64;
  localparam int HDR_BITS     = SOF_BITS + MPN_BITS + SID_BITS + RW_BITS;  // 29
  localparam int FRAME_BITS   = HDR_BITS + DATA_BITS;                      // 93
  localparam int IFS_BITS     = 2;     // idle slots after each frame

  // Slot index of the last bit of each field.
  localparam int SOF_LAST     = SOF_BITS - 1;                              // 7
  localparam int RW_SLOT      = HDR_BITS - 1;                              // 28
  localparam int LAST_SLOT    = FRAME_BITS - 1;                            // 92

  localparam logic [SOF_BITS-1:0] SOF_PATTERN = 8'b1010_1011;

  typedef logic [MPN_BITS-1:0]  mpn_t;
  typedef logic [SID_BITS-1:0]  sid_t;
  typedef logic [DATA_BITS-1:0] data_t;
  typedef logic [$clog2(FRAME_BITS)-1:0] slot_t;

  // Header as it appears on the wire, first-sent field in the top bits.
  typedef struct packed {
    logic [SOF_BITS-1:0] sof;
    mpn_t                mpn;
    sid_t                sid;
    logic                rw;
  } header_t;

  // Frame a master wants to send.
  typedef struct packed {
    sid_t  sid;
    logic  rw;     // 1: command frame, ask the slave for 64 bits
    data_t data;   // payload of a data frame, unused for a command
  } tx_frame_t;

  // Data frame a slave has received.
  typedef struct packed {
    mpn_t  mpn;    // priority number of the sending master
    sid_t  sid;
    data_t data;
  } rx_frame_t;

endpackage
