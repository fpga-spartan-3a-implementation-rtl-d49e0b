// can_pkg: shared types and constants of the message-based CAN arbiter.
//
// A frame is 60 bits wide and is carried most-significant bit first: bit 59
// is the start-of-frame bit, bits 58:48 hold the 11-bit identifier, and the
// end-of-frame field occupies bits 6:0. The field list and widths follow the
// base (11-bit identifier) CAN data frame with the data field cut to two
// bytes:
//
//   SOF 1 | ID 11 | RTR 1 | IDE 1 | r0 1 | DLC 4 | DATA 16 | CRC 15 |
//   CRC delimiter 1 | ACK 1 | ACK delimiter 1 | EOF 7          = 60 bits
//
// Placing SOF at the most significant end is this design's choice; the field
// order and sizes are those of the frame format. A lower identifier value
// means more dominant (0) bits early in the identifier and therefore a higher
// priority.
package can_pkg;

  localparam int unsigned ID_W      = 11;
  localparam int unsigned DLC_W     = 4;
  localparam int unsigned DATA_W    = 16;  // two data bytes
  localparam int unsigned CRC_W     = 15;
  localparam int unsigned EOF_W     = 7;

  typedef logic [ID_W-1:0] can_id_t;

  typedef struct packed {
    logic              sof;        // start of frame, dominant (0)
    can_id_t           id;         // identifier, the arbitration field
    logic              rtr;        // remote transmission request
    logic              ide;        // identifier extension, 0 = base format
    logic              r0;         // reserved
    logic [DLC_W-1:0]  dlc;        // data length code
    logic [DATA_W-1:0] data;       // data field
    logic [CRC_W-1:0]  crc;        // cyclic redundancy check
    logic              crc_delim;  // recessive (1)
    logic              ack;        // slot: sender 1, receiver may force 0
    logic              ack_delim;  // recessive (1)
    logic [EOF_W-1:0]  eof;        // end of frame, all recessive (1)
  } can_frame_t;

  localparam int unsigned FRAME_W = $bits(can_frame_t);  // 60

endpackage
