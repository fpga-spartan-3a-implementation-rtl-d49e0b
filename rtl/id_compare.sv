// id_compare: one step of message-based arbitration between two CAN frames.
//
// The 11-bit identifiers of frames a and b are compared as unsigned numbers.
// The frame with the lower identifier, i.e. the one whose identifier reaches
// a dominant (0) bit first, is passed to `win`; `b_wins` tells which one it
// was. On equal identifiers frame a is kept. The frame format requires
// identifiers to be unique, so a tie is outside normal use; keeping `a`
// (the lower-numbered port when the arbiter chains these steps) is this
// design's choice.
//
// Purely combinational: no clock, the result follows the inputs within the
// same cycle.
module id_compare
  import can_pkg::*;
(
  input  can_frame_t a,
  input  can_frame_t b,
  output can_frame_t win,
  output logic       b_wins
);

  always_comb begin
    b_wins = (b.id < a.id);
    win    = b_wins ? b : a;
  end

endmodule
