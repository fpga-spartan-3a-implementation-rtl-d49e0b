// can_arbiter: message-based CAN arbiter for N_PORTS ECU ports (default 8).
//
// Each ECU drives one 60-bit frame port. Instead of request and grant lines,
// the arbiter decides from the frames themselves: the frame whose 11-bit
// identifier has the lowest value (the most dominant bits) wins and is placed
// on the single 60-bit output port.
//
// How it works. scan_ctrl divides time into rounds of N_PORTS cycles.
//   * idx = 0 (`sample`): all ports are captured at once into a snapshot
//     register, and port 0's frame becomes the running candidate.
//   * idx = 1..N_PORTS-1: one id_compare step per cycle compares the
//     candidate with the snapshot of port idx and keeps the lower identifier,
//     so port 0 is compared with port 1, the winner with port 2, and so on
//     until every port has been seen.
//   * In the last step (`done`) the winner is written to `output_frame`, its
//     port number to `winner`, and `out_valid` pulses for one cycle.
// Frames that change while a round is running do not affect that round; they
// are seen in the next one. On equal identifiers the lower port number wins.
//
// Timing: frames present in the cycle where sample = 1 appear on
// output_frame N_PORTS cycles later (after the clock edge that ends the
// done cycle), and the output is refreshed every N_PORTS cycles. The output
// holds its value between refreshes.
//
// Interface: clk, active-high asynchronous reset rst (clears the output to
// all zeros and restarts the scan), frame[0..N_PORTS-1] (frame[0] is the
// document's "Frame 1"), output_frame. out_valid and winner are this
// design's additions for a receiver that wants to know when and from where a
// new frame arrived.
//
// From the document: 8 ports of 60 bits, clock and reset inputs, one 60-bit
// output, lowest identifier wins, comparison of the first two frames and then
// of the winner with each further frame in turn, a reset that clears the
// output register asynchronously. This design's choices: the one-comparison-
// per-cycle schedule, the input snapshot, the tie rule and the two extra
// outputs.
module can_arbiter
  import can_pkg::*;
#(
  parameter int unsigned N_PORTS = 8,
  localparam int unsigned IDX_W  = (N_PORTS > 1) ? $clog2(N_PORTS) : 1
) (
  input  logic             clk,
  input  logic             rst,
  input  can_frame_t       frame [N_PORTS],
  output can_frame_t       output_frame,
  output logic             out_valid,
  output logic [IDX_W-1:0] winner
);

  logic [IDX_W-1:0] idx;
  logic             sample, done;

  can_frame_t       snap [1:N_PORTS-1];  // ports 1.. captured at round start
  can_frame_t       cur;                 // running candidate
  logic [IDX_W-1:0] cur_idx;             // its port number
  can_frame_t       next_frame;          // frame compared with the candidate
  can_frame_t       cmp_win;
  logic             cmp_b_wins;

  scan_ctrl #(.N_PORTS(N_PORTS)) u_scan (
    .clk    (clk),
    .rst    (rst),
    .idx    (idx),
    .sample (sample),
    .done   (done)
  );

  // idx is 1..N_PORTS-1 whenever the comparison result is used.
  always_comb begin
    next_frame = snap[1];
    for (int unsigned p = 1; p < N_PORTS; p++)
      if (idx == IDX_W'(p)) next_frame = snap[p];
  end

  id_compare u_cmp (
    .a      (cur),
    .b      (next_frame),
    .win    (cmp_win),
    .b_wins (cmp_b_wins)
  );

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      for (int unsigned p = 1; p < N_PORTS; p++) snap[p] <= '0;
      cur          <= '0;
      cur_idx      <= '0;
      output_frame <= '0;
      winner       <= '0;
      out_valid    <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (sample) begin
        for (int unsigned p = 1; p < N_PORTS; p++) snap[p] <= frame[p];
        cur     <= frame[0];
        cur_idx <= '0;
      end else begin
        cur     <= cmp_win;
        cur_idx <= cmp_b_wins ? idx : cur_idx;
        if (done) begin
          output_frame <= cmp_win;
          winner       <= cmp_b_wins ? idx : cur_idx;
          out_valid    <= 1'b1;
        end
      end
    end
  end

  initial begin
    if (N_PORTS < 2) $error("can_arbiter: N_PORTS must be at least 2");
    if (FRAME_W != 60) $error("can_arbiter: frame layout is not 60 bits");
  end

endmodule
