// tb_can_arbiter: end-to-end self-checking test of the 8-port CAN arbiter at
// its default size (8 ports, 60-bit frames).
//
// A reference model runs beside the arbiter with its own round counter. At
// the clock edge that starts a round it takes a copy of all ports and works
// out the winner from the raw identifier bits (58:48): lowest identifier,
// lowest port on a tie. Every cycle the test checks that out_valid is high
// exactly once per round, on the cycle after the round's last comparison,
// and then that output_frame and winner equal the model's; between updates
// the output must hold still.
//
// Scenarios, each counted, with a failure for any that never happened:
//   paper     - eight frames with fixed SOF/control/EOF bits and distinct
//               identifiers, as in the document's simulation
//   each port - every port wins at least once
//   tie       - two or more ports share the lowest identifier
//   snapshot  - the ports change in the middle of a round, and the change
//               only shows in the next round
//   reset     - an asynchronous reset in the middle of a round clears the
//               output and restarts the scan
//   random    - fully random frames
module tb_can_arbiter;
  import can_pkg::*;

  localparam int N = 8;

  logic        clk = 1'b0;
  logic        rst;
  can_frame_t  frame [N];
  can_frame_t  output_frame;
  logic        out_valid;
  logic [2:0]  winner;

  int checks = 0, failures = 0;
  int cyc = 0;

  // model state
  int          m_idx;
  logic [59:0] m_exp_frame, m_hold_frame;
  int          m_exp_port, m_hold_port;
  bit          m_expect_valid;
  bit          m_round_had_change;

  // mechanism counters
  int n_paper = 0, n_tie = 0, n_snapshot = 0, n_reset = 0, n_random = 0;
  int n_port_wins [N];
  int n_rounds = 0;

  always #5 clk = ~clk;

  can_arbiter dut (
    .clk(clk), .rst(rst), .frame(frame),
    .output_frame(output_frame), .out_valid(out_valid), .winner(winner)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL cycle %0d: %s", cyc, what);
    end
  endtask

  function automatic logic [59:0] paper_style_frame(input logic [10:0] id,
                                                   input logic [15:0] data);
    // SOF 0, id, RTR 0, IDE 0, r0 0, DLC 2, data, CRC, CRC del 1,
    // ACK 1, ACK del 1, EOF 7'b1111111
    return {1'b0, id, 3'b000, 4'd2, data, 15'($urandom), 1'b1, 1'b1, 1'b1, 7'h7F};
  endfunction

  // Reference: winner of a set of raw frames.
  task automatic ref_winner(output logic [59:0] f, output int port);
    port = 0;
    for (int p = 1; p < N; p++)
      if (frame[p][58:48] < frame[port][58:48]) port = p;
    f = frame[port];
  endtask

  function automatic bit has_tie();
    int port = 0, cnt = 0;
    for (int p = 1; p < N; p++)
      if (frame[p][58:48] < frame[port][58:48]) port = p;
    for (int p = 0; p < N; p++)
      if (frame[p][58:48] == frame[port][58:48]) cnt++;
    return cnt > 1;
  endfunction

  // Reference model, advanced at every rising edge (asynchronous reset
  // handled where it is applied).
  always @(posedge clk) begin
    if (!rst) begin
      m_expect_valid = (m_idx == N - 1);
      if (m_idx == 0) begin
        ref_winner(m_exp_frame, m_exp_port);
        if (has_tie()) n_tie++;
        m_round_had_change = 1'b0;
      end
      m_idx = (m_idx + 1) % N;
    end
  end

  // Checks half a cycle after each edge.
  always @(negedge clk) begin
    if (!rst) begin
      cyc++;
      check(out_valid == m_expect_valid,
            $sformatf("out_valid=%0b expected %0b", out_valid, m_expect_valid));
      if (m_expect_valid) begin
        m_hold_frame = m_exp_frame;
        m_hold_port  = m_exp_port;
        n_port_wins[m_exp_port]++;
        n_rounds++;
      end
      check(output_frame == m_hold_frame,
            $sformatf("output_frame id=%h expected id=%h", output_frame.id, m_hold_frame[58:48]));
      check(int'(winner) == m_hold_port,
            $sformatf("winner=%0d expected %0d", winner, m_hold_port));
    end
  end

  task automatic do_reset();
    rst = 1'b1;
    #1;
    check(output_frame == '0 && winner == '0 && out_valid == 1'b0,
          "reset did not clear the outputs");
    m_idx = 0;
    m_expect_valid = 1'b0;
    m_hold_frame = '0;
    m_hold_port = 0;
    #2 rst = 1'b0;
  endtask

  // Apply a set of frames at a negedge right before a round starts, and let
  // the round run to its output.
  task automatic run_round();
    @(negedge clk);
    while (m_idx != 0) @(negedge clk);
  endtask

  task automatic wait_round_start();
    while (m_idx != 0) @(negedge clk);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < N; p++) begin
      frame[p] = '0;
      n_port_wins[p] = 0;
    end
    m_idx = 0; m_expect_valid = 0; m_hold_frame = '0; m_hold_port = 0;
    m_exp_frame = '0; m_exp_port = 0;
    @(negedge clk);
    do_reset();
    @(negedge clk);
    wait_round_start();

    // 1. Document-style frames: distinct identifiers, one set per round,
    //    the lowest identifier moved over every port in turn.
    for (int w = 0; w < N; w++) begin
      for (int p = 0; p < N; p++)
        frame[p] = paper_style_frame(11'(16 + 8 * p + ((p == w) ? -16 : 0) + 1),
                                     16'($urandom));
      frame[w].id = 11'(w);  // winner
      n_paper++;
      run_round();
    end
    // Identifiers in decreasing order too, so the candidate changes in every step.
    for (int p = 0; p < N; p++) frame[p] = paper_style_frame(11'(100 - p), 16'hA5A5);
    n_paper++;
    run_round();

    // 2. Ties: several ports share the lowest identifier.
    for (int r = 0; r < 6; r++) begin
      for (int p = 0; p < N; p++) frame[p] = paper_style_frame(11'($urandom_range(5, 9)), 16'($urandom));
      run_round();
    end
    for (int p = 0; p < N; p++) frame[p] = paper_style_frame(11'h3, 16'(p));
    run_round();

    // 3. Snapshot: change the ports three cycles into a round. The round's
    //    result must be the frames present at its start.
    for (int r = 0; r < 4; r++) begin
      for (int p = 0; p < N; p++) frame[p] = paper_style_frame(11'($urandom_range(200, 400)), 16'($urandom));
      @(negedge clk);  // round starts at the next posedge
      repeat (3) @(negedge clk);
      for (int p = 0; p < N; p++) frame[p] = paper_style_frame(11'($urandom_range(0, 199)), 16'($urandom));
      n_snapshot++;
      wait_round_start();
      // next round uses the changed frames
      run_round();
    end

    // 4. Asynchronous reset in the middle of a round.
    for (int p = 0; p < N; p++) frame[p] = paper_style_frame(11'($urandom), 16'($urandom));
    repeat (4) @(negedge clk);
    #2;
    do_reset();
    n_reset++;
    @(negedge clk);
    wait_round_start();
    run_round();

    // 5. Random frames, changed at random times.
    for (int r = 0; r < 300; r++) begin
      for (int p = 0; p < N; p++) frame[p] = 60'({$urandom, $urandom});
      n_random++;
      repeat ($urandom_range(1, 12)) @(negedge clk);
    end
    wait_round_start();
    run_round();
    repeat (2) @(negedge clk);

    // Mechanism coverage.
    check(n_paper > 0,    "document-style rounds never ran");
    check(n_tie > 0,      "no round with tied identifiers");
    check(n_snapshot > 0, "inputs never changed inside a round");
    check(n_reset > 0,    "reset inside a round never happened");
    check(n_random > 0,   "random frames never applied");
    for (int p = 0; p < N; p++)
      check(n_port_wins[p] > 0, $sformatf("port %0d never won", p));
    check(n_rounds > 40, "too few rounds completed");
    $display("rounds=%0d paper=%0d tie=%0d snapshot=%0d reset=%0d random=%0d",
             n_rounds, n_paper, n_tie, n_snapshot, n_reset, n_random);
    for (int p = 0; p < N; p++) $display("port %0d won %0d rounds", p, n_port_wins[p]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
