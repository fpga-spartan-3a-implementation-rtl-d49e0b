// tb_id_compare: self-checking test of one arbitration step.
//
// Drives pairs of 60-bit frames (directed corner cases, then random ones),
// and checks that the output is the frame whose identifier (bits 58:48) is
// the lower, with frame a kept on a tie, and that b_wins agrees. The expected
// result is computed from raw bit slices, independently of the package's
// struct layout.
module tb_id_compare;
  import can_pkg::*;

  can_frame_t a, b, win;
  logic       b_wins;
  int         checks = 0, failures = 0;

  id_compare dut (.a(a), .b(b), .win(win), .b_wins(b_wins));

  function automatic logic [59:0] rand_frame(input logic [10:0] id);
    logic [59:0] f;
    f = 60'({$urandom, $urandom});
    f[58:48] = id;
    return f;
  endfunction

  task automatic check_pair(input logic [59:0] fa, input logic [59:0] fb);
    logic [59:0] exp_win;
    logic        exp_b;
    a = fa;
    b = fb;
    #1;
    exp_b   = (fb[58:48] < fa[58:48]);
    exp_win = exp_b ? fb : fa;
    checks++;
    if (win !== exp_win || b_wins !== exp_b) begin
      failures++;
      $display("FAIL a.id=%h b.id=%h win.id=%h b_wins=%0b (expected %0b)",
               fa[58:48], fb[58:48], win.id, b_wins, exp_b);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Corner cases: extremes, one-bit differences at MSB and LSB, ties.
    check_pair(rand_frame(11'h000), rand_frame(11'h7FF));
    check_pair(rand_frame(11'h7FF), rand_frame(11'h000));
    check_pair(rand_frame(11'h400), rand_frame(11'h3FF));
    check_pair(rand_frame(11'h3FF), rand_frame(11'h400));
    check_pair(rand_frame(11'h001), rand_frame(11'h000));
    check_pair(rand_frame(11'h000), rand_frame(11'h001));
    check_pair(rand_frame(11'h123), rand_frame(11'h123));
    check_pair(rand_frame(11'h7FF), rand_frame(11'h7FF));
    // Same identifier, different payload: a must be passed whole.
    check_pair({1'b0, 11'h055, 48'hFFFF_FFFF_FFFF}, {1'b0, 11'h055, 48'h0});
    // Frames differing only outside the identifier: the identifier decides.
    check_pair({1'b1, 11'h200, 48'h0}, {1'b0, 11'h201, 48'hFFFF_FFFF_FFFF});
    for (int i = 0; i < 2000; i++)
      check_pair(rand_frame(11'($urandom)), rand_frame(11'($urandom)));
    // Close identifiers so that ties and neighbours appear often.
    for (int i = 0; i < 500; i++)
      check_pair(rand_frame(11'($urandom_range(0, 3))), rand_frame(11'($urandom_range(0, 3))));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
