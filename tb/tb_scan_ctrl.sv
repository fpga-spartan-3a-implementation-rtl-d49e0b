// tb_scan_ctrl: self-checking test of the round sequencer.
//
// For the default 8 ports and for 5 ports (a count that is not a power of
// two) it checks, cycle by cycle against an independent counter, that the
// index steps 0..N-1 and wraps, that `sample` is high only at index 0 and
// `done` only at index N-1, that a round lasts exactly N cycles, and that an
// asynchronous reset in the middle of a round brings the index back to 0
// at once.
module tb_scan_ctrl;

  logic       clk = 1'b0;
  logic       rst;
  logic [2:0] idx8, idx5;
  logic       sample8, done8, sample5, done5;
  int         checks = 0, failures = 0;
  int         m8, m5;      // reference counters
  int         last_sample8, rounds8;
  int         cyc;

  always #5 clk = ~clk;

  scan_ctrl dut8 (.clk(clk), .rst(rst), .idx(idx8), .sample(sample8), .done(done8));
  scan_ctrl #(.N_PORTS(5)) dut5 (.clk(clk), .rst(rst), .idx(idx5), .sample(sample5), .done(done5));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL cycle %0d: %s", cyc, what);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1;
    m8 = 0; m5 = 0; cyc = 0; last_sample8 = -1; rounds8 = 0;
    repeat (2) @(negedge clk);
    check(idx8 == 0 && idx5 == 0, "index not 0 in reset");
    rst = 1'b0;
    for (cyc = 0; cyc < 200; cyc++) begin
      // Asynchronous reset in the middle of a round, between clock edges.
      if (cyc == 83) begin
        #2 rst = 1'b1;
        #1 check(idx8 == 0 && idx5 == 0, "asynchronous reset did not clear index");
        rst = 1'b0;
        m8 = 0; m5 = 0;
        last_sample8 = -1;
      end
      check(idx8 == 3'(m8), $sformatf("idx8=%0d expected %0d", idx8, m8));
      check(idx5 == 3'(m5), $sformatf("idx5=%0d expected %0d", idx5, m5));
      check(sample8 == (m8 == 0) && done8 == (m8 == 7), "sample8/done8 wrong");
      check(sample5 == (m5 == 0) && done5 == (m5 == 4), "sample5/done5 wrong");
      if (sample8) begin
        if (last_sample8 >= 0) begin
          check(cyc - last_sample8 == 8, "round of 8 ports is not 8 cycles");
          rounds8++;
        end
        last_sample8 = cyc;
      end
      @(negedge clk);
      m8 = (m8 + 1) % 8;
      m5 = (m5 + 1) % 5;
    end
    check(rounds8 >= 20, "too few complete rounds seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
