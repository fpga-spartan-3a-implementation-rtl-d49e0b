// scan_ctrl: sequencer of one arbitration round over N_PORTS input ports.
//
// A round lasts N_PORTS clock cycles. A port index `idx` counts
// 0, 1, ..., N_PORTS-1 and wraps back to 0, so rounds follow each other
// without a gap. `sample` is high in the cycle with idx = 0: the arbiter then
// captures all ports at once and takes port 0 as the first candidate.
// In each of the cycles idx = 1..N_PORTS-1 the candidate is compared with
// port idx; `done` is high in the last of them (idx = N_PORTS-1), when the
// result of the round is ready to be registered.
//
// Reset `rst` is active high and asynchronous, and returns the index to 0 so
// that the first cycle after reset starts a new round. Stepping one port per
// cycle and running rounds back to back are this design's choices; the
// document fixes only the order of the comparisons.
module scan_ctrl #(
  parameter int unsigned N_PORTS = 8,
  localparam int unsigned IDX_W  = (N_PORTS > 1) ? $clog2(N_PORTS) : 1
) (
  input  logic             clk,
  input  logic             rst,
  output logic [IDX_W-1:0] idx,
  output logic             sample,
  output logic             done
);

  localparam logic [IDX_W-1:0] LAST = IDX_W'(N_PORTS - 1);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)              idx <= '0;
    else if (idx == LAST) idx <= '0;
    else                  idx <= idx + 1'b1;
  end

  always_comb begin
    sample = (idx == '0);
    done   = (idx == LAST);
  end

  // The index never leaves the port range.
  a_idx_in_range: assert property (@(posedge clk) idx <= LAST);

  initial begin
    if (N_PORTS < 2) $error("scan_ctrl: N_PORTS must be at least 2");
  end

endmodule
