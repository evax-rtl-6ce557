// sample_ctrl: sampling interval in committed instructions.
//
// The detector classifies the counter values once per fixed number of
// committed instructions. Each cycle the core reports how many instructions
// it committed (0..8 for an 8-wide core); the controller accumulates them
// and pulses sample in the cycle in which the total reaches interval. The
// excess over the interval is carried into the next one, so the long-run
// sampling rate is exact as long as the interval is not shorter than the
// commit width. At most one sample is taken per cycle: an interval shorter
// than that samples every cycle and the excess is dropped.
//
// Interface: commit_cnt per cycle, interval from the configuration block
// (run-time programmable; 0 is treated as 1), sample is a one-cycle strobe,
// registered (it rises the cycle after the commit that completed the
// interval). Synchronous active-low reset.
//
// Sampling every N instructions follows the EVAX proposal (100 to
// 100,000 instructions were evaluated; 10,000 is the default); the carry of
// the excess and the registered strobe are this design's own.
module sample_ctrl
  import evax_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  ccnt_t       commit_cnt,
  input  logic [31:0] interval,
  output logic        sample
);

  logic [31:0] count;
  logic [32:0] total;
  logic [31:0] ival;
  logic [32:0] excess;

  assign ival  = (interval == '0) ? 32'd1 : interval;
  assign total  = {1'b0, count} + 33'(commit_cnt);
  assign excess = total - {1'b0, ival};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      count  <= '0;
      sample <= 1'b0;
    end else if (total >= {1'b0, ival}) begin
      count  <= (excess >= {1'b0, ival}) ? '0 : excess[31:0];
      sample <= 1'b1;
    end else begin
      count  <= total[31:0];
      sample <= 1'b0;
    end
  end

endmodule
