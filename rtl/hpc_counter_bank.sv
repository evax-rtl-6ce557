// hpc_counter_bank: one saturating event counter per perceptron feature.
//
// Every cycle counter i adds 1 when ev[i] is set, and stops at its maximum
// instead of wrapping. On the sample strobe the current counts (cnt) are
// taken by the binarizer in that same cycle, and each counter restarts with
// the event of the sample cycle, so no event is lost between intervals.
//
// Interface: ev are the per-cycle event strobes (base HPCs then security
// HPCs); sample ends the interval; cnt are the counter values. Synchronous,
// active-low reset clears the counters.
//
// Counting per sampling interval follows the EVAX proposal; the
// counter width, saturation and the one-increment-per-cycle event model are
// this design's own choices.
module hpc_counter_bank
  import evax_pkg::*;
#(
  parameter int unsigned NF = N_FEAT,
  parameter int unsigned CW = CNT_W
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [NF-1:0]          ev,
  input  logic                   sample,
  output logic [NF-1:0][CW-1:0]  cnt
);

  localparam logic [CW-1:0] CMAX = '1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt <= '0;
    end else begin
      for (int i = 0; i < int'(NF); i++) begin
        if (sample)
          cnt[i] <= CW'(ev[i]);
        else if (ev[i] && cnt[i] != CMAX)
          cnt[i] <= cnt[i] + 1'b1;
      end
    end
  end

endmodule
