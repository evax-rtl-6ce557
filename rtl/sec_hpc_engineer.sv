// sec_hpc_engineer: the engineered security HPC events.
//
// Each security HPC is the Boolean AND of FANIN base HPC event signals:
// it fires in a cycle only when all of its sources fire in that cycle, e.g.
// "squashed loads AND loads that hit in the write queue". Which base events
// feed which security HPC is chosen offline, so the sources are given by a
// select table (sel) that the patch-update port can rewrite; the table's
// reset contents are set by the configuration block.
//
// Interface: base_ev are the per-cycle base event strobes, sel[k][j] the base
// index of input j of security HPC k, sec_ev the engineered strobes. A select
// that points past the last base event reads as 0. Purely combinational.
//
// The AND combination and the counts (12 security HPCs of two inputs each)
// follow the EVAX proposal; the select table is this design's way
// of keeping the combinations updatable.
module sec_hpc_engineer
  import evax_pkg::*;
#(
  parameter int unsigned NB = N_BASE,
  parameter int unsigned NS = N_SEC,
  parameter int unsigned FI = FANIN
) (
  input  logic [NB-1:0]            base_ev,
  input  idx_t [NS-1:0][FI-1:0]    sel,
  output logic [NS-1:0]            sec_ev
);

  always_comb begin
    for (int k = 0; k < int'(NS); k++) begin
      sec_ev[k] = 1'b1;
      for (int j = 0; j < int'(FI); j++) begin
        if (int'(sel[k][j]) < int'(NB))
          sec_ev[k] = sec_ev[k] & base_ev[sel[k][j]];
        else
          sec_ev[k] = 1'b0;
      end
    end
  end

endmodule
