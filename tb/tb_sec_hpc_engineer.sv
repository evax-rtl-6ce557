// tb_sec_hpc_engineer: random base events and random select tables; each
// security HPC must equal the AND of the base events its selects name, and
// read 0 when a select points past the last base event.
module tb_sec_hpc_engineer;
  import evax_pkg::*;

  logic [N_BASE-1:0]           base_ev;
  idx_t [N_SEC-1:0][FANIN-1:0] sel;
  logic [N_SEC-1:0]            sec_ev;
  int checks = 0, failures = 0;

  sec_hpc_engineer dut (.base_ev, .sel, .sec_ev);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    for (int t = 0; t < 2000; t++) begin
      for (int i = 0; i < int'(N_BASE); i++)
        base_ev[i] = ($urandom_range(0, 99) < 60);
      for (int k = 0; k < int'(N_SEC); k++)
        for (int j = 0; j < int'(FANIN); j++)
          sel[k][j] = ($urandom_range(0, 19) == 0) ? idx_t'($urandom_range(N_BASE, 255))
                                                   : idx_t'($urandom_range(0, N_BASE - 1));
      #1;
      for (int k = 0; k < int'(N_SEC); k++) begin
        exp = 1'b1;
        for (int j = 0; j < int'(FANIN); j++)
          exp = exp && (int'(sel[k][j]) < int'(N_BASE)) && base_ev[int'(sel[k][j]) % 256];
        checks++;
        if (sec_ev[k] !== exp) begin
          failures++;
          if (failures < 10) $display("mismatch t=%0d k=%0d got %b exp %b", t, k, sec_ev[k], exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
