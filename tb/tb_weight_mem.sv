// tb_weight_mem: reset contents, random writes (some to unmapped indices)
// and reads of every index against a reference array.
module tb_weight_mem;
  import evax_pkg::*;

  logic    clk = 0, rst_n = 0;
  logic    we = 0;
  idx_t    widx = '0, ridx = '0;
  weight_t wdata = '0, rdata;
  int      refw [256];
  int checks = 0, failures = 0;

  weight_mem dut (.clk, .rst_n, .we, .widx, .wdata, .ridx, .rdata);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int i = 0; i < 256; i++) begin
      ridx = idx_t'(i);
      #1;
      checks++;
      if (int'(rdata) != ((i < int'(N_FEAT)) ? refw[i] : 0)) begin
        failures++;
        if (failures < 10) $display("w[%0d]=%0d exp %0d", i, rdata, refw[i]);
      end
    end
  endtask

  initial begin
    foreach (refw[i]) refw[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check_all();
    for (int r = 0; r < 4; r++) begin
      for (int t = 0; t < 300; t++) begin
        @(negedge clk);
        we    = 1;
        widx  = idx_t'($urandom_range(0, 160));
        wdata = weight_t'($urandom_range(0, 3));
        if (int'(widx) < int'(N_FEAT)) refw[widx] = int'(wdata);
      end
      @(negedge clk);
      we = 0;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
