// tb_hpc_counter_bank: random events and random sample strobes against a
// reference count per feature; a narrow counter is also driven into
// saturation.
module tb_hpc_counter_bank;
  import evax_pkg::*;

  localparam int NF = 16;
  localparam int CW = 5;

  logic clk = 0, rst_n = 0;
  logic [NF-1:0]         ev = '0;
  logic                  sample = 0;
  logic [NF-1:0][CW-1:0] cnt;
  int ref_cnt [NF];
  int checks = 0, failures = 0, saturations = 0, samples = 0;

  hpc_counter_bank #(.NF(NF), .CW(CW)) dut (.clk, .rst_n, .ev, .sample, .cnt);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (ref_cnt[i]) ref_cnt[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      // compare the visible counts with the reference
      for (int i = 0; i < NF; i++) begin
        checks++;
        if (int'(cnt[i]) != ref_cnt[i]) begin
          failures++;
          if (failures < 10) $display("t=%0d cnt[%0d]=%0d exp %0d", t, i, cnt[i], ref_cnt[i]);
        end
      end
      // drive the next cycle: long intervals sometimes, to reach saturation
      for (int i = 0; i < NF; i++) ev[i] = ($urandom_range(0, 99) < 70);
      sample = (t % 97 == 96) || ($urandom_range(0, 199) == 0);
      // reference update at the coming edge
      for (int i = 0; i < NF; i++) begin
        if (sample) ref_cnt[i] = int'(ev[i]);
        else if (ev[i] && ref_cnt[i] < (1 << CW) - 1) ref_cnt[i]++;
        else if (ev[i]) saturations++;
      end
      if (sample) samples++;
    end
    checks++;
    if (saturations == 0 || samples == 0) failures++;
    $display("saturating increments=%0d samples=%0d", saturations, samples);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
