// tb_sample_ctrl: random commit counts (0..8 per cycle) against a reference
// model, for several intervals including 1 and the 10,000-instruction
// default; also checks the number of samples over a long run.
module tb_sample_ctrl;
  import evax_pkg::*;

  logic clk = 0, rst_n = 0;
  ccnt_t commit_cnt = '0;
  logic [31:0] interval = 32'd100;
  logic sample;
  int checks = 0, failures = 0;

  sample_ctrl dut (.clk, .rst_n, .commit_cnt, .interval, .sample);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int ival, input int ncycles, input int maxc);
    longint acc = 0, total = 0;
    int nsamp = 0;
    logic exp;
    rst_n = 0;
    interval = ival;
    @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < ncycles; t++) begin
      commit_cnt = ccnt_t'($urandom_range(0, maxc));
      acc += longint'(commit_cnt);
      total += longint'(commit_cnt);
      exp = (acc >= longint'(ival));
      if (exp) acc -= longint'(ival);
      if (acc >= longint'(ival)) acc = 0;   // at most one sample per cycle
      @(negedge clk);
      checks++;
      if (sample !== exp) begin
        failures++;
        if (failures < 10) $display("ival=%0d t=%0d sample=%b exp %b", ival, t, sample, exp);
      end
      if (sample) nsamp++;
    end
    checks++;
    if (ival >= 8 && nsamp != int'(total / longint'(ival))) begin
      failures++;
      $display("ival=%0d samples %0d expected %0d", ival, nsamp, total / longint'(ival));
    end
    commit_cnt = '0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    run(100, 3000, 8);
    run(1, 200, 8);
    run(7, 2000, 8);
    run(SAMPLE_INSTS_DEF, 40000, 8);
    run(1000, 20000, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
