// tb_evax_intervals: the detector at its default sizes under the sampling
// intervals and secure-mode windows that the detector was evaluated with,
// at about one instruction per cycle (0..2 committed per cycle).
//
// For each interval (100, 1,000 and 100,000 instructions) it checks that
// floor(instructions / interval) samples were taken (plus the instructions
// left over from the previous interval setting), that every
// sample was either classified or dropped, and that vectors are dropped only
// when an interval is shorter than the 147-cycle classification (the
// 100-instruction case at this IPC). For the 10,000- and 100,000-instruction
// windows it starts one attack phase and checks that the core stays secure
// for the window: between window and window+7 committed instructions.
module tb_evax_intervals;
  import evax_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [N_BASE-1:0] base_ev = '0;
  ccnt_t commit_cnt = '0;
  logic cfg_we = 0;
  logic [CFG_AW-1:0] cfg_addr = '0;
  logic [CFG_DW-1:0] cfg_wdata = '0;
  logic secure, sample, sample_drop, det_valid, det_flag;
  logic mode_entered, mode_left, mode_retrigger;
  mitig_t mitig;
  theta_t det_score;

  evax_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int attack = 0, stall = 1;
  longint insts = 0, n_samp = 0, n_drop = 0, n_valid = 0, sec_insts = 0, n_left = 0;
  ccnt_t commit_q = '0;

  always @(negedge clk) if (rst_n && !cfg_we) begin
    for (int i = 0; i < int'(N_BASE); i++)
      base_ev[i] = (attack != 0 && i < 40) ? ($urandom_range(0, 1) == 1)
                                           : ($urandom_range(0, 99) < 3);
    commit_cnt = (stall != 0) ? '0 : ccnt_t'($urandom_range(0, 2));
  end

  always @(posedge clk) if (rst_n) begin
    // secure-mode instructions as the mode switch sees them (registered commit)
    if (secure) sec_insts += longint'(commit_q);
    commit_q <= commit_cnt;
    insts    += longint'(commit_cnt);
    if (sample) n_samp++;
    if (sample_drop) n_drop++;
    if (det_valid) n_valid++;
    if (mode_left) n_left++;
  end

  initial begin : watchdog
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cfg_write(input logic [1:0] region, input int index, input logic [31:0] data);
    @(negedge clk);
    cfg_we = 1; cfg_addr = {region, 8'(index)}; cfg_wdata = data;
    base_ev = '0; commit_cnt = '0;
    @(negedge clk);
    cfg_we = 0;
  endtask

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // features 0..39 count towards an attack once they reach thr per interval
  task automatic set_thresholds(input int thr);
    for (int i = 0; i < 40; i++) cfg_write(REG_FTHR, i, 32'(thr));
    for (int i = 40; i < int'(N_FEAT); i++) cfg_write(REG_FTHR, i, 32'hFFFF);
  endtask

  int prev_ival = 0;   // instructions left over from the previous interval: < prev_ival

  task automatic interval_case(input int ival, input int ncyc, input logic expect_drops);
    stall = 1;
    cfg_write(REG_CTRL, 3, 32'(ival));
    set_thresholds(ival / 4);
    repeat (4) @(posedge clk);
    insts = 0; n_samp = 0; n_drop = 0; n_valid = 0;
    stall = 0;
    repeat (ncyc) @(posedge clk);
    stall = 1;
    repeat (400) @(posedge clk);
    $display("interval %0d: %0d instructions, %0d samples, %0d classified, %0d dropped",
             ival, insts, n_samp, n_valid, n_drop);
    chk(n_samp >= insts / longint'(ival) && n_samp <= (insts + longint'(prev_ival)) / longint'(ival), "sample count");
    prev_ival = ival;
    chk(n_valid + n_drop == n_samp, "every sample classified or dropped");
    chk(expect_drops ? (n_drop > 0) : (n_drop == 0), "drops only when interval < latency");
  endtask

  task automatic window_case(input int win);
    stall = 1;
    cfg_write(REG_CTRL, 2, 32'(win));
    cfg_write(REG_CTRL, 3, 32'd1000);
    set_thresholds(250);
    repeat (4) @(posedge clk);
    sec_insts = 0; n_left = 0;
    stall = 0;
    attack = 1;
    repeat (1100) @(posedge clk);
    attack = 0;
    wait (secure == 1'b1);
    wait (secure == 1'b0);
    repeat (4) @(posedge clk);
    $display("window %0d: %0d instructions in secure mode", win, sec_insts);
    chk(n_left == 1, "one secure period");
    chk(sec_insts >= longint'(win) && sec_insts <= longint'(win) + 7, "secure window length");
  endtask

  initial begin
    repeat (4) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 40; i++) cfg_write(REG_WEIGHT, i, 32'd1);
    cfg_write(REG_CTRL, 0, 32'd20);
    interval_case(100, 5000, 1'b1);
    interval_case(1000, 20000, 1'b0);
    interval_case(100000, 450000, 1'b0);
    window_case(10000);
    window_case(100000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
