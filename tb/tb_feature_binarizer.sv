// tb_feature_binarizer: programs random per-feature thresholds, presents
// random counts with sample strobes and checks the latched 0/1 vector, the
// valid/ready handshake and the drop pulse when a vector is replaced before
// it was taken.
module tb_feature_binarizer;
  import evax_pkg::*;

  localparam int NF = N_FEAT;

  logic clk = 0, rst_n = 0;
  logic [NF-1:0][CNT_W-1:0] cnt;
  logic sample = 0, thr_we = 0, x_ready = 0;
  idx_t thr_idx = '0;
  count_t thr_data = '0;
  logic [NF-1:0] x, exp_x;
  logic x_valid, drop;
  int thr_ref [NF];
  int checks = 0, failures = 0, drops = 0, exp_drops = 0;
  logic exp_valid;

  feature_binarizer dut (.clk, .rst_n, .cnt, .sample, .thr_we, .thr_idx, .thr_data,
                         .x, .x_valid, .x_ready, .drop);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (drop) drops++;

  initial begin
    cnt = '0;
    foreach (thr_ref[i]) thr_ref[i] = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // threshold of 1 after reset: a feature is 1 when it counted anything
    @(negedge clk);
    // program random thresholds for half the features
    for (int i = 0; i < NF; i += 2) begin
      thr_we = 1; thr_idx = idx_t'(i); thr_data = count_t'($urandom_range(0, 40));
      thr_ref[i] = int'(thr_data);
      @(negedge clk);
    end
    thr_we = 0;
    exp_valid = 0;
    exp_x = '0;
    for (int t = 0; t < 3000; t++) begin
      for (int i = 0; i < NF; i++) cnt[i] = count_t'($urandom_range(0, 50));
      sample  = ($urandom_range(0, 3) == 0);
      x_ready = ($urandom_range(0, 2) == 0);
      // reference for the coming edge
      if (sample && exp_valid && !x_ready) exp_drops++;
      if (sample) begin
        for (int i = 0; i < NF; i++) exp_x[i] = (int'(cnt[i]) >= thr_ref[i]);
        exp_valid = 1;
      end else if (x_ready) exp_valid = 0;
      @(negedge clk);
      checks++;
      if (x_valid !== exp_valid) begin
        failures++;
        if (failures < 10) $display("t=%0d x_valid=%b exp %b", t, x_valid, exp_valid);
      end
      checks++;
      if (x !== exp_x) begin
        failures++;
        if (failures < 10) $display("t=%0d x mismatch", t);
      end
    end
    sample = 0;
    @(negedge clk);
    checks++;
    if (drops != exp_drops || exp_drops == 0) begin
      failures++;
      $display("drops=%0d exp %0d", drops, exp_drops);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
