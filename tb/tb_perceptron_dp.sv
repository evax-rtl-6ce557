// tb_perceptron_dp: random input vectors, weights and thresholds, plus the
// two extreme sums (-290 and +145) and thresholds equal to the sum and one
// below it; checks score, detect and that done comes
// exactly NF cycles after the vector is accepted, and that no vector is
// accepted while busy.
module tb_perceptron_dp;
  import evax_pkg::*;

  localparam int NF = N_FEAT;

  logic clk = 0, rst_n = 0;
  logic [NF-1:0] x = '0;
  logic x_valid = 0, x_ready, done, detect;
  idx_t ridx;
  weight_t w;
  theta_t theta = '0, score;
  int wref [NF];
  int checks = 0, failures = 0, detects = 0, clears = 0;

  perceptron_dp dut (.clk, .rst_n, .x, .x_valid, .x_ready, .ridx, .w, .theta,
                     .done, .detect, .score);

  always #5 clk = ~clk;
  assign w = (int'(ridx) < NF) ? weight_t'(wref[ridx]) : '0;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int mode);
    int sum, cycles;
    for (int i = 0; i < NF; i++) begin
      case (mode)
        0, 3, 4: begin x[i] = 1'($urandom_range(0, 1)); wref[i] = $urandom_range(0, 3) - 2; end
        1: begin x[i] = 1; wref[i] = -2; end
        default: begin x[i] = 1; wref[i] = 1; end
      endcase
    end
    theta = theta_t'($urandom_range(0, 80) - 40);
    sum = 0;
    for (int i = 0; i < NF; i++) if (x[i]) sum += wref[i];
    if (mode == 3) theta = theta_t'(sum);        // boundary: sum == theta is no detection
    if (mode == 4) theta = theta_t'(sum - 1);    // smallest sum that detects
    @(negedge clk);
    checks++;
    if (!x_ready) begin failures++; $display("not ready when idle"); end
    x_valid = 1;
    @(posedge clk);       // acceptance edge
    @(negedge clk);
    x_valid = 1;          // keep offering: must not be taken while busy
    x = ~x;               // must not disturb the running sum
    cycles = 0;
    while (!done && cycles < 1000) begin
      checks++;
      if (x_ready) begin failures++; $display("ready while busy"); end
      @(negedge clk);
      cycles++;
    end
    x_valid = 0;
    checks++;
    if (cycles != NF) begin
      failures++;
      $display("latency %0d cycles, expected %0d", cycles, NF);
    end
    checks++;
    if (int'(score) != sum || detect != (sum > int'(theta))) begin
      failures++;
      $display("score %0d detect %b, expected %0d %b (theta %0d)", score, detect, sum,
               sum > int'(theta), theta);
    end
    if (detect) detects++; else clears++;
    @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(1);
    run(2);
    for (int r = 0; r < 60; r++) run(0);
    for (int r = 0; r < 10; r++) begin run(3); run(4); end
    checks++;
    if (detects == 0 || clears == 0) failures++;
    $display("detections=%0d clears=%0d", detects, clears);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
