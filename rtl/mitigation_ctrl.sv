// mitigation_ctrl: adaptive switch between performance and secure mode.
//
// The core runs with its mitigations bypassed (performance mode) until the
// detector raises a flag. A flag switches it to secure mode for window
// committed instructions, during which the mitigation chosen by policy is
// enabled; a flag raised while already secure restarts the window. When the
// window has been committed the core returns to performance mode.
//
// Interface: flag is a one-cycle detection strobe, commit_cnt the
// instructions committed this cycle, window and policy come from the
// configuration block. secure is the mode; mitig the enables for the core's
// fence or speculative-buffer logic (all 0 in performance mode); entered and
// left pulse on the mode changes, retrigger when a flag restarts the window.
// The mode changes on the clock edge that follows the flag. A window of 0 is
// treated as 1.
//
// Secure mode on each true flag for a fixed instruction count (1M by
// default) and the four mitigations follow the EVAX proposal;
// restarting the window on a new flag is this design's own choice.
module mitigation_ctrl
  import evax_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        flag,
  input  ccnt_t       commit_cnt,
  input  logic [31:0] window,
  input  policy_e     policy,
  output logic        secure,
  output mitig_t      mitig,
  output logic        entered,
  output logic        left,
  output logic        retrigger
);

  typedef enum logic {PERF, SECURE} mode_e;

  mode_e       mode;
  logic [31:0] remaining;

  assign secure = (mode == SECURE);
  assign mitig  = secure ? policy_enables(policy) : '0;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mode      <= PERF;
      remaining <= '0;
      entered   <= 1'b0;
      left      <= 1'b0;
      retrigger <= 1'b0;
    end else begin
      entered   <= 1'b0;
      left      <= 1'b0;
      retrigger <= 1'b0;
      if (flag) begin
        remaining <= (window == '0) ? 32'd1 : window;
        mode      <= SECURE;
        entered   <= (mode == PERF);
        retrigger <= (mode == SECURE);
      end else if (mode == SECURE) begin
        if (remaining <= 32'(commit_cnt)) begin
          remaining <= '0;
          mode      <= PERF;
          left      <= 1'b1;
        end else begin
          remaining <= remaining - 32'(commit_cnt);
        end
      end
    end
  end

endmodule
