// tb_mitigation_ctrl: random flags and commit counts against a reference
// model of the mode switch, for every policy; counts entries, exits and
// window restarts and requires each to happen.
module tb_mitigation_ctrl;
  import evax_pkg::*;

  logic clk = 0, rst_n = 0, flag = 0;
  ccnt_t commit_cnt = '0;
  logic [31:0] window = 32'd50;
  policy_e policy = POL_SPECTRE_FENCE;
  logic secure, entered, left, retrigger;
  mitig_t mitig;
  int checks = 0, failures = 0, n_enter = 0, n_left = 0, n_retrig = 0;

  mitigation_ctrl dut (.clk, .rst_n, .flag, .commit_cnt, .window, .policy,
                       .secure, .mitig, .entered, .left, .retrigger);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [3:0] exp_mitig(input logic sec, input policy_e p);
    if (!sec) return 4'b0000;
    case (p)
      POL_SPECTRE_FENCE:    return 4'b1000;
      POL_FUTURISTIC_FENCE: return 4'b0100;
      POL_SPECTRE_SPEC:     return 4'b0010;
      default:              return 4'b0001;
    endcase
  endfunction

  initial begin
    logic ref_sec, e_ent, e_left, e_ret;
    longint rem;
    repeat (2) @(posedge clk);
    rst_n = 1;
    ref_sec = 0; rem = 0;
    for (int t = 0; t < 20000; t++) begin
      @(negedge clk);
      if (t % 5000 == 0) policy = policy_e'(t / 5000);
      flag = ($urandom_range(0, 199) == 0);
      commit_cnt = ccnt_t'($urandom_range(0, 8));
      window = (t < 10000) ? 32'd50 : 32'd300;
      // reference for the coming edge
      e_ent = 0; e_left = 0; e_ret = 0;
      if (flag) begin
        e_ent = !ref_sec; e_ret = ref_sec;
        ref_sec = 1; rem = longint'(window);
      end else if (ref_sec) begin
        if (rem <= longint'(commit_cnt)) begin rem = 0; ref_sec = 0; e_left = 1; end
        else rem -= longint'(commit_cnt);
      end
      @(posedge clk);
      #1;
      checks++;
      if (secure !== ref_sec || entered !== e_ent || left !== e_left || retrigger !== e_ret) begin
        failures++;
        if (failures < 10) $display("t=%0d secure=%b/%b entered=%b/%b left=%b/%b retrig=%b/%b",
                                    t, secure, ref_sec, entered, e_ent, left, e_left, retrigger, e_ret);
      end
      checks++;
      if (mitig !== exp_mitig(ref_sec, policy)) begin
        failures++;
        if (failures < 10) $display("t=%0d mitig=%b exp %b", t, mitig, exp_mitig(ref_sec, policy));
      end
      n_enter += e_ent; n_left += e_left; n_retrig += e_ret;
    end
    checks++;
    if (n_enter == 0 || n_left == 0 || n_retrig == 0) failures++;
    $display("entries=%0d exits=%0d restarts=%0d", n_enter, n_left, n_retrig);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
