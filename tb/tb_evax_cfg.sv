// tb_evax_cfg: reset values, then random writes over the whole address map;
// checks the forwarded weight and threshold strobes and the held registers
// against a reference.
module tb_evax_cfg;
  import evax_pkg::*;

  logic clk = 0, rst_n = 0, cfg_we = 0;
  logic [CFG_AW-1:0] cfg_addr = '0;
  logic [CFG_DW-1:0] cfg_wdata = '0;
  logic w_we, thr_we;
  idx_t w_idx, thr_idx;
  weight_t w_data;
  count_t thr_data;
  idx_t [N_SEC-1:0][FANIN-1:0] sel;
  theta_t theta;
  policy_e policy;
  logic [31:0] window, interval;
  int checks = 0, failures = 0;

  evax_cfg dut (.clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata, .w_we, .w_idx, .w_data,
                .thr_we, .thr_idx, .thr_data, .sel, .theta, .policy, .window, .interval);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    int rsel [N_SEC*FANIN];
    int rtheta, rpol;
    logic [31:0] rwin, rint;
    logic [1:0] region;
    logic [7:0] index;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < int'(N_SEC * FANIN); i++) begin
      rsel[i] = i;
      chk(int'(sel[i / FANIN][i % FANIN]) == i, "sel reset");
    end
    rtheta = 0; rpol = 0; rwin = SECURE_INSTS_DEF; rint = SAMPLE_INSTS_DEF;
    chk(theta == 0 && policy == POL_SPECTRE_FENCE && window == SECURE_INSTS_DEF
        && interval == SAMPLE_INSTS_DEF, "scalar reset");
    for (int t = 0; t < 4000; t++) begin
      region = 2'($urandom_range(0, 3));
      index  = (region == 2'd3) ? 8'($urandom_range(0, 5)) : 8'($urandom_range(0, 200));
      cfg_addr  = {region, index};
      cfg_wdata = $urandom;
      cfg_we    = ($urandom_range(0, 3) != 0);
      #1;
      chk(w_we == (cfg_we && region == 0) && thr_we == (cfg_we && region == 1), "strobes");
      chk(w_idx == index && thr_idx == index && w_data == cfg_wdata[1:0]
          && thr_data == cfg_wdata[15:0], "forwarded data");
      if (cfg_we) begin
        if (region == 2 && int'(index) < int'(N_SEC * FANIN)) rsel[int'(index)] = int'(cfg_wdata[7:0]);
        if (region == 3) begin
          case (index)
            0: rtheta = int'(cfg_wdata[9:0]);
            1: rpol = int'(cfg_wdata[1:0]);
            2: rwin = cfg_wdata;
            3: rint = cfg_wdata;
            default: ;
          endcase
        end
      end
      @(negedge clk);
      cfg_we = 0;
      for (int i = 0; i < int'(N_SEC * FANIN); i++)
        chk(int'(sel[i / FANIN][i % FANIN]) == rsel[i], "sel");
      chk(int'($unsigned(theta)) == rtheta && int'(policy) == rpol && window == rwin
          && interval == rint, "scalars");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
