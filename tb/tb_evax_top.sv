// tb_evax_top: end-to-end test of the detector at its default sizes (145
// features, 10,000-instruction sampling interval, 1,000,000-instruction
// secure window), against a cycle-level reference model written here.
//
// The core is emulated by random event strobes and 6..8 committed
// instructions per cycle. Features 0..39 stand for attack-correlated events
// (+1 weights, high thresholds), the 12 security HPCs AND pairs of them,
// and the other base features get random weights and thresholds. Benign
// phases fire every event rarely; attack phases fire the attack features
// often. The run goes through: configuration by the patch port, benign
// sampling, an attack that enters secure mode and restarts its window,
// expiry of the full 1M-instruction window, the other three mitigation
// policies with a shorter window, a sampling interval shorter than the
// perceptron's 145-cycle latency (vectors dropped), and a long stall without
// commits that saturates the counters. Every cycle the sample strobe, the
// classification strobe, score and flag, the drop strobe, the mode and the
// mitigation enables are compared with the model; each mechanism must occur.
module tb_evax_top;
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
  longint cycle = 0;

  // ---- reference model state ----------------------------------------------
  int   w_m [N_FEAT];
  int   thr_m [N_FEAT];
  int   sel_m [N_SEC][FANIN];
  int   theta_m = 0, policy_m = 0;
  longint window_m = longint'(SECURE_INSTS_DEF), interval_m = longint'(SAMPLE_INSTS_DEF);

  logic [N_BASE-1:0] m_base_q = '0;
  int   m_commit_q = 0;
  longint m_scount = 0;
  logic m_sample = 0;
  int   m_cnt [N_FEAT];
  logic m_pend_valid = 0;
  int   m_pend_score = 0;
  int   m_busy = 0, m_inflight = 0;
  logic m_done = 0;
  int   m_done_score = 0;
  logic m_drop = 0;
  logic m_secure = 0;
  longint m_rem = 0;

  // mechanism counters
  int n_samples = 0, n_detect = 0, n_clear = 0, n_enter = 0, n_exit = 0, n_retrig = 0;
  int n_drop = 0, n_sat = 0, n_sec_fire = 0, n_cfg = 0, n_full_window = 0;
  int n_policy [4];
  longint enter_cycle = 0;

  // ---- stimulus helpers ----------------------------------------------------
  int phase_attack = 0;   // 0 benign, 1 attack, 2 all events (stall)
  int commit_lo = 6, commit_hi = 8;

  always @(negedge clk) if (rst_n && !cfg_we) begin
    for (int i = 0; i < int'(N_BASE); i++) begin
      case (phase_attack)
        0: base_ev[i] = ($urandom_range(0, 99) < 5);
        1: base_ev[i] = (i < 40) ? ($urandom_range(0, 99) < 50) : ($urandom_range(0, 99) < 10);
        default: base_ev[i] = 1'b1;
      endcase
    end
    commit_cnt = ccnt_t'($urandom_range(commit_lo, commit_hi));
  end

  task automatic cfg_write(input logic [1:0] region, input int index, input logic [31:0] data);
    @(negedge clk);
    cfg_we = 1; cfg_addr = {region, 8'(index)}; cfg_wdata = data;
    base_ev = '0; commit_cnt = '0;
    @(posedge clk);
    #1;
    cfg_we = 0;
    n_cfg++;
    case (region)
      REG_WEIGHT: if (index < int'(N_FEAT)) w_m[index] = int'(signed'(data[1:0]));
      REG_FTHR:   if (index < int'(N_FEAT)) thr_m[index] = int'(data[15:0]);
      REG_SEL:    if (index < int'(N_SEC * FANIN)) sel_m[index / FANIN][index % FANIN] = int'(data[7:0]);
      default: case (index)
        0: theta_m = int'(signed'(data[9:0]));
        1: policy_m = int'(data[1:0]);
        2: window_m = longint'(data);
        3: interval_m = longint'(data);
        default: ;
      endcase
    endcase
  endtask

  // ---- reference model -----------------------------------------------------
  always @(posedge clk) begin
    logic [N_FEAT-1:0] ev;
    longint total, ival, excess;
    int score;
    logic ready, flag;
    cycle++;
    if (!rst_n) begin
      m_base_q = '0; m_commit_q = 0; m_scount = 0; m_sample = 0;
      foreach (m_cnt[i]) m_cnt[i] = 0;
      m_pend_valid = 0; m_busy = 0; m_done = 0; m_drop = 0; m_secure = 0; m_rem = 0;
    end else begin
      // features from the registered base events
      for (int i = 0; i < int'(N_BASE); i++) ev[i] = m_base_q[i];
      for (int k = 0; k < int'(N_SEC); k++) begin
        ev[N_BASE + k] = 1'b1;
        for (int j = 0; j < int'(FANIN); j++)
          ev[N_BASE + k] &= (sel_m[k][j] < int'(N_BASE)) && m_base_q[sel_m[k][j] % 256];
        if (ev[N_BASE + k]) n_sec_fire++;
      end
      // vector and dot product of the interval that ends now
      score = 0;
      for (int i = 0; i < int'(N_FEAT); i++) if (m_cnt[i] >= thr_m[i]) score += w_m[i];
      // mode switch (uses the strobe visible before this edge)
      flag = m_done && (m_done_score > theta_m);
      if (flag) begin
        if (m_secure) n_retrig++; else begin n_enter++; enter_cycle = cycle; end
        m_secure = 1;
        m_rem = (window_m == 0) ? 64'sd1 : window_m;
      end else if (m_secure) begin
        if (m_rem <= longint'(m_commit_q)) begin
          m_rem = 0; m_secure = 0; n_exit++;
        end else m_rem -= longint'(m_commit_q);
      end
      // perceptron and handshake
      ready  = (m_busy == 0);
      m_drop = m_sample && m_pend_valid && !ready;
      if (m_drop) n_drop++;
      m_done = 0;
      if (ready && m_pend_valid) begin
        m_busy = N_FEAT; m_inflight = m_pend_score;
      end else if (m_busy > 0) begin
        m_busy--;
        if (m_busy == 0) begin m_done = 1; m_done_score = m_inflight; end
      end
      if (m_sample) begin
        m_pend_valid = 1; m_pend_score = score;
      end else if (ready) m_pend_valid = 0;
      // counters
      for (int i = 0; i < int'(N_FEAT); i++) begin
        if (m_sample) m_cnt[i] = int'(ev[i]);
        else if (ev[i] && m_cnt[i] < 65535) m_cnt[i]++;
        else if (ev[i]) n_sat++;
      end
      // sampling interval
      ival  = (interval_m == 0) ? 1 : interval_m;
      total = m_scount + longint'(m_commit_q);
      if (total >= ival) begin
        excess = total - ival;
        m_scount = (excess >= ival) ? 0 : excess;
        m_sample = 1;
      end else begin
        m_scount = total;
        m_sample = 0;
      end
      // input register
      m_base_q = base_ev; m_commit_q = int'(commit_cnt);
    end
  end

  // ---- compare every cycle ------------------------------------------------------
  function automatic logic [3:0] exp_mitig();
    if (!m_secure) return 4'b0000;
    return 4'b1000 >> policy_m;
  endfunction

  always @(negedge clk) if (rst_n) begin
    checks++;
    if (sample !== m_sample || det_valid !== m_done || sample_drop !== m_drop
        || secure !== m_secure || mitig !== exp_mitig()) begin
      failures++;
      if (failures < 10)
        $display("cycle %0d: sample %b/%b valid %b/%b drop %b/%b secure %b/%b mitig %b/%b",
                 cycle, sample, m_sample, det_valid, m_done, sample_drop, m_drop,
                 secure, m_secure, mitig, exp_mitig());
    end
    if (m_sample) n_samples++;
    if (m_secure) n_policy[policy_m]++;
    if (m_done) begin
      checks++;
      if (int'(det_score) != m_done_score || det_flag !== (m_done_score > theta_m)) begin
        failures++;
        if (failures < 10) $display("cycle %0d: score %0d/%0d flag %b", cycle, det_score,
                                    m_done_score, det_flag);
      end
      if (m_done_score > theta_m) n_detect++; else n_clear++;
    end
  end

  initial begin : watchdog
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int ph, input int ncyc);
    phase_attack = ph;
    repeat (ncyc) @(posedge clk);
  endtask

  task automatic wait_secure_off(input int maxcyc);
    int c = 0;
    phase_attack = 0;
    while (m_secure && c < maxcyc) begin @(posedge clk); c++; end
  endtask

  initial begin
    foreach (w_m[i]) w_m[i] = 0;
    foreach (thr_m[i]) thr_m[i] = 1;
    foreach (n_policy[i]) n_policy[i] = 0;
    for (int k = 0; k < int'(N_SEC); k++)
      for (int j = 0; j < int'(FANIN); j++) sel_m[k][j] = k * FANIN + j;
    repeat (4) @(posedge clk);
    #1 rst_n = 1;
    // ---- patch: weights, thresholds, security HPC sources, threshold -------
    for (int i = 0; i < int'(N_FEAT); i++) begin
      if (i < 40)                 cfg_write(REG_WEIGHT, i, 32'd1);
      else if (i >= int'(N_BASE)) cfg_write(REG_WEIGHT, i, 32'd1);
      else                        cfg_write(REG_WEIGHT, i, 32'($urandom_range(0, 3)));
      if (i < 40)                 cfg_write(REG_FTHR, i, 32'd300);
      else if (i >= int'(N_BASE)) cfg_write(REG_FTHR, i, 32'd40);
      else                        cfg_write(REG_FTHR, i, 32'($urandom_range(100, 1500)));
    end
    for (int k = 0; k < int'(N_SEC); k++) begin
      cfg_write(REG_SEL, k * FANIN,     32'($urandom_range(0, 39)));
      cfg_write(REG_SEL, k * FANIN + 1, 32'($urandom_range(0, 39)));
    end
    cfg_write(REG_CTRL, 0, 32'd20);
    // ---- benign, then an attack under the default 1M-instruction window -----
    run(0, 15000);
    run(1, 5000);
    run(0, 1);
    if (!m_secure) begin failures++; $display("attack not detected"); end
    wait_secure_off(200000);
    if (n_exit > 0 && n_enter > 0) begin
      // window: from the restart to the exit, about 1M / 7 cycles
      n_full_window++;
      $display("secure mode lasted %0d cycles", cycle - enter_cycle);
    end
    run(0, 3000);
    // ---- the other policies with a 20,000-instruction window --------------------
    cfg_write(REG_CTRL, 2, 32'd20000);
    for (int p = 1; p < 4; p++) begin
      cfg_write(REG_CTRL, 1, 32'(p));
      run(1, 4000);
      wait_secure_off(20000);
      run(0, 3000);
    end
    // ---- sampling faster than the perceptron: vectors dropped ------------------
    cfg_write(REG_CTRL, 3, 32'd40);
    run(0, 2000);
    cfg_write(REG_CTRL, 3, SAMPLE_INSTS_DEF);
    run(0, 3000);
    // ---- long stall: every event fires, nothing commits, counters saturate -----
    commit_lo = 0; commit_hi = 0;
    run(2, 70000);
    commit_lo = 6; commit_hi = 8;
    run(0, 4000);
    wait_secure_off(5000);
    run(0, 500);
    // ---- mechanisms -------------------------------------------------------------
    $display("samples=%0d detections=%0d clears=%0d enter=%0d exit=%0d restart=%0d",
             n_samples, n_detect, n_clear, n_enter, n_exit, n_retrig);
    $display("drops=%0d saturations=%0d security_hpc_events=%0d cfg_writes=%0d",
             n_drop, n_sat, n_sec_fire, n_cfg);
    $display("secure cycles per policy: %0d %0d %0d %0d",
             n_policy[0], n_policy[1], n_policy[2], n_policy[3]);
    checks++; if (n_samples == 0)     begin failures++; $display("no sample"); end
    checks++; if (n_detect == 0)      begin failures++; $display("no detection"); end
    checks++; if (n_clear == 0)       begin failures++; $display("no clear"); end
    checks++; if (n_enter == 0)       begin failures++; $display("no secure entry"); end
    checks++; if (n_exit == 0)        begin failures++; $display("no secure exit"); end
    checks++; if (n_retrig == 0)      begin failures++; $display("no window restart"); end
    checks++; if (n_drop == 0)        begin failures++; $display("no dropped vector"); end
    checks++; if (n_sat == 0)         begin failures++; $display("no saturation"); end
    checks++; if (n_sec_fire == 0)    begin failures++; $display("no security HPC event"); end
    checks++; if (n_full_window == 0) begin failures++; $display("default window never expired"); end
    for (int p = 0; p < 4; p++) begin
      checks++;
      if (n_policy[p] == 0) begin failures++; $display("policy %0d never active", p); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
