// evax_top: perceptron-based microarchitectural attack detector with an
// adaptive performance/secure mode switch.
//
// Event strobes from all over the core (base_ev, one per existing HPC) are
// registered once at the detector's edge. The engineered security HPCs are
// formed from them by AND (sec_hpc_engineer), and all 145 features are
// counted per sampling interval (hpc_counter_bank). Every SAMPLE instructions
// (sample_ctrl) the counts are compared with their thresholds to give the
// binary input vector (feature_binarizer), which the serial perceptron
// (perceptron_dp, with weight_mem) classifies in 145 cycles while the next
// interval is already being counted. A detection switches the core to
// secure mode for WINDOW committed instructions (mitigation_ctrl), enabling
// the selected mitigation; everything is reprogrammable through the
// patch-update port (evax_cfg).
//
// Interface: base_ev and commit_cnt come from the core each cycle; cfg_* is
// the register-write port; secure/mitig drive the core's mitigation logic.
// det_valid pulses with every classification (det_flag, det_score), sample
// with every interval end, sample_drop when an interval's vector was
// replaced before the perceptron took it, and mode_entered / mode_left /
// mode_retrigger on mode changes.
//
// Timing: an event counts in the interval of the cycle after it is
// presented (input register). The classification of an interval is ready
// 147 cycles after its sample strobe: one cycle to latch the vector, one to
// hand it over, 145 to add. secure rises on the following edge.
//
// The feature set, the serial perceptron and the adaptive mode switch follow
// the EVAX proposal; the input register, the event and counter
// model, the handshake and the configuration port are this design's own.
module evax_top
  import evax_pkg::*;
#(
  parameter int unsigned SAMPLE_RST = SAMPLE_INSTS_DEF,
  parameter int unsigned WINDOW_RST = SECURE_INSTS_DEF
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // core events
  input  logic [N_BASE-1:0]    base_ev,
  input  ccnt_t                commit_cnt,
  // patch-update port
  input  logic                 cfg_we,
  input  logic [CFG_AW-1:0]    cfg_addr,
  input  logic [CFG_DW-1:0]    cfg_wdata,
  // to the core's mitigation logic
  output logic                 secure,
  output mitig_t               mitig,
  // status
  output logic                 sample,
  output logic                 sample_drop,
  output logic                 det_valid,
  output logic                 det_flag,
  output theta_t               det_score,
  output logic                 mode_entered,
  output logic                 mode_left,
  output logic                 mode_retrigger
);

  // ---- event input register --------------------------------------------------
  logic [N_BASE-1:0] base_q;
  ccnt_t             commit_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      base_q   <= '0;
      commit_q <= '0;
    end else begin
      base_q   <= base_ev;
      commit_q <= commit_cnt;
    end
  end

  // ---- configuration ------------------------------------------------------------
  logic                        w_we, thr_we;
  idx_t                        w_idx, thr_idx;
  weight_t                     w_data;
  count_t                      thr_data;
  idx_t [N_SEC-1:0][FANIN-1:0] sel;
  theta_t                      theta;
  policy_e                     policy;
  logic [31:0]                 window, interval;

  evax_cfg #(
    .WINDOW_RST (WINDOW_RST),
    .SAMPLE_RST (SAMPLE_RST)
  ) u_cfg (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata,
    .w_we, .w_idx, .w_data, .thr_we, .thr_idx, .thr_data,
    .sel, .theta, .policy, .window, .interval
  );

  // ---- features ------------------------------------------------------------------
  logic [N_SEC-1:0]             sec_ev;
  logic [N_FEAT-1:0]            ev;
  logic [N_FEAT-1:0][CNT_W-1:0] cnt;

  sec_hpc_engineer u_sec (
    .base_ev (base_q),
    .sel     (sel),
    .sec_ev  (sec_ev)
  );

  assign ev = {sec_ev, base_q};   // features 0..132 base, 133..144 security

  sample_ctrl u_sample (
    .clk, .rst_n,
    .commit_cnt (commit_q),
    .interval   (interval),
    .sample     (sample)
  );

  hpc_counter_bank u_cnt (
    .clk, .rst_n,
    .ev     (ev),
    .sample (sample),
    .cnt    (cnt)
  );

  logic [N_FEAT-1:0] x;
  logic              x_valid, x_ready;

  feature_binarizer u_bin (
    .clk, .rst_n,
    .cnt, .sample,
    .thr_we, .thr_idx, .thr_data,
    .x, .x_valid, .x_ready,
    .drop (sample_drop)
  );

  // ---- perceptron --------------------------------------------------------------
  idx_t    ridx;
  weight_t w;

  weight_mem u_wmem (
    .clk, .rst_n,
    .we    (w_we),
    .widx  (w_idx),
    .wdata (w_data),
    .ridx  (ridx),
    .rdata (w)
  );

  perceptron_dp u_dp (
    .clk, .rst_n,
    .x, .x_valid, .x_ready,
    .ridx, .w, .theta,
    .done   (det_valid),
    .detect (det_flag),
    .score  (det_score)
  );

  // ---- adaptive mode switch ----------------------------------------------------
  mitigation_ctrl u_mode (
    .clk, .rst_n,
    .flag       (det_valid && det_flag),
    .commit_cnt (commit_q),
    .window     (window),
    .policy     (policy),
    .secure     (secure),
    .mitig      (mitig),
    .entered    (mode_entered),
    .left       (mode_left),
    .retrigger  (mode_retrigger)
  );

endmodule
