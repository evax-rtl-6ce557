// evax_cfg: patch-update port of the detector.
//
// Weights, features and their thresholds are expected to change only with a
// vendor-distributed patch, much like a microcode update. This block decodes
// one register-write port (cfg_we, cfg_addr, cfg_wdata) against the address
// map of evax_pkg: writes to the weight and feature-threshold regions are
// forwarded as write strobes to the weight store and the binarizer; the
// security-HPC select table and the scalar registers (detection threshold,
// policy, secure window, sampling interval) are held here.
//
// Timing: a write takes effect at the clock edge on which cfg_we is high;
// forwarded strobes are combinational, so the target updates on that same
// edge. Writes to unmapped indices are ignored.
//
// Reset values: theta = THETA_RST, policy = fence after every branch,
// window = WINDOW_RST, interval = SAMPLE_RST, security HPC k ANDs base
// events 2k and 2k+1. Updating by patch is part of the EVAX proposal; the port,
// the map and all reset values are this design's own choices.
module evax_cfg
  import evax_pkg::*;
#(
  parameter int          NS         = N_SEC,
  parameter int          FI         = FANIN,
  parameter int          THETA_RST  = 0,
  parameter int unsigned WINDOW_RST = SECURE_INSTS_DEF,
  parameter int unsigned SAMPLE_RST = SAMPLE_INSTS_DEF
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 cfg_we,
  input  logic [CFG_AW-1:0]    cfg_addr,
  input  logic [CFG_DW-1:0]    cfg_wdata,
  // weight store
  output logic                 w_we,
  output idx_t                 w_idx,
  output weight_t              w_data,
  // feature thresholds
  output logic                 thr_we,
  output idx_t                 thr_idx,
  output count_t               thr_data,
  // held registers
  output idx_t [NS-1:0][FI-1:0] sel,
  output theta_t               theta,
  output policy_e              policy,
  output logic [31:0]          window,
  output logic [31:0]          interval
);

  logic [1:0] region;
  idx_t       index;

  assign region = cfg_addr[CFG_AW-1 -: 2];
  assign index  = cfg_addr[IDX_W-1:0];

  assign w_we     = cfg_we && (region == REG_WEIGHT);
  assign w_idx    = index;
  assign w_data   = cfg_wdata[WGT_W-1:0];
  assign thr_we   = cfg_we && (region == REG_FTHR);
  assign thr_idx  = index;
  assign thr_data = cfg_wdata[CNT_W-1:0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < NS; k++)
        for (int j = 0; j < FI; j++)
          sel[k][j] <= IDX_W'(k * FI + j);
      theta    <= THETA_W'(THETA_RST);
      policy   <= POL_SPECTRE_FENCE;
      window   <= WINDOW_RST;
      interval <= SAMPLE_RST;
    end else if (cfg_we) begin
      if (region == REG_SEL) begin
        if (int'(index) < NS * FI)
          sel[int'(index) / FI][int'(index) % FI] <= cfg_wdata[IDX_W-1:0];
      end else if (region == REG_CTRL) begin
        unique case (index)
          CTRL_THETA:  theta    <= cfg_wdata[THETA_W-1:0];
          CTRL_POLICY: policy   <= policy_e'(cfg_wdata[1:0]);
          CTRL_WINDOW: window   <= cfg_wdata;
          CTRL_SAMPLE: interval <= cfg_wdata;
          default: ;
        endcase
      end
    end
  end

endmodule
