// feature_binarizer: turns event counts into the perceptron's 0/1 inputs.
//
// The perceptron only sees binary inputs, so each feature is 1 when its
// count over the sampling interval reaches a per-feature threshold. The
// thresholds stand in for the offline normalisation of each counter by its
// maximum and are written through the patch-update port (thr_we, thr_idx,
// thr_data); they reset to THR_RST.
//
// On sample the compared vector is latched into x and x_valid is raised. The
// serial dot-product unit takes it with x_ready (valid/ready handshake). If a
// new sample arrives while the previous vector has not been taken, the new
// vector replaces it and drop pulses for one cycle. Latency: x_valid is high
// the cycle after sample.
//
// Binary inputs follow the EVAX proposal; the threshold compare,
// its reset value and the replace-on-overrun rule are this design's own.
module feature_binarizer
  import evax_pkg::*;
#(
  parameter int unsigned NF      = N_FEAT,
  parameter int unsigned CW      = CNT_W,
  parameter int unsigned THR_RST = 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [NF-1:0][CW-1:0]  cnt,
  input  logic                   sample,
  input  logic                   thr_we,
  input  idx_t                   thr_idx,
  input  logic [CW-1:0]          thr_data,
  output logic [NF-1:0]          x,
  output logic                   x_valid,
  input  logic                   x_ready,
  output logic                   drop
);

  logic [NF-1:0][CW-1:0] thr;
  logic [NF-1:0]         cmp;

  always_comb begin
    for (int i = 0; i < int'(NF); i++)
      cmp[i] = (cnt[i] >= thr[i]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NF); i++)
        thr[i] <= CW'(THR_RST);
    end else if (thr_we && int'(thr_idx) < int'(NF)) begin
      thr[thr_idx] <= thr_data;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x       <= '0;
      x_valid <= 1'b0;
      drop    <= 1'b0;
    end else begin
      drop <= sample && x_valid && !x_ready;
      if (sample) begin
        x       <= cmp;
        x_valid <= 1'b1;
      end else if (x_ready) begin
        x_valid <= 1'b0;
      end
    end
  end

endmodule
