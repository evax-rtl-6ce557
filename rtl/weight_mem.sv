// weight_mem: storage for the perceptron weights.
//
// One 2-bit two's-complement weight per feature, covering the range [-2,1].
// The weights are trained offline and only change with a patch, written
// through we/widx/wdata. The dot-product unit reads one weight per cycle at
// ridx; the read is combinational. Weights reset to 0, which makes the
// detector silent until a weight set is loaded.
//
// The count and the range of the weights follow the EVAX proposal;
// the reset value and the asynchronous read are this design's own choices.
module weight_mem
  import evax_pkg::*;
#(
  parameter int unsigned NF = N_FEAT
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    we,
  input  idx_t    widx,
  input  weight_t wdata,
  input  idx_t    ridx,
  output weight_t rdata
);

  weight_t mem [NF];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NF); i++)
        mem[i] <= '0;
    end else if (we && int'(widx) < int'(NF)) begin
      mem[widx] <= wdata;
    end
  end

  assign rdata = (int'(ridx) < int'(NF)) ? mem[ridx] : '0;

endmodule
