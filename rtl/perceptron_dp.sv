// perceptron_dp: serial perceptron inference over the binary feature vector.
//
// Inputs are 0 or 1, so no multiplier is needed: the unit walks the features
// one per cycle and adds a feature's weight only when its input bit is 1.
// A single ACC_W-bit adder and accumulator register do all the work. The
// dot product of NF weights in [-2,1] lies in [-2*NF, NF]; the accumulator
// holds it offset by BIAS = 2*NF, so for 145 features the 435 possible sums
// are the unsigned values 0..435 of a 9-bit register. At the end the sum is
// compared with the signed threshold theta: detect = (sum > theta).
//
// Interface: x/x_valid/x_ready is a valid/ready handshake; the vector is
// copied into a shift register when it is accepted, so the producer may
// reuse its register at once. ridx/w read the weight store (combinational).
// done pulses for one cycle with detect and score (the signed sum).
//
// Timing: if the vector is accepted at clock edge 0, done, detect and score
// are valid after edge NF, i.e. NF cycles later (145 for the full size). A
// new vector is accepted the cycle after done.
//
// The serial add of a weight per set input bit, the 9-bit adder, the weight
// range and the threshold compare follow the EVAX proposal; the
// offset encoding of the accumulator and the handshake are this design's own.
module perceptron_dp
  import evax_pkg::*;
#(
  parameter int unsigned NF  = N_FEAT,
  parameter int unsigned AW  = ACC_W
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [NF-1:0]  x,
  input  logic           x_valid,
  output logic           x_ready,
  output idx_t           ridx,
  input  weight_t        w,
  input  theta_t         theta,
  output logic           done,
  output logic           detect,
  output theta_t         score
);

  localparam int unsigned BIAS = (1 << (WGT_W - 1)) * NF;
  localparam int unsigned MAXV = BIAS + ((1 << (WGT_W - 1)) - 1) * NF;

  if (MAXV >= (1 << AW)) begin : g_width_check
    $error("perceptron_dp: accumulator of %0d bits cannot hold %0d", AW, MAXV);
  end

  logic [NF-1:0] xs;       // input vector, shifted right one feature per cycle
  logic [AW-1:0] acc;
  logic          busy;
  logic [AW-1:0] acc_next;
  theta_t        sum_next;

  assign x_ready = !busy;

  // add the sign-extended weight when the current input bit is set
  assign acc_next = xs[0] ? acc + AW'(signed'(w)) : acc;
  assign sum_next = theta_t'(signed'({1'b0, acc_next}) - signed'((AW + 1)'(BIAS)));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      xs     <= '0;
      acc    <= '0;
      busy   <= 1'b0;
      ridx   <= '0;
      done   <= 1'b0;
      detect <= 1'b0;
      score  <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (x_valid) begin
          xs   <= x;
          acc  <= AW'(BIAS);
          ridx <= '0;
          busy <= 1'b1;
        end
      end else begin
        acc  <= acc_next;
        xs   <= xs >> 1;
        ridx <= ridx + 1'b1;
        if (int'(ridx) == int'(NF) - 1) begin
          busy   <= 1'b0;
          done   <= 1'b1;
          score  <= sum_next;
          detect <= (sum_next > theta);
        end
      end
    end
  end

endmodule
