// input_layer: the computation that all RNN cells share, done once per ADC sample.
//
// A vanilla RNN cell computes h' = tanh(Wx*x + b + Wh*h). The term u = Wx*x + b depends
// only on the sample x, and in a sliding window each sample is seen by every cell in
// turn, so it is computed once here (in the "first cell") and handed to all the others.
// With one input per step, Wx and b are N-element vectors and the unit needs N scalar
// multipliers.
//
// Arithmetic: x is IO type, Wx and b are weight type, u is internal type. The product is
// truncated and saturated to 18 bits (see rnn_pkg).
//
// Interface: valid_i, side_i and x_i are taken on every clock; u_o, valid_o and side_o
// (an opaque tag, e.g. the channel number) appear LATENCY = 2 clocks later.
module input_layer
  import rnn_pkg::*;
#(
  parameter int N      = N_UNITS_DEF,
  parameter int SIDE_W = 4,
  localparam int LATENCY = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              valid_i,
  input  logic [SIDE_W-1:0] side_i,
  input  io_t               x_i,
  input  wgt_t [N-1:0]      wx_i,
  input  wgt_t [N-1:0]      b_i,
  output logic              valid_o,
  output logic [SIDE_W-1:0] side_o,
  output int_t [N-1:0]      u_o
);

  localparam int SHIFT = W_FRAC + IO_FRAC - INT_FRAC;

  logic signed [PROD_W-1:0] prod [N];
  wgt_t                     b_q  [N];
  logic [SIDE_W-1:0]        side_q;
  logic [1:0]               vpipe;

  always_ff @(posedge clk) begin
    for (int j = 0; j < N; j++) begin
      prod[j] <= PROD_W'(wx_i[j] * x_i);
      b_q[j]  <= b_i[j];
      // bias aligned to the product's binary point before the shared truncation
      u_o[j]  <= trunc_sat(64'(prod[j]) + (64'(b_q[j]) <<< IO_FRAC), SHIFT);
    end
    side_q <= side_i;
    side_o <= side_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vpipe <= '0;
    else        vpipe <= {vpipe[0], valid_i};
  end

  assign valid_o = vpipe[1];

endmodule
