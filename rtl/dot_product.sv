// dot_product: pipelined sum of N products a[i]*b[i], accumulated in general logic.
//
// One DSP-style multiplier per element feeds a balanced binary adder tree built from
// plain adders, with a register after the multipliers and after every tree level. This
// is the "accumulate in logic" strategy that the reference firmware found best at high
// clock frequency (rather than chaining the DSP blocks' own accumulators). The result
// keeps full precision; the caller decides where to truncate.
//
// Interface: a (weights) and b (data) are sampled with valid_i on every clock; sum_o and
// valid_o follow LATENCY = 1 + ceil(log2(N)) clocks later. A new dot product can start on
// every clock (initiation interval 1). Data registers have no reset; valid does.
module dot_product
  import rnn_pkg::*;
#(
  parameter int N = N_UNITS_DEF,
  localparam int LEVELS  = (N > 1) ? $clog2(N) : 0,
  localparam int P       = 1 << LEVELS,
  localparam int SUM_W   = PROD_W + LEVELS,
  localparam int LATENCY = 1 + LEVELS
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    valid_i,
  input  wgt_t [N-1:0]            a_i,
  input  int_t [N-1:0]            b_i,
  output logic                    valid_o,
  output logic signed [SUM_W-1:0] sum_o
);

  logic signed [SUM_W-1:0] tree [LEVELS+1][P];
  logic [LATENCY-1:0]      vpipe;

  always_ff @(posedge clk) begin
    for (int i = 0; i < P; i++) begin
      if (i < N) tree[0][i] <= SUM_W'(a_i[i] * b_i[i]);
      else       tree[0][i] <= '0;
    end
    for (int l = 1; l <= LEVELS; l++) begin
      for (int i = 0; i < (P >> l); i++) begin
        tree[l][i] <= tree[l-1][2*i] + tree[l-1][2*i+1];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vpipe <= '0;
    else        vpipe <= LATENCY'({vpipe, valid_i});
  end

  assign sum_o   = tree[LEVELS][0];
  assign valid_o = vpipe[LATENCY-1];

endmodule
