// dense_layer: the output layer, energy = Wd . h + bd, placed after the last RNN cell.
//
// One dot_product of N terms (weight type x internal type) followed by the bias add and
// a truncating, saturating conversion to the IO type. Fully pipelined.
//
// Interface: valid_i, h_i, side_i on every clock; e_o, valid_o, side_o LATENCY clocks
// later (dot_product latency + 1, i.e. 5 for N = 8).
module dense_layer
  import rnn_pkg::*;
#(
  parameter int N      = N_UNITS_DEF,
  parameter int SIDE_W = 4,
  localparam int DOT_LAT = 1 + ((N > 1) ? $clog2(N) : 0),
  localparam int LATENCY = DOT_LAT + 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              valid_i,
  input  logic [SIDE_W-1:0] side_i,
  input  int_t [N-1:0]      h_i,
  input  wgt_t [N-1:0]      wd_i,
  input  wgt_t              bd_i,
  output logic              valid_o,
  output logic [SIDE_W-1:0] side_o,
  output io_t               e_o
);

  localparam int SUM_W = PROD_W + DOT_LAT - 1;
  localparam int SHIFT = W_FRAC + INT_FRAC - IO_FRAC;

  logic signed [SUM_W-1:0] sum;
  logic                    dvalid;
  logic [SIDE_W-1:0]       spipe [LATENCY];
  wgt_t                    bd_d  [DOT_LAT];   // bias travels with its data

  dot_product #(.N(N)) u_dot (
    .clk     (clk),
    .rst_n   (rst_n),
    .valid_i (valid_i),
    .a_i     (wd_i),
    .b_i     (h_i),
    .valid_o (dvalid),
    .sum_o   (sum)
  );

  always_ff @(posedge clk) begin
    bd_d[0] <= bd_i;
    for (int i = 1; i < DOT_LAT; i++) bd_d[i] <= bd_d[i-1];
    e_o <= trunc_sat(64'(sum) + (64'(bd_d[DOT_LAT-1]) <<< INT_FRAC), SHIFT);
    spipe[0] <= side_i;
    for (int i = 1; i < LATENCY; i++) spipe[i] <= spipe[i-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid_o <= 1'b0;
    else        valid_o <= dvalid;
  end

  assign side_o = spipe[LATENCY-1];

endmodule
