// rnn_cell: one vanilla RNN cell, h_o = tanh(u_i + Wh * h_i), for one step of the window.
//
// The network is unrolled along the window: each of the SEQ_LEN steps has its own cell,
// and a cell is fully pipelined so that it accepts one channel's data on every clock.
// The matrix-vector product Wh*h uses N dot_product units (N*N multipliers, adder trees
// in logic). The input term u_i = Wx*x + b comes precomputed from the input layer.
// The first cell of the window (FIRST = 1) starts from h = 0, so it needs no multiplier
// at all and reduces to h_o = tanh(u_i).
//
// Arithmetic: the N-term sum (weight x internal) is aligned with u, added, truncated and
// saturated to the internal type, then passed through the tanh table.
//
// Interface: valid_i, h_i, u_i and side_i (an opaque bundle carried alongside, such as
// the channel number and the rest of the window) on every clock; the results appear
// LATENCY clocks later: 1 for the first cell, dot_product latency + 2 otherwise (6 for
// N = 8).
module rnn_cell
  import rnn_pkg::*;
#(
  parameter int N      = N_UNITS_DEF,
  parameter bit FIRST  = 1'b0,
  parameter int SIDE_W = 4,
  localparam int DOT_LAT = 1 + ((N > 1) ? $clog2(N) : 0),
  localparam int LATENCY = FIRST ? 1 : DOT_LAT + 2
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   valid_i,
  input  logic [SIDE_W-1:0]      side_i,
  input  int_t [N-1:0]           h_i,
  input  int_t [N-1:0]           u_i,
  input  wgt_t [N-1:0][N-1:0]    wh_i,   // wh_i[j][k]: weight from h[k] to unit j
  output logic                   valid_o,
  output logic [SIDE_W-1:0]      side_o,
  output int_t [N-1:0]           h_o
);

  logic [LATENCY-1:0]        vpipe;
  logic [SIDE_W-1:0]         spipe [LATENCY];
  int_t [N-1:0]              pre;    // activation input

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vpipe <= '0;
    else        vpipe <= LATENCY'({vpipe, valid_i});
  end

  always_ff @(posedge clk) begin
    spipe[0] <= side_i;
    for (int i = 1; i < LATENCY; i++) spipe[i] <= spipe[i-1];
  end

  assign valid_o = vpipe[LATENCY-1];
  assign side_o  = spipe[LATENCY-1];

  if (FIRST) begin : g_first
    logic unused_h;
    assign unused_h = ^{h_i, wh_i};
    assign pre = u_i;
  end else begin : g_rec
    localparam int SUM_W = PROD_W + DOT_LAT - 1;
    logic signed [SUM_W-1:0] sum [N];
    logic [N-1:0]            dvalid;
    int_t [N-1:0]            u_d [DOT_LAT];
    logic                    unused_dv;

    for (genvar j = 0; j < N; j++) begin : g_unit
      dot_product #(.N(N)) u_dot (
        .clk     (clk),
        .rst_n   (rst_n),
        .valid_i (valid_i),
        .a_i     (wh_i[j]),
        .b_i     (h_i),
        .valid_o (dvalid[j]),
        .sum_o   (sum[j])
      );
    end
    assign unused_dv = ^dvalid;

    // delay u to meet the dot products
    always_ff @(posedge clk) begin
      u_d[0] <= u_i;
      for (int i = 1; i < DOT_LAT; i++) u_d[i] <= u_d[i-1];
    end

    always_ff @(posedge clk) begin
      for (int j = 0; j < N; j++) begin
        pre[j] <= trunc_sat(64'(sum[j]) + (64'(u_d[DOT_LAT-1][j]) <<< W_FRAC), W_FRAC);
      end
    end
  end

  for (genvar j = 0; j < N; j++) begin : g_act
    tanh_act u_tanh (.clk(clk), .x_i(pre[j]), .y_o(h_o[j]));
  end

endmodule
