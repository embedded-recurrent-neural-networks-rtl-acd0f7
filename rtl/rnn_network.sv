// rnn_network: one complete, time-multiplexed energy-reconstruction network.
//
// For every calorimeter channel and every bunch crossing it computes an energy from a
// sliding window of the channel's last SEQ_LEN ADC samples with a vanilla RNN of N hidden
// units followed by a dense output layer. The network is unrolled along the window and
// fully pipelined, so it takes a new (channel, sample) pair on every clock; MUX channels
// share it in turn (14 channels at about 561 MHz give each channel 40 MHz).
//
// Data path:
//   input_layer   u_t = Wx*x_t + b, once per sample (the computation common to all cells)
//   window_buffer per-channel history, emits (u_{t-S+1} ... u_t)
//   rnn_cell 0    h_1 = tanh(u_{t-S+1})            (starts from h = 0, no multiplier)
//   rnn_cell k    h_{k+1} = tanh(u_{t-S+1+k} + Wh*h_k), k = 1 .. S-1
//   dense_layer   E_t = Wd . h_S + bd
// With N = 8 and S = 5 this needs 8 + 4*64 + 8 = 272 multipliers.
//
// The remaining window entries travel with the data through each cell's side channel.
// Interface: valid_i/ch_i/x_i in, valid_o/ch_o/e_o LATENCY clocks later (33 for the
// defaults); weights from a weight_regs instance.
module rnn_network
  import rnn_pkg::*;
#(
  parameter int N       = N_UNITS_DEF,
  parameter int SEQ_LEN = SEQ_LEN_DEF,
  parameter int MUX     = MUX_DEF,
  localparam int CH_W     = (MUX > 1) ? $clog2(MUX) : 1,
  localparam int DOT_LAT  = 1 + ((N > 1) ? $clog2(N) : 0),
  localparam int LATENCY  = 2 + 1 + 1 + (SEQ_LEN - 1) * (DOT_LAT + 2) + (DOT_LAT + 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                valid_i,
  input  logic [CH_W-1:0]     ch_i,
  input  io_t                 x_i,
  input  wgt_t [N-1:0]        wx_i,
  input  wgt_t [N-1:0]        b_i,
  input  wgt_t [N-1:0][N-1:0] wh_i,
  input  wgt_t [N-1:0]        wd_i,
  input  wgt_t                bd_i,
  output logic                valid_o,
  output logic [CH_W-1:0]     ch_o,
  output io_t                 e_o
);

  typedef int_t [SEQ_LEN-1:0][N-1:0] win_t;
  localparam int SIDE_W = CH_W + $bits(win_t);

  logic              u_valid, w_valid;
  logic [CH_W-1:0]   u_ch, w_ch;
  int_t [N-1:0]      u;
  win_t              win;

  input_layer #(.N(N), .SIDE_W(CH_W)) u_in (
    .clk(clk), .rst_n(rst_n),
    .valid_i(valid_i), .side_i(ch_i), .x_i(x_i),
    .wx_i(wx_i), .b_i(b_i),
    .valid_o(u_valid), .side_o(u_ch), .u_o(u)
  );

  window_buffer #(.N(N), .SEQ_LEN(SEQ_LEN), .MUX(MUX)) u_win (
    .clk(clk), .rst_n(rst_n),
    .valid_i(u_valid), .ch_i(u_ch), .u_i(u),
    .valid_o(w_valid), .ch_o(w_ch), .win_o(win)
  );

  // cell k gets the state of cell k-1 and window entry k; side = {channel, window}
  logic              c_valid [SEQ_LEN+1];
  logic [SIDE_W-1:0] c_side  [SEQ_LEN+1];
  int_t [N-1:0]      c_h     [SEQ_LEN+1];

  assign c_valid[0] = w_valid;
  assign c_side[0]  = {w_ch, win};
  assign c_h[0]     = '0;

  for (genvar k = 0; k < SEQ_LEN; k++) begin : g_cell
    int_t [N-1:0] u_k;
    assign u_k = c_side[k][k*N*DATA_W +: N*DATA_W];
    rnn_cell #(.N(N), .FIRST(k == 0), .SIDE_W(SIDE_W)) u_cell (
      .clk(clk), .rst_n(rst_n),
      .valid_i(c_valid[k]), .side_i(c_side[k]),
      .h_i(c_h[k]), .u_i(u_k), .wh_i(wh_i),
      .valid_o(c_valid[k+1]), .side_o(c_side[k+1]), .h_o(c_h[k+1])
    );
  end

  logic [SIDE_W-1:0] d_side;
  logic              unused_side;

  dense_layer #(.N(N), .SIDE_W(SIDE_W)) u_dense (
    .clk(clk), .rst_n(rst_n),
    .valid_i(c_valid[SEQ_LEN]), .side_i(c_side[SEQ_LEN]), .h_i(c_h[SEQ_LEN]),
    .wd_i(wd_i), .bd_i(bd_i),
    .valid_o(valid_o), .side_o(d_side), .e_o(e_o)
  );

  assign ch_o        = d_side[SIDE_W-1 -: CH_W];
  assign unused_side = ^d_side[$bits(win_t)-1:0];

endmodule
