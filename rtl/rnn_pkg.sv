// rnn_pkg: types, sizes and fixed-point helpers shared by the energy-reconstruction RNN.
//
// All data in the network are 18-bit signed fixed-point numbers, a width chosen to match
// the 18x18 multipliers of the FPGA's DSP blocks. Three number types are used, as in the
// reference firmware: the IO type (ADC samples in, energies out), the internal type (the
// input terms u and hidden states h) and the weight type. Each has its own binary point;
// the fraction widths below are this design's choice, as the split is not published.
// Every narrowing conversion truncates (drops LSBs, rounding towards minus infinity) and
// then saturates to the 18-bit range; weights are expected to be rounded before loading.
//
// Network defaults: vanilla RNN with 8 hidden units, a window (sequence length) of 5
// samples, one input per step and one output. That gives 8+64+8 RNN parameters plus
// 8+1 dense parameters = 89 loadable parameters.
package rnn_pkg;

  localparam int DATA_W   = 18;  // every fixed-point word
  localparam int IO_FRAC  = 10;  // IO type: ADC sample in, energy out (range +-128)
  localparam int INT_FRAC = 12;  // internal type: u and h (range +-32)
  localparam int W_FRAC   = 14;  // weight type (range +-8)

  localparam int N_UNITS_DEF = 8;   // hidden units of the vanilla RNN
  localparam int SEQ_LEN_DEF = 5;   // samples per sliding window
  localparam int MUX_DEF     = 14;  // channels time-multiplexed on one network
  localparam int N_NET_DEF   = 28;  // networks per FPGA
  localparam int N_CH_DEF    = 384; // calorimeter channels per FPGA

  localparam int PROD_W = 2 * DATA_W;  // full product of two 18-bit words

  typedef logic signed [DATA_W-1:0] io_t;
  typedef logic signed [DATA_W-1:0] int_t;
  typedef logic signed [DATA_W-1:0] wgt_t;

  // Number of loadable parameters of a network with n units: Wx, b, Wh, Wd, bd.
  function automatic int n_params(int n);
    return n + n + n * n + n + 1;
  endfunction

  // Drop `shift` fraction bits (arithmetic shift: truncation) and saturate to DATA_W bits.
  function automatic logic signed [DATA_W-1:0] trunc_sat(logic signed [63:0] v, int shift);
    logic signed [63:0] s;
    localparam logic signed [63:0] MAXV = (64'sd1 <<< (DATA_W - 1)) - 64'sd1;
    localparam logic signed [63:0] MINV = -(64'sd1 <<< (DATA_W - 1));
    s = v >>> shift;
    if (s > MAXV) return DATA_W'(MAXV);
    if (s < MINV) return DATA_W'(MINV);
    return DATA_W'(s);
  endfunction

endpackage
