// window_buffer: per-channel sliding window of input terms for a time-multiplexed network.
//
// The network sees a new window for a channel at every bunch crossing: the current sample
// plus the SEQ_LEN-1 before it. Since u = Wx*x + b of a sample never changes, the buffer
// keeps, for every one of the MUX channels, the u vectors of its last SEQ_LEN-1 samples.
// When the u vector of a new sample of channel ch arrives, the buffer emits the whole
// window (oldest first, newest last) and shifts the new vector into that channel's
// history in the same clock, so samples of one channel may follow each other on any
// clock. After reset every history entry is zero (u = 0, not the bias), so the
// first SEQ_LEN-1 energies of a channel after reset come from a partly filled window.
//
// Interface: valid_i/ch_i/u_i in; valid_o/ch_o/win_o one clock later, win_o[0] oldest,
// win_o[SEQ_LEN-1] the sample just received. Channel numbers >= MUX are ignored.
module window_buffer
  import rnn_pkg::*;
#(
  parameter int N       = N_UNITS_DEF,
  parameter int SEQ_LEN = SEQ_LEN_DEF,
  parameter int MUX     = MUX_DEF,
  localparam int CH_W   = (MUX > 1) ? $clog2(MUX) : 1,
  localparam int LATENCY = 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       valid_i,
  input  logic [CH_W-1:0]            ch_i,
  input  int_t [N-1:0]               u_i,
  output logic                       valid_o,
  output logic [CH_W-1:0]            ch_o,
  output int_t [SEQ_LEN-1:0][N-1:0]  win_o
);

  // hist[c][k]: k = 0 oldest ... SEQ_LEN-2 most recent earlier sample of channel c
  int_t [SEQ_LEN-2:0][N-1:0] hist [MUX];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < MUX; c++) hist[c] <= '0;
      valid_o <= 1'b0;
      ch_o    <= '0;
      win_o   <= '0;
    end else begin
      valid_o <= valid_i && (32'(ch_i) < MUX);
      if (valid_i && (32'(ch_i) < MUX)) begin
        ch_o <= ch_i;
        for (int k = 0; k < SEQ_LEN - 1; k++) win_o[k] <= hist[ch_i][k];
        win_o[SEQ_LEN-1] <= u_i;
        for (int k = 0; k < SEQ_LEN - 2; k++) hist[ch_i][k] <= hist[ch_i][k+1];
        hist[ch_i][SEQ_LEN-2] <= u_i;
      end
    end
  end

endmodule
