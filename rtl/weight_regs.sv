// weight_regs: the loadable parameters of one RNN network (89 words for 8 units).
//
// Weights are trained off-line, rounded to the 18-bit weight type in software and then
// loaded, one word per write, into this register file. All parameters are held in
// flip-flops so that every multiplier of the unrolled network sees its weight at once.
// Address map (N units): 0..N-1 Wx, N..2N-1 b, 2N..2N+N*N-1 Wh row-major (Wh[j][k] at
// 2N + j*N + k), then N words of Wd, then bd. Writes to higher addresses are ignored.
// Reset clears every parameter to zero.
//
// Interface: wr_en/wr_addr/wr_data sampled on the clock; the new value is visible on the
// outputs from the next clock.
module weight_regs
  import rnn_pkg::*;
#(
  parameter int N = N_UNITS_DEF,
  localparam int NP     = 2 * N + N * N + N + 1,
  localparam int ADDR_W = $clog2(NP)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                wr_en,
  input  logic [ADDR_W-1:0]   wr_addr,
  input  wgt_t                wr_data,
  output wgt_t [N-1:0]        wx_o,
  output wgt_t [N-1:0]        b_o,
  output wgt_t [N-1:0][N-1:0] wh_o,
  output wgt_t [N-1:0]        wd_o,
  output wgt_t                bd_o
);

  localparam int A_B  = N;
  localparam int A_WH = 2 * N;
  localparam int A_WD = 2 * N + N * N;
  localparam int A_BD = A_WD + N;

  wgt_t regs [NP];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NP; i++) regs[i] <= '0;
    end else if (wr_en && (32'(wr_addr) < NP)) begin
      regs[wr_addr] <= wr_data;
    end
  end

  always_comb begin
    for (int j = 0; j < N; j++) begin
      wx_o[j] = regs[j];
      b_o[j]  = regs[A_B + j];
      wd_o[j] = regs[A_WD + j];
      for (int k = 0; k < N; k++) wh_o[j][k] = regs[A_WH + j * N + k];
    end
    bd_o = regs[A_BD];
  end

endmodule
