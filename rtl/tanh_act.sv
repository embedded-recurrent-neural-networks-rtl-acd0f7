// tanh_act: hyperbolic-tangent activation of the vanilla RNN cell, as a lookup table.
//
// The input (internal type) is split into sign and magnitude. The magnitude is truncated
// to a step of 2^-STEP_FRAC and clamped to the table's last entry, so the table covers
// [0, 2^(IDX_W-STEP_FRAC)) = [0, 4) by default, beyond which tanh is within 0.1% of 1.
// The table holds floor(tanh(i * 2^-STEP_FRAC) * 2^INT_FRAC) and is computed when the
// design is elaborated; the odd symmetry of tanh supplies the negative half. The table
// is a ROM of 2^IDX_W words, which maps onto one block memory per activation.
//
// Interface: y_o = tanh(x_i) one clock after x_i (registered output, no reset, no stall).
module tanh_act
  import rnn_pkg::*;
#(
  parameter int IDX_W     = 10,
  parameter int STEP_FRAC = 8
) (
  input  logic clk,
  input  int_t x_i,
  output int_t y_o
);

  localparam int DEPTH = 1 << IDX_W;
  typedef int_t lut_t [DEPTH];

  function automatic lut_t build_lut();
    lut_t l;
    for (int i = 0; i < DEPTH; i++) begin
      l[i] = int_t'($rtoi($floor($tanh(real'(i) / real'(1 << STEP_FRAC))
                                  * real'(1 << INT_FRAC))));
    end
    return l;
  endfunction

  localparam lut_t LUT = build_lut();

  logic              neg;
  logic [DATA_W:0]   mag;   // one bit wider so that |-2^17| fits
  logic [DATA_W:0]   step;
  logic [IDX_W-1:0]  idx;

  always_comb begin
    neg  = x_i[DATA_W-1];
    mag  = neg ? (DATA_W+1)'(-(DATA_W+1)'(signed'(x_i))) : (DATA_W+1)'(x_i);
    step = mag >> (INT_FRAC - STEP_FRAC);
    idx  = (step > (DATA_W+1)'(DEPTH - 1)) ? IDX_W'(DEPTH - 1) : step[IDX_W-1:0];
  end

  always_ff @(posedge clk) begin
    y_o <= neg ? -LUT[idx] : LUT[idx];
  end

endmodule
