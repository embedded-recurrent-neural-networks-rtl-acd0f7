// channel_deserializer: gathers a time-multiplexed network's outputs per channel.
//
// The network returns one (channel, energy) pair per clock. Each energy is written to
// its channel's output register; when the last channel (MUX-1) has been written, valid_o
// pulses for one clock and e_o then holds one energy per channel for the same bunch
// crossing. The registers keep their values until overwritten. Reset clears them.
//
// Interface: valid_i/ch_i/e_i per clock in; e_o[MUX] and valid_o one clock after the
// last channel arrives.
module channel_deserializer
  import rnn_pkg::*;
#(
  parameter int MUX   = MUX_DEF,
  localparam int CH_W = (MUX > 1) ? $clog2(MUX) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            valid_i,
  input  logic [CH_W-1:0] ch_i,
  input  io_t             e_i,
  output logic            valid_o,
  output io_t [MUX-1:0]   e_o
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e_o     <= '0;
      valid_o <= 1'b0;
    end else begin
      valid_o <= valid_i && (32'(ch_i) == MUX - 1);
      if (valid_i && (32'(ch_i) < MUX)) e_o[ch_i] <= e_i;
    end
  end

endmodule
