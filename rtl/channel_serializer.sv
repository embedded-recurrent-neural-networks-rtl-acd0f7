// channel_serializer: time-multiplexes MUX calorimeter channels onto one network.
//
// Every channel delivers one ADC sample per bunch crossing (40 MHz). The network runs at
// a clock MUX times faster, so at each bunch-crossing strobe this unit captures the MUX
// samples in parallel and then issues them one per clock, channel 0 first, each with its
// channel number. The strobe must come at most once every MUX clocks; a strobe that
// comes earlier restarts the sequence with the new samples and raises overrun_o for one
// clock, so that dropped channels can be noticed.
//
// Interface: bc_i (one-clock strobe) with x_i[MUX] valid on it; valid_o/ch_o/x_o start
// one clock after the strobe and last MUX clocks.
module channel_serializer
  import rnn_pkg::*;
#(
  parameter int MUX   = MUX_DEF,
  localparam int CH_W = (MUX > 1) ? $clog2(MUX) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            bc_i,
  input  io_t [MUX-1:0]   x_i,
  output logic            valid_o,
  output logic [CH_W-1:0] ch_o,
  output io_t             x_o,
  output logic            overrun_o
);

  io_t [MUX-1:0]   buf_q;
  logic [CH_W-1:0] cnt;
  logic            busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      cnt       <= '0;
      buf_q     <= '0;
      overrun_o <= 1'b0;
    end else begin
      overrun_o <= bc_i && busy && (32'(cnt) != MUX - 1);
      if (bc_i) begin
        buf_q <= x_i;
        busy  <= 1'b1;
        cnt   <= '0;
      end else if (busy) begin
        if (32'(cnt) == MUX - 1) busy <= 1'b0;
        else                     cnt  <= cnt + 1'b1;
      end
    end
  end

  assign valid_o = busy;
  assign ch_o    = cnt;
  assign x_o     = buf_q[cnt];

endmodule
