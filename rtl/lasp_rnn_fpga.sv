// lasp_rnn_fpga: RNN energy reconstruction for all calorimeter channels of one FPGA.
//
// N_NET identical networks, each time-multiplexed over MUX channels, cover N_CH channels
// (28 x 14 = 392 slots for 384 channels by default; unused slots get zero samples and
// their outputs are dropped). Channel c is handled by network c / MUX in time slot
// c % MUX. Per network: channel_serializer -> rnn_network -> channel_deserializer, with
// its own weight_regs so that each network can carry its own trained parameters.
//
// Clocking: one fast clock (about 561 MHz, 14 x the 40 MHz bunch-crossing rate) and a
// one-clock bunch-crossing strobe bc_i on which all N_CH samples adc_i are valid. All
// networks run in lockstep; energy_valid_o pulses once per bunch crossing when energy_o
// holds one energy per channel. The strobe-to-result latency is MUX + network latency + 1
// clocks: 14 + 33 + 1 = 48 clocks (86 ns at 561 MHz) with the defaults, inside the 125 ns
// budget.
//
// Weight loading: wr_en with wr_net selecting the network (or wr_bcast for all of them),
// wr_addr/wr_data as in weight_regs. overrun_o flags a strobe that came before the
// previous bunch crossing's channels had all been issued.
module lasp_rnn_fpga
  import rnn_pkg::*;
#(
  parameter int N_CH    = N_CH_DEF,
  parameter int N_NET   = N_NET_DEF,
  parameter int MUX     = MUX_DEF,
  parameter int N       = N_UNITS_DEF,
  parameter int SEQ_LEN = SEQ_LEN_DEF,
  localparam int NET_W  = (N_NET > 1) ? $clog2(N_NET) : 1,
  localparam int ADDR_W = $clog2(2 * N + N * N + N + 1),
  localparam int CH_W   = (MUX > 1) ? $clog2(MUX) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               bc_i,
  input  io_t [N_CH-1:0]     adc_i,
  output io_t [N_CH-1:0]     energy_o,
  output logic               energy_valid_o,
  output logic               overrun_o,
  input  logic               wr_en,
  input  logic               wr_bcast,
  input  logic [NET_W-1:0]   wr_net,
  input  logic [ADDR_W-1:0]  wr_addr,
  input  wgt_t               wr_data
);

  localparam int SLOTS = N_NET * MUX;

  io_t [SLOTS-1:0] adc_slots;
  io_t [SLOTS-1:0] e_slots;
  logic [N_NET-1:0] net_valid, net_overrun;

  always_comb begin
    adc_slots = '0;
    adc_slots[N_CH-1:0] = adc_i;
  end

  for (genvar n = 0; n < N_NET; n++) begin : g_net
    wgt_t [N-1:0]        wx, b, wd;
    wgt_t [N-1:0][N-1:0] wh;
    wgt_t                bd;
    logic                s_valid, r_valid;
    logic [CH_W-1:0]     s_ch, r_ch;
    io_t                 s_x, r_e;
    io_t [MUX-1:0]       e_par;

    weight_regs #(.N(N)) u_wregs (
      .clk(clk), .rst_n(rst_n),
      .wr_en(wr_en && (wr_bcast || (32'(wr_net) == n))),
      .wr_addr(wr_addr), .wr_data(wr_data),
      .wx_o(wx), .b_o(b), .wh_o(wh), .wd_o(wd), .bd_o(bd)
    );

    channel_serializer #(.MUX(MUX)) u_ser (
      .clk(clk), .rst_n(rst_n),
      .bc_i(bc_i), .x_i(adc_slots[n*MUX +: MUX]),
      .valid_o(s_valid), .ch_o(s_ch), .x_o(s_x), .overrun_o(net_overrun[n])
    );

    rnn_network #(.N(N), .SEQ_LEN(SEQ_LEN), .MUX(MUX)) u_rnn (
      .clk(clk), .rst_n(rst_n),
      .valid_i(s_valid), .ch_i(s_ch), .x_i(s_x),
      .wx_i(wx), .b_i(b), .wh_i(wh), .wd_i(wd), .bd_i(bd),
      .valid_o(r_valid), .ch_o(r_ch), .e_o(r_e)
    );

    channel_deserializer #(.MUX(MUX)) u_deser (
      .clk(clk), .rst_n(rst_n),
      .valid_i(r_valid), .ch_i(r_ch), .e_i(r_e),
      .valid_o(net_valid[n]), .e_o(e_par)
    );

    assign e_slots[n*MUX +: MUX] = e_par;
  end

  // slots beyond N_CH and the other networks' (identical) valid strobes are not used
  logic unused_slots;
  assign unused_slots = ^{e_slots, net_valid};

  assign energy_o       = e_slots[N_CH-1:0];
  assign energy_valid_o = net_valid[0];
  assign overrun_o      = |net_overrun;

endmodule
