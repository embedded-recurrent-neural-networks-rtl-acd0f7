// tb_lasp_rnn_fpga_full: the top at its full size (384 channels, 28 networks x 14 time
// slots). The same weights are broadcast to all networks, then six bunch crossings of
// random samples are sent at the nominal period of 14 clocks; every channel's energy is
// compared with the bit-exact reference and the latency is checked at 48 clocks.
module tb_lasp_rnn_fpga_full;
  import rnn_pkg::*;
  import rnn_ref_pkg::*;
  localparam int N_CH = 384, MUX = 14, S = 5, NP = 89, NBC = 6;
  localparam int LAT = MUX + 34;

  logic clk = 0, rst_n = 0, bc = 0, e_valid, overrun;
  io_t [N_CH-1:0] adc, energy;
  logic wr_en = 0, wr_bcast = 0;
  logic [4:0] wr_net = 0;
  logic [6:0] wr_addr = 0;
  wgt_t wr_data = 0;

  ref_w_t w;
  longint hist [N_CH][S];
  int seen [N_CH];
  int checks = 0, failures = 0, cyc = 0, n_results = 0, n_overrun = 0;
  typedef io_t [N_CH-1:0] snap_t;
  snap_t exp_q [$];
  int exp_c [$];

  lasp_rnn_fpga dut (
    .clk, .rst_n, .bc_i(bc), .adc_i(adc), .energy_o(energy), .energy_valid_o(e_valid),
    .overrun_o(overrun), .wr_en, .wr_bcast, .wr_net, .wr_addr, .wr_data);

  always #1 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (overrun) n_overrun++;
    if (e_valid) begin
      snap_t got, m;
      int c0;
      got = energy;
      m = exp_q.pop_front();
      c0 = exp_c.pop_front();
      n_results++;
      checks++;
      if (cyc - c0 != LAT) begin failures++; $display("latency %0d, expected %0d", cyc - c0, LAT); end
      for (int c = 0; c < N_CH; c++) begin
        checks++;
        if (got[c] != m[c]) begin
          failures++;
          if (failures < 20) $display("channel %0d: got %0d exp %0d", c, got[c], m[c]);
        end
      end
    end
  end

  initial begin
    snap_t m;
    longint xs [];
    xs = new[S];
    adc = '0;
    for (int c = 0; c < N_CH; c++) begin
      seen[c] = 0;
      for (int k = 0; k < S; k++) hist[c][k] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    w = rnd_weights(16384);
    for (int a = 0; a < NP; a++) begin
      @(negedge clk);
      wr_en = 1; wr_bcast = 1; wr_addr = 7'(a); wr_data = wgt_t'(w_at(w, a));
    end
    @(negedge clk) wr_en = 0;
    for (int i = 0; i < NBC; i++) begin
      @(negedge clk);
      bc = 1;
      for (int c = 0; c < N_CH; c++) begin
        adc[c] = io_t'(rnd(4096));
        for (int k = 0; k < S - 1; k++) hist[c][k] = hist[c][k+1];
        hist[c][S-1] = longint'(adc[c]);
        if (seen[c] < S) seen[c]++;
        for (int k = 0; k < S; k++) xs[k] = hist[c][k];
        m[c] = io_t'(net_ref(w, xs, S - seen[c]));
      end
      exp_q.push_back(m);
      exp_c.push_back(cyc);
      @(negedge clk) bc = 0;
      repeat (MUX - 2) @(negedge clk);
    end
    repeat (LAT + 4) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || n_results != NBC || n_overrun != 0) begin
      failures++;
      $display("results %0d of %0d, overruns %0d", n_results, NBC, n_overrun);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
