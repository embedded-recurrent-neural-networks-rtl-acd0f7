// tb_lasp_rnn_fpga: end-to-end test of the multi-network top at a reduced size (10
// channels on 3 networks of 4 time slots, two slots unused). Each network gets its own
// random weights through the load port, then one broadcast write changes the output bias
// of all networks. Random ADC samples arrive at every bunch-crossing strobe (period MUX,
// sometimes longer); every channel's energy is compared with the bit-exact reference and
// the strobe-to-result latency is checked at MUX + 34 clocks. A final early strobe must
// raise overrun_o. Each mechanism is counted and must occur at least once.
module tb_lasp_rnn_fpga;
  import rnn_pkg::*;
  import rnn_ref_pkg::*;
  localparam int N_CH = 10, N_NET = 3, MUX = 4, N = 8, S = 5, NP = 89;
  localparam int LAT = MUX + 34;

  logic clk = 0, rst_n = 0, bc = 0, e_valid, overrun;
  io_t [N_CH-1:0] adc, energy;
  logic wr_en = 0, wr_bcast = 0;
  logic [1:0] wr_net = 0;
  logic [6:0] wr_addr = 0;
  wgt_t wr_data = 0;

  ref_w_t wn [N_NET];
  longint hist [N_CH][S];
  int seen [N_CH];
  int checks = 0, failures = 0, cyc = 0;
  int n_net_loads = 0, n_bcast = 0, n_overrun = 0, n_gap = 0, n_partial = 0, n_results = 0;
  typedef io_t [N_CH-1:0] snap_t;
  snap_t exp_q [$];
  int exp_c [$];

  lasp_rnn_fpga #(.N_CH(N_CH), .N_NET(N_NET), .MUX(MUX)) dut (
    .clk, .rst_n, .bc_i(bc), .adc_i(adc), .energy_o(energy), .energy_valid_o(e_valid),
    .overrun_o(overrun), .wr_en, .wr_bcast, .wr_net, .wr_addr, .wr_data);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (100000) @(posedge clk);
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
          failures++; $display("channel %0d: got %0d exp %0d", c, got[c], m[c]);
        end
      end
    end
  end

  task automatic load(int net, bit bcast, int a, longint d);
    @(negedge clk);
    wr_en = 1; wr_bcast = bcast; wr_net = 2'(net); wr_addr = 7'(a); wr_data = wgt_t'(d);
    @(negedge clk);
    wr_en = 0; wr_bcast = 0;
  endtask

  // one bunch crossing: new samples on the strobe, the next strobe `gap` clocks later
  task automatic crossing(int gap);
    snap_t m;
    longint xs [];
    xs = new[S];
    @(negedge clk);
    bc = 1;
    for (int c = 0; c < N_CH; c++) begin
      adc[c] = io_t'(rnd(4096));
      for (int k = 0; k < S - 1; k++) hist[c][k] = hist[c][k+1];
      hist[c][S-1] = longint'(adc[c]);
      if (seen[c] < S) begin seen[c]++; n_partial++; end
      for (int k = 0; k < S; k++) xs[k] = hist[c][k];
      m[c] = io_t'(net_ref(wn[c / MUX], xs, S - seen[c]));
    end
    exp_q.push_back(m);
    exp_c.push_back(cyc);
    @(negedge clk) bc = 0;
    repeat (gap - 2) @(negedge clk);
  endtask

  initial begin
    adc = '0;
    for (int c = 0; c < N_CH; c++) begin
      seen[c] = 0;
      for (int k = 0; k < S; k++) hist[c][k] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < N_NET; n++) begin
      wn[n] = rnd_weights(16384);
      for (int a = 0; a < NP; a++) load(n, 1'b0, a, w_at(wn[n], a));
      n_net_loads++;
    end
    // broadcast: same output bias everywhere (network select ignored)
    load(2, 1'b1, NP - 1, 300);
    for (int n = 0; n < N_NET; n++) wn[n].bd = 300;
    n_bcast++;
    for (int i = 0; i < 30; i++) begin
      int gap;
      gap = (i % 6 == 5) ? MUX + 3 : MUX;
      if (gap > MUX) n_gap++;
      crossing(gap);
    end
    repeat (LAT + 2) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d results missing", exp_q.size()); end
    // an early strobe: results are no longer checked, only the overrun flag
    @(negedge clk) bc = 1;
    @(negedge clk) bc = 0;
    @(negedge clk) bc = 1;
    @(negedge clk) bc = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (n_net_loads == 0 || n_bcast == 0 || n_overrun == 0 || n_gap == 0 || n_partial == 0
        || n_results == 0) begin
      failures++;
      $display("mechanisms: loads %0d bcast %0d overrun %0d gaps %0d partial %0d results %0d",
               n_net_loads, n_bcast, n_overrun, n_gap, n_partial, n_results);
    end
    $display("per-network loads %0d, broadcasts %0d, overruns %0d, long gaps %0d, partial windows %0d, results %0d",
             n_net_loads, n_bcast, n_overrun, n_gap, n_partial, n_results);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
