// tb_rnn_network: one network, three multiplexed channels fed in random order with idle
// clocks and back-to-back samples of the same channel. Every energy is compared with the
// bit-exact reference RNN run on that channel's last five samples (an empty history
// entry after reset holds an input term of zero), and the input-to-output latency is checked at 33 clocks.
module tb_rnn_network;
  import rnn_pkg::*;
  import rnn_ref_pkg::*;
  localparam int N = 8, S = 5, MUX = 3, LAT = 33;

  logic clk = 0, rst_n = 0, valid_i = 0, valid_o;
  logic [1:0] ch_i = 0, ch_o;
  io_t x = 0, e;
  wgt_t [N-1:0] wx, b, wd;
  wgt_t [N-1:0][N-1:0] wh;
  wgt_t bd;
  ref_w_t w;
  int checks = 0, failures = 0, cyc = 0, nonzero = 0;
  longint hist [MUX][S];
  int seen [MUX];
  typedef struct { longint e; logic [1:0] ch; int c; } exp_t;
  exp_t q [$];

  rnn_network #(.N(N), .SEQ_LEN(S), .MUX(MUX)) dut (.clk, .rst_n, .valid_i, .ch_i, .x_i(x),
    .wx_i(wx), .b_i(b), .wh_i(wh), .wd_i(wd), .bd_i(bd), .valid_o, .ch_o, .e_o(e));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && valid_o) begin
    exp_t x_e;
    x_e = q.pop_front();
    checks++;
    if (longint'(e) != x_e.e || ch_o != x_e.ch || cyc - x_e.c != LAT) begin
      failures++;
      $display("got e=%0d ch=%0d lat=%0d, exp e=%0d ch=%0d", e, ch_o, cyc - x_e.c, x_e.e, x_e.ch);
    end
    if (x_e.e != 0) nonzero++;
  end

  initial begin
    longint xs [];
    exp_t x_e;
    xs = new[S];
    w = rnd_weights(16384);
    for (int j = 0; j < N; j++) begin
      wx[j] = wgt_t'(w.wx[j]); b[j] = wgt_t'(w.b[j]); wd[j] = wgt_t'(w.wd[j]);
      for (int k = 0; k < N; k++) wh[j][k] = wgt_t'(w.wh[j][k]);
    end
    bd = wgt_t'(w.bd);
    for (int c = 0; c < MUX; c++) begin
      seen[c] = 0;
      for (int k = 0; k < S; k++) hist[c][k] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      valid_i = ($urandom_range(0, 5) != 0);
      ch_i = 2'($urandom_range(0, MUX - 1));
      x = io_t'(rnd(4096));
      if (valid_i) begin
        for (int k = 0; k < S - 1; k++) hist[ch_i][k] = hist[ch_i][k+1];
        hist[ch_i][S-1] = longint'(x);
        for (int k = 0; k < S; k++) xs[k] = hist[ch_i][k];
        if (seen[ch_i] < S) seen[ch_i]++;
        x_e.e = net_ref(w, xs, S - seen[ch_i]); x_e.ch = ch_i; x_e.c = cyc;
        q.push_back(x_e);
      end
    end
    @(negedge clk) valid_i = 0;
    repeat (LAT + 3) @(posedge clk);
    checks++;
    if (q.size() != 0 || nonzero < 100) begin
      failures++; $display("missing %0d, nonzero energies %0d", q.size(), nonzero);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
