// tb_window_buffer: three channels in random order (back-to-back repeats included, and
// out-of-range channel numbers that must be ignored); each emitted window is compared
// with a per-channel history kept by the testbench. Latency 1 clock.
module tb_window_buffer;
  import rnn_pkg::*;
  localparam int N = 2, S = 5, MUX = 3;

  logic clk = 0, rst_n = 0, valid_i = 0, valid_o;
  logic [1:0] ch_i = 0, ch_o;
  int_t [N-1:0] u;
  int_t [S-1:0][N-1:0] win;
  int checks = 0, failures = 0, cyc = 0, repeats = 0, ignored = 0;
  longint hist [MUX][S];
  typedef struct { longint w [S][N]; logic [1:0] ch; int c; } exp_t;
  exp_t q [$];

  window_buffer #(.N(N), .SEQ_LEN(S), .MUX(MUX)) dut (.clk, .rst_n, .valid_i, .ch_i,
    .u_i(u), .valid_o, .ch_o, .win_o(win));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && valid_o) begin
    exp_t x;
    x = q.pop_front();
    checks++;
    if (cyc - x.c != 1 || ch_o != x.ch) begin
      failures++; $display("latency %0d ch %0d exp %0d", cyc - x.c, ch_o, x.ch);
    end
    for (int k = 0; k < S; k++)
      for (int j = 0; j < N; j++) begin
        checks++;
        if (longint'(win[k][j]) != x.w[k][j]) begin
          failures++; $display("ch %0d win[%0d][%0d] got %0d exp %0d", x.ch, k, j, win[k][j], x.w[k][j]);
        end
      end
  end

  // history entries hold a value per unit: unit j of a sample v is v + j
  initial begin
    longint v;
    logic [1:0] last = 0;
    exp_t x;
    for (int c = 0; c < MUX; c++) for (int k = 0; k < S; k++) hist[c][k] = 0;
    u = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      valid_i = ($urandom_range(0, 3) != 0);
      ch_i = 2'($urandom_range(0, 3));   // 3 is out of range
      v = longint'(rnd_val());
      for (int j = 0; j < N; j++) u[j] = int_t'(v + j);
      if (valid_i && ch_i == 3) ignored++;
      if (valid_i && ch_i < MUX) begin
        if (ch_i == last) repeats++;
        last = ch_i;
        for (int k = 0; k < S - 1; k++) hist[ch_i][k] = hist[ch_i][k+1];
        hist[ch_i][S-1] = v;
        for (int k = 0; k < S; k++)
          for (int j = 0; j < N; j++)
            x.w[k][j] = (hist[ch_i][k] == 0 && t < 0) ? 0 : wval(hist[ch_i][k], j);
        x.ch = ch_i; x.c = cyc;
        q.push_back(x);
      end
    end
    @(negedge clk) valid_i = 0;
    repeat (4) @(posedge clk);
    checks++;
    if (q.size() != 0 || repeats == 0 || ignored == 0) begin
      failures++; $display("missing %0d repeats %0d ignored %0d", q.size(), repeats, ignored);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd_val();
    return 1 + int'($urandom_range(0, 60000));
  endfunction

  // value stored for unit j; a never-filled entry (0) stays 0 for every unit
  function automatic longint wval(longint s, int j);
    return (s == 0) ? 0 : s + j;
  endfunction
endmodule
