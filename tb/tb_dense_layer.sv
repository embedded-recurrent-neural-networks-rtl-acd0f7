// tb_dense_layer: random hidden states, weights and bias (changing every clock, with
// extremes to force saturation); energy compared with the reference, latency 5 clocks.
module tb_dense_layer;
  import rnn_pkg::*;
  import rnn_ref_pkg::*;
  localparam int N = 8;

  logic clk = 0, rst_n = 0, valid_i = 0, valid_o;
  logic [7:0] side_i = 0, side_o;
  int_t [N-1:0] h;
  wgt_t [N-1:0] wd;
  wgt_t bd;
  io_t e;
  int checks = 0, failures = 0, cyc = 0, sat_seen = 0;
  typedef struct { longint e; int c; logic [7:0] tag; } exp_t;
  exp_t q [$];

  dense_layer #(.N(N), .SIDE_W(8)) dut (.clk, .rst_n, .valid_i, .side_i, .h_i(h),
    .wd_i(wd), .bd_i(bd), .valid_o, .side_o, .e_o(e));

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
    if (cyc - x.c != 5 || side_o != x.tag || longint'(e) != x.e) begin
      failures++;
      $display("got e=%0d lat=%0d tag=%0d, exp e=%0d tag=%0d", e, cyc - x.c, side_o, x.e, x.tag);
    end
    if (x.e == 131071 || x.e == -131072) sat_seen++;
  end

  initial begin
    longint hl [RN], wl [RN];
    exp_t x;
    h = '0; wd = '0; bd = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      valid_i = ($urandom_range(0, 4) != 0);
      side_i = 8'(t);
      for (int j = 0; j < N; j++) begin
        h[j]  = (t % 17 == 0) ? int_t'(131071) : int_t'(rnd(4096));
        wd[j] = (t % 17 == 0) ? wgt_t'(131071) : wgt_t'(rnd(65536));
        hl[j] = longint'(h[j]); wl[j] = longint'(wd[j]);
      end
      bd = wgt_t'(rnd(131071));
      x.e = dense_ref(wl, longint'(bd), hl, N);
      x.c = cyc; x.tag = side_i;
      if (valid_i) q.push_back(x);
    end
    @(negedge clk) valid_i = 0;
    repeat (8) @(posedge clk);
    checks++;
    if (q.size() != 0 || sat_seen == 0) begin
      failures++; $display("missing %0d, saturations %0d", q.size(), sat_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
