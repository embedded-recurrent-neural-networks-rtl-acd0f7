// tb_input_layer: random weights, biases and samples (with extremes to force saturation);
// u = Wx*x + b compared with the reference for every unit, latency checked at 2 clocks.
module tb_input_layer;
  import rnn_pkg::*;
  import rnn_ref_pkg::*;
  localparam int N = 8;

  logic clk = 0, rst_n = 0, valid_i = 0, valid_o;
  logic [7:0] side_i = 0, side_o;
  io_t x;
  wgt_t [N-1:0] wx, b;
  int_t [N-1:0] u;
  int checks = 0, failures = 0, cyc = 0, sat_seen = 0;
  typedef struct { longint u [N]; int c; logic [7:0] tag; } exp_t;
  exp_t q [$];

  input_layer #(.N(N), .SIDE_W(8)) dut (.clk, .rst_n, .valid_i, .side_i, .x_i(x),
    .wx_i(wx), .b_i(b), .valid_o, .side_o, .u_o(u));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && valid_o) begin
    exp_t e;
    e = q.pop_front();
    checks++;
    if (cyc - e.c != 2 || side_o != e.tag) begin
      failures++; $display("latency/tag wrong: %0d %0d", cyc - e.c, side_o);
    end
    for (int j = 0; j < N; j++) begin
      checks++;
      if (longint'(u[j]) != e.u[j]) begin
        failures++; $display("u[%0d] got %0d exp %0d", j, u[j], e.u[j]);
      end
      if (e.u[j] == 131071 || e.u[j] == -131072) sat_seen++;
    end
  end

  initial begin
    wx = '0; b = '0; x = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      exp_t e;
      @(negedge clk);
      valid_i = ($urandom_range(0, 4) != 0);
      side_i = 8'(t);
      x = (t % 11 == 0) ? io_t'($urandom) : io_t'(rnd(8192));
      for (int j = 0; j < N; j++) begin
        wx[j] = (t % 13 == 0) ? wgt_t'($urandom) : wgt_t'(rnd(32768));
        b[j]  = wgt_t'(rnd(32768));
        e.u[j] = u_ref(longint'(wx[j]), longint'(b[j]), longint'(x));
      end
      e.c = cyc; e.tag = side_i;
      if (valid_i) q.push_back(e);
    end
    @(negedge clk) valid_i = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (q.size() != 0 || sat_seen == 0) begin
      failures++; $display("missing %0d, saturations %0d", q.size(), sat_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
