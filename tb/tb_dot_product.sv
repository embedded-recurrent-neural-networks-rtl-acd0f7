// tb_dot_product: random vectors, full-precision sums compared with a direct computation,
// one new input every clock, latency checked to be 1 + log2(N) clocks.
module tb_dot_product;
  import rnn_pkg::*;
  localparam int N = 8;
  localparam int LAT = 4;

  logic clk = 0, rst_n = 0, valid_i = 0, valid_o;
  wgt_t [N-1:0] a;
  int_t [N-1:0] b;
  logic signed [PROD_W+2:0] sum;
  int checks = 0, failures = 0;
  longint expq [$];
  int cyc = 0, sent_cyc [$];

  dot_product #(.N(N)) dut (.clk, .rst_n, .valid_i, .a_i(a), .b_i(b), .valid_o, .sum_o(sum));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && valid_o) begin
    longint e; int c;
    e = expq.pop_front(); c = sent_cyc.pop_front();
    checks++;
    if (longint'(sum) != e) begin
      failures++; $display("mismatch: got %0d exp %0d", sum, e);
    end
    if (cyc - c != LAT) begin
      failures++; $display("latency %0d, expected %0d", cyc - c, LAT);
    end
  end

  initial begin
    a = '0; b = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      valid_i = ($urandom_range(0, 3) != 0);
      for (int i = 0; i < N; i++) begin
        // include extreme values now and then
        a[i] = (t % 37 == 0) ? wgt_t'(-131072) : wgt_t'($urandom);
        b[i] = (t % 37 == 0) ? int_t'(-131072) : int_t'($urandom);
      end
      if (valid_i) begin
        longint e; e = 0;
        for (int i = 0; i < N; i++) e += longint'(a[i]) * longint'(b[i]);
        expq.push_back(e); sent_cyc.push_back(cyc);
      end
    end
    @(negedge clk) valid_i = 0;
    repeat (10) @(posedge clk);
    if (expq.size() != 0) begin failures++; $display("%0d results missing", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
