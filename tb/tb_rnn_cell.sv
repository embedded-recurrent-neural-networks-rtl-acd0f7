// tb_rnn_cell: a recurrent cell (FIRST = 0) and a first cell (FIRST = 1) driven with
// random states, input terms and weights; h' = tanh(u + Wh*h) compared with the
// reference for every unit; latencies 6 and 1 clocks checked.
module tb_rnn_cell;
  import rnn_pkg::*;
  import rnn_ref_pkg::*;
  localparam int N = 8;

  logic clk = 0, rst_n = 0, valid_i = 0, v_rec, v_first;
  logic [7:0] side_i = 0, s_rec, s_first;
  int_t [N-1:0] h, u, h_rec, h_first;
  wgt_t [N-1:0][N-1:0] wh;
  int checks = 0, failures = 0, cyc = 0;
  typedef struct { longint h [N]; longint h0 [N]; int c; logic [7:0] tag; } exp_t;
  exp_t q_rec [$], q_first [$];

  rnn_cell #(.N(N), .FIRST(1'b0), .SIDE_W(8)) dut_rec (.clk, .rst_n, .valid_i, .side_i,
    .h_i(h), .u_i(u), .wh_i(wh), .valid_o(v_rec), .side_o(s_rec), .h_o(h_rec));
  rnn_cell #(.N(N), .FIRST(1'b1), .SIDE_W(8)) dut_first (.clk, .rst_n, .valid_i, .side_i,
    .h_i(h), .u_i(u), .wh_i(wh), .valid_o(v_first), .side_o(s_first), .h_o(h_first));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && v_rec) begin
    exp_t x;
    x = q_rec.pop_front();
    checks++;
    if (cyc - x.c != 6 || s_rec != x.tag) begin
      failures++; $display("rec latency %0d tag %0d", cyc - x.c, s_rec);
    end
    for (int j = 0; j < N; j++) begin
      checks++;
      if (longint'(h_rec[j]) != x.h[j]) begin
        failures++; $display("rec h[%0d] got %0d exp %0d", j, h_rec[j], x.h[j]);
      end
    end
  end

  always @(posedge clk) if (rst_n && v_first) begin
    exp_t x;
    x = q_first.pop_front();
    checks++;
    if (cyc - x.c != 1 || s_first != x.tag) begin
      failures++; $display("first latency %0d tag %0d", cyc - x.c, s_first);
    end
    for (int j = 0; j < N; j++) begin
      checks++;
      if (longint'(h_first[j]) != x.h0[j]) begin
        failures++; $display("first h[%0d] got %0d exp %0d", j, h_first[j], x.h0[j]);
      end
    end
  end

  initial begin
    longint hl [RN], wrow [RN];
    exp_t x;
    h = '0; u = '0; wh = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      valid_i = ($urandom_range(0, 4) != 0);
      side_i = 8'(t);
      for (int k = 0; k < N; k++) begin
        h[k] = int_t'(rnd(4096));
        u[k] = (t % 19 == 0) ? int_t'(-131072) : int_t'(rnd(12000));
        hl[k] = longint'(h[k]);
      end
      for (int j = 0; j < N; j++) begin
        for (int k = 0; k < N; k++) begin
          wh[j][k] = wgt_t'(rnd(32768));
          wrow[k] = longint'(wh[j][k]);
        end
        x.h[j]  = tanh_ref(pre_ref(longint'(u[j]), wrow, hl, N));
        x.h0[j] = tanh_ref(longint'(u[j]));
      end
      x.c = cyc; x.tag = side_i;
      if (valid_i) begin q_rec.push_back(x); q_first.push_back(x); end
    end
    @(negedge clk) valid_i = 0;
    repeat (10) @(posedge clk);
    checks++;
    if (q_rec.size() != 0 || q_first.size() != 0) begin
      failures++; $display("missing results");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
