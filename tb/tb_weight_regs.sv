// tb_weight_regs: loads all 89 parameters in random order, checks every output field
// against the address map, checks that an out-of-range write changes nothing and that
// a rewrite takes effect on the next clock.
module tb_weight_regs;
  import rnn_pkg::*;
  import rnn_ref_pkg::*;
  localparam int N = 8, NP = 89;

  logic clk = 0, rst_n = 0, wr_en = 0;
  logic [6:0] wr_addr = 0;
  wgt_t wr_data = 0;
  wgt_t [N-1:0] wx, b, wd;
  wgt_t [N-1:0][N-1:0] wh;
  wgt_t bd;
  int checks = 0, failures = 0;
  ref_w_t w;

  weight_regs #(.N(N)) dut (.clk, .rst_n, .wr_en, .wr_addr, .wr_data,
    .wx_o(wx), .b_o(b), .wh_o(wh), .wd_o(wd), .bd_o(bd));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write(int a, longint d);
    @(negedge clk) begin wr_en = 1; wr_addr = 7'(a); wr_data = wgt_t'(d); end
    @(negedge clk) wr_en = 0;
  endtask

  task automatic compare(string what);
    for (int j = 0; j < N; j++) begin
      checks += 3;
      if (longint'(wx[j]) != w.wx[j]) begin failures++; $display("%s wx[%0d]", what, j); end
      if (longint'(b[j])  != w.b[j])  begin failures++; $display("%s b[%0d]", what, j); end
      if (longint'(wd[j]) != w.wd[j]) begin failures++; $display("%s wd[%0d]", what, j); end
      for (int k = 0; k < N; k++) begin
        checks++;
        if (longint'(wh[j][k]) != w.wh[j][k]) begin failures++; $display("%s wh[%0d][%0d]", what, j, k); end
      end
    end
    checks++;
    if (longint'(bd) != w.bd) begin failures++; $display("%s bd", what); end
  endtask

  initial begin
    int order [NP];
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int j = 0; j < N; j++) begin
      w.wx[j] = 0; w.b[j] = 0; w.wd[j] = 0;
      for (int k = 0; k < N; k++) w.wh[j][k] = 0;
    end
    w.bd = 0;
    @(negedge clk) compare("after reset");
    w = rnd_weights(131071);
    for (int i = 0; i < NP; i++) order[i] = i;
    order.shuffle();
    foreach (order[i]) write(order[i], w_at(w, order[i]));
    compare("after load");
    write(NP, 12345);
    write(127, -5);
    compare("after out-of-range writes");
    w.wh[3][5] = -77;
    write(2 * N + 3 * N + 5, -77);
    compare("after rewrite");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
