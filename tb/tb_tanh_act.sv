// tb_tanh_act: sweeps the whole input range (every 7th code plus the extremes) and
// compares the registered output, one clock later, with the reference activation.
module tb_tanh_act;
  import rnn_pkg::*;
  import rnn_ref_pkg::*;

  logic clk = 0;
  int_t x, y;
  int checks = 0, failures = 0;

  tanh_act dut (.clk, .x_i(x), .y_o(y));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(longint v);
    @(negedge clk) x = int_t'(v);
    @(negedge clk);
    checks++;
    if (longint'(y) != tanh_ref(v)) begin
      failures++;
      if (failures < 10) $display("tanh(%0d): got %0d exp %0d", v, y, tanh_ref(v));
    end
  endtask

  initial begin
    longint v;
    check_one(-131072); check_one(131071); check_one(0); check_one(-1); check_one(16);
    check_one(4096); check_one(-4096);
    v = -131072;
    while (v <= 131071) begin
      check_one(v);
      v += 7;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
