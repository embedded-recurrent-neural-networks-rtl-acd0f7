// tb_channel_serializer: bunch-crossing strobes every MUX clocks, at longer gaps and one
// too early (overrun); checks that channels 0..MUX-1 come out in order, one per clock,
// starting one clock after the strobe, with the samples captured at the strobe.
module tb_channel_serializer;
  import rnn_pkg::*;
  localparam int MUX = 5;

  logic clk = 0, rst_n = 0, bc = 0, valid_o, overrun;
  logic [2:0] ch;
  io_t [MUX-1:0] x_par;
  io_t x;
  int checks = 0, failures = 0, overruns = 0, cyc = 0;
  typedef struct { logic [2:0] ch; longint x; int c; } exp_t;
  exp_t q [$];

  channel_serializer #(.MUX(MUX)) dut (.clk, .rst_n, .bc_i(bc), .x_i(x_par),
    .valid_o, .ch_o(ch), .x_o(x), .overrun_o(overrun));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (overrun) overruns++;
    if (valid_o) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin failures++; $display("unexpected output"); end
      else begin
        e = q.pop_front();
        if (ch != e.ch || longint'(x) != e.x || cyc != e.c) begin
          failures++;
          $display("got ch %0d x %0d at %0d, exp ch %0d x %0d at %0d", ch, x, cyc, e.ch, e.x, e.c);
        end
      end
    end
  end

  task automatic strobe(int gap, bit early);
    exp_t e;
    @(negedge clk);
    bc = 1;
    for (int i = 0; i < MUX; i++) x_par[i] = io_t'($urandom);
    // the sequence in progress is abandoned after the output of this clock
    if (early) while (q.size() > 0 && q[$].c > cyc) void'(q.pop_back());
    for (int i = 0; i < MUX; i++) begin
      e.ch = 3'(i); e.x = longint'(x_par[i]); e.c = cyc + 1 + i;
      q.push_back(e);
    end
    @(negedge clk) bc = 0;
    repeat (gap - 1) @(negedge clk);
  endtask

  initial begin
    x_par = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 20; n++) strobe(MUX, 0);
    strobe(MUX + 3, 0);
    strobe(2, 0);          // next strobe comes too early
    strobe(MUX, 1);
    for (int n = 0; n < 5; n++) strobe(MUX, 0);
    repeat (MUX + 2) @(negedge clk);
    checks++;
    if (q.size() != 0 || overruns != 1) begin
      failures++; $display("left %0d, overruns %0d (expected 1)", q.size(), overruns);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
