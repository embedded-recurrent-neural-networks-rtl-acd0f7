// tb_channel_deserializer: serial (channel, energy) streams, in order with idle gaps
// and with the last channel repeated alone; checks that valid_o pulses one clock after
// the last channel and that every channel's register holds its latest energy.
module tb_channel_deserializer;
  import rnn_pkg::*;
  localparam int MUX = 6;

  logic clk = 0, rst_n = 0, valid_i = 0, valid_o;
  logic [2:0] ch = 0;
  io_t e = 0;
  io_t [MUX-1:0] e_par;
  typedef io_t [MUX-1:0] snap_t;
  snap_t model;
  snap_t snaps [$];
  int pulse_at [$];
  int checks = 0, failures = 0, pulses = 0, exp_pulses = 0, cyc = 0, last_cyc = -10;

  channel_deserializer #(.MUX(MUX)) dut (.clk, .rst_n, .valid_i, .ch_i(ch), .e_i(e),
    .valid_o, .e_o(e_par));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && valid_o) begin
    snap_t m, got;
    m = snaps.pop_front();
    got = e_par;
    pulses++;
    checks++;
    last_cyc = pulse_at.pop_front();
    if (cyc != last_cyc + 1) begin failures++; $display("pulse at %0d, last ch at %0d", cyc, last_cyc); end
    for (int i = 0; i < MUX; i++) begin
      checks++;
      if (got[i] != m[i]) begin
        failures++; $display("ch %0d got %0d exp %0d", i, got[i], m[i]);
      end
    end
  end

  task automatic send(int c, bit v);
    @(negedge clk);
    valid_i = v; ch = 3'(c); e = io_t'($urandom);
    if (v && c < MUX) model[c] = e;
    if (v && c == MUX - 1) begin exp_pulses++; pulse_at.push_back(cyc); snaps.push_back(model); end
  endtask

  initial begin
    model = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 30; n++) begin
      for (int i = 0; i < MUX; i++) send(i, 1);
      if (n % 4 == 0) send(0, 0);
      if (n % 7 == 0) send(MUX - 1, 1);
      if (n % 5 == 0) send(MUX + 1, 1);   // out of range: ignored
    end
    send(0, 0);
    repeat (3) @(negedge clk);
    checks++;
    if (pulses != exp_pulses) begin failures++; $display("pulses %0d exp %0d", pulses, exp_pulses); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
