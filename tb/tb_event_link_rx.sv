// tb_event_link_rx: drives the link line from a reference serialiser in the
// testbench (MSB first, one bit per cycle, random dark gaps) and checks that
// the receiver returns every code exactly once, three cycles after the last
// bit, flags frames without the 11 head as errors, and produces nothing for
// a line stuck at 1 until it has gone dark again.
`timescale 1ns/1ps
module tb_event_link_rx;
  logic clk = 1'b0, rst_n = 1'b0;
  always #10 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic        line, code_valid, frame_err;
  logic [31:0] code;

  event_link_rx dut (.clk, .rst_n, .line, .code_valid, .code, .frame_err);

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] exp_q [$];
  int          exp_t [$];   // cycle in which code_valid is expected
  int          n_err_exp = 0, n_err = 0, n_got = 0;

  always @(posedge clk) if (rst_n) begin
    if (code_valid) begin
      n_got++;
      if (exp_q.size() == 0) check(0, $sformatf("unexpected code %h", code));
      else begin
        logic [31:0] e; int t;
        e = exp_q.pop_front(); t = exp_t.pop_front();
        check(code == e, $sformatf("code %h, expected %h", code, e));
        check(cyc == t, $sformatf("code at cycle %0d, expected %0d", cyc, t));
      end
    end
    if (frame_err) n_err++;
  end

  // send one frame: the line changes right after a rising edge
  task automatic send(logic [31:0] c, bit good);
    int tlast;
    for (int b = 31; b >= 0; b--) begin
      @(posedge clk); #1 line = c[b];
    end
    tlast = cyc;          // cycle in which bit 0 is on the line
    if (good) begin
      exp_q.push_back(c);
      exp_t.push_back(tlast + 3);
    end else n_err_exp++;
    @(posedge clk); #1 line = 1'b0;
  endtask

  initial begin
    line = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);
    for (int k = 0; k < 60; k++) begin
      logic [31:0] c;
      bit good;
      good = ($urandom % 8) != 0;
      c = {1'b1, good ? 1'b1 : 1'b0, 30'($urandom)};
      send(c, good);
      repeat ($urandom % 5) @(posedge clk);   // gap of 1..5 dark bits
    end
    // line stuck at 1 for 100 cycles: one frame error, then nothing
    @(posedge clk); #1 line = 1'b1;
    exp_q.push_back(32'hFFFF_FFFF);
    exp_t.push_back(cyc + 34);
    repeat (100) @(posedge clk);
    #1 line = 1'b0;
    repeat (5) @(posedge clk);
    send(32'hC123_4567, 1);
    repeat (20) @(posedge clk);
    check(exp_q.size() == 0, $sformatf("%0d codes never received", exp_q.size()));
    check(n_err == n_err_exp, $sformatf("frame errors %0d, expected %0d", n_err, n_err_exp));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
