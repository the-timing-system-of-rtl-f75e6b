// tb_us_timer: checks that the microsecond timer raises `done` exactly
// N*50 - LEAD cycles after `start` (cycle 1 for N = 0), for LEAD 0 and 1,
// that `done` lasts one cycle, that `clear` cancels a running timer and that
// `start` while running reloads it.
`timescale 1ns/1ps
module tb_us_timer;
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

  logic        start, clear;
  logic [31:0] n_us;
  logic        busy0, done0, busy1, done1;

  us_timer #(.LEAD(0)) dut0 (.clk, .rst_n, .start, .clear, .n_us, .busy(busy0), .done(done0));
  us_timer #(.LEAD(1)) dut1 (.clk, .rst_n, .start, .clear, .n_us, .busy(busy1), .done(done1));

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // start in one cycle, then count cycles until each done
  task automatic run_one(int n);
    int t0, t_d0, t_d1, exp0, exp1, dones0, dones1;
    @(negedge clk);
    start = 1'b1; n_us = n;
    @(posedge clk); t0 = cyc;
    @(negedge clk);
    start = 1'b0;
    t_d0 = -1; t_d1 = -1; dones0 = 0; dones1 = 0;
    exp0 = (n == 0) ? 1 : n * 50;
    exp1 = (n == 0) ? 1 : n * 50 - 1;
    repeat (exp0 + 5) begin
      if (done0) begin dones0++; if (t_d0 < 0) t_d0 = cyc - t0; end
      if (done1) begin dones1++; if (t_d1 < 0) t_d1 = cyc - t0; end
      @(negedge clk);
    end
    check(t_d0 == exp0, $sformatf("LEAD0 n=%0d done after %0d, expected %0d", n, t_d0, exp0));
    check(t_d1 == exp1, $sformatf("LEAD1 n=%0d done after %0d, expected %0d", n, t_d1, exp1));
    check(dones0 == 1 && dones1 == 1, $sformatf("n=%0d done pulses %0d/%0d", n, dones0, dones1));
    check(!busy0 && !busy1, "idle after done");
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int saw;
    start = 0; clear = 0; n_us = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_one(0);
    run_one(1);
    run_one(2);
    run_one(7);
    for (int k = 0; k < 5; k++) run_one(1 + ($urandom % 40));
    // clear cancels
    @(negedge clk); start = 1; n_us = 3;
    @(negedge clk); start = 0;
    repeat (60) @(negedge clk);
    clear = 1; @(negedge clk); clear = 0;
    saw = 0;
    repeat (200) begin if (done0 || done1) saw++; @(negedge clk); end
    check(saw == 0 && !busy0, "clear cancels the timer");
    // reload while running: done measured from the second start
    begin
      int t0, td;
      @(negedge clk); start = 1; n_us = 4;
      @(negedge clk); start = 0;
      repeat (30) @(negedge clk);
      start = 1; n_us = 2;
      @(posedge clk); t0 = cyc;
      @(negedge clk); start = 0;
      td = -1;
      repeat (300) begin if (done0 && td < 0) td = cyc - t0; @(negedge clk); end
      check(td == 100, $sformatf("reload: done after %0d, expected 100", td));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
