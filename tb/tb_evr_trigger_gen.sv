// tb_evr_trigger_gen: fires the trigger generator with random delays and
// widths and checks that the output rises exactly delay+1 cycles after
// `fire` and stays high 2*width cycles; width 0 gives no pulse; a second
// fire while busy restarts it with the new values and flags an overrun.
`timescale 1ns/1ps
module tb_evr_trigger_gen;
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

  logic        fire, trig_out, busy, overrun;
  logic [31:0] delay;
  logic [15:0] width;

  evr_trigger_gen dut (.*);

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // record the output history
  logic hist [int];
  int   n_over = 0;
  always @(negedge clk) begin
    #1;
    hist[cyc] = trig_out;
    if (overrun) n_over++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // fire in cycle h, check the pulse afterwards
  task automatic one(int d, int w);
    int h;
    bit ok;
    @(negedge clk); fire = 1; delay = d; width = 16'(w); h = cyc;
    @(negedge clk); fire = 0;
    repeat (d + 2 * w + 5) @(negedge clk);
    #2;
    ok = 1;
    for (int t = h; t <= h + d + 2 * w + 3; t++) begin
      bit e;
      e = (w != 0) && (t >= h + 1 + d) && (t <= h + d + 2 * w);
      if (hist[t] !== e) ok = 0;
    end
    check(ok, $sformatf("pulse for delay %0d width %0d", d, w));
  endtask

  initial begin
    fire = 0; delay = 0; width = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    one(0, 1);
    one(1, 1);
    one(5, 0);
    one(0, 3);
    for (int k = 0; k < 60; k++) one($urandom % 200, 1 + $urandom % 20);
    // restart while waiting
    begin
      int h;
      bit ok;
      @(negedge clk); fire = 1; delay = 100; width = 4;
      @(negedge clk); fire = 0;
      repeat (20) @(negedge clk);
      fire = 1; delay = 10; width = 2; h = cyc;
      @(negedge clk); fire = 0;
      repeat (200) @(negedge clk);
      ok = 1;
      for (int t = h; t < h + 200; t++)
        if (hist[t] !== ((t >= h + 11) && (t <= h + 14))) ok = 0;
      check(ok, "second fire replaces the first");
      check(n_over == 1, $sformatf("one overrun, saw %0d", n_over));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
