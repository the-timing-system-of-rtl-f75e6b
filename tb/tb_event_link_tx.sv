// tb_event_link_tx: offers random event codes to the link transmitter,
// samples the line every cycle and checks that each frame appears MSB first
// starting one cycle after the handshake, that the line is dark for the gap
// and that back-to-back frames start every 36 cycles.
`timescale 1ns/1ps
module tb_event_link_tx;
  import timing_pkg::*;
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

  logic        valid, ready, line, busy;
  logic [31:0] code;

  event_link_tx dut (.clk, .rst_n, .valid, .code, .ready, .line, .busy);

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // record every accepted code and the cycle it was taken
  logic [31:0] sent_q [$];
  int          sent_t [$];
  // sampled in the middle of each cycle, after the driver has acted
  logic hist [int];
  always @(negedge clk) begin
    #1;
    hist[cyc] = line;
    if (rst_n && valid && ready) begin
      sent_q.push_back(code);
      sent_t.push_back(cyc);
    end
  end

  initial begin
    int prev_t;
    valid = 0; code = 0;
    repeat (3) @(posedge clk);
    check(line == 1'b0 && ready, "dark and ready after reset");
    rst_n = 1'b1;
    // 40 frames back to back
    for (int k = 0; k < 40; k++) begin
      @(negedge clk);
      valid = 1'b1;
      code = {2'b11, 30'($urandom)};
      if (k == 0) code = 32'hC000_0000;
      if (k == 1) code = 32'hFFFF_FFFF;
      while (!ready) @(negedge clk);
    end
    @(negedge clk); valid = 1'b0;
    // isolated frames with idle time between
    for (int k = 0; k < 10; k++) begin
      repeat ($urandom % 60 + 1) @(negedge clk);
      valid = 1'b1; code = {2'b11, 30'($urandom)};
      while (!ready) @(negedge clk);
      @(negedge clk); valid = 1'b0;
    end
    repeat (60) @(posedge clk);
    // check every frame against the line history
    check(sent_q.size() == 50, $sformatf("50 frames accepted, saw %0d", sent_q.size()));
    prev_t = -1000;
    for (int f = 0; f < sent_q.size(); f++) begin
      bit ok;
      int t;
      ok = 1;
      t = sent_t[f];
      for (int b = 0; b < 32; b++)
        if (hist[t + 1 + b] !== sent_q[f][31 - b]) ok = 0;
      for (int g = 0; g < LINK_GAP; g++)
        if (hist[t + 33 + g] !== 1'b0) ok = 0;
      if (hist[t] !== 1'b0) ok = 0;   // dark right before the frame
      check(ok, $sformatf("frame %0d (%h) on the line", f, sent_q[f]));
      if (f > 0 && f < 40)
        check(t - prev_t == 32 + LINK_GAP,
              $sformatf("frame spacing %0d, expected %0d", t - prev_t, 32 + LINK_GAP));
      prev_t = t;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
