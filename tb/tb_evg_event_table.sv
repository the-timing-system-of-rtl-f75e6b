// tb_evg_event_table: fills the EVG event cycle RAM through the host port
// with random lines, then reads every word back through the host port and
// every line through the sequencer port and compares with a reference
// copy kept in the testbench.
`timescale 1ns/1ps
module tb_evg_event_table;
  import timing_pkg::*;
  localparam int DEPTH = 64;
  localparam int IDX_W = 6;
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

  logic              h_we, h_re;
  logic [IDX_W+2:0]  h_addr;
  logic [31:0]       h_wdata, h_rdata;
  logic [IDX_W-1:0]  s_idx;
  evg_entry_t        s_entry;

  evg_event_table #(.DEPTH(DEPTH)) dut (.*);

  logic [31:0] ref_w [DEPTH][8];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic hwrite(int line, int w, logic [31:0] d);
    @(negedge clk);
    h_we = 1; h_addr = {IDX_W'(line), 3'(w)}; h_wdata = d;
    @(negedge clk);
    h_we = 0;
  endtask

  task automatic hread(int line, int w, output logic [31:0] d);
    @(negedge clk);
    h_re = 1; h_addr = {IDX_W'(line), 3'(w)};
    @(negedge clk);
    h_re = 0;
    d = h_rdata;
  endtask

  initial begin
    logic [31:0] d;
    h_we = 0; h_re = 0; h_addr = 0; h_wdata = 0; s_idx = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int l = 0; l < DEPTH; l++)
      for (int w = 0; w < 8; w++) begin
        d = $urandom;
        hwrite(l, w, d);
        if (w == 2) d = d & 32'h000F_FFFF;   // repeat, cond, trig_sel only
        if (w >= 5) d = 0;                   // unused words
        ref_w[l][w] = d;
      end
    for (int l = 0; l < DEPTH; l++) begin
      for (int w = 0; w < 8; w++) begin
        hread(l, w, d);
        check(d == ref_w[l][w], $sformatf("host read line %0d word %0d: %h, expected %h",
                                          l, w, d, ref_w[l][w]));
      end
    end
    for (int k = 0; k < 200; k++) begin
      int l;
      l = $urandom % DEPTH;
      @(negedge clk);
      s_idx = IDX_W'(l);
      #1;
      check(s_entry.code == ref_w[l][0] && s_entry.delay_us == ref_w[l][1] &&
            s_entry.repeat_n == ref_w[l][2][15:0] &&
            s_entry.cond == start_cond_e'(ref_w[l][2][17:16]) &&
            s_entry.trig_sel == ref_w[l][2][19:18] &&
            s_entry.timeout_us == ref_w[l][3] && s_entry.timeout_code == ref_w[l][4],
            $sformatf("sequencer read of line %0d", l));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
