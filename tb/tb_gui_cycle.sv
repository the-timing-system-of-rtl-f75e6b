// tb_gui_cycle: runs the example event cycle of the operator's sequence
// editor on the complete system at default size: four events
//   C05A2000  1000 ms  x1
//   C0020001   250 ms  x72
//   C00C0001  2000 ms  x1
//   C0130001  1000 ms  x1
// with a 23000 ms cycle period, i.e. 75 frames per cycle. All times are
// divided by TIME_DIV so that the run fits a short simulation; the timing
// logic does not depend on the size of the numbers (32-bit counters).
// Checks: the 75 codes arrive at both receivers in order, frame starts are
// exactly delay*50 cycles apart, the second cycle starts exactly one period
// after the first, and receiver 1 fires one trigger per C0020001 event.
`timescale 1ns/1ps
module tb_gui_cycle;
  import timing_pkg::*;
  localparam int TIME_DIV = 20;
  localparam int N_EVR = 2;
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

  logic              evg_we, evg_re;
  logic [9:0]        evg_addr;
  logic [31:0]       evg_wdata, evg_rdata;
  logic [3:0]        ext_trig_in;
  logic              evg_link_out, evg_running, evg_cycle_start;
  logic              evg_ev_sent, evg_ev_timeout, evg_ev_skipped;
  logic [N_EVR-1:0]  evr_we, evr_re;
  logic [5:0]        evr_addr  [N_EVR];
  logic [31:0]       evr_wdata [N_EVR];
  logic [31:0]       evr_rdata [N_EVR];
  logic [N_EVR-1:0]  evr_link_in;
  logic [N_EVR-1:0]  evr_evt_valid, evr_evt_hit, evr_trig_out, evr_frame_err, evr_overrun;
  logic [31:0]       evr_evt_code [N_EVR];
  logic [3:0]        evr_evt_hit_idx [N_EVR];

  timing_system_top dut (.*);

  optical_fanout_model #(.N_OUT(N_EVR)) u_fan (.clk, .in(evg_link_out), .out(evr_link_in));

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic [31:0] code_q [N_EVR][$];
  int          sent_t [$];
  int          cs_t [$];
  int          n_trig = 0;
  logic        prev_trig = 0;
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < N_EVR; i++) if (evr_evt_valid[i]) code_q[i].push_back(evr_evt_code[i]);
    if (evg_ev_sent) sent_t.push_back(cyc);
    if (evg_cycle_start) cs_t.push_back(cyc);
    if (evr_trig_out[1] && !prev_trig) n_trig++;
    prev_trig <= evr_trig_out[1];
  end

  localparam int MS = 1000 / TIME_DIV;   // microseconds per (scaled) millisecond

  initial begin
    repeat (30 * 1000 * MS * 50) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic gw(logic [9:0] a, logic [31:0] d);
    @(negedge clk); evg_we = 1; evg_addr = a; evg_wdata = d;
    @(negedge clk); evg_we = 0;
  endtask
  task automatic rw(int e, int a, logic [31:0] d);
    @(negedge clk); evr_we[e] = 1; evr_addr[e] = 6'(a); evr_wdata[e] = d;
    @(negedge clk); evr_we[e] = 0;
  endtask

  logic [31:0] codes [4] = '{32'hC05A2000, 32'hC0020001, 32'hC00C0001, 32'hC0130001};
  int          dly_ms [4] = '{1000, 250, 2000, 1000};
  int          reps [4]   = '{1, 72, 1, 1};

  initial begin
    int f;
    bit ok_seq, ok_t;
    evg_we = 0; evg_re = 0; evg_addr = 0; evg_wdata = 0; ext_trig_in = 0;
    evr_we = 0; evr_re = 0;
    for (int i = 0; i < N_EVR; i++) begin evr_addr[i] = 0; evr_wdata[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int l = 0; l < 4; l++) begin
      gw({1'b1, 6'(l), 3'd0}, codes[l]);
      gw({1'b1, 6'(l), 3'd1}, dly_ms[l] * MS);
      gw({1'b1, 6'(l), 3'd2}, reps[l]);
    end
    gw(10'd1, 4);
    gw(10'd2, 23000 / TIME_DIV);
    // receiver 1 triggers on C0020001 after 1 us, 1 us wide
    rw(1, 1, 25);
    rw(1, 2, 32'hC0020001);
    rw(1, 3, 50);
    rw(1, 0, 1);
    gw(10'd0, 1);
    wait (cs_t.size() == 2);
    repeat (100) @(posedge clk);
    gw(10'd0, 2);
    // first cycle: 75 codes
    ok_seq = 1; ok_t = 1; f = 0;
    for (int l = 0; l < 4; l++)
      for (int r = 0; r < reps[l]; r++) begin
        for (int i = 0; i < N_EVR; i++)
          if (f >= code_q[i].size() || code_q[i][f] != codes[l]) ok_seq = 0;
        if (f + 1 < sent_t.size() && !(l == 3 && r == reps[l] - 1))
          if (sent_t[f + 1] - sent_t[f] != dly_ms[l] * MS * 50) ok_t = 0;
        f++;
      end
    check(f == 75, "75 frames per cycle");
    check(ok_seq, "codes in order at both receivers");
    check(ok_t, "frame spacing equals the programmed delays");
    check(cs_t[1] - cs_t[0] == 23000 * MS * 50, $sformatf("period %0d cycles", cs_t[1] - cs_t[0]));
    check(sent_t.size() >= 76 && sent_t[75] == cs_t[1], "second cycle starts with its first code");
    check(n_trig == 72, $sformatf("72 triggers from receiver 1, saw %0d", n_trig));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
