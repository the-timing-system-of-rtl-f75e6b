// tb_evg_sequencer: runs the EVG sequencer against a table held in the
// testbench and a link model that is busy for 36 cycles after every code it
// takes. Expected codes and the cycles in which the link takes them are
// worked out by hand from the table (50 cycles per microsecond):
//   1. sequence events with repeats: exact delay spacing, single cycle;
//   2. the four start conditions without triggers (timeout paths);
//   3. the same table with triggers, including one on an input not selected;
//   4. a 1 ms cycle period, and a table longer than its period;
//   5. stop in the middle of a cycle.
`timescale 1ns/1ps
module tb_evg_sequencer;
  import timing_pkg::*;
  localparam int DEPTH = 8;
  localparam int IDX_W = 3;
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

  logic             start, stop;
  logic [IDX_W:0]   num_events;
  logic [31:0]      period_ms;
  logic [3:0]       ext_trig;
  logic [IDX_W-1:0] t_idx;
  evg_entry_t       t_entry;
  logic             tx_valid, tx_ready;
  logic [31:0]      tx_code;
  logic             running, ev_sent, ev_timeout, ev_skipped, cycle_start;
  logic [31:0]      cycle_count;

  evg_entry_t tab [DEPTH];
  assign t_entry = tab[t_idx];

  evg_sequencer #(.DEPTH(DEPTH), .N_EXT(4)) dut (.*);

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // link model: after taking a code it is busy for the rest of a frame
  int busy_left = 0;
  assign tx_ready = (busy_left == 0);
  always @(posedge clk) begin
    if (tx_valid && tx_ready) busy_left <= 35;
    else if (busy_left > 0) busy_left <= busy_left - 1;
  end

  logic [31:0] got_c [$];
  int          got_t [$];
  int          cs_t  [$];
  int          n_timeout = 0, n_skip = 0;
  always @(negedge clk) begin
    #1;
    if (rst_n && tx_valid && tx_ready) begin
      got_c.push_back(tx_code);
      got_t.push_back(cyc);
    end
    if (cycle_start) cs_t.push_back(cyc);
    if (ev_timeout) n_timeout++;
    if (ev_skipped) n_skip++;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic evg_entry_t ent(logic [31:0] code, int dly, int rep, start_cond_e c,
                                     int sel, int tmo, logic [31:0] tocode);
    evg_entry_t e;
    e.code = code; e.delay_us = dly; e.repeat_n = 16'(rep); e.cond = c;
    e.trig_sel = 2'(sel); e.timeout_us = tmo; e.timeout_code = tocode;
    return e;
  endfunction

  task automatic do_start();
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
  endtask

  // compare what the link took with the expected list, times relative to
  // the first code
  task automatic expect_list(string name, logic [31:0] ec [], int et []);
    check(got_c.size() == ec.size(),
          $sformatf("%s: %0d codes, expected %0d", name, got_c.size(), ec.size()));
    for (int i = 0; i < ec.size() && i < got_c.size(); i++) begin
      check(got_c[i] == ec[i], $sformatf("%s: code %0d is %h, expected %h", name, i, got_c[i], ec[i]));
      check(got_t[i] - got_t[0] == et[i],
            $sformatf("%s: code %0d at +%0d, expected +%0d", name, i, got_t[i] - got_t[0], et[i]));
    end
    got_c.delete(); got_t.delete();
  endtask

  task automatic pulse_at(int t, int sel);
    while (cyc < t) @(negedge clk);
    ext_trig[sel] = 1'b1;
    @(negedge clk);
    ext_trig[sel] = 1'b0;
  endtask

  initial begin
    int a0, s0;
    start = 0; stop = 0; num_events = 0; period_ms = 0; ext_trig = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);

    // 1. sequence events
    tab[0] = ent(32'hC0010001, 2, 3, SC_SEQUENCE, 0, 0, 0);
    tab[1] = ent(32'hC0020001, 1, 1, SC_SEQUENCE, 0, 0, 0);
    tab[2] = ent(32'hC0030001, 5, 2, SC_SEQUENCE, 0, 0, 0);
    num_events = 3;
    @(negedge clk); start = 1; s0 = cyc;
    @(negedge clk); start = 0;
    repeat (1000) @(negedge clk);
    check(got_t.size() > 0 && got_t[0] == s0 + 1, "first code one cycle after start");
    expect_list("sequence",
                '{32'hC0010001, 32'hC0010001, 32'hC0010001, 32'hC0020001, 32'hC0030001, 32'hC0030001},
                '{0, 100, 200, 300, 350, 600});
    check(!running, "single cycle ends");
    check(cs_t.size() == 1 && cycle_count == 1, "one cycle started");
    cs_t.delete();

    // 2. start conditions, no triggers
    tab[0] = ent(32'hC0100000, 1, 1, SC_SEQUENCE,     0,  0, 0);
    tab[1] = ent(32'hC0110000, 1, 1, SC_EXT_TIMEOUT,  2,  3, 32'hC0F10000);
    tab[2] = ent(32'hC0120000, 1, 1, SC_EXT_SKIP,     1,  2, 32'hC0F20000);
    tab[3] = ent(32'hC0130000, 1, 1, SC_EXT_LONGWAIT, 0,  2, 32'hC0F30000);
    tab[4] = ent(32'hC0140000, 1, 1, SC_EXT_TIMEOUT,  3, 10, 32'hC0F40000);
    tab[5] = ent(32'hC0150000, 1, 1, SC_SEQUENCE,     0,  0, 0);
    num_events = 6;
    n_timeout = 0; n_skip = 0;
    do_start();
    repeat (1200) @(negedge clk);
    expect_list("timeouts",
                '{32'hC0100000, 32'hC0F10000, 32'hC0130000, 32'hC0F40000, 32'hC0150000},
                '{0, 199, 448, 997, 1047});
    check(n_timeout == 2 && n_skip == 1,
          $sformatf("timeouts %0d (2), skips %0d (1)", n_timeout, n_skip));

    // 3. same table with triggers
    n_timeout = 0; n_skip = 0;
    do_start();
    a0 = cyc;             // first code is taken in this cycle
    fork
      begin
        pulse_at(a0 + 55, 0);   // not the selected input of line 1: ignored
        pulse_at(a0 + 70, 2);   // line 1
        pulse_at(a0 + 130, 1);  // line 2 (waiting since +120)
        pulse_at(a0 + 185, 0);  // line 3 (waiting since +180)
        pulse_at(a0 + 238, 3);  // line 4 (waiting since +235)
      end
    join
    repeat (400) @(negedge clk);
    expect_list("triggers",
                '{32'hC0100000, 32'hC0110000, 32'hC0120000, 32'hC0130000, 32'hC0140000, 32'hC0150000},
                '{0, 70, 130, 185, 238, 288});
    check(n_timeout == 0 && n_skip == 0, "no timeout or skip when triggered");

    // 4a. 1 ms period
    cs_t.delete();
    tab[0] = ent(32'hC0200000, 100, 2, SC_SEQUENCE, 0, 0, 0);
    num_events = 1;
    period_ms = 1;
    do_start();
    repeat (120000) @(negedge clk);
    check(cs_t.size() == 3, $sformatf("3 cycle starts in 2.4 ms, saw %0d", cs_t.size()));
    if (cs_t.size() >= 3)
      check(cs_t[1] - cs_t[0] == 50000 && cs_t[2] - cs_t[1] == 50000,
            $sformatf("cycle period %0d/%0d cycles, expected 50000", cs_t[1] - cs_t[0], cs_t[2] - cs_t[1]));
    check(got_c.size() == 6 && got_t[1] - got_t[0] == 5000 && got_t[2] - got_t[0] == 50000,
          "codes of the periodic cycle");
    @(negedge clk); stop = 1;
    @(negedge clk); stop = 0;
    check(!running, "stop ends the periodic run");
    got_c.delete(); got_t.delete(); cs_t.delete();

    // 4b. table longer than the period: the next cycle follows at once
    tab[0] = ent(32'hC0210000, 600, 2, SC_SEQUENCE, 0, 0, 0);
    do_start();
    repeat (65000) @(negedge clk);
    check(cs_t.size() == 2 && cs_t[1] - cs_t[0] == 60001,
          "overlong cycle restarts right after its last delay");
    @(negedge clk); stop = 1;
    @(negedge clk); stop = 0;
    got_c.delete(); got_t.delete();

    // 5. stop in the middle
    period_ms = 0;
    tab[0] = ent(32'hC0300000, 10, 5, SC_SEQUENCE, 0, 0, 0);
    do_start();
    repeat (1200) @(negedge clk);
    stop = 1;
    @(negedge clk); stop = 0;
    repeat (2000) @(negedge clk);
    check(got_c.size() == 3, $sformatf("stop after 3 codes, saw %0d", got_c.size()));
    check(!running, "idle after stop");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
