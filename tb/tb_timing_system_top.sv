// tb_timing_system_top: end-to-end run of the timing system at its default
// size (64-line EVG table, two receivers with 16-line tables). The
// generator is loaded with one accelerator operation cycle, EVT Start Cycle
// to EVT MeasureN, with times in microseconds and a 1 ms cycle period; the
// link reaches the two receivers through a behavioural fan-out with
// different cable delays. Receiver 0 triggers an injection/extraction
// kicker-like device, receiver 1 an RF/ramp-like device.
//
// The first cycle gets every external trigger in time; the second gets
// none, so the injection waits time out (replacement event), the ramp start
// goes out after its maximum wait and the extraction preparation is dropped.
// A corrupted frame is injected on receiver 1's input and the run ends with
// a stop. A reference model in the testbench decodes each receiver's input,
// looks the codes up in its own copy of the tables and predicts every
// trigger pulse (rise 5+delay cycles after the last bit, 2*width cycles
// long, a newer event replacing a pending one); the observed pulses must
// match. Every mechanism is counted and must occur at least once.
`timescale 1ns/1ps
module tb_timing_system_top;
  import timing_pkg::*;
  localparam int N_EVR = 2;
  localparam int EVG_AW = 10;
  localparam int EVR_AW = 6;
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

  logic                evg_we, evg_re;
  logic [EVG_AW-1:0]   evg_addr;
  logic [31:0]         evg_wdata, evg_rdata;
  logic [3:0]          ext_trig_in;
  logic                evg_link_out, evg_running, evg_cycle_start;
  logic                evg_ev_sent, evg_ev_timeout, evg_ev_skipped;
  logic [N_EVR-1:0]    evr_we, evr_re;
  logic [EVR_AW-1:0]   evr_addr  [N_EVR];
  logic [31:0]         evr_wdata [N_EVR];
  logic [31:0]         evr_rdata [N_EVR];
  logic [N_EVR-1:0]    evr_link_in, fan_out, inject;
  logic [N_EVR-1:0]    evr_evt_valid, evr_evt_hit, evr_trig_out, evr_frame_err, evr_overrun;
  logic [31:0]         evr_evt_code [N_EVR];
  logic [3:0]          evr_evt_hit_idx [N_EVR];

  timing_system_top dut (.*);

  optical_fanout_model #(.N_OUT(N_EVR), .BASE_DELAY(3), .STEP_DELAY(4)) u_fan (
    .clk, .in(evg_link_out), .out(fan_out)
  );
  assign evr_link_in = fan_out | inject;

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---------------------------------------------------------------- events
  localparam logic [31:0] E_START   = 32'hC0010001;
  localparam logic [31:0] E_PREPINJ = 32'hC0020001;
  localparam logic [31:0] E_INJ     = 32'hC0030001;
  localparam logic [31:0] E_INJTMO  = 32'hC00E0001;
  localparam logic [31:0] E_RAMP    = 32'hC0040001;
  localparam logic [31:0] E_MID     = 32'hC0050001;
  localparam logic [31:0] E_PREPEXT = 32'hC0060001;
  localparam logic [31:0] E_EXT     = 32'hC0070001;
  localparam logic [31:0] E_END     = 32'hC0080001;
  localparam logic [31:0] E_MEAS    = 32'hC0090001;

  // receiver tables (reference copies)
  logic [31:0] r_id [N_EVR][$];
  int          r_dl [N_EVR][$];
  int          r_w  [N_EVR];

  // ------------------------------------------------------- reference model
  // decode each receiver input, predict its trigger pulses
  int          exp_rise [N_EVR][$];
  int          exp_fall [N_EVR][$];   // last high cycle
  int          obs_rise [N_EVR][$];
  int          obs_fall [N_EVR][$];
  logic [31:0] dec_c    [N_EVR][$];
  int          nb  [N_EVR] = '{0, 0};
  logic [31:0] dsh [N_EVR];
  bit          prev_trig [N_EVR] = '{0, 0};
  int          n_hit [N_EVR] = '{0, 0}, n_miss [N_EVR] = '{0, 0};
  int          n_ferr = 0, n_over = 0, n_cycles = 0, n_sent = 0, n_tmo = 0, n_skip = 0;
  int          n_ext_started = 0;

  always @(negedge clk) begin
    #1;
    if (evg_cycle_start) n_cycles++;
    if (evg_ev_sent) n_sent++;
    if (evg_ev_timeout) n_tmo++;
    if (evg_ev_skipped) n_skip++;
    for (int i = 0; i < N_EVR; i++) begin
      if (evr_frame_err[i]) n_ferr++;
      if (evr_overrun[i]) n_over++;
      // trigger output edges
      if (evr_trig_out[i] && !prev_trig[i]) obs_rise[i].push_back(cyc);
      if (!evr_trig_out[i] && prev_trig[i]) obs_fall[i].push_back(cyc - 1);
      prev_trig[i] = evr_trig_out[i];
      // reference deserialiser
      if (nb[i] == 0) begin
        if (evr_link_in[i]) begin nb[i] = 1; dsh[i] = 32'h1; end
      end else begin
        dsh[i] = {dsh[i][30:0], evr_link_in[i]};
        nb[i]++;
        if (nb[i] == 32) begin
          nb[i] = -1;                           // wait for darkness
          if (dsh[i][31:30] == 2'b11) begin
            int m;
            dec_c[i].push_back(dsh[i]);
            m = -1;
            for (int k = r_id[i].size() - 1; k >= 0; k--) if (r_id[i][k] == dsh[i]) m = k;
            if (m < 0) n_miss[i]++;
            else begin
              int fire, rise;
              n_hit[i]++;
              fire = cyc + 4;                   // match registered one cycle after evt_valid
              rise = fire + 1 + r_dl[i][m];
              if (exp_rise[i].size() > 0 && exp_fall[i][$] >= fire) begin
                // the newer event replaces the pending one
                if (exp_rise[i][$] > fire) begin
                  void'(exp_rise[i].pop_back()); void'(exp_fall[i].pop_back());
                end else exp_fall[i][$] = fire;
              end
              exp_rise[i].push_back(rise);
              exp_fall[i].push_back(rise + 2 * r_w[i] - 1);
            end
          end
        end
      end
      if (nb[i] == -1 && !evr_link_in[i]) nb[i] = 0;
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ host tasks
  task automatic gw(logic [EVG_AW-1:0] a, logic [31:0] d);
    @(negedge clk); evg_we = 1; evg_addr = a; evg_wdata = d;
    @(negedge clk); evg_we = 0;
  endtask
  task automatic gr(logic [EVG_AW-1:0] a, output logic [31:0] d);
    @(negedge clk); evg_re = 1; evg_addr = a;
    @(negedge clk); evg_re = 0; d = evg_rdata;
  endtask
  task automatic gline(int line, logic [31:0] code, int dly, int rep, start_cond_e cond,
                       int sel, int tmo, logic [31:0] tocode);
    gw({1'b1, 6'(line), 3'd0}, code);
    gw({1'b1, 6'(line), 3'd1}, dly);
    gw({1'b1, 6'(line), 3'd2}, {12'd0, 2'(sel), 2'(cond), 16'(rep)});
    gw({1'b1, 6'(line), 3'd3}, tmo);
    gw({1'b1, 6'(line), 3'd4}, tocode);
  endtask
  task automatic rw(int e, int a, logic [31:0] d);
    @(negedge clk); evr_we[e] = 1; evr_addr[e] = EVR_AW'(a); evr_wdata[e] = d;
    @(negedge clk); evr_we[e] = 0;
  endtask
  task automatic rcase(int e, logic [31:0] id, int dl);
    int k;
    k = r_id[e].size();
    r_id[e].push_back(id); r_dl[e].push_back(dl);
    rw(e, 2 + 2 * k, id);
    rw(e, 3 + 2 * k, dl);
    rw(e, 0, k + 1);
  endtask

  // external trigger edge when the line is waiting for it
  task automatic trig_after(logic [31:0] code_before, int wait_cycles, int sel);
    int n0;
    n0 = dec_c[0].size();
    forever begin
      @(negedge clk);
      if (dec_c[0].size() > n0 && dec_c[0][$] == code_before) break;
    end
    repeat (wait_cycles) @(negedge clk);
    ext_trig_in[sel] = 1;
    repeat (20) @(negedge clk);
    ext_trig_in[sel] = 0;
  endtask

  // ------------------------------------------------------------- stimulus
  initial begin
    logic [31:0] d;
    int n_dec0;
    evg_we = 0; evg_re = 0; evg_addr = 0; evg_wdata = 0; ext_trig_in = 0;
    evr_we = 0; evr_re = 0; inject = 0;
    for (int i = 0; i < N_EVR; i++) begin evr_addr[i] = 0; evr_wdata[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;

    // one operation cycle, times in us
    gline(0, E_START,   50, 1, SC_SEQUENCE,     0,   0, 0);
    gline(1, E_PREPINJ, 20, 1, SC_SEQUENCE,     0,   0, 0);
    gline(2, E_INJ,     30, 1, SC_EXT_TIMEOUT,  0, 100, E_INJTMO);
    gline(3, E_RAMP,    30, 1, SC_EXT_LONGWAIT, 1,  40, 0);
    gline(4, E_MID,     30, 1, SC_SEQUENCE,     0,   0, 0);
    gline(5, E_PREPEXT, 20, 1, SC_EXT_SKIP,     2,  40, 0);
    gline(6, E_EXT,     20, 1, SC_SEQUENCE,     0,   0, 0);
    gline(7, E_END,     10, 1, SC_SEQUENCE,     0,   0, 0);
    gline(8, E_MEAS,     5, 4, SC_SEQUENCE,     0,   0, 0);
    gw(10'd1, 9);
    gw(10'd2, 1);                      // 1 ms period

    // receiver 0: injection / extraction device, 200 ns pulses
    r_w[0] = 5; rw(0, 1, 5);
    rcase(0, E_INJ, 100);
    rcase(0, E_INJTMO, 0);
    rcase(0, E_EXT, 7);
    // receiver 1: ramp / RF device, 80 ns pulses; its long start-cycle delay
    // is overtaken by the next event (overrun)
    r_w[1] = 2; rw(1, 1, 2);
    rcase(1, E_START, 3000);
    rcase(1, E_PREPINJ, 10);
    rcase(1, E_RAMP, 0);
    rcase(1, E_PREPEXT, 250);
    rcase(1, E_MEAS, 3);
    rw(1, 0, 5);
    begin
      logic [31:0] rd;
      @(negedge clk); evr_re[1] = 1; evr_addr[1] = 6'd8;
      @(negedge clk); evr_re[1] = 0; rd = evr_rdata[1];
      check(rd == E_PREPEXT, "receiver table reads back");
    end

    gw(10'd0, 1);                      // start
    // cycle 1: every trigger arrives
    trig_after(E_PREPINJ, 1100, 0);
    trig_after(E_INJ,     1600, 1);
    trig_after(E_MID,     1600, 2);
    // cycle 2: no triggers; wait for its end
    wait (n_cycles == 2);
    n_dec0 = dec_c[0].size();
    repeat (20000) @(negedge clk);
    // a corrupted frame on receiver 1 while the link is dark
    for (int b = 31; b >= 0; b--) begin
      logic [31:0] bad;
      bad = 32'hA5A5_0001;            // head 10
      inject[1] = bad[b];
      @(negedge clk);
    end
    inject[1] = 0;
    wait (n_cycles == 3);
    repeat (200) @(negedge clk);
    gw(10'd0, 2);                      // stop
    repeat (5000) @(negedge clk);
    gr(10'd0, d);
    check(d == 0, "stopped");

    // ------------------------------------------------------------ checks
    begin
      logic [31:0] c1 [] = '{E_START, E_PREPINJ, E_INJ, E_RAMP, E_MID, E_PREPEXT, E_EXT, E_END,
                             E_MEAS, E_MEAS, E_MEAS, E_MEAS};
      logic [31:0] c2 [] = '{E_START, E_PREPINJ, E_INJTMO, E_RAMP, E_MID, E_EXT, E_END,
                             E_MEAS, E_MEAS, E_MEAS, E_MEAS};
      bit ok;
      ok = dec_c[0].size() >= c1.size() + c2.size();
      for (int k = 0; ok && k < c1.size(); k++) if (dec_c[0][k] != c1[k]) ok = 0;
      for (int k = 0; ok && k < c2.size(); k++) if (dec_c[0][c1.size() + k] != c2[k]) ok = 0;
      check(ok, "event sequence of cycle 1 (triggered) and cycle 2 (timeouts)");
      check(dec_c[0].size() == dec_c[1].size(), "both receivers see the same frames");
    end
    for (int i = 0; i < N_EVR; i++) begin
      bit ok;
      ok = (obs_rise[i].size() == exp_rise[i].size()) && (obs_fall[i].size() == exp_fall[i].size());
      for (int k = 0; ok && k < exp_rise[i].size(); k++)
        if (obs_rise[i][k] != exp_rise[i][k] || obs_fall[i][k] != exp_fall[i][k]) ok = 0;
      check(ok, $sformatf("receiver %0d: %0d trigger pulses as predicted (%0d seen)",
                          i, exp_rise[i].size(), obs_rise[i].size()));
    end
    // every mechanism happened
    check(n_cycles >= 2,      $sformatf("cycle restarts: %0d cycles", n_cycles));
    check(n_sent > 0,         $sformatf("codes sent: %0d", n_sent));
    check(n_tmo >= 1,         $sformatf("timeout replacement events: %0d", n_tmo));
    check(n_skip >= 1,        $sformatf("skipped events: %0d", n_skip));
    check(n_hit[0] > 0 && n_hit[1] > 0, $sformatf("table hits: %0d/%0d", n_hit[0], n_hit[1]));
    check(n_miss[0] > 0,      $sformatf("codes without a case: %0d", n_miss[0]));
    check(n_ferr == 1,        $sformatf("frame errors: %0d", n_ferr));
    check(n_over >= 1,        $sformatf("trigger overruns: %0d", n_over));
    $display("mechanisms: cycles=%0d sent=%0d timeouts=%0d skips=%0d hits=%0d/%0d misses=%0d ferr=%0d overruns=%0d",
             n_cycles, n_sent, n_tmo, n_skip, n_hit[0], n_hit[1], n_miss[0], n_ferr, n_over);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
