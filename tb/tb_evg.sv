// tb_evg: programs the event generator only through its host port (table
// words and registers), reads everything back, starts the cycle and decodes
// the link output with a reference deserialiser in the testbench. Checks the
// codes, their order, that frame starts are delay*50 cycles apart, that an
// external trigger edge puts its event on the line three cycles later, and
// the status registers (running, cycle count, codes sent).
`timescale 1ns/1ps
module tb_evg;
  import timing_pkg::*;
  localparam int DEPTH = 64;
  localparam int AW = 10;
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

  logic          h_we, h_re;
  logic [AW-1:0] h_addr;
  logic [31:0]   h_wdata, h_rdata;
  logic [3:0]    ext_trig_in;
  logic          link_out, running, cycle_start, ev_sent, ev_timeout, ev_skipped;

  evg #(.DEPTH(DEPTH), .N_EXT(4)) dut (.*);

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // reference deserialiser: a frame starts with the first 1 after darkness
  logic [31:0] f_c [$];
  int          f_t [$];
  int          nbits = 0;
  logic [31:0] sh;
  int          t_first;
  always @(negedge clk) begin
    #1;
    if (nbits == 0) begin
      if (link_out) begin nbits = 1; sh = 32'h1; t_first = cyc; end
    end else begin
      sh = {sh[30:0], link_out};
      nbits++;
      if (nbits == 32) begin
        f_c.push_back(sh); f_t.push_back(t_first); nbits = 0;
      end
    end
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic hwrite(logic [AW-1:0] a, logic [31:0] d);
    @(negedge clk); h_we = 1; h_addr = a; h_wdata = d;
    @(negedge clk); h_we = 0;
  endtask
  task automatic hread(logic [AW-1:0] a, output logic [31:0] d);
    @(negedge clk); h_re = 1; h_addr = a;
    @(negedge clk); h_re = 0; d = h_rdata;
  endtask
  function automatic logic [AW-1:0] ta(int line, int w);
    return {1'b1, 6'(line), 3'(w)};
  endfunction
  task automatic wline(int line, logic [31:0] code, int dly, int rep, int cond, int sel,
                       int tmo, logic [31:0] tocode);
    hwrite(ta(line, 0), code);
    hwrite(ta(line, 1), dly);
    hwrite(ta(line, 2), {12'd0, 2'(sel), 2'(cond), 16'(rep)});
    hwrite(ta(line, 3), tmo);
    hwrite(ta(line, 4), tocode);
  endtask

  initial begin
    logic [31:0] d;
    int p;
    h_we = 0; h_re = 0; h_addr = 0; h_wdata = 0; ext_trig_in = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // cycle: three sequence lines, codes in the system's format
    wline(0, 32'hC05A2000, 10, 1, 0, 0, 0, 0);
    wline(1, 32'hC0020001,  2, 5, 0, 0, 0, 0);
    wline(2, 32'hC00C0001, 20, 1, 0, 0, 0, 0);
    wline(3, 32'hC0130001,  4, 1, 1, 1, 500, 32'hC0FF0001);  // waits for trigger 1
    hwrite(10'd1, 4);
    hwrite(10'd2, 0);
    hread(ta(1, 2), d); check(d == 32'h0000_0005, "table control word reads back");
    hread(ta(3, 4), d); check(d == 32'hC0FF0001, "timeout code reads back");
    hread(10'd1, d);    check(d == 4, "NUM_EVENTS reads back");
    hread(10'd0, d);    check(d == 0, "not running before start");
    hwrite(10'd0, 1);   // start
    hread(10'd0, d);    check(d == 1, "running after start");
    // wait until line 3 is waiting, then give trigger 1 a rising edge
    while (f_c.size() < 7) @(negedge clk);
    repeat (1100) @(negedge clk);          // line 3 starts waiting 20 us after frame 7
    ext_trig_in[1] = 1; p = cyc;
    repeat (50) @(negedge clk);
    ext_trig_in[1] = 0;
    repeat (400) @(negedge clk);
    check(f_c.size() == 8, $sformatf("8 frames, saw %0d", f_c.size()));
    if (f_c.size() == 8) begin
      logic [31:0] ec [8] = '{32'hC05A2000, 32'hC0020001, 32'hC0020001, 32'hC0020001,
                              32'hC0020001, 32'hC0020001, 32'hC00C0001, 32'hC0130001};
      int et [7] = '{500, 100, 100, 100, 100, 100, 1000};
      for (int i = 0; i < 8; i++) check(f_c[i] == ec[i], $sformatf("frame %0d code %h", i, f_c[i]));
      for (int i = 0; i < 6; i++)
        check(f_t[i + 1] - f_t[i] == et[i],
              $sformatf("frame %0d to %0d: %0d cycles, expected %0d", i, i + 1, f_t[i + 1] - f_t[i], et[i]));
      check(f_t[7] == p + 3, $sformatf("triggered frame at +%0d after edge, expected +3", f_t[7] - p));
    end
    hread(10'd0, d); check(d == 0, "stopped after the single cycle");
    hread(10'd3, d); check(d == 1, "one cycle counted");
    hread(10'd4, d); check(d == 8, $sformatf("8 codes counted, read %0d", d));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
