// tb_evr: loads an event receiver's case table through its host port, then
// sends frames on its link input from a reference serialiser and checks,
// per frame: the code handed to the device controller three cycles after
// the last bit, whether it hit the table, and for hits the trigger pulse,
// which must rise 5+delay cycles after the last bit and last 2*width cycles.
// Frames without the code head must raise a frame error and nothing else.
`timescale 1ns/1ps
module tb_evr;
  localparam int DEPTH = 16;
  localparam int AW = 6;
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

  logic          h_we, h_re, link_in;
  logic [AW-1:0] h_addr;
  logic [31:0]   h_wdata, h_rdata, evt_code;
  logic          evt_valid, evt_hit, trig_out, frame_err, overrun;
  logic [3:0]    evt_hit_idx;

  evr #(.DEPTH(DEPTH)) dut (.*);

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic hist [int];
  int   v_t [$];
  logic [31:0] v_c [$];
  int   n_err = 0;
  always @(negedge clk) begin
    #1;
    hist[cyc] = trig_out;
    if (evt_valid) begin v_t.push_back(cyc); v_c.push_back(evt_code); end
    if (frame_err) n_err++;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic hwrite(int a, logic [31:0] d);
    @(negedge clk); h_we = 1; h_addr = AW'(a); h_wdata = d;
    @(negedge clk); h_we = 0;
  endtask

  // serialise one frame; returns the cycle of its last bit
  task automatic send(logic [31:0] c, output int tlast);
    for (int b = 31; b >= 0; b--) begin
      @(posedge clk); #1 link_in = c[b];
    end
    tlast = cyc;
    @(posedge clk); #1 link_in = 1'b0;
  endtask

  logic [31:0] id [DEPTH], dl [DEPTH];
  localparam int W = 3;

  initial begin
    int tl, n_trig_pulses;
    h_we = 0; h_re = 0; h_addr = 0; h_wdata = 0; link_in = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 8; i++) begin
      id[i] = {2'b11, 6'd0, 8'(8'h10 + i), 8'h20, 8'h01};
      dl[i] = i * 37;
    end
    hwrite(0, 8);
    hwrite(1, W);
    for (int i = 0; i < 8; i++) begin hwrite(2 + 2 * i, id[i]); hwrite(3 + 2 * i, dl[i]); end
    n_trig_pulses = 0;
    for (int k = 0; k < 40; k++) begin
      int sel;
      logic [31:0] c;
      bit good, is_hit;
      sel = $urandom % 10;
      good = 1; is_hit = (sel < 8);
      if (sel < 8) c = id[sel];
      else if (sel == 8) c = {2'b11, 6'd0, 8'h77, 16'h2001};      // not in the table
      else begin c = {2'b10, 30'($urandom)}; good = 0; is_hit = 0; end
      v_t.delete(); v_c.delete(); n_err = 0;
      send(c, tl);
      repeat (2 + 300 + 2 * W + 10) @(negedge clk);
      #2;
      if (good) begin
        check(v_t.size() == 1 && v_t[0] == tl + 3 && v_c[0] == c,
              $sformatf("frame %0d: event code to controller", k));
        check(n_err == 0, "no frame error");
      end else begin
        check(v_t.size() == 0 && n_err == 1, $sformatf("frame %0d: bad head rejected", k));
      end
      begin
        bit ok;
        ok = 1;
        for (int t = tl; t < tl + 320; t++) begin
          bit e;
          e = is_hit && (t >= tl + 5 + dl[sel]) && (t < tl + 5 + dl[sel] + 2 * W);
          if (hist[t] !== e) ok = 0;
        end
        if (is_hit) n_trig_pulses++;
        check(ok, $sformatf("frame %0d (%h): trigger output", k, c));
      end
    end
    check(n_trig_pulses > 0, "at least one trigger pulse");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
