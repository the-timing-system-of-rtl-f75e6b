// tb_evr_case_table: loads the receiver's case table through the host port,
// reads it back, then looks up random codes (stored ones, unstored ones and
// ones stored beyond the valid count) and checks hit/miss, index and delay
// one cycle later against a reference search. Duplicate IDs must return
// the lowest line.
`timescale 1ns/1ps
module tb_evr_case_table;
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

  logic          h_we, h_re;
  logic [AW-1:0] h_addr;
  logic [31:0]   h_wdata, h_rdata;
  logic          code_valid, hit, miss;
  logic [31:0]   code, hit_delay;
  logic [3:0]    hit_idx;
  logic [15:0]   pulse_width;

  evr_case_table #(.DEPTH(DEPTH)) dut (.*);

  logic [31:0] rid [DEPTH], rdl [DEPTH];
  int          rnum;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic hwrite(int a, logic [31:0] d);
    @(negedge clk); h_we = 1; h_addr = AW'(a); h_wdata = d;
    @(negedge clk); h_we = 0;
  endtask
  task automatic hread(int a, output logic [31:0] d);
    @(negedge clk); h_re = 1; h_addr = AW'(a);
    @(negedge clk); h_re = 0; d = h_rdata;
  endtask

  task automatic lookup(logic [31:0] c);
    int exp_i;
    exp_i = -1;
    for (int i = rnum - 1; i >= 0; i--) if (rid[i] == c) exp_i = i;
    @(negedge clk); code_valid = 1; code = c;
    @(negedge clk); code_valid = 0;
    if (exp_i >= 0)
      check(hit && !miss && hit_idx == 4'(exp_i) && hit_delay == rdl[exp_i],
            $sformatf("code %h should hit line %0d", c, exp_i));
    else
      check(!hit && miss, $sformatf("code %h should miss", c));
    @(negedge clk);
    check(!hit && !miss, "hit/miss last one cycle");
  endtask

  initial begin
    logic [31:0] d;
    h_we = 0; h_re = 0; h_addr = 0; h_wdata = 0; code_valid = 0; code = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < DEPTH; i++) begin
      rid[i] = {2'b11, 30'($urandom)};
      rdl[i] = $urandom % 1000;
    end
    rid[9] = rid[4];               // duplicate: line 4 must win
    rnum = 12;
    hwrite(0, rnum);
    hwrite(1, 7);
    for (int i = 0; i < DEPTH; i++) begin
      hwrite(2 + 2 * i, rid[i]);
      hwrite(3 + 2 * i, rdl[i]);
    end
    hread(0, d); check(d == 12, "count reads back");
    hread(1, d); check(d == 7 && pulse_width == 7, "width reads back");
    for (int i = 0; i < DEPTH; i++) begin
      hread(2 + 2 * i, d); check(d == rid[i], $sformatf("ID %0d reads back", i));
      hread(3 + 2 * i, d); check(d == rdl[i], $sformatf("delay %0d reads back", i));
    end
    for (int k = 0; k < 200; k++) begin
      case ($urandom % 3)
        0: lookup(rid[$urandom % rnum]);
        1: lookup(rid[rnum + $urandom % (DEPTH - rnum)]);   // stored but not counted
        default: lookup({2'b11, 30'($urandom)});
      endcase
    end
    lookup(rid[4]);
    // count above DEPTH is limited to DEPTH
    hwrite(0, 100);
    hread(0, d); check(d == DEPTH, "count limited to DEPTH");
    rnum = DEPTH;
    lookup(rid[15]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
