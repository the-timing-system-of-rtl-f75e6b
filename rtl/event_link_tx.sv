// event_link_tx: serialises 32-bit event codes onto the single-line timing
// link (the electrical side of the optical fibre).
//
// The link sends one bit per clock, i.e. one 20 ns pulse slot per bit, most
// significant bit first, with "light" = 1. Every event code starts with the
// two head bits 11, so the first bit of a frame is always a pulse and marks
// the frame start for the receiver; the line is dark between frames for at
// least GAP bit times. 20 ns as the smallest pulse unit follows the
// system's description; the framing (MSB first, no clock recovery, idle gap)
// is this design's choice.
//
// Interface: valid/ready handshake. When `valid && ready` in cycle 0, bit 31
// is on `line` in cycle 1 and bit 0 in cycle 32; cycles 33..32+GAP are dark.
// `ready` is high again in the last gap cycle, so back-to-back frames start
// every 32+GAP cycles.
module event_link_tx #(
  parameter int unsigned GAP = timing_pkg::LINK_GAP
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        valid,
  input  logic [31:0] code,
  output logic        ready,
  output logic        line,
  output logic        busy
);
  localparam int unsigned FRAME = 32 + GAP;
  localparam int unsigned CNT_W = $clog2(FRAME + 1);

  logic [31:0]      sh_q, sh_d;
  logic [CNT_W-1:0] cnt_q, cnt_d;
  logic             line_q;

  assign ready = (cnt_q <= CNT_W'(1));
  assign busy  = (cnt_q != '0);
  assign line  = line_q;

  always_comb begin
    sh_d  = sh_q << 1;
    cnt_d = (cnt_q != '0) ? cnt_q - 1'b1 : cnt_q;
    if (valid && ready) begin
      sh_d  = code;
      cnt_d = CNT_W'(FRAME);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh_q   <= '0;
      cnt_q  <= '0;
      line_q <= 1'b0;
    end else begin
      sh_q   <= sh_d;
      cnt_q  <= cnt_d;
      line_q <= sh_d[31] && (cnt_d > CNT_W'(GAP));
    end
  end

  // a frame without the head bits cannot be found by the receiver
  a_head : assert property (@(posedge clk) disable iff (!rst_n)
                            valid && ready |-> timing_pkg::code_head_ok(code));
  // the offered code must be held until it is taken
  a_hold : assert property (@(posedge clk) disable iff (!rst_n)
                            valid && !ready |=> valid && $stable(code));
endmodule
