// event_link_rx: recovers 32-bit event codes from the single-line timing
// link written by event_link_tx.
//
// The line is first passed through a two-flop synchroniser. In IDLE the
// receiver waits for the first pulse, which is bit 31 of a frame (the code
// head is always 11); it then samples one bit per clock until 32 bits are in.
// A frame whose bit 30 is not 1 is counted as a framing error and dropped.
// After every frame the line must go dark for at least one bit time before
// a new frame is accepted, so a line stuck at 1 produces errors, not events.
//
// Timing: the receiver runs on a clock of the same frequency as the
// generator (one sample per 20 ns bit slot); in a real station that clock
// would be recovered from the link, which is outside this block. If the last
// bit of a frame is on `line` in cycle t, `code_valid` is high for one cycle
// in cycle t+3 with the code on `code`. Framing and error handling are this
// design's choices.
module event_link_rx (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        line,
  output logic        code_valid,
  output logic [31:0] code,
  output logic        frame_err
);
  typedef enum logic [1:0] {S_IDLE, S_DATA, S_DARK} rx_state_e;

  logic        s1_q, s2_q;
  rx_state_e   st_q;
  logic [30:0] sh_q;       // bits received so far, newest in bit 0
  logic [4:0]  n_q;        // bits still to sample in S_DATA
  logic        valid_q, err_q;
  logic [31:0] code_q;

  assign code_valid = valid_q;
  assign code       = code_q;
  assign frame_err  = err_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_q    <= 1'b0;
      s2_q    <= 1'b0;
      st_q    <= S_IDLE;
      sh_q    <= '0;
      n_q     <= '0;
      valid_q <= 1'b0;
      err_q   <= 1'b0;
      code_q  <= '0;
    end else begin
      s1_q    <= line;
      s2_q    <= s1_q;
      valid_q <= 1'b0;
      err_q   <= 1'b0;
      unique case (st_q)
        S_IDLE: if (s2_q) begin
          sh_q <= 31'h1;           // bit 31 already seen
          n_q  <= 5'd31;
          st_q <= S_DATA;
        end
        S_DATA: begin
          sh_q <= {sh_q[29:0], s2_q};
          n_q  <= n_q - 1'b1;
          if (n_q == 5'd1) begin
            // {sh_q[30:0], s2_q} is the whole frame; sh_q[29] is its bit 30
            st_q <= S_DARK;
            if (sh_q[29]) begin
              code_q  <= {sh_q[30:0], s2_q};
              valid_q <= 1'b1;
            end else begin
              err_q <= 1'b1;
            end
          end
        end
        S_DARK: if (!s2_q) st_q <= S_IDLE;
        default: st_q <= S_IDLE;
      endcase
    end
  end
endmodule
