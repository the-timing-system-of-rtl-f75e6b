// evg_event_table: the event generator's RAM that holds one accelerator
// event cycle, written and read back by the host software.
//
// Each line (timing_pkg::evg_entry_t) holds an event code, the delay until
// the next event in microseconds, how many times the code is repeated, its
// start condition with the external trigger it waits for, the maximum wait
// time and the replacement code sent on timeout. The host sees every line
// as five 32-bit words at word address {line, word}, word = 0..4
// (EW_CODE, EW_DELAY, EW_CTRL, EW_TIMEOUT, EW_TOCODE); EW_CTRL packs
// repeat [15:0], condition [17:16] and trigger select [19:18]. Words 5..7
// of a line read as 0 and ignore writes.
//
// Host writes take effect at the clock edge; host reads are registered
// (data one cycle after `h_re`). The sequencer port reads a whole line
// combinationally. The code, delay and repeat fields follow the event cycle
// structure of the system; the start-condition fields, the word layout and
// the depth are this design's choices.
module evg_event_table #(
  parameter int unsigned DEPTH = 64,
  localparam int unsigned IDX_W = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // host port
  input  logic                    h_we,
  input  logic                    h_re,
  input  logic [IDX_W+2:0]        h_addr,
  input  logic [31:0]             h_wdata,
  output logic [31:0]             h_rdata,
  // sequencer port
  input  logic [IDX_W-1:0]        s_idx,
  output timing_pkg::evg_entry_t  s_entry
);
  import timing_pkg::*;

  evg_entry_t mem [DEPTH];

  logic [IDX_W-1:0] h_idx;
  logic [2:0]       h_word;
  assign h_idx  = h_addr[IDX_W+2:3];
  assign h_word = h_addr[2:0];

  // host-side index beyond DEPTH (only possible when DEPTH is not a power of 2)
  logic h_in_range;
  assign h_in_range = (32'(h_idx) < DEPTH);

  always_ff @(posedge clk) begin
    if (h_we && h_in_range) begin
      unique case (h_word)
        EW_CODE:    mem[h_idx].code         <= h_wdata;
        EW_DELAY:   mem[h_idx].delay_us     <= h_wdata;
        EW_CTRL: begin
          mem[h_idx].repeat_n <= h_wdata[15:0];
          mem[h_idx].cond     <= start_cond_e'(h_wdata[17:16]);
          mem[h_idx].trig_sel <= h_wdata[19:18];
        end
        EW_TIMEOUT: mem[h_idx].timeout_us   <= h_wdata;
        EW_TOCODE:  mem[h_idx].timeout_code <= h_wdata;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h_rdata <= '0;
    end else if (h_re) begin
      h_rdata <= '0;
      if (h_in_range) begin
        unique case (h_word)
          EW_CODE:    h_rdata <= mem[h_idx].code;
          EW_DELAY:   h_rdata <= mem[h_idx].delay_us;
          EW_CTRL:    h_rdata <= {12'd0, mem[h_idx].trig_sel, mem[h_idx].cond,
                                  mem[h_idx].repeat_n};
          EW_TIMEOUT: h_rdata <= mem[h_idx].timeout_us;
          EW_TOCODE:  h_rdata <= mem[h_idx].timeout_code;
          default:    h_rdata <= '0;
        endcase
      end
    end
  end

  assign s_entry = mem[s_idx];
endmodule
