// evg_sequencer: plays the event cycle stored in evg_event_table onto the
// link transmitter.
//
// After `start` the sequencer walks the table from line 0 to line
// num_events-1. For each line it first waits for the line's start condition
// (timing_pkg::start_cond_e): none for a sequence event; the selected
// external trigger for the other three, bounded by the line's timeout, on
// which it sends the replacement code (SC_EXT_TIMEOUT), drops the event and
// moves on (SC_EXT_SKIP) or sends the event anyway (SC_EXT_LONGWAIT). The
// event code is then sent `repeat_n` times (0 counts as 1), each sending
// followed by the line's delay in microseconds before the next sending or
// the next line. When the last line is done the cycle ends: with
// period_ms = 0 the sequencer stops; otherwise the next cycle starts
// period_ms milliseconds after the start of the last one (at once if the
// table took longer). `stop` aborts at any time.
//
// Timing, at 50 cycles per microsecond: the transmitter takes a code in the
// cycle `tx_valid && tx_ready`. Two consecutive sendings whose start does
// not wait for a trigger are taken exactly delay_us*50 cycles apart,
// provided that is not shorter than one link frame (36 cycles); shorter
// delays are stretched by the link. The cycle period is exact to the cycle
// as well. A trigger pulse is seen only while its line is waiting for it.
// Delay, repeat count and cycle period follow the event cycle structure of
// the system; the handling of the four start conditions follows its
// description of them; the exact timing rules are this design's choices.
module evg_sequencer #(
  parameter int unsigned DEPTH         = 64,
  parameter int unsigned N_EXT         = 4,
  parameter int unsigned CYCLES_PER_US = timing_pkg::CYCLES_PER_US,
  parameter int unsigned US_PER_MS     = timing_pkg::US_PER_MS,
  localparam int unsigned IDX_W = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // control
  input  logic                    start,
  input  logic                    stop,
  input  logic [IDX_W:0]          num_events,
  input  logic [31:0]             period_ms,
  input  logic [N_EXT-1:0]        ext_trig,     // one-cycle pulses
  // table
  output logic [IDX_W-1:0]        t_idx,
  input  timing_pkg::evg_entry_t  t_entry,
  // link transmitter
  output logic                    tx_valid,
  output logic [31:0]             tx_code,
  input  logic                    tx_ready,
  // status
  output logic                    running,
  output logic                    ev_sent,      // a code was taken by the link
  output logic                    ev_timeout,   // replacement code was sent
  output logic                    ev_skipped,   // an event was dropped on timeout
  output logic                    cycle_start,
  output logic [31:0]             cycle_count
);
  import timing_pkg::*;

  typedef enum logic [2:0] {S_IDLE, S_COND, S_SEND, S_DELAY, S_CEND} seq_state_e;

  localparam int unsigned PRE_W = (CYCLES_PER_US > 1) ? $clog2(CYCLES_PER_US) : 1;
  localparam int unsigned USC_W = (US_PER_MS > 1) ? $clog2(US_PER_MS) : 1;

  seq_state_e       st_q, st_d;
  logic [IDX_W-1:0] idx_q, idx_d;
  logic [15:0]      reps_q, reps_d;
  logic [31:0]      code_q, code_d;
  logic             armed_q, armed_d;

  // cycle clock: cycles since the start of the current cycle
  logic [PRE_W-1:0] cpre_q;
  logic [USC_W-1:0] cus_q;
  logic [31:0]      cms_q;
  logic             cclr;   // the next cycle is a cycle start

  // shared microsecond timer for trigger timeouts and event delays
  logic        tm_start, tm_done;
  logic [31:0] tm_n;

  us_timer #(.CYCLES_PER_US(CYCLES_PER_US), .US_W(32), .LEAD(1)) u_timer (
    .clk, .rst_n,
    .start(tm_start), .clear(stop), .n_us(tm_n),
    .busy(), .done(tm_done)
  );

  logic        trig;
  logic        go;          // the current line may be sent now
  logic        skip;        // the current line is dropped
  logic [31:0] go_code;
  logic        last_line;
  logic        period_over;
  logic [15:0] reps_first;

  assign t_idx     = idx_q;
  assign trig      = ext_trig[t_entry.trig_sel];
  assign last_line = ({1'b0, idx_q} + 1'b1) >= num_events;
  assign reps_first = (t_entry.repeat_n == '0) ? 16'd0 : t_entry.repeat_n - 1'b1;

  // true in the last cycle of a period that started period_ms ms ago
  assign period_over = (cms_q >= period_ms) ||
                       ((cms_q == period_ms - 1) && (32'(cus_q) == US_PER_MS - 1) &&
                        (32'(cpre_q) == CYCLES_PER_US - 1));

  always_comb begin
    go      = 1'b0;
    skip    = 1'b0;
    go_code = t_entry.code;
    unique case (t_entry.cond)
      SC_SEQUENCE:     go = 1'b1;
      SC_EXT_TIMEOUT: begin
        if (trig) go = 1'b1;
        else if (armed_q && tm_done) begin
          go      = 1'b1;
          go_code = t_entry.timeout_code;
        end
      end
      SC_EXT_SKIP: begin
        if (trig) go = 1'b1;
        else if (armed_q && tm_done) skip = 1'b1;
      end
      SC_EXT_LONGWAIT: go = trig || (armed_q && tm_done);
      default: ;
    endcase
  end

  always_comb begin
    st_d        = st_q;
    idx_d       = idx_q;
    reps_d      = reps_q;
    code_d      = code_q;
    armed_d     = armed_q;
    tx_valid    = 1'b0;
    tx_code     = code_q;
    tm_start    = 1'b0;
    tm_n        = t_entry.delay_us;
    ev_sent     = 1'b0;
    ev_timeout  = 1'b0;
    ev_skipped  = 1'b0;
    cclr        = 1'b0;

    unique case (st_q)
      S_IDLE: begin
        armed_d = 1'b0;
        if (start && num_events != '0) begin
          idx_d = '0;
          st_d  = S_COND;
          cclr  = 1'b1;
        end
      end

      S_COND: begin
        if (!armed_q && t_entry.cond != SC_SEQUENCE) begin
          tm_start = 1'b1;
          tm_n     = t_entry.timeout_us;
          armed_d  = 1'b1;
        end
        if (go) begin
          tx_valid = 1'b1;
          tx_code  = go_code;
          code_d   = go_code;
          reps_d   = reps_first;
          armed_d  = 1'b0;
          ev_timeout = (t_entry.cond == SC_EXT_TIMEOUT) && !trig;
          if (tx_ready) begin
            ev_sent  = 1'b1;
            tm_start = 1'b1;
            tm_n     = t_entry.delay_us;
            st_d     = S_DELAY;
          end else begin
            st_d     = S_SEND;
          end
        end else if (skip) begin
          ev_skipped = 1'b1;
          armed_d    = 1'b0;
          if (last_line) st_d = S_CEND;
          else           idx_d = idx_q + 1'b1;
        end
      end

      S_SEND: begin
        tx_valid = 1'b1;
        if (tx_ready) begin
          ev_sent  = 1'b1;
          tm_start = 1'b1;
          tm_n     = t_entry.delay_us;
          st_d     = S_DELAY;
        end
      end

      S_DELAY: begin
        if (tm_done) begin
          if (reps_q != '0) begin
            reps_d = reps_q - 1'b1;
            st_d   = S_SEND;
          end else if (last_line) begin
            st_d   = S_CEND;
          end else begin
            idx_d  = idx_q + 1'b1;
            st_d   = S_COND;
          end
        end
      end

      S_CEND: begin
        if (period_ms == '0) begin
          st_d = S_IDLE;
        end else if (period_over) begin
          idx_d = '0;
          st_d  = S_COND;
          cclr  = 1'b1;
        end
      end

      default: st_d = S_IDLE;
    endcase

    if (stop) begin
      st_d     = S_IDLE;
      tx_valid = 1'b0;
      tm_start = 1'b0;
      ev_sent  = 1'b0;
      ev_timeout = 1'b0;
      ev_skipped = 1'b0;
      cclr     = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q        <= S_IDLE;
      idx_q       <= '0;
      reps_q      <= '0;
      code_q      <= '0;
      armed_q     <= 1'b0;
      cpre_q      <= '0;
      cus_q       <= '0;
      cms_q       <= '0;
      cycle_start <= 1'b0;
      cycle_count <= '0;
    end else begin
      st_q        <= st_d;
      idx_q       <= idx_d;
      reps_q      <= reps_d;
      code_q      <= code_d;
      armed_q     <= armed_d;
      cycle_start <= cclr;
      if (cclr) cycle_count <= cycle_count + 1'b1;
      if (cclr || st_q == S_IDLE) begin
        cpre_q <= '0;
        cus_q  <= '0;
        cms_q  <= '0;
      end else if (32'(cpre_q) == CYCLES_PER_US - 1) begin
        cpre_q <= '0;
        if (32'(cus_q) == US_PER_MS - 1) begin
          cus_q <= '0;
          if (cms_q != '1) cms_q <= cms_q + 1'b1;
        end else begin
          cus_q <= cus_q + 1'b1;
        end
      end else begin
        cpre_q <= cpre_q + 1'b1;
      end
    end
  end

  assign running = (st_q != S_IDLE);

  // the code offered to the link does not change until it is taken
  a_tx_hold : assert property (@(posedge clk) disable iff (!rst_n || stop)
                               tx_valid && !tx_ready |=> tx_valid && $stable(tx_code));
endmodule
