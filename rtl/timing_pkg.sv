// timing_pkg: types and constants shared by the event generator (EVG) and the
// event receivers (EVR) of the accelerator timing system.
//
// The 32-bit event code has a fixed layout: bits 31 and 30 are the code head
// and are always 1, bits 29..25 are reserved, bit 24 is the mode bit, bits
// 23..16 the event number, bits 15..8 the function code and bits 7..0 the
// virtual accelerator number. That layout is the system's own.
//
// The clock is 50 MHz, so one clock cycle is the 20 ns unit that the link
// bit time, the EVR delay and (doubled) the EVR pulse width are counted in.
// The EVG counts its delays in microseconds, i.e. in groups of 50 cycles.
//
// An EVG event starts under one of four conditions (start_cond_e):
//   SC_SEQUENCE     - starts as soon as the previous event's delay ends;
//   SC_EXT_TIMEOUT  - waits for an external trigger; on timeout a scheduled
//                     replacement (timeout) event is sent instead;
//   SC_EXT_SKIP     - waits for an external trigger; on timeout the event is
//                     dropped and the sequence simply continues;
//   SC_EXT_LONGWAIT - starts on the external trigger or, at the latest,
//                     when the maximum wait time has elapsed.
// The numeric encoding of the four categories, the link framing and the
// register layout are choices of this design.
package timing_pkg;

  // one clock = 20 ns
  localparam int unsigned CYCLES_PER_US = 50;
  localparam int unsigned US_PER_MS     = 1000;

  // the two head bits of every event code
  localparam logic [1:0] CODE_HEAD = 2'b11;

  // minimum number of idle (dark) bit times between two frames on the link
  localparam int unsigned LINK_GAP = 4;

  typedef struct packed {
    logic [1:0] head;      // 31:30, always 2'b11
    logic [4:0] reserved;  // 29:25
    logic       mode;      // 24
    logic [7:0] event_no;  // 23:16
    logic [7:0] func;      // 15:8
    logic [7:0] vacc;      // 7:0, virtual accelerator number
  } event_code_t;

  typedef enum logic [1:0] {
    SC_SEQUENCE     = 2'd0,
    SC_EXT_TIMEOUT  = 2'd1,
    SC_EXT_SKIP     = 2'd2,
    SC_EXT_LONGWAIT = 2'd3
  } start_cond_e;

  // one line of the EVG event cycle table
  typedef struct packed {
    logic [31:0] code;          // event code sent on the link
    logic [31:0] delay_us;      // time from this frame to the next one, in us
    logic [15:0] repeat_n;      // how many times the code is sent (0 counts as 1)
    start_cond_e cond;          // start condition of the first sending
    logic [1:0]  trig_sel;      // which external trigger input is awaited
    logic [31:0] timeout_us;    // maximum wait for the external trigger, in us
    logic [31:0] timeout_code;  // replacement event for SC_EXT_TIMEOUT
  } evg_entry_t;

  // EVG table entries are written as five 32-bit words
  localparam logic [2:0] EW_CODE     = 3'd0;
  localparam logic [2:0] EW_DELAY    = 3'd1;
  localparam logic [2:0] EW_CTRL     = 3'd2;  // [15:0] repeat, [17:16] cond, [19:18] trig_sel
  localparam logic [2:0] EW_TIMEOUT  = 3'd3;
  localparam logic [2:0] EW_TOCODE   = 3'd4;

  function automatic logic code_head_ok(logic [31:0] c);
    return c[31:30] == CODE_HEAD;
  endfunction

  function automatic logic [31:0] make_code(logic mode, logic [7:0] ev,
                                            logic [7:0] fn, logic [7:0] va);
    event_code_t c;
    c.head     = CODE_HEAD;
    c.reserved = '0;
    c.mode     = mode;
    c.event_no = ev;
    c.func     = fn;
    c.vacc     = va;
    return c;
  endfunction

endpackage
