// evr: the event receiver in front of one device controller. It recovers
// event codes from the timing link, looks each one up in its table of
// pre-stored cases and, for a match, fires a trigger pulse after the case's
// delay, with the table's pulse width.
//
// Inside: event_link_rx (deserialiser with code-head check),
// evr_case_table (host-written table and comparator) and evr_trigger_gen
// (delay counter and pulse former). Every correctly framed code is also
// handed to the device controller on `evt_valid`/`evt_code`, whether it
// matched or not, so that the controller can act on events that need no
// trigger pulse.
//
// Host port: the evr_case_table map (0 = number of IDs, 1 = pulse width in
// 40 ns units, 2+2i = ID i, 3+2i = delay i in 20 ns units); reads return data
// one cycle after `h_re`.
// Timing: if the last bit of a matching frame is on `link_in` in cycle t,
// `evt_valid` is high in cycle t+3 and `trig_out` rises in cycle
// t+5+delay and stays high 2*width cycles.
module evr #(
  parameter int unsigned DEPTH = 16,
  localparam int unsigned IDX_W = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned AW    = $clog2(2 * DEPTH + 2)
) (
  input  logic             clk,
  input  logic             rst_n,
  // host port (device controller side)
  input  logic             h_we,
  input  logic             h_re,
  input  logic [AW-1:0]    h_addr,
  input  logic [31:0]      h_wdata,
  output logic [31:0]      h_rdata,
  // timing link
  input  logic             link_in,
  // to the device controller
  output logic             evt_valid,
  output logic [31:0]      evt_code,
  output logic             evt_hit,
  output logic [IDX_W-1:0] evt_hit_idx,
  output logic             trig_out,
  // status
  output logic             frame_err,
  output logic             overrun
);
  logic        code_valid;
  logic [31:0] code;

  event_link_rx u_rx (
    .clk, .rst_n,
    .line(link_in), .code_valid, .code, .frame_err
  );

  assign evt_valid = code_valid;
  assign evt_code  = code;

  logic        hit;
  logic [31:0] hit_delay;
  logic [15:0] width;

  evr_case_table #(.DEPTH(DEPTH)) u_table (
    .clk, .rst_n,
    .h_we, .h_re, .h_addr, .h_wdata, .h_rdata,
    .code_valid, .code,
    .hit, .miss(), .hit_idx(evt_hit_idx), .hit_delay, .pulse_width(width)
  );

  assign evt_hit = hit;

  evr_trigger_gen u_trig (
    .clk, .rst_n,
    .fire(hit), .delay(hit_delay), .width,
    .trig_out, .busy(), .overrun
  );
endmodule
