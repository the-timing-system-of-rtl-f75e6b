// timing_system_top: the digital part of the accelerator's event-based
// timing system: one event generator (EVG) and N_EVR event receivers (EVR),
// one per device-controller station.
//
// The EVG plays the event cycle written by the host onto `evg_link_out`.
// In the real system that pulse train passes an electrical-to-optical
// converter, 150 m of twisted pair, a converter at each station and an
// optical fan-out before it reaches the receivers; those parts are optical
// and analog, so they are not in this module: `evg_link_out` leaves it and
// each receiver's `evr_link_in[i]` enters it, and whatever sits between them
// must deliver the same bit sequence, one bit per 20 ns clock, to every
// receiver. Each EVR has its own table port (loaded by its device
// controller) and its own trigger and event outputs to that controller.
//
// N_EVR = 2 matches the two stations of the system's hardware overview;
// the number is a parameter because the fan-out serves any number.
module timing_system_top #(
  parameter int unsigned EVG_DEPTH = 64,
  parameter int unsigned N_EXT     = 4,
  parameter int unsigned EVR_DEPTH = 16,
  parameter int unsigned N_EVR     = 2,
  localparam int unsigned EVG_AW   = ((EVG_DEPTH > 1) ? $clog2(EVG_DEPTH) : 1) + 4,
  localparam int unsigned EVR_AW   = $clog2(2 * EVR_DEPTH + 2),
  localparam int unsigned EVR_IW   = (EVR_DEPTH > 1) ? $clog2(EVR_DEPTH) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // EVG host port
  input  logic                  evg_we,
  input  logic                  evg_re,
  input  logic [EVG_AW-1:0]     evg_addr,
  input  logic [31:0]           evg_wdata,
  output logic [31:0]           evg_rdata,
  input  logic [N_EXT-1:0]      ext_trig_in,
  output logic                  evg_link_out,
  output logic                  evg_running,
  output logic                  evg_cycle_start,
  output logic                  evg_ev_sent,
  output logic                  evg_ev_timeout,
  output logic                  evg_ev_skipped,
  // EVR host ports, one per receiver
  input  logic [N_EVR-1:0]      evr_we,
  input  logic [N_EVR-1:0]      evr_re,
  input  logic [EVR_AW-1:0]     evr_addr  [N_EVR],
  input  logic [31:0]           evr_wdata [N_EVR],
  output logic [31:0]           evr_rdata [N_EVR],
  // links from the fan-out
  input  logic [N_EVR-1:0]      evr_link_in,
  // to the device controllers
  output logic [N_EVR-1:0]      evr_evt_valid,
  output logic [31:0]           evr_evt_code [N_EVR],
  output logic [N_EVR-1:0]      evr_evt_hit,
  output logic [EVR_IW-1:0]     evr_evt_hit_idx [N_EVR],
  output logic [N_EVR-1:0]      evr_trig_out,
  output logic [N_EVR-1:0]      evr_frame_err,
  output logic [N_EVR-1:0]      evr_overrun
);
  evg #(.DEPTH(EVG_DEPTH), .N_EXT(N_EXT)) u_evg (
    .clk, .rst_n,
    .h_we(evg_we), .h_re(evg_re), .h_addr(evg_addr), .h_wdata(evg_wdata),
    .h_rdata(evg_rdata),
    .ext_trig_in,
    .link_out(evg_link_out),
    .running(evg_running), .cycle_start(evg_cycle_start),
    .ev_sent(evg_ev_sent), .ev_timeout(evg_ev_timeout), .ev_skipped(evg_ev_skipped)
  );

  for (genvar i = 0; i < N_EVR; i++) begin : g_evr
    evr #(.DEPTH(EVR_DEPTH)) u_evr (
      .clk, .rst_n,
      .h_we(evr_we[i]), .h_re(evr_re[i]), .h_addr(evr_addr[i]),
      .h_wdata(evr_wdata[i]), .h_rdata(evr_rdata[i]),
      .link_in(evr_link_in[i]),
      .evt_valid(evr_evt_valid[i]), .evt_code(evr_evt_code[i]),
      .evt_hit(evr_evt_hit[i]), .evt_hit_idx(evr_evt_hit_idx[i]),
      .trig_out(evr_trig_out[i]),
      .frame_err(evr_frame_err[i]), .overrun(evr_overrun[i])
    );
  end
endmodule
