// us_timer: one-shot timer that measures a whole number of microseconds in
// clock cycles.
//
// A microsecond prescaler (CYCLES_PER_US cycles) feeds a 32-bit microsecond
// down-counter. Both are loaded together, so the time is exact to the cycle:
// if `start` is high in cycle 0 with `n_us` = N, `done` is high for one cycle
// in cycle N*CYCLES_PER_US - LEAD (cycle 1 for N = 0). LEAD lets a user that
// needs one cycle to act on `done` land exactly on the microsecond grid. `start` while running
// reloads the timer; `clear` stops it without a `done`.
// The EVG counts its event delays and trigger timeouts in microseconds; how
// they are counted is this design's choice.
module us_timer #(
  parameter int unsigned CYCLES_PER_US = timing_pkg::CYCLES_PER_US,
  parameter int unsigned US_W          = 32,
  parameter int unsigned LEAD          = 0
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic            clear,
  input  logic [US_W-1:0] n_us,
  output logic            busy,
  output logic            done
);
  localparam int unsigned PRE_W = (CYCLES_PER_US > 1) ? $clog2(CYCLES_PER_US) : 1;
  localparam logic [PRE_W-1:0] PRE_MAX   = PRE_W'(CYCLES_PER_US - 1);
  localparam logic [PRE_W-1:0] PRE_FIRST = PRE_W'(CYCLES_PER_US - 1 - LEAD);

  logic [US_W-1:0]  us_q;
  logic [PRE_W-1:0] pre_q;
  logic             run_q;

  if (LEAD >= CYCLES_PER_US) begin : g_bad_lead
    $error("LEAD must be below CYCLES_PER_US");
  end

  assign busy = run_q;
  assign done = run_q && (us_q == '0) && (pre_q == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      us_q  <= '0;
      pre_q <= '0;
      run_q <= 1'b0;
    end else if (clear) begin
      run_q <= 1'b0;
    end else if (start) begin
      run_q <= 1'b1;
      if (n_us == '0) begin
        us_q  <= '0;
        pre_q <= '0;
      end else begin
        us_q  <= n_us - 1'b1;
        pre_q <= PRE_FIRST;
      end
    end else if (run_q) begin
      if (done) begin
        run_q <= 1'b0;
      end else if (pre_q == '0) begin
        pre_q <= PRE_MAX;
        us_q  <= us_q - 1'b1;
      end else begin
        pre_q <= pre_q - 1'b1;
      end
    end
  end
endmodule
