// optical_fanout_model: behavioural stand-in, for simulation only, for the
// path between the event generator and the receivers: electrical-to-optical
// converter, twisted-pair cable, converters at the stations and the optical
// fan-out. It copies the generator's line to N_OUT outputs, output i
// delayed by BASE_DELAY + i*STEP_DELAY whole clock cycles to stand for the
// different cable lengths. It has no reset: the delay line starts dark.
module optical_fanout_model #(
  parameter int unsigned N_OUT      = 2,
  parameter int unsigned BASE_DELAY = 3,
  parameter int unsigned STEP_DELAY = 4
) (
  input  logic             clk,
  input  logic             in,
  output logic [N_OUT-1:0] out
);
  localparam int unsigned MAXD = BASE_DELAY + (N_OUT - 1) * STEP_DELAY + 1;
  logic [MAXD-1:0] dl = '0;
  always_ff @(posedge clk) dl <= {dl[MAXD-2:0], in};
  for (genvar i = 0; i < N_OUT; i++) begin : g_out
    assign out[i] = dl[BASE_DELAY + i * STEP_DELAY - 1];
  end
endmodule
