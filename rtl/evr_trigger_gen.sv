// evr_trigger_gen: turns a matched event into the trigger pulse that starts
// the device's action.
//
// On `fire` the generator waits `delay` clock cycles (20 ns each) and then
// drives `trig_out` high for 2*`width` cycles (width in 40 ns units), as the
// event table of the receiver specifies. A width of 0 produces no pulse.
// A new `fire` while a delay or pulse is still running restarts the
// generator with the new values and raises `overrun` for one cycle: the
// newest event wins. That rule is this design's choice.
//
// Timing: `fire` in cycle h gives `trig_out` high in cycles
// h+1+delay .. h+delay+2*width.
module evr_trigger_gen (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        fire,
  input  logic [31:0] delay,
  input  logic [15:0] width,
  output logic        trig_out,
  output logic        busy,
  output logic        overrun
);
  typedef enum logic [1:0] {T_IDLE, T_WAIT, T_PULSE} trig_state_e;

  trig_state_e st_q;
  logic [31:0] dcnt_q;
  logic [16:0] pcnt_q;
  logic [15:0] width_q;

  assign trig_out = (st_q == T_PULSE);
  assign busy     = (st_q != T_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q    <= T_IDLE;
      dcnt_q  <= '0;
      pcnt_q  <= '0;
      width_q <= '0;
      overrun <= 1'b0;
    end else begin
      overrun <= fire && (st_q != T_IDLE);
      if (fire) begin
        width_q <= width;
        if (width == '0) begin
          st_q <= T_IDLE;
        end else if (delay == '0) begin
          st_q   <= T_PULSE;
          pcnt_q <= {width, 1'b0};
        end else begin
          st_q   <= T_WAIT;
          dcnt_q <= delay;
        end
      end else begin
        unique case (st_q)
          T_WAIT: begin
            if (dcnt_q == 32'd1) begin
              st_q   <= T_PULSE;
              pcnt_q <= {width_q, 1'b0};
            end
            dcnt_q <= dcnt_q - 1'b1;
          end
          T_PULSE: begin
            if (pcnt_q == 17'd1) st_q <= T_IDLE;
            pcnt_q <= pcnt_q - 1'b1;
          end
          default: ;
        endcase
      end
    end
  end
endmodule
