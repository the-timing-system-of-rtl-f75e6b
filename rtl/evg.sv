// evg: the event generator card. The host software writes one accelerator
// event cycle into the card's RAM, can read it back, and starts the cycle;
// the card then sends the cycle's event codes as a pulse train on the
// timing link that is fanned out to every event receiver.
//
// Inside: evg_event_table (the RAM), evg_sequencer (start conditions,
// delays, repeats, cycle period), event_link_tx (serial link, one bit per
// 20 ns) and a two-flop synchroniser with rising-edge detector for each
// external trigger input.
//
// Host port (32-bit words, reads return data one cycle after `h_re`):
//   h_addr[ADDR_W-1] = 1 : table word {line, word} (see evg_event_table)
//   h_addr[ADDR_W-1] = 0 : registers
//     0 CTRL        write: bit0 start, bit1 stop;  read: bit0 running
//     1 NUM_EVENTS  number of table lines in the cycle
//     2 PERIOD_MS   cycle period in ms, 0 = run the cycle once
//     3 CYCLE_COUNT cycles started since reset (read only)
//     4 SENT_COUNT  event codes sent since reset (read only)
// The card's bus interface (PXI in the original system) is reduced to this
// simple synchronous port; the register map is this design's choice.
module evg #(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned N_EXT = 4,
  localparam int unsigned IDX_W  = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned ADDR_W = IDX_W + 4
) (
  input  logic              clk,
  input  logic              rst_n,
  // host port
  input  logic              h_we,
  input  logic              h_re,
  input  logic [ADDR_W-1:0] h_addr,
  input  logic [31:0]       h_wdata,
  output logic [31:0]       h_rdata,
  // external triggers from equipment (asynchronous levels)
  input  logic [N_EXT-1:0]  ext_trig_in,
  // timing link
  output logic              link_out,
  // status
  output logic              running,
  output logic              cycle_start,
  output logic              ev_sent,
  output logic              ev_timeout,
  output logic              ev_skipped
);
  import timing_pkg::*;

  localparam logic [2:0] R_CTRL = 3'd0, R_NUM = 3'd1, R_PERIOD = 3'd2,
                         R_CYCLES = 3'd3, R_SENT = 3'd4;

  logic             is_table;
  logic [2:0]       reg_sel;
  assign is_table = h_addr[ADDR_W-1];
  assign reg_sel  = h_addr[2:0];

  // registers
  logic [IDX_W:0] num_q;
  logic [31:0]    period_q;
  logic [31:0]    sent_q;
  logic           start, stop;
  logic [31:0]    cycle_count;

  assign start = h_we && !is_table && (reg_sel == R_CTRL) && h_wdata[0];
  assign stop  = h_we && !is_table && (reg_sel == R_CTRL) && h_wdata[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      num_q    <= '0;
      period_q <= '0;
      sent_q   <= '0;
    end else begin
      if (h_we && !is_table && reg_sel == R_NUM)
        num_q <= (32'(h_wdata) > DEPTH) ? (IDX_W+1)'(DEPTH) : h_wdata[IDX_W:0];
      if (h_we && !is_table && reg_sel == R_PERIOD) period_q <= h_wdata;
      if (ev_sent) sent_q <= sent_q + 1'b1;
    end
  end

  // external trigger synchronisers and rising-edge detectors
  logic [N_EXT-1:0] t1_q, t2_q, t3_q, trig_pulse;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t1_q <= '0;
      t2_q <= '0;
      t3_q <= '0;
    end else begin
      t1_q <= ext_trig_in;
      t2_q <= t1_q;
      t3_q <= t2_q;
    end
  end
  assign trig_pulse = t2_q & ~t3_q;

  // table
  logic [IDX_W-1:0] t_idx;
  evg_entry_t       t_entry;
  logic [31:0]      tab_rdata;

  evg_event_table #(.DEPTH(DEPTH)) u_table (
    .clk, .rst_n,
    .h_we(h_we && is_table), .h_re(h_re && is_table),
    .h_addr(h_addr[IDX_W+2:0]), .h_wdata, .h_rdata(tab_rdata),
    .s_idx(t_idx), .s_entry(t_entry)
  );

  // sequencer
  logic        tx_valid, tx_ready;
  logic [31:0] tx_code;

  evg_sequencer #(.DEPTH(DEPTH), .N_EXT(N_EXT)) u_seq (
    .clk, .rst_n,
    .start, .stop, .num_events(num_q), .period_ms(period_q),
    .ext_trig(trig_pulse),
    .t_idx, .t_entry,
    .tx_valid, .tx_code, .tx_ready,
    .running, .ev_sent, .ev_timeout, .ev_skipped,
    .cycle_start, .cycle_count
  );

  // link
  event_link_tx u_tx (
    .clk, .rst_n,
    .valid(tx_valid), .code(tx_code), .ready(tx_ready),
    .line(link_out), .busy()
  );

  // register reads
  logic        rd_table_q;
  logic [31:0] reg_rdata_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_table_q  <= 1'b0;
      reg_rdata_q <= '0;
    end else if (h_re) begin
      rd_table_q <= is_table;
      unique case (reg_sel)
        R_CTRL:   reg_rdata_q <= {31'd0, running};
        R_NUM:    reg_rdata_q <= 32'(num_q);
        R_PERIOD: reg_rdata_q <= period_q;
        R_CYCLES: reg_rdata_q <= cycle_count;
        R_SENT:   reg_rdata_q <= sent_q;
        default:  reg_rdata_q <= '0;
      endcase
    end
  end
  assign h_rdata = rd_table_q ? tab_rdata : reg_rdata_q;
endmodule
