// evr_case_table: the event receiver's table of pre-stored cases, and the
// comparator that looks every received event code up in it.
//
// The table holds a count of valid event IDs, up to DEPTH pairs of
// {event ID, delay} and one trigger pulse width, in the order and units of
// the system's event table file: the delay is in 20 ns units (clock cycles),
// the width in 40 ns units (pairs of cycles). A received code is compared
// with all valid IDs at once (the whole 32-bit code must match); the lowest
// matching line wins.
//
// Host port (word addresses, 32-bit data): 0 = number of IDs, 1 = pulse
// width, 2+2i = event ID i, 3+2i = delay of ID i. Writes act at the clock
// edge, reads return data one cycle after `h_re`.
// Timing: `code_valid` in cycle t gives `hit`/`miss` (one-cycle pulses) with
// the line's delay and index in cycle t+1.
// Comparing the full code, the address map and DEPTH are this design's
// choices.
module evr_case_table #(
  parameter int unsigned DEPTH = 16,
  localparam int unsigned IDX_W = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned AW    = $clog2(2 * DEPTH + 2)
) (
  input  logic             clk,
  input  logic             rst_n,
  // host port
  input  logic             h_we,
  input  logic             h_re,
  input  logic [AW-1:0]    h_addr,
  input  logic [31:0]      h_wdata,
  output logic [31:0]      h_rdata,
  // lookup
  input  logic             code_valid,
  input  logic [31:0]      code,
  output logic             hit,
  output logic             miss,
  output logic [IDX_W-1:0] hit_idx,
  output logic [31:0]      hit_delay,
  output logic [15:0]      pulse_width
);
  logic [31:0]    id_q    [DEPTH];
  logic [31:0]    delay_q [DEPTH];
  logic [IDX_W:0] num_q;
  logic [15:0]    width_q;

  assign pulse_width = width_q;

  // host writes
  logic             h_is_pair;
  logic [IDX_W-1:0] h_line;
  assign h_is_pair = (h_addr >= AW'(2)) && (32'(h_addr) < 2 * DEPTH + 2);
  assign h_line    = IDX_W'((32'(h_addr) - 2) >> 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      num_q   <= '0;
      width_q <= '0;
    end else if (h_we) begin
      if (h_addr == AW'(0)) num_q   <= (32'(h_wdata) > DEPTH) ? (IDX_W+1)'(DEPTH)
                                                              : h_wdata[IDX_W:0];
      if (h_addr == AW'(1)) width_q <= h_wdata[15:0];
    end
  end

  always_ff @(posedge clk) begin
    if (h_we && h_is_pair) begin
      if (h_addr[0] == 1'b0) id_q[h_line]    <= h_wdata;
      else                   delay_q[h_line] <= h_wdata;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h_rdata <= '0;
    end else if (h_re) begin
      if (h_addr == AW'(0))      h_rdata <= 32'(num_q);
      else if (h_addr == AW'(1)) h_rdata <= 32'(width_q);
      else if (h_is_pair)        h_rdata <= h_addr[0] ? delay_q[h_line] : id_q[h_line];
      else                       h_rdata <= '0;
    end
  end

  // parallel compare, lowest line first
  logic             m_any;
  logic [IDX_W-1:0] m_idx;
  always_comb begin
    m_any = 1'b0;
    m_idx = '0;
    for (int i = DEPTH - 1; i >= 0; i--) begin
      if ((i < 32'(num_q)) && (id_q[i] == code)) begin
        m_any = 1'b1;
        m_idx = IDX_W'(i);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hit       <= 1'b0;
      miss      <= 1'b0;
      hit_idx   <= '0;
      hit_delay <= '0;
    end else begin
      hit  <= code_valid && m_any;
      miss <= code_valid && !m_any;
      if (code_valid && m_any) begin
        hit_idx   <= m_idx;
        hit_delay <= delay_q[m_idx];
      end
    end
  end
endmodule
