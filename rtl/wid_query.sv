// Order-agnostic sliding-window aggregate query circuit based on Window-ID
// (WID), built for the query "count the UBSN trades of the last RANGE
// seconds, every SLIDE seconds".
//
// Tuples may arrive out of timestamp order, by at most SLACK. Instead of
// sorting them, the circuit keeps N_WIN = ceil((RANGE+SLACK)/SLIDE) window
// instances open at once; every tuple is offered to all of them in the same
// cycle and each instance accepts it if the timestamp falls in its window.
// Punctuations (tuples with the punctuation flag set, whose Time attribute
// says that no earlier tuple will follow) close windows.
//
// Pipeline, one cycle per stage, issue rate 1 tuple/cycle, latency 4:
//   Stage 1  Symbol == SYMBOL, registered as is_equal next to the tuple.
//   Stage 2  data valid AND is_equal; punctuations pass unchanged.
//   Stage 3  N_WIN window-aggregation modules.
//   Stage 4  n-way union: binary encoder + multiplexer to the output.
// Output: out_punct marks a result tuple <out_time, out_value>, where
// out_time is the end of the closed window and out_value the aggregate.
//
// The stage structure, the equations for N_WIN and the window algorithms
// follow the document. The attribute positions, the load port for the query
// start time and the aggregated attribute for SUM/MIN/MAX (VALUE_ATTR) are
// this design's own.
module wid_query
  import sq_pkg::*;
#(
  parameter int unsigned RANGE      = 600,
  parameter int unsigned SLIDE      = 60,
  parameter int unsigned SLACK      = 60,
  parameter int unsigned N_WIN      = n_win(RANGE, SLIDE, SLACK),
  parameter attr_t       SYMBOL     = 32'h5542_534E,  // "UBSN"
  parameter agg_fn_e     AGG_FN     = AGG_COUNT,
  parameter logic [1:0]  VALUE_ATTR = ATTR_PRICE
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   load,
  input  attr_t  wattr_start,
  input  logic   in_punct,
  input  logic   in_valid,
  input  tuple_t in_data,
  output logic   out_punct,
  output logic   out_valid,
  output attr_t  out_time,
  output attr_t  out_value
);

  // Stage 1: comparison.
  logic   s1_punct, s1_valid, s1_is_equal;
  tuple_t s1_data;

  always_ff @(posedge clk) begin
    if (rst) begin
      s1_punct    <= 1'b0;
      s1_valid    <= 1'b0;
      s1_is_equal <= 1'b0;
      s1_data     <= '0;
    end else begin
      s1_punct    <= in_punct;
      s1_valid    <= in_valid;
      s1_is_equal <= (get_attr(in_data, ATTR_SYMBOL) == SYMBOL);
      s1_data     <= in_data;
    end
  end

  // Stage 2: AND of data valid and is_equal.
  logic   s2_punct, s2_valid;
  tuple_t s2_data;

  always_ff @(posedge clk) begin
    if (rst) begin
      s2_punct <= 1'b0;
      s2_valid <= 1'b0;
      s2_data  <= '0;
    end else begin
      s2_punct <= s1_punct;
      s2_valid <= s1_valid & s1_is_equal;
      s2_data  <= s1_data;
    end
  end

  // Stage 3: window-aggregation modules.
  logic [N_WIN-1:0] w_punct, w_valid;
  logic [2*ATTR_W-1:0] w_data [N_WIN];

  for (genvar i = 0; i < N_WIN; i++) begin : g_win
    attr_t t_time, t_value;
    wid_window_agg #(.RANGE(RANGE), .SLIDE(SLIDE), .N_WIN(N_WIN), .IDX(i)) u_win (
      .clk, .rst, .load, .wattr_start, .fn(AGG_FN),
      .punct(s2_punct), .valid(s2_valid),
      .wattr(get_attr(s2_data, ATTR_TIME)),
      .value(get_attr(s2_data, VALUE_ATTR)),
      .out_punct(w_punct[i]), .out_valid(w_valid[i]),
      .out_time(t_time), .out_value(t_value)
    );
    assign w_data[i] = {t_time, t_value};
  end

  // Stage 4: n-way union.
  logic [2*ATTR_W-1:0] u_data;

  union_mux #(.N(N_WIN), .W(2 * ATTR_W)) u_union (
    .clk, .rst, .in_punct(w_punct), .in_valid(w_valid), .in_data(w_data),
    .out_punct, .out_valid, .out_data(u_data)
  );

  assign {out_time, out_value} = u_data;

endmodule
