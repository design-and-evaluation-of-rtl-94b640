// Aggregation module: incremental COUNT, SUM, MIN and MAX circuits and a
// 4-to-1 result multiplexer.
//
// The module keeps only the partial aggregates of the current window or pane,
// never the tuples. While eis is high the value on din contributes to every
// partial aggregate; when eos is high the selected aggregate (including a
// value accepted in the same cycle) is emitted on the output registers and
// the partial state returns to its identity values. out_valid is the
// comparison 0 < count, so an empty window or pane is reported as not valid.
//
// Timing: one cycle. out_eos, out_valid and out_value are registered and
// follow eos/eis by one clock. out_value is refreshed every cycle with the
// running aggregate; it is the final result in the cycle where out_eos is 1.
//
// The four circuits, the multiplexer and the "<" comparator follow the block
// diagrams of the document; accepting an input together with eos, the
// signed MIN/MAX comparison and 32-bit wrap-around arithmetic are this
// design's own choices.
module agg_unit
  import sq_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst,
  input  agg_fn_e      fn,
  input  logic         eis,
  input  logic         eos,
  input  logic [W-1:0] din,
  output logic         out_eos,
  output logic         out_valid,
  output logic [W-1:0] out_value
);

  localparam logic [W-1:0] MAX_POS = {1'b0, {(W-1){1'b1}}};
  localparam logic [W-1:0] MIN_NEG = {1'b1, {(W-1){1'b0}}};

  logic [W-1:0] cnt_q, sum_q, min_q, max_q;
  logic [W-1:0] cnt_n, sum_n, min_n, max_n;
  logic [W-1:0] result;

  always_comb begin
    cnt_n = cnt_q;
    sum_n = sum_q;
    min_n = min_q;
    max_n = max_q;
    if (eis) begin
      cnt_n = cnt_q + 1'b1;
      sum_n = sum_q + din;
      if ($signed(din) < $signed(min_q)) min_n = din;
      if ($signed(din) > $signed(max_q)) max_n = din;
    end
    unique case (fn)
      AGG_COUNT: result = cnt_n;
      AGG_SUM:   result = sum_n;
      AGG_MIN:   result = min_n;
      AGG_MAX:   result = max_n;
      default:   result = cnt_n;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst || eos) begin
      cnt_q <= '0;
      sum_q <= '0;
      min_q <= MAX_POS;
      max_q <= MIN_NEG;
    end else begin
      cnt_q <= cnt_n;
      sum_q <= sum_n;
      min_q <= min_n;
      max_q <= max_n;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_eos   <= 1'b0;
      out_valid <= 1'b0;
      out_value <= '0;
    end else begin
      out_eos   <= eos;
      out_valid <= eos && (cnt_n != '0);
      out_value <= result;
    end
  end

endmodule
