// Window-aggregation module of the WID query circuit: one control module
// (wid_ctrl) paired with one aggregation module (agg_unit).
//
// The control module decides, in the same cycle, whether the incoming tuple
// belongs to this instance's window (eis) and whether a punctuation closes it
// (eos). The aggregation module keeps the partial aggregate and, on eos,
// places the result in the output registers together with the window end
// time, giving one <Time, Number> result per closed window.
//
// Timing: one cycle from input to the output registers. out_punct and
// out_valid are both the registered eos, as the two flag registers of the
// module are driven by the control module; out_time is the end of the
// closed window, out_value the aggregate selected by fn.
//
// The pairing of control and aggregation modules follows the document. The
// aggregation module's own valid output (non-empty window) is left open on
// purpose: the query reports every closed window, an empty one with value
// 0, so a linter notes an empty pin connection here.
module wid_window_agg
  import sq_pkg::*;
#(
  parameter int unsigned RANGE = 600,
  parameter int unsigned SLIDE = 60,
  parameter int unsigned N_WIN = 11,
  parameter int unsigned IDX   = 0
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    load,
  input  attr_t   wattr_start,
  input  agg_fn_e fn,
  input  logic    punct,
  input  logic    valid,
  input  attr_t   wattr,
  input  attr_t   value,
  output logic    out_punct,
  output logic    out_valid,
  output attr_t   out_time,
  output attr_t   out_value
);

  logic  eis, eos;
  attr_t win_end;
  logic  agg_eos;

  wid_ctrl #(.RANGE(RANGE), .SLIDE(SLIDE), .N_WIN(N_WIN), .IDX(IDX)) u_ctrl (
    .clk, .rst, .load, .wattr_start, .punct, .valid, .wattr,
    .eis, .eos, .win_end
  );

  agg_unit #(.W(ATTR_W)) u_agg (
    .clk, .rst, .fn, .eis, .eos, .din(value),
    .out_eos(agg_eos), .out_valid(), .out_value
  );

  always_ff @(posedge clk) begin
    if (rst) out_time <= '0;
    else if (eos) out_time <= win_end;
  end

  assign out_punct = agg_eos;
  assign out_valid = agg_eos;

endmodule
