// Window control module of the Window-ID (WID) query circuit.
//
// Each of the N_WIN window instances owns one control module. Instance IDX
// (counting from 0) covers the window [win_begin, win_end), initialised to
// WATTR_start + IDX*SLIDE and WATTR_start + IDX*SLIDE + RANGE. When a
// punctuation with timestamp at or beyond win_end arrives, the window has
// closed: eos is raised for that cycle and both bounds move forward by
// N_WIN*SLIDE, so the N_WIN instances take turns covering all overlapping
// windows. eis is raised for a data tuple whose windowing attribute lies
// inside the current window, whatever order tuples arrive in.
//
// Interface and timing: eis, eos and win_end are combinational from the
// registered window state and the current inputs (the aggregation module
// uses them in the same cycle); the bounds update on the clock edge. load
// initialises the bounds from wattr_start; reset initialises them as if
// WATTR_start were 0.
//
// The window bookkeeping follows the document's two algorithms exactly;
// the load port and the reset value are this design's own.
module wid_ctrl
  import sq_pkg::*;
#(
  parameter int unsigned RANGE = 600,
  parameter int unsigned SLIDE = 60,
  parameter int unsigned N_WIN = 11,
  parameter int unsigned IDX   = 0
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  load,
  input  attr_t wattr_start,
  input  logic  punct,
  input  logic  valid,
  input  attr_t wattr,
  output logic  eis,
  output logic  eos,
  output attr_t win_end
);

  localparam attr_t OFFSET = attr_t'(IDX * SLIDE);
  localparam attr_t STEP   = attr_t'(N_WIN * SLIDE);

  attr_t win_begin;

  always_ff @(posedge clk) begin
    if (rst) begin
      win_begin <= OFFSET;
      win_end   <= OFFSET + attr_t'(RANGE);
    end else if (load) begin
      win_begin <= wattr_start + OFFSET;
      win_end   <= wattr_start + OFFSET + attr_t'(RANGE);
    end else if (punct && wattr >= win_end) begin
      win_begin <= win_begin + STEP;
      win_end   <= win_end + STEP;
    end
  end

  always_comb begin
    if (!punct) begin
      eos = 1'b0;
      eis = valid && (win_begin <= wattr) && (wattr < win_end);
    end else begin
      eis = 1'b0;
      eos = (wattr >= win_end);
    end
  end

endmodule
