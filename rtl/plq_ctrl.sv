// PLQ control module of the static pane-based query circuit.
//
// A pane is a tumbling sub-window whose length is GCD(RANGE, SLIDE) of the
// original query. To tolerate out-of-order tuples, N_PLQ = ceil(SLACK /
// SLIDE_PLQ) + 1 pane instances are open at once. Instance IDX (from 0)
// starts at [WATTR_start + IDX*SLIDE_PLQ, WATTR_start + (IDX+1)*SLIDE_PLQ)
// and moves forward by N_PLQ*SLIDE_PLQ each time a punctuation at or beyond
// its pane end closes it.
//
// Interface and timing: eis (tuple belongs to this pane), eos (this pane
// closes) and pane_end are combinational; the pane bounds update on the
// clock edge. load initialises the bounds from wattr_start; reset as if
// WATTR_start were 0. Both algorithms are the document's; load and reset
// values are this design's own.
module plq_ctrl
  import sq_pkg::*;
#(
  parameter int unsigned SLIDE_PLQ = 60,
  parameter int unsigned N_PLQ     = 2,
  parameter int unsigned IDX       = 0
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
  output attr_t pane_end
);

  localparam attr_t OFFSET = attr_t'(IDX * SLIDE_PLQ);
  localparam attr_t STEP   = attr_t'(N_PLQ * SLIDE_PLQ);

  attr_t pane_begin;

  always_ff @(posedge clk) begin
    if (rst) begin
      pane_begin <= OFFSET;
      pane_end   <= OFFSET + attr_t'(SLIDE_PLQ);
    end else if (load) begin
      pane_begin <= wattr_start + OFFSET;
      pane_end   <= wattr_start + OFFSET + attr_t'(SLIDE_PLQ);
    end else if (punct && wattr >= pane_end) begin
      pane_begin <= pane_begin + STEP;
      pane_end   <= pane_end + STEP;
    end
  end

  always_comb begin
    if (!punct) begin
      eos = 1'b0;
      eis = valid && (pane_begin <= wattr) && (wattr < pane_end);
    end else begin
      eis = 1'b0;
      eos = (wattr >= pane_end);
    end
  end

endmodule
