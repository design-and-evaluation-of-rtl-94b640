// Top level: the three stream query processors side by side.
//
//   wid_*   the Window-ID circuit: one window-aggregation module per
//           overlapping window, tolerant of out-of-order tuples (query Q2:
//           count of UBSN trades, RANGE 600, SLIDE 60, SLACK 60).
//   pane_*  the pane-based circuit for the same query: pane-level and
//           window-level sub-queries with a pane buffer, whose size no
//           longer grows in logic with RANGE/SLIDE.
//   cq_*    CQPH, the run-time configurable engine for many queries.
// The three share only clock and reset; their ports are those of the
// individual designs, described there. Latencies: 4 cycles for wid_*,
// 7 for pane_*, 2*N_S+11 .. N_G+2*N_S+10 for cq_* (N_S = 2 at N_G = 64).
//
// The three designs are the document's; putting them in one top with
// separate ports, rather than choosing one, is this design's own choice.
module query_accel_top
  import sq_pkg::*;
#(
  parameter int unsigned N_SP = 64,
  parameter int unsigned N_G  = 64
) (
  input  logic           clk,
  input  logic           rst,
  // Window-ID circuit.
  input  logic           wid_load,
  input  attr_t          wid_wattr_start,
  input  logic           wid_in_punct,
  input  logic           wid_in_valid,
  input  tuple_t         wid_in_data,
  output logic           wid_out_punct,
  output logic           wid_out_valid,
  output attr_t          wid_out_time,
  output attr_t          wid_out_value,
  // Pane-based circuit.
  input  logic           pane_load,
  input  attr_t          pane_wattr_start,
  input  logic           pane_in_punct,
  input  logic           pane_in_valid,
  input  tuple_t         pane_in_data,
  output logic           pane_out_punct,
  output logic           pane_out_valid,
  output attr_t          pane_out_time,
  output attr_t          pane_out_value,
  // CQPH.
  input  logic           cq_in_cfg,
  input  logic           cq_in_punct,
  input  logic           cq_in_valid,
  input  tuple_t         cq_in_data,
  output logic           cq_in_ready,
  output logic           cq_out_valid,
  output tuple_t         cq_out_data,
  input  logic           cq_out_ready,
  output logic           cq_bypass_valid,
  output logic [N_G-1:0] cq_bypass_vflags,
  output tuple_t         cq_bypass_data
);

  wid_query u_wid (
    .clk, .rst, .load(wid_load), .wattr_start(wid_wattr_start),
    .in_punct(wid_in_punct), .in_valid(wid_in_valid), .in_data(wid_in_data),
    .out_punct(wid_out_punct), .out_valid(wid_out_valid),
    .out_time(wid_out_time), .out_value(wid_out_value)
  );

  pane_query u_pane (
    .clk, .rst, .load(pane_load), .wattr_start(pane_wattr_start),
    .in_punct(pane_in_punct), .in_valid(pane_in_valid), .in_data(pane_in_data),
    .out_punct(pane_out_punct), .out_valid(pane_out_valid),
    .out_time(pane_out_time), .out_value(pane_out_value)
  );

  cqph #(.N_SP(N_SP), .N_G(N_G)) u_cqph (
    .clk, .rst, .in_cfg(cq_in_cfg), .in_punct(cq_in_punct), .in_valid(cq_in_valid),
    .in_data(cq_in_data), .in_ready(cq_in_ready), .out_valid(cq_out_valid),
    .out_data(cq_out_data), .out_ready(cq_out_ready), .bypass_valid(cq_bypass_valid),
    .bypass_vflags(cq_bypass_vflags), .bypass_data(cq_bypass_data)
  );

endmodule
