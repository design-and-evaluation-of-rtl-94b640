// CQPH: Configurable Query Processing Hardware for data streams.
//
// One fixed circuit runs many sliding-window aggregate queries of the form
//   SELECT time, group, AGG(attr) FROM S [RANGE r SLIDE s]
//   WHERE <boolean expression> GROUP BY <attribute>
// at one tuple per clock, and queries are added or changed at run time by
// streaming configuration tuples through the same input, one cycle per
// configurable module. The data flow has no loops:
//   shared selection   N_SP predicates shared by N_G Boolean expression
//                      trees, one valid flag per query (2 cycles);
//   group-by managers  a systolic chain of N_G cells, each routing the
//                      tuples of one group (or of one query without GROUP
//                      BY) to its aggregation pipeline (1 cycle per hop);
//   aggregation        N_G pipelines of PLQ, pane buffer and WLQ
//   pipelines          (6 cycles);
//   union              per-pipeline FIFOs, round-robin output through N_S
//                      two-cycle stages (2*N_S + 2 cycles).
// From the punctuation that closes a window the first result leaves after
// 2*N_S + 11 cycles and the last after N_G + 2*N_S + 10.
//
// Interface: in_cfg / in_punct / in_valid qualify in_data (a configuration
// tuple, a punctuation carrying its timestamp, or a data tuple). in_ready is
// the union's admission control; the source must not present a tuple
// while it is low. out_valid/out_data give results {pipeline index, group
// value, window end, aggregate} as four 32-bit words, most significant
// first; out_ready is the output channel's acceptance (see union_rr).
// bypass_* show tuples still flagged for a query after the last group-by
// manager: groups beyond the provisioned managers, left to a host.
//
// Configuration IDs: predicate i is i; reducer j of tree t is
// N_SP + t*(N_SP-1) + j; group-by manager g, PLQ g and WLQ g follow (see
// sq_pkg). Register layouts are described in each module.
//
// Module structure, latencies and static parameters follow the document.
// The configuration tuple format, the result format, the FIFO depth and the
// admission margin are this design's own.
module cqph
  import sq_pkg::*;
#(
  parameter int unsigned N_SP        = 64,
  parameter int unsigned N_G         = 64,
  parameter int unsigned N_S         = (N_G <= 8) ? 1 : 2,
  parameter int unsigned PB_DEPTH    = 2048,
  parameter int unsigned FIFO_DEPTH  = 128,
  parameter int unsigned FIFO_MARGIN = N_G + 16
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           in_cfg,
  input  logic           in_punct,
  input  logic           in_valid,
  input  tuple_t         in_data,
  output logic           in_ready,
  output logic           out_valid,
  output tuple_t         out_data,
  input  logic           out_ready,
  output logic           bypass_valid,
  output logic [N_G-1:0] bypass_vflags,
  output tuple_t         bypass_data
);

  // Shared selection.
  logic           sel_cfg, sel_punct;
  logic [N_G-1:0] sel_vflags;
  tuple_t         sel_data;

  shared_selection #(.N_SP(N_SP), .N_Q(N_G)) u_sel (
    .clk, .rst, .in_cfg, .in_punct, .in_valid, .in_data,
    .out_cfg(sel_cfg), .out_punct(sel_punct), .out_vflags(sel_vflags), .out_data(sel_data)
  );

  // Group-by manager chain; position 0 is the selection output.
  logic           ch_cfg    [N_G+1];
  logic           ch_punct  [N_G+1];
  logic [N_G-1:0] ch_vflags [N_G+1];
  tuple_t         ch_data   [N_G+1];

  assign ch_cfg[0]    = sel_cfg;
  assign ch_punct[0]  = sel_punct;
  assign ch_vflags[0] = sel_vflags;
  assign ch_data[0]   = sel_data;

  logic [N_G-1:0] res_push;
  tuple_t         res_data [N_G];

  for (genvar g = 0; g < N_G; g++) begin : g_col
    logic   n_cfg, n_punct, n_valid;
    tuple_t n_data;
    attr_t  group_val;
    logic   group_set;
    logic   r_eos, r_valid;
    attr_t  r_time, r_value;

    groupby_manager #(.N_Q(N_G), .ID(id_gm(N_SP, N_G, g))) u_gm (
      .clk, .rst,
      .w_cfg(ch_cfg[g]), .w_punct(ch_punct[g]), .w_vflags(ch_vflags[g]), .w_data(ch_data[g]),
      .e_cfg(ch_cfg[g+1]), .e_punct(ch_punct[g+1]), .e_vflags(ch_vflags[g+1]), .e_data(ch_data[g+1]),
      .n_cfg, .n_punct, .n_valid, .n_data, .group_val, .group_set
    );

    aggregation_pipeline #(
      .PLQ_ID(id_plq(N_SP, N_G, g)), .WLQ_ID(id_wlq(N_SP, N_G, g)), .PB_DEPTH(PB_DEPTH)
    ) u_pipe (
      .clk, .rst, .in_cfg(n_cfg), .in_punct(n_punct), .in_valid(n_valid), .in_data(n_data),
      .out_eos(r_eos), .out_valid(r_valid), .out_time(r_time), .out_value(r_value)
    );

    assign res_push[g] = r_eos && r_valid;
    assign res_data[g] = {ATTR_W'(g), group_set ? group_val : '0, r_time, r_value};
  end

  // Union.
  union_rr #(
    .N(N_G), .N_S(N_S), .DEPTH(FIFO_DEPTH), .MARGIN(FIFO_MARGIN), .W(TUPLE_W)
  ) u_union (
    .clk, .rst, .push(res_push), .din(res_data), .out_ready,
    .out_valid, .out_data, .admit(in_ready)
  );

  // Tuples no group-by manager claimed.
  assign bypass_valid  = |ch_vflags[N_G];
  assign bypass_vflags = ch_vflags[N_G];
  assign bypass_data   = ch_data[N_G];

endmodule
