// Aggregation pipeline of CQPH: pane-level sub-query, pane buffer and
// window-level sub-query in series.
//
// The pipeline receives the tuples its group-by manager claimed, together
// with every punctuation and configuration tuple. The PLQ reduces them to
// one aggregate per pane, the pane buffer keeps the recent panes, and the
// WLQ combines the last panes of each window into the window result.
//
// Timing: a punctuation that closes a window produces out_eos six cycles
// after it enters (two cycles PLQ, three cycles buffer write, pointer
// update and read, one cycle WLQ aggregation). Issue rate one tuple/cycle.
module aggregation_pipeline
  import sq_pkg::*;
#(
  parameter int unsigned PLQ_ID   = 0,
  parameter int unsigned WLQ_ID   = 1,
  parameter int unsigned PB_DEPTH = 2048
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   in_cfg,
  input  logic   in_punct,
  input  logic   in_valid,
  input  tuple_t in_data,
  output logic   out_eos,
  output logic   out_valid,
  output attr_t  out_time,
  output attr_t  out_value
);

  localparam int unsigned AW = $clog2(PB_DEPTH);

  logic              p_cfg, p_eos, p_valid;
  tuple_t            p_data;
  logic              we;
  logic [AW-1:0]     wr_addr, rd_addr;
  logic [2*ATTR_W:0] wdata, rdata;

  cqph_plq #(.ID(PLQ_ID)) u_plq (
    .clk, .rst, .in_cfg, .in_punct, .in_valid, .in_data,
    .out_cfg(p_cfg), .out_eos(p_eos), .out_valid(p_valid), .out_data(p_data)
  );

  pane_buffer #(.DEPTH(PB_DEPTH), .W(2 * ATTR_W + 1)) u_buf (
    .clk, .we, .waddr(wr_addr), .wdata, .raddr(rd_addr), .rdata
  );

  cqph_wlq #(.ID(WLQ_ID), .ADDR_W(AW)) u_wlq (
    .clk, .rst, .in_cfg(p_cfg), .in_eos(p_eos), .in_valid(p_valid), .in_data(p_data),
    .we, .wr_addr, .wdata, .rd_addr, .rdata,
    .out_eos, .out_valid, .out_time, .out_value
  );

endmodule
