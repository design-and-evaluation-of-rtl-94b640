// Window-level sub-query (WLQ) module of a CQPH aggregation pipeline.
//
// Pane-aggregates arriving from the PLQ are written into the pane buffer;
// a WLQ control (wlq_ctrl) re-reads the last `panes` of them for every
// window and an aggregation module combines them, so a window of RANGE
// seconds sliding by SLIDE needs one aggregation circuit however many
// windows overlap. For a COUNT query the WLQ is configured with SUM, for
// SUM, MIN and MAX with the same function.
//
// Configuration (two tuples with target ID, taken from the PLQ output
// bus): select 0 loads the number of panes per window [15:0], clears the
// buffer pointers and, one cycle later, any partly aggregated window;
// select 1 loads enable [0] and function [2:1].
//
// Buffer interface: we/wr_addr/wdata write a pane entry {non-empty, pane
// end, aggregate}; rd_addr/rdata read it one cycle later.
//
// Timing: the PLQ result is written on the first edge, the read pointer
// moves on the second, the entry is read with its eis/eos on the third and
// the window result is registered on the fourth. out_eos marks a closed
// window, out_time is its end (the end of its last pane), out_valid is set
// when at least one non-empty pane contributed.
//
// The control algorithm is the document's; gating eis with the non-empty
// bit and the configuration layout are this design's own.
module cqph_wlq
  import sq_pkg::*;
#(
  parameter int unsigned ID     = 0,
  parameter int unsigned ADDR_W = 11
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              in_cfg,
  input  logic              in_eos,
  input  logic              in_valid,
  input  tuple_t            in_data,
  output logic              we,
  output logic [ADDR_W-1:0] wr_addr,
  output logic [2*ATTR_W:0] wdata,
  output logic [ADDR_W-1:0] rd_addr,
  input  logic [2*ATTR_W:0] rdata,
  output logic              out_eos,
  output logic              out_valid,
  output attr_t             out_time,
  output attr_t             out_value
);

  cfg_t        cfg;
  logic        en_q;
  agg_fn_e     fn_q;
  logic [15:0] panes_q;
  logic        clr;
  logic        c_eis, c_eos;
  logic        s_eis, s_eos, s_clr;

  assign cfg = cfg_t'(in_data);
  assign clr = in_cfg && cfg.target == CFG_ID_W'(ID) && cfg.sel == CFG_SEL_W'(0);

  always_ff @(posedge clk) begin
    if (rst) begin
      en_q    <= 1'b0;
      fn_q    <= AGG_SUM;
      panes_q <= 16'd1;
    end else if (in_cfg && cfg.target == CFG_ID_W'(ID)) begin
      if (cfg.sel == CFG_SEL_W'(0)) panes_q <= cfg.payload[15:0];
      if (cfg.sel == CFG_SEL_W'(1)) begin
        en_q <= cfg.payload[0];
        fn_q <= agg_fn_e'(cfg.payload[2:1]);
      end
    end
  end

  assign we    = en_q && in_eos && !in_cfg;
  assign wdata = {in_valid, in_data[2*ATTR_W-1:0]};

  wlq_ctrl #(.ADDR_W(ADDR_W), .CNT_W(16)) u_ctrl (
    .clk, .rst, .clr, .panes(panes_q), .pane_in(we),
    .wr_addr, .rd_addr, .eis(c_eis), .eos(c_eos)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      s_eis <= 1'b0;
      s_eos <= 1'b0;
      s_clr <= 1'b0;
    end else begin
      s_eis <= en_q && c_eis;
      s_eos <= en_q && c_eos;
      s_clr <= clr;
    end
  end

  logic  r_valid;
  attr_t r_time, r_value;
  assign {r_valid, r_time, r_value} = rdata;

  // A new window setting also drops any partly aggregated window.
  agg_unit #(.W(ATTR_W)) u_agg (
    .clk, .rst(rst || s_clr), .fn(fn_q), .eis(s_eis && r_valid), .eos(s_eos), .din(r_value),
    .out_eos, .out_valid, .out_value
  );

  always_ff @(posedge clk) begin
    if (rst)        out_time <= '0;
    else if (s_eos) out_time <= r_time;
  end

endmodule
