// Pane-level sub-query (PLQ) module of a CQPH aggregation pipeline.
//
// The module computes one aggregate per pane, a tumbling time window that
// starts at time_start and moves by pane_move (SLIDE of the panes). A
// control part registers, each cycle, eis for a data tuple with
// pane_begin < timestamp <= pane_end and eos for a punctuation with
// timestamp >= pane_end, which also moves the pane forward. The aggregation
// module (agg_unit) then accumulates the configured attribute and, on eos,
// emits <pane end, pane aggregate>.
//
// Configuration (two tuples with target ID): select 0 loads time_start
// [31:0], pane range [63:32] and pane move [95:64]; select 1 loads enable
// [0], aggregate function [2:1], value attribute [4:3] and time attribute
// [6:5]. A disabled PLQ ignores tuples and punctuations.
//
// Output bus: out_eos marks a closed pane with out_valid = non-empty and
// out_data = {64'b0, pane end, aggregate}; out_cfg forwards configuration
// tuples (out_data then holds the tuple) to the window-level sub-query.
//
// Timing: two cycles from a closing punctuation to out_eos.
//
// The control equations follow the document's PLQ control for CQPH; the
// configuration layout is this design's own.
module cqph_plq
  import sq_pkg::*;
#(
  parameter int unsigned ID = 0
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   in_cfg,
  input  logic   in_punct,
  input  logic   in_valid,
  input  tuple_t in_data,
  output logic   out_cfg,
  output logic   out_eos,
  output logic   out_valid,
  output tuple_t out_data
);

  cfg_t       cfg;
  logic       en_q;
  agg_fn_e    fn_q;
  logic [1:0] vattr_q, tattr_q;
  attr_t      pane_begin, pane_end, pane_move;
  attr_t      ts;

  assign cfg = cfg_t'(in_data);
  assign ts  = get_attr(in_data, tattr_q);

  // Control: registered eis/eos, pane bounds.
  logic  eis_q, eos_q, cfg_q;
  attr_t end_q, val_q;
  tuple_t cfg_data_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      en_q       <= 1'b0;
      fn_q       <= AGG_COUNT;
      vattr_q    <= ATTR_PRICE;
      tattr_q    <= ATTR_TIME;
      pane_begin <= '0;
      pane_end   <= '0;
      pane_move  <= '0;
      eis_q      <= 1'b0;
      eos_q      <= 1'b0;
      end_q      <= '0;
    end else begin
      eis_q <= 1'b0;
      eos_q <= 1'b0;
      if (in_cfg) begin
        if (cfg.target == CFG_ID_W'(ID) && cfg.sel == CFG_SEL_W'(0)) begin
          pane_begin <= cfg.payload[31:0];
          pane_end   <= cfg.payload[31:0] + cfg.payload[63:32];
          pane_move  <= cfg.payload[95:64];
        end
        if (cfg.target == CFG_ID_W'(ID) && cfg.sel == CFG_SEL_W'(1)) begin
          en_q    <= cfg.payload[0];
          fn_q    <= agg_fn_e'(cfg.payload[2:1]);
          vattr_q <= cfg.payload[4:3];
          tattr_q <= cfg.payload[6:5];
        end
      end else if (en_q && in_punct) begin
        if (pane_end <= ts) begin
          eos_q      <= 1'b1;
          end_q      <= pane_end;
          pane_begin <= pane_begin + pane_move;
          pane_end   <= pane_end + pane_move;
        end
      end else if (en_q && in_valid) begin
        if (pane_begin < ts && ts <= pane_end) eis_q <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      val_q      <= '0;
      cfg_q      <= 1'b0;
      cfg_data_q <= '0;
    end else begin
      val_q      <= get_attr(in_data, vattr_q);
      cfg_q      <= in_cfg;
      cfg_data_q <= in_data;
    end
  end

  // Aggregation.
  attr_t agg_value;
  attr_t t_end;
  logic  fwd_cfg;
  tuple_t fwd_data;

  agg_unit #(.W(ATTR_W)) u_agg (
    .clk, .rst, .fn(fn_q), .eis(eis_q), .eos(eos_q), .din(val_q),
    .out_eos, .out_valid, .out_value(agg_value)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      t_end    <= '0;
      fwd_cfg  <= 1'b0;
      fwd_data <= '0;
    end else begin
      t_end    <= end_q;
      fwd_cfg  <= cfg_q;
      fwd_data <= cfg_data_q;
    end
  end

  assign out_cfg  = fwd_cfg;
  assign out_data = fwd_cfg ? fwd_data : {64'b0, t_end, agg_value};

endmodule
