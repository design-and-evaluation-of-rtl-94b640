// Shared selection module of CQPH.
//
// Stage 1 holds N_SP selection predicate modules, each evaluating one
// configured predicate on the incoming tuple into a 1-bit register. Stage 2
// holds N_Q Boolean expression trees, one per query; each combines any of
// the shared predicate results into that query's valid flag. The tuple and
// its configuration/punctuation flags are forwarded unchanged; a query's
// valid flag is set only for a data tuple (in_valid) whose tree is true.
//
// Configuration: configuration tuples are decoded by every predicate and
// reducer at the module input and forwarded downstream. Predicate i has ID
// i; reducer j of tree t has ID N_SP + t*(N_SP-1) + j.
//
// Timing: two cycles, issue rate one tuple per cycle.
module shared_selection
  import sq_pkg::*;
#(
  parameter int unsigned N_SP = 64,
  parameter int unsigned N_Q  = 64
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           in_cfg,
  input  logic           in_punct,
  input  logic           in_valid,
  input  tuple_t         in_data,
  output logic           out_cfg,
  output logic           out_punct,
  output logic [N_Q-1:0] out_vflags,
  output tuple_t         out_data
);

  // Stage 1.
  logic [N_SP-1:0] pred;
  logic            s1_cfg, s1_punct, s1_valid;
  tuple_t          s1_data;

  for (genvar i = 0; i < N_SP; i++) begin : g_sp
    sel_predicate #(.ID(i)) u_sp (
      .clk, .rst, .cfg_valid(in_cfg), .cfg_data(in_data), .data(in_data),
      .result(pred[i])
    );
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      s1_cfg   <= 1'b0;
      s1_punct <= 1'b0;
      s1_valid <= 1'b0;
      s1_data  <= '0;
    end else begin
      s1_cfg   <= in_cfg;
      s1_punct <= in_punct;
      s1_valid <= in_valid && !in_cfg && !in_punct;
      s1_data  <= in_data;
    end
  end

  // Stage 2.
  logic [N_Q-1:0] tree_y;

  for (genvar t = 0; t < N_Q; t++) begin : g_tree
    bool_expr_tree #(.N_SP(N_SP), .ID_BASE(id_br(N_SP, t))) u_tree (
      .clk, .rst, .cfg_valid(in_cfg), .cfg_data(in_data), .pred, .y(tree_y[t])
    );
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_cfg    <= 1'b0;
      out_punct  <= 1'b0;
      out_vflags <= '0;
      out_data   <= '0;
    end else begin
      out_cfg    <= s1_cfg;
      out_punct  <= s1_punct;
      out_vflags <= s1_valid ? tree_y : '0;
      out_data   <= s1_data;
    end
  end

endmodule
