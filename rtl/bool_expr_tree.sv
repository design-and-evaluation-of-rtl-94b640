// Boolean expression tree of the CQPH shared selection (stage 2).
//
// A complete binary tree of N_SP-1 binary reducers, numbered in heap order
// (node 0 is the root, node j has children 2j+1 and 2j+2). The N_SP/2 leaf
// nodes each pick two of the N_SP shared predicate results; the tree can
// therefore express any AND/OR combination of up to N_SP predicates, such
// as (A=1 OR B>2) AND C<3. Node j has configuration ID ID_BASE + j.
//
// Timing: y is combinational from the registered predicate results; the
// shared selection registers it as the query's valid flag. N_SP must be a
// power of two and at least 2.
module bool_expr_tree
  import sq_pkg::*;
#(
  parameter int unsigned N_SP    = 64,
  parameter int unsigned ID_BASE = 0
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            cfg_valid,
  input  tuple_t          cfg_data,
  input  logic [N_SP-1:0] pred,
  output logic            y
);

  localparam int unsigned N_NODE = N_SP - 1;
  localparam int unsigned FIRST_LEAF = N_SP / 2 - 1;

  logic [N_NODE-1:0] node_y;

  for (genvar j = 0; j < N_NODE; j++) begin : g_node
    if (j >= FIRST_LEAF) begin : g_leaf
      bin_reducer #(.ID(ID_BASE + j), .N_SP(N_SP), .LEAF(1'b1)) u_br (
        .clk, .rst, .cfg_valid, .cfg_data, .pred, .l_in(1'b0), .r_in(1'b0),
        .y(node_y[j])
      );
    end else begin : g_inner
      bin_reducer #(.ID(ID_BASE + j), .N_SP(N_SP), .LEAF(1'b0)) u_br (
        .clk, .rst, .cfg_valid, .cfg_data, .pred,
        .l_in(node_y[2*j+1]), .r_in(node_y[2*j+2]), .y(node_y[j])
      );
    end
  end

  assign y = node_y[0];

endmodule
