// Binary reducer: one node of a CQPH Boolean expression tree.
//
// A node combines two 1-bit inputs with a run-time configured operation:
// LEFT (pass the left input, for a sub-tree that needs only one operand),
// AND, OR, or a constant TRUE/FALSE (for queries whose WHERE clause is
// absent or constant). A leaf node (LEAF = 1) takes its two inputs from the
// shared predicate results, choosing each by a configured index, so any
// predicate can feed any tree; an inner node takes the results of its two
// children.
//
// Configuration: a configuration tuple (select 0) with target ID loads op
// [2:0], left index [15:8] and right index [23:16]. Unconfigured: FALSE.
//
// Timing: y is combinational; the tree output is registered by its user.
// LEFT, AND and OR are the operations shown in the document; TRUE/FALSE,
// the index selection of leaf inputs and the payload layout are this
// design's reading of it.
module bin_reducer
  import sq_pkg::*;
#(
  parameter int unsigned ID   = 0,
  parameter int unsigned N_SP = 4,
  parameter bit          LEAF = 1'b1
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            cfg_valid,
  input  tuple_t          cfg_data,
  input  logic [N_SP-1:0] pred,
  input  logic            l_in,
  input  logic            r_in,
  output logic            y
);

  localparam int unsigned SW = (N_SP > 1) ? $clog2(N_SP) : 1;

  cfg_t          cfg;
  br_op_e        op_q;
  logic [SW-1:0] lsel_q, rsel_q;
  logic          a, b;

  assign cfg = cfg_t'(cfg_data);

  always_ff @(posedge clk) begin
    if (rst) begin
      op_q   <= BR_FALSE;
      lsel_q <= '0;
      rsel_q <= '0;
    end else if (cfg_valid && cfg.target == CFG_ID_W'(ID) && cfg.sel == '0) begin
      op_q   <= br_op_e'(cfg.payload[2:0]);
      lsel_q <= cfg.payload[8 +: SW];
      rsel_q <= cfg.payload[16 +: SW];
    end
  end

  assign a = LEAF ? pred[lsel_q] : l_in;
  assign b = LEAF ? pred[rsel_q] : r_in;

  always_comb begin
    unique case (op_q)
      BR_TRUE: y = 1'b1;
      BR_LEFT: y = a;
      BR_AND:  y = a & b;
      BR_OR:   y = a | b;
      default: y = 1'b0;
    endcase
  end

endmodule
