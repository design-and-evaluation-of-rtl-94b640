// Selection predicate module of the CQPH shared selection (stage 1).
//
// A run-time configurable predicate "<attribute> <op> <literal>" with op one
// of =, !=, >, >=, <, <=. It evaluates every incoming tuple and stores the
// outcome in a 1-bit register; the Boolean expression trees of any number
// of queries read that register, so a predicate used by several queries is
// evaluated once.
//
// Configuration: a configuration tuple (cfg_valid high, select 0) whose target
// equals ID loads, from its payload, literal [31:0], op [34:32], attribute
// index [36:35] and enable [37] in one cycle. A disabled predicate yields 0.
//
// Timing: result is registered, one cycle after data.
//
// The predicate forms come from the document's expression grammar; the
// payload layout and the signed comparison are this design's own.
module sel_predicate
  import sq_pkg::*;
#(
  parameter int unsigned ID = 0
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   cfg_valid,
  input  tuple_t cfg_data,
  input  tuple_t data,
  output logic   result
);

  cfg_t       cfg;
  logic       en_q;
  cmp_op_e    op_q;
  logic [1:0] attr_q;
  attr_t      lit_q;
  attr_t      a;
  logic       hit;

  assign cfg = cfg_t'(cfg_data);
  assign a   = get_attr(data, attr_q);

  always_comb begin
    unique case (op_q)
      OP_EQ:   hit = (a == lit_q);
      OP_NE:   hit = (a != lit_q);
      OP_GT:   hit = ($signed(a) >  $signed(lit_q));
      OP_GE:   hit = ($signed(a) >= $signed(lit_q));
      OP_LT:   hit = ($signed(a) <  $signed(lit_q));
      OP_LE:   hit = ($signed(a) <= $signed(lit_q));
      default: hit = 1'b0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      en_q   <= 1'b0;
      op_q   <= OP_EQ;
      attr_q <= '0;
      lit_q  <= '0;
    end else if (cfg_valid && cfg.target == CFG_ID_W'(ID) && cfg.sel == '0) begin
      lit_q  <= cfg.payload[31:0];
      op_q   <= cmp_op_e'(cfg.payload[34:32]);
      attr_q <= cfg.payload[36:35];
      en_q   <= cfg.payload[37];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) result <= 1'b0;
    else     result <= en_q && hit;
  end

endmodule
