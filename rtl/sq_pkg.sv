// Shared types and constants of the stream query processors.
//
// A tuple is 128 bits wide and holds four 32-bit attributes. Attribute 0
// occupies the most significant word: for the Trades stream that is
// <Symbol, Price, Volume, Time>, packed in the order of the stream schema.
// The field layouts of configuration tuples, the aggregate function codes and
// the comparison and reduction operators are this design's own encodings;
// the set of functions and operators follows the document. Some named
// constants (attribute positions, N_ATTR) are not used by every module that
// imports the package; a linter reports them as unused parameters there.
package sq_pkg;

  localparam int unsigned TUPLE_W = 128;
  localparam int unsigned ATTR_W  = 32;
  localparam int unsigned N_ATTR  = 4;

  typedef logic [ATTR_W-1:0]  attr_t;
  typedef logic [TUPLE_W-1:0] tuple_t;

  localparam logic [1:0] ATTR_SYMBOL = 2'd0;
  localparam logic [1:0] ATTR_PRICE  = 2'd1;
  localparam logic [1:0] ATTR_VOLUME = 2'd2;
  localparam logic [1:0] ATTR_TIME   = 2'd3;

  // Aggregate functions of the aggregation module (COUNT, SUM, MIN, MAX).
  typedef enum logic [1:0] {
    AGG_COUNT = 2'd0,
    AGG_SUM   = 2'd1,
    AGG_MIN   = 2'd2,
    AGG_MAX   = 2'd3
  } agg_fn_e;

  // Comparison of a selection predicate.
  typedef enum logic [2:0] {
    OP_EQ = 3'd0,
    OP_NE = 3'd1,
    OP_GT = 3'd2,
    OP_GE = 3'd3,
    OP_LT = 3'd4,
    OP_LE = 3'd5
  } cmp_op_e;

  // Operation of a binary reducer.
  typedef enum logic [2:0] {
    BR_FALSE = 3'd0,
    BR_TRUE  = 3'd1,
    BR_LEFT  = 3'd2,
    BR_AND   = 3'd3,
    BR_OR    = 3'd4
  } br_op_e;

  // Configuration tuple carried in the data field while the configuration
  // flag is set: a target module ID, a register select and a payload.
  localparam int unsigned CFG_ID_W  = 16;
  localparam int unsigned CFG_SEL_W = 4;
  localparam int unsigned CFG_PAY_W = TUPLE_W - CFG_ID_W - CFG_SEL_W;

  typedef struct packed {
    logic [CFG_ID_W-1:0]  target;
    logic [CFG_SEL_W-1:0] sel;
    logic [CFG_PAY_W-1:0] payload;
  } cfg_t;

  // Select attribute idx of a tuple (attribute 0 is the top word).
  function automatic attr_t get_attr(tuple_t t, logic [1:0] idx);
    return t[TUPLE_W-1-ATTR_W*idx -: ATTR_W];
  endfunction

  function automatic int unsigned ceil_div(int unsigned a, int unsigned b);
    return (a + b - 1) / b;
  endfunction

  function automatic int unsigned gcd(int unsigned a, int unsigned b);
    int unsigned x = a;
    int unsigned y = b;
    while (y != 0) begin
      int unsigned t = x % y;
      x = y;
      y = t;
    end
    return x;
  endfunction

  // Number of window-aggregation modules of the WID design,
  // ceil((RANGE + SLACK) / SLIDE): the windows still open while tuples up
  // to SLACK late can arrive (10 for RANGE 600, SLIDE 60 without slack).
  function automatic int unsigned n_win(int unsigned range, int unsigned slide,
                                        int unsigned slack);
    return ceil_div(slack + range, slide);
  endfunction

  // Number of PLQ modules of the pane-based design: ceil(SLACK/pane) + 1.
  function automatic int unsigned n_plq(int unsigned slack, int unsigned slide_pane);
    return ceil_div(slack, slide_pane) + 1;
  endfunction

  // Configuration IDs of the CQPH modules: predicates first, then the
  // reducers of each Boolean expression tree, then the group-by managers,
  // the pane-level and the window-level sub-queries.
  function automatic int unsigned id_br(int unsigned n_sp, int unsigned tree);
    return n_sp + tree * (n_sp - 1);
  endfunction
  function automatic int unsigned id_gm(int unsigned n_sp, int unsigned n_g, int unsigned g);
    return n_sp + n_g * (n_sp - 1) + g;
  endfunction
  function automatic int unsigned id_plq(int unsigned n_sp, int unsigned n_g, int unsigned g);
    return n_sp + n_g * (n_sp - 1) + n_g + g;
  endfunction
  function automatic int unsigned id_wlq(int unsigned n_sp, int unsigned n_g, int unsigned g);
    return n_sp + n_g * (n_sp - 1) + 2 * n_g + g;
  endfunction

endpackage
