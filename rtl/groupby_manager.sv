// Group-by Manager (GM): one cell of the CQPH systolic group-by array.
//
// Group-by is done by routing. GMs form a linear chain: each takes a tuple
// from its West_in port and passes it to East_out one cycle later. A GM is
// configured with a query ID (qid) and looks only at that query's valid
// flag. Without GROUP BY, it claims every tuple whose flag is set. With
// GROUP BY, the first such tuple sets its group register (previously NULL)
// to the tuple's grouping attribute, and from then on it claims only
// tuples of that group. A claimed tuple is copied to North_out (its
// aggregation pipeline) and its qid flag is cleared on East_out, so later
// GMs of the same query see only unclaimed groups. Each aggregation
// pipeline thus receives one group; tuples still flagged after the last GM
// are the "bypassed" tuples of groups beyond the provisioned GMs.
//
// Punctuations and configuration tuples go to both North and East.
//
// Configuration: a tuple with target ID, select 0, loads enable [0], GROUP BY [1],
// grouping attribute [3:2] and qid [15:8], and resets the group to NULL.
//
// Timing: one cycle per hop, all outputs registered. group_val/group_set
// expose the claimed group.
//
// The routing rules are the document's; the payload layout and the
// handling of punctuations are this design's own.
module groupby_manager
  import sq_pkg::*;
#(
  parameter int unsigned N_Q = 64,
  parameter int unsigned ID  = 0
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           w_cfg,
  input  logic           w_punct,
  input  logic [N_Q-1:0] w_vflags,
  input  tuple_t         w_data,
  output logic           e_cfg,
  output logic           e_punct,
  output logic [N_Q-1:0] e_vflags,
  output tuple_t         e_data,
  output logic           n_cfg,
  output logic           n_punct,
  output logic           n_valid,
  output tuple_t         n_data,
  output attr_t          group_val,
  output logic           group_set
);

  localparam int unsigned QW = (N_Q > 1) ? $clog2(N_Q) : 1;

  cfg_t          cfg;
  logic          en_q, grp_by_q;
  logic [1:0]    gattr_q;
  logic [QW-1:0] qid_q;
  attr_t         gval;
  logic          mine, claim;

  assign cfg  = cfg_t'(w_data);
  assign gval = get_attr(w_data, gattr_q);
  assign mine = en_q && !w_cfg && w_vflags[qid_q];

  always_comb begin
    claim = 1'b0;
    if (mine) begin
      if (!grp_by_q)                    claim = 1'b1;
      else if (!group_set)              claim = 1'b1;
      else if (group_val == gval)       claim = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      en_q      <= 1'b0;
      grp_by_q  <= 1'b0;
      gattr_q   <= '0;
      qid_q     <= '0;
      group_val <= '0;
      group_set <= 1'b0;
    end else if (w_cfg && cfg.target == CFG_ID_W'(ID) && cfg.sel == '0) begin
      en_q      <= cfg.payload[0];
      grp_by_q  <= cfg.payload[1];
      gattr_q   <= cfg.payload[3:2];
      qid_q     <= cfg.payload[8 +: QW];
      group_set <= 1'b0;
    end else if (claim && grp_by_q && !group_set) begin
      group_val <= gval;
      group_set <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      e_cfg    <= 1'b0;
      e_punct  <= 1'b0;
      e_vflags <= '0;
      e_data   <= '0;
      n_cfg    <= 1'b0;
      n_punct  <= 1'b0;
      n_valid  <= 1'b0;
      n_data   <= '0;
    end else begin
      e_cfg    <= w_cfg;
      e_punct  <= w_punct;
      e_vflags <= w_vflags;
      if (claim) e_vflags[qid_q] <= 1'b0;
      e_data   <= w_data;
      n_cfg    <= w_cfg;
      n_punct  <= w_punct;
      n_valid  <= claim;
      n_data   <= w_data;
    end
  end

endmodule
