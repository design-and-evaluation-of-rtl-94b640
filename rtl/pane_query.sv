// Scalable pane-based sliding-window aggregate query circuit for the query
// "count the UBSN trades of the last RANGE seconds, every SLIDE seconds".
//
// The query is split into two sub-queries. The pane-level sub-query (PLQ)
// counts matching tuples per pane, a tumbling window of GCD(RANGE, SLIDE)
// seconds; out-of-order arrival within SLACK is handled by N_PLQ open pane
// instances, each closed by a punctuation. The window-level sub-query (WLQ)
// sums the last PANES = RANGE/GCD pane counts for every window, reading
// them from a pane buffer. The number of aggregation circuits is therefore
// N_PLQ + 1 whatever the RANGE/SLIDE ratio; only the buffer grows with it.
//
// Pipeline, issue rate 1 tuple/cycle, latency 7 cycles from a closing
// punctuation to the window result:
//   Stage 1  Symbol == SYMBOL AND data valid, N_PLQ PLQ control modules;
//            their eis/eos go into the valid/punctuation registers.
//   Stage 2  N_PLQ PLQ aggregate modules (result <pane end, aggregate>).
//   Stage 3  2-way (N_PLQ-way) union: binary encoder + multiplexer.
//   Stage 4  WLQ control and pane buffer (three cycles: write pointer,
//            read pointer, buffer read).
//   Stage 5  WLQ aggregate module.
// Output: out_punct for one cycle per closed window, with out_time the
// window end, out_value the aggregate, out_valid when any pane contributed.
//
// Stage contents, N_PLQ, PANES and the aggregate pairing of the sub-queries
// (COUNT then SUM) follow the document. The buffer depth (next power of
// two holding PANES+2 entries), the attribute positions, the load port and
// skipping empty panes in the WLQ are this design's own.
module pane_query
  import sq_pkg::*;
#(
  parameter int unsigned RANGE      = 600,
  parameter int unsigned SLIDE      = 60,
  parameter int unsigned SLACK      = 60,
  parameter int unsigned SLIDE_PLQ  = gcd(RANGE, SLIDE),
  parameter int unsigned N_PLQ      = n_plq(SLACK, SLIDE_PLQ),
  parameter int unsigned PANES      = RANGE / SLIDE_PLQ,
  parameter int unsigned PB_DEPTH   = 2 ** $clog2(PANES + 2),
  parameter attr_t       SYMBOL     = 32'h5542_534E,  // "UBSN"
  parameter agg_fn_e     PLQ_FN     = AGG_COUNT,
  parameter agg_fn_e     WLQ_FN     = AGG_SUM,
  parameter logic [1:0]  VALUE_ATTR = ATTR_PRICE
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   load,
  input  attr_t  wattr_start,
  input  logic   in_punct,
  input  logic   in_valid,
  input  tuple_t in_data,
  output logic   out_punct,
  output logic   out_valid,
  output attr_t  out_time,
  output attr_t  out_value
);

  localparam int unsigned AW = $clog2(PB_DEPTH);

  // Stage 1: selection and PLQ control.
  logic         sel_valid;
  attr_t        in_time;
  logic [N_PLQ-1:0] c_eis, c_eos;
  attr_t        c_end [N_PLQ];

  assign sel_valid = in_valid && (get_attr(in_data, ATTR_SYMBOL) == SYMBOL);
  assign in_time   = get_attr(in_data, ATTR_TIME);

  logic [N_PLQ-1:0] s1_eis, s1_eos;
  attr_t            s1_end [N_PLQ];
  attr_t            s1_value;

  for (genvar i = 0; i < N_PLQ; i++) begin : g_ctrl
    plq_ctrl #(.SLIDE_PLQ(SLIDE_PLQ), .N_PLQ(N_PLQ), .IDX(i)) u_ctrl (
      .clk, .rst, .load, .wattr_start, .punct(in_punct), .valid(sel_valid),
      .wattr(in_time), .eis(c_eis[i]), .eos(c_eos[i]), .pane_end(c_end[i])
    );
    always_ff @(posedge clk) begin
      if (rst) s1_end[i] <= '0;
      else     s1_end[i] <= c_end[i];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      s1_eis   <= '0;
      s1_eos   <= '0;
      s1_value <= '0;
    end else begin
      s1_eis   <= c_eis;
      s1_eos   <= c_eos;
      s1_value <= get_attr(in_data, VALUE_ATTR);
    end
  end

  // Stage 2: PLQ aggregate modules.
  logic [N_PLQ-1:0]    p_eos, p_valid;
  logic [2*ATTR_W-1:0] p_data [N_PLQ];

  for (genvar i = 0; i < N_PLQ; i++) begin : g_plq
    attr_t t_time, t_value;
    agg_unit #(.W(ATTR_W)) u_agg (
      .clk, .rst, .fn(PLQ_FN), .eis(s1_eis[i]), .eos(s1_eos[i]), .din(s1_value),
      .out_eos(p_eos[i]), .out_valid(p_valid[i]), .out_value(t_value)
    );
    always_ff @(posedge clk) begin
      if (rst) t_time <= '0;
      else     t_time <= s1_end[i];
    end
    assign p_data[i] = {t_time, t_value};
  end

  // Stage 3: union of the PLQ results.
  logic                s3_punct, s3_valid;
  logic [2*ATTR_W-1:0] s3_data;

  union_mux #(.N(N_PLQ), .W(2 * ATTR_W)) u_union (
    .clk, .rst, .in_punct(p_eos), .in_valid(p_valid), .in_data(p_data),
    .out_punct(s3_punct), .out_valid(s3_valid), .out_data(s3_data)
  );

  // Stage 4: WLQ control and pane buffer.
  logic [AW-1:0]       wr_addr, rd_addr;
  logic                w_eis, w_eos;
  logic [2*ATTR_W:0]   rdata;
  logic                s4_eis, s4_eos;

  wlq_ctrl #(.ADDR_W(AW), .CNT_W(16)) u_wctrl (
    .clk, .rst, .clr(load), .panes(16'(PANES)), .pane_in(s3_punct),
    .wr_addr, .rd_addr, .eis(w_eis), .eos(w_eos)
  );

  pane_buffer #(.DEPTH(PB_DEPTH), .W(2 * ATTR_W + 1)) u_buf (
    .clk, .we(s3_punct), .waddr(wr_addr), .wdata({s3_valid, s3_data}),
    .raddr(rd_addr), .rdata
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      s4_eis <= 1'b0;
      s4_eos <= 1'b0;
    end else begin
      s4_eis <= w_eis;
      s4_eos <= w_eos;
    end
  end

  // Stage 5: WLQ aggregate module. Only non-empty panes are accumulated.
  logic  r_valid;
  attr_t r_time, r_value;
  assign {r_valid, r_time, r_value} = rdata;

  agg_unit #(.W(ATTR_W)) u_wagg (
    .clk, .rst, .fn(WLQ_FN), .eis(s4_eis && r_valid), .eos(s4_eos), .din(r_value),
    .out_eos(out_punct), .out_valid(out_valid), .out_value
  );

  always_ff @(posedge clk) begin
    if (rst)         out_time <= '0;
    else if (s4_eos) out_time <= r_time;
  end

endmodule
