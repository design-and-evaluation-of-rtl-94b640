// N-way union of CQPH: merges the result streams of N aggregation pipelines
// into one output stream.
//
// Every source writes its results into its own FIFO. Each cycle in which
// the output accepts data (out_ready), a round-robin arbiter picks the next
// non-empty FIFO after the one served last and removes its head. The chosen
// word then crosses an N_S-stage pipelined multiplexer: each stage ORs
// groups of G words (G the smallest integer with G**N_S >= N; only the
// chosen word is non-zero) and spends two cycles, a group register and a
// retiming register, which shortens the critical path of wide unions.
//
// Admission control: admit is low while any FIFO holds more than
// DEPTH - MARGIN entries. The input interface of the engine must stop
// accepting tuples then, so that results still in flight find room and no
// result is lost inside the union.
//
// Timing: a result pushed on one edge can leave 2*N_S + 2 edges later
// (FIFO write, arbitration, 2 cycles per stage); one result per cycle.
// out_ready is sampled at arbitration: the output channel must accept what
// appears 2*N_S cycles later.
//
// FIFOs, round-robin forwarding, admission control and N_S pipeline
// stages of two cycles follow the document; the FIFO depth, the margin,
// the group multiplexer structure and the meaning of out_ready are this
// design's own.
module union_rr #(
  parameter int unsigned N      = 64,
  parameter int unsigned N_S    = 2,
  parameter int unsigned DEPTH  = 128,
  parameter int unsigned MARGIN = 96,
  parameter int unsigned W      = 128
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] push,
  input  logic [W-1:0] din [N],
  input  logic         out_ready,
  output logic         out_valid,
  output logic [W-1:0] out_data,
  output logic         admit
);

  localparam int unsigned CW = $clog2(DEPTH) + 1;
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  function automatic int unsigned group_size(int unsigned n, int unsigned s);
    int unsigned g = 1;
    int unsigned p;
    do begin
      g++;
      p = 1;
      for (int unsigned k = 0; k < s; k++) p = p * g;
    end while (p < n);
    return g;
  endfunction

  localparam int unsigned G = group_size(N, N_S);

  function automatic int unsigned level_cnt(int unsigned n, int unsigned s);
    int unsigned c = n;
    for (int unsigned k = 0; k < s; k++) c = (c + G - 1) / G;
    return c;
  endfunction

  // FIFOs.
  logic [W-1:0]  head  [N];
  logic [N-1:0]  empty;
  logic [N-1:0]  pop;
  logic [CW-1:0] count [N];

  for (genvar i = 0; i < N; i++) begin : g_fifo
    sync_fifo #(.DEPTH(DEPTH), .W(W)) u_fifo (
      .clk, .rst, .push(push[i]), .din(din[i]), .pop(pop[i]),
      .dout(head[i]), .empty(empty[i]), .count(count[i])
    );
  end

  // Round-robin arbiter.
  logic [IW-1:0] ptr;
  logic [IW-1:0] gidx;
  logic          gany;

  always_comb begin
    gidx = '0;
    gany = 1'b0;
    for (int k = N - 1; k >= 0; k--) begin
      logic [IW-1:0] idx;
      idx = IW'((int'(ptr) + k) % N);
      if (!empty[idx]) begin
        gidx = idx;
        gany = 1'b1;
      end
    end
    pop = '0;
    if (gany && out_ready) pop[gidx] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) ptr <= '0;
    else if (gany && out_ready) ptr <= (int'(gidx) == N - 1) ? '0 : gidx + 1'b1;
  end

  // Pipelined multiplexer: level 0 holds the masked heads.
  logic [W:0] lvl [N_S+1][N];

  for (genvar i = 0; i < N; i++) begin : g_l0
    logic [W:0] l0;
    always_ff @(posedge clk) begin
      if (rst) l0 <= '0;
      else     l0 <= pop[i] ? {1'b1, head[i]} : '0;
    end
    assign lvl[0][i] = l0;
  end

  for (genvar s = 0; s < N_S; s++) begin : g_stage
    localparam int unsigned CIN  = level_cnt(N, s);
    localparam int unsigned COUT = level_cnt(N, s + 1);
    for (genvar j = 0; j < N; j++) begin : g_grp
      if (j < COUT) begin : g_used
        logic [W:0] orv, r1, r2;
        always_comb begin
          orv = '0;
          for (int unsigned k = 0; k < G; k++) begin
            if (j * G + k < CIN) orv = orv | lvl[s][j*G+k];
          end
        end
        always_ff @(posedge clk) begin
          if (rst) begin
            r1 <= '0;
            r2 <= '0;
          end else begin
            r1 <= orv;
            r2 <= r1;
          end
        end
        assign lvl[s+1][j] = r2;
      end else begin : g_unused
        assign lvl[s+1][j] = '0;
      end
    end
  end

  assign {out_valid, out_data} = lvl[N_S][0];

  // Admission control.
  always_ff @(posedge clk) begin
    if (rst) admit <= 1'b1;
    else begin
      admit <= 1'b1;
      for (int i = 0; i < N; i++) begin
        if (count[i] > CW'(DEPTH - MARGIN)) admit <= 1'b0;
      end
    end
  end

endmodule
