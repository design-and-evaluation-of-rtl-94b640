// Testbench of cqph with four predicates, four queries / pipelines, 16-entry
// pane buffers and 8-entry union FIFOs. The engine is configured only by
// configuration tuples on its input:
//   query 0: Symbol == 1, COUNT over 4 panes (pipeline 0);
//   query 1: Symbol == 2 AND Price > 0, SUM(Price) over 2 panes (pipeline 1);
//   query 2: Volume >= 0 (every tuple) GROUP BY Symbol; pipelines 2 (MAX)
//            and 3 (MIN, single-pane windows) take the first two symbols
//            seen, tuples of the third symbol leave on the bypass port.
// Panes are 3 time units. The stream is in order; each pane gets random
// tuples and then a punctuation with the pane end. A reference model
// selects, routes and aggregates every tuple and predicts each pipeline's
// results, which must come out in order per pipeline with the right group,
// window end and aggregate. While the output is always ready the
// punctuation-to-result latency must be 2*N_S+11+g cycles for pipeline g
// (lower bound 2*N_S+11, upper N_G+2*N_S+10). A later phase stalls the
// output so that the union's admission control pauses the input; the
// source then waits for in_ready. Bypassed tuples are counted against the
// model.
module tb_cqph;
  import sq_pkg::*;
  localparam int NSP = 4, NG = 4, NS = 1, S = 3;
  localparam int LAT0 = 2 * NS + 11;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_cfg, in_punct, in_valid, in_ready, out_valid, out_ready, bypass_valid;
  tuple_t in_data, out_data, bypass_data;
  logic [NG-1:0] bypass_vflags;

  cqph #(.N_SP(NSP), .N_G(NG), .N_S(NS), .PB_DEPTH(16), .FIFO_DEPTH(8), .FIFO_MARGIN(6)) dut (.*);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int edge_no = 0;
  always @(posedge clk) edge_no <= edge_no + 1;

  // expected results per pipeline
  tuple_t exp_q[NG][$];
  int     due_q[NG][$];
  bit     lat_check = 1;
  int results = 0, lat_checked = 0, bypass_seen = 0, stall_cycles = 0;

  always @(posedge clk) begin
    #1;
    if (!rst) begin
      if (bypass_valid) bypass_seen++;
      if (out_valid) begin
        int g;
        g = out_data[127:96];
        checks++;
        if (g >= NG || exp_q[g].size() == 0) begin
          failures++; $display("FAIL unexpected result %h", out_data);
        end else begin
          if (out_data !== exp_q[g][0]) begin
            failures++; $display("FAIL pipeline %0d got %h exp %h", g, out_data, exp_q[g][0]);
          end
          if (lat_check) begin
            checks++; lat_checked++;
            if (edge_no != due_q[g][0]) begin
              failures++; $display("FAIL pipeline %0d latency: edge %0d expected %0d", g, edge_no, due_q[g][0]);
            end
          end
          void'(exp_q[g].pop_front()); void'(due_q[g].pop_front());
          results++;
        end
      end
    end
  end

  // output channel: accepts one cycle in eight while congested
  bit congested = 0;
  always @(negedge clk) out_ready = !congested || (($urandom % 8) == 0);

  int cfg_tuples = 0;
  task automatic put(bit c, bit p, bit v, tuple_t d);
    @(negedge clk);
    while (!in_ready) begin stall_cycles++; @(negedge clk); end
    in_cfg = c; in_punct = p; in_valid = v; in_data = d;
    if (c) cfg_tuples++;
    @(posedge clk);
    @(negedge clk);
    in_cfg = 0; in_punct = 0; in_valid = 0;
  endtask

  // reference of the pipelines' settings
  int P[NG] = '{4, 2, 3, 1};
  int FN[NG] = '{0, 1, 3, 2};   // COUNT, SUM, MAX, MIN
  int pc[NG][$], ps[NG][$], pmn[NG][$], pmx[NG][$];
  int c_cnt[NG], c_sum[NG], c_mn[NG], c_mx[NG];
  bit gset[NG]; attr_t gval[NG];
  int claims[NG], sel_none = 0, exp_bypass = 0;

  task automatic configure();
    // predicates: 0: Symbol == 1, 1: Symbol == 2, 2: Price > 0, 3: Volume >= 0
    put(1, 0, 0, {16'd0, 4'd0, 70'd0, 1'b1, 2'(ATTR_SYMBOL), 3'(OP_EQ), 32'd1});
    put(1, 0, 0, {16'd1, 4'd0, 70'd0, 1'b1, 2'(ATTR_SYMBOL), 3'(OP_EQ), 32'd2});
    put(1, 0, 0, {16'd2, 4'd0, 70'd0, 1'b1, 2'(ATTR_PRICE), 3'(OP_GT), 32'd0});
    put(1, 0, 0, {16'd3, 4'd0, 70'd0, 1'b1, 2'(ATTR_VOLUME), 3'(OP_GE), 32'd0});
    // trees: node 0 = LEFT(node 1); node 1 = leaf
    for (int t = 0; t < 3; t++) begin
      int op, l, r;
      op = (t == 1) ? BR_AND : BR_LEFT;
      l = (t == 0) ? 0 : (t == 1) ? 1 : 3;
      r = 2;
      put(1, 0, 0, {16'(id_br(NSP, t)), 4'd0, 84'd0, 5'd0, 3'd0, 5'd0, 3'd0, 5'd0, 3'(BR_LEFT)});
      put(1, 0, 0, {16'(id_br(NSP, t) + 1), 4'd0, 84'd0, 5'd0, 3'(r), 5'd0, 3'(l), 5'd0, 3'(op)});
    end
    // group-by managers
    for (int g = 0; g < NG; g++) begin
      int q;
      bit gb;
      q = (g < 2) ? g : 2; gb = g >= 2;
      put(1, 0, 0, {16'(id_gm(NSP, NG, g)), 4'd0, 98'd0, 2'(q), 4'd0, 2'(ATTR_SYMBOL), gb, 1'b1});
      gset[g] = 0; gval[g] = 0;
    end
    // aggregation pipelines
    for (int g = 0; g < NG; g++) begin
      put(1, 0, 0, {16'(id_plq(NSP, NG, g)), 4'd0, 12'd0, 32'(S), 32'(S), 32'd0});
      put(1, 0, 0, {16'(id_plq(NSP, NG, g)), 4'd1, 101'd0, 2'(ATTR_TIME), 2'(ATTR_PRICE), 2'(FN[g]), 1'b1});
      put(1, 0, 0, {16'(id_wlq(NSP, NG, g)), 4'd0, 92'd0, 16'(P[g])});
      put(1, 0, 0, {16'(id_wlq(NSP, NG, g)), 4'd1, 105'd0, 2'(FN[g] == 0 ? 1 : FN[g]), 1'b1});
    end
  endtask

  task automatic add(int g, int v);
    if (c_cnt[g] == 0 || v < c_mn[g]) c_mn[g] = v;
    if (c_cnt[g] == 0 || v > c_mx[g]) c_mx[g] = v;
    c_cnt[g]++; c_sum[g] += v; claims[g]++;
  endtask

  initial begin
    foreach (c_cnt[g]) begin c_cnt[g] = 0; c_sum[g] = 0; c_mn[g] = 0; c_mx[g] = 0; claims[g] = 0; end
    in_cfg = 0; in_punct = 0; in_valid = 0; in_data = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    configure();
    for (int k = 1; k <= 400; k++) begin
      int n;
      n = $urandom % 7;
      if (k == 200) lat_check = 0;
      for (int j = 0; j < n; j++) begin
        int sym, price, vol, t;
        bit q0, q1, q2, v;
        sym = 1 + $urandom % 3; price = int'($urandom % 101) - 50; vol = $urandom % 100;
        t = (k - 1) * S + 1 + $urandom % S;
        v = ($urandom % 8) != 0;
        put(0, 0, v, {32'(sym), 32'(price), 32'(vol), 32'(t)});
        q0 = v && sym == 1; q1 = v && sym == 2 && price > 0; q2 = v;
        if (!q0 && !q1 && !q2) sel_none++;
        if (q0) add(0, price);
        if (q1) add(1, price);
        if (q2) begin
          if (!gset[2]) begin gset[2] = 1; gval[2] = sym; end
          if (gval[2] == sym) add(2, price);
          else begin
            if (!gset[3]) begin gset[3] = 1; gval[3] = sym; end
            if (gval[3] == sym) add(3, price);
            else exp_bypass++;
          end
        end
      end
      congested = k >= 200 && k < 300;
      repeat (lat_check ? NG + 8 : 0) @(posedge clk);
      put(0, 1, 0, {96'd0, 32'(k * S)});
      for (int g = 0; g < NG; g++) begin
        int tc, ts, tmn, tmx;
        pc[g].push_back(c_cnt[g]); ps[g].push_back(c_sum[g]);
        pmn[g].push_back(c_mn[g]); pmx[g].push_back(c_mx[g]);
        c_cnt[g] = 0; c_sum[g] = 0;
        if (k >= P[g]) begin
          tc = 0; ts = 0; tmn = 0; tmx = 0;
          for (int q = k - P[g]; q < k; q++) begin
            if (pc[g][q] != 0) begin
              if (tc == 0 || pmn[g][q] < tmn) tmn = pmn[g][q];
              if (tc == 0 || pmx[g][q] > tmx) tmx = pmx[g][q];
            end
            tc += pc[g][q]; ts += ps[g][q];
          end
          if (tc != 0) begin
            exp_q[g].push_back({32'(g), gset[g] ? gval[g] : 32'd0, 32'(k * S),
                                32'(FN[g] == 0 ? tc : FN[g] == 1 ? ts : FN[g] == 2 ? tmn : tmx)});
            due_q[g].push_back(edge_no + LAT0 - 1 + g);  // edge_no is the edge that took the punctuation
          end
        end
      end
    end
    congested = 0;
    repeat (200) @(posedge clk);
    for (int g = 0; g < NG; g++) begin
      checks++;
      if (exp_q[g].size() != 0) begin failures++; $display("FAIL pipeline %0d: %0d results missing", g, exp_q[g].size()); end
    end
    checks++;
    if (bypass_seen != exp_bypass) begin failures++; $display("FAIL bypass %0d expected %0d", bypass_seen, exp_bypass); end
    checks++;
    if (results < 300 || stall_cycles < 10 || exp_bypass < 10 || lat_checked < 100 || sel_none < 10) begin
      failures++; $display("FAIL coverage");
    end
    $display("cqph: config=%0d results=%0d latency_checked=%0d claims=%0d/%0d/%0d/%0d bypass=%0d no_query=%0d stall_cycles=%0d",
             cfg_tuples, results, lat_checked, claims[0], claims[1], claims[2], claims[3], exp_bypass, sel_none, stall_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
