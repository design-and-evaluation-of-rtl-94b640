// End-to-end test of query_accel_top at full size (default parameters: 64
// predicates, 64 queries / aggregation pipelines, 2048-entry pane buffers,
// 128-entry union FIFOs, two union stages). Two streams run concurrently:
//
// Stream 1 feeds the window-ID circuit and the pane-based circuit with the
// same out-of-order trade stream: "count UBSN trades over the last 600 s,
// every 60 s, tuples up to 60 s late". Period p holds timestamps in
// [60p, 60p+60) mixed with late tuples of period p-1, other symbols and
// idle cycles, then a punctuation 60p. Each punctuation T >= 600 must give
// the count of UBSN tuples stamped in [T-600, T), 4 edges later from the
// window-ID circuit and 7 edges later from the pane-based circuit.
//
// Stream 2 configures and runs the configurable engine through its input:
//   query 0: Symbol == 1, COUNT over 4 panes (pipeline 0);
//   query 1: Symbol == 2 AND Price > 0, SUM(Price) over 2 panes (pipeline 1);
//   query 2: Volume >= 0 GROUP BY Symbol, pipelines 2 (MAX over 3 panes) and
//            3 (MIN, single-pane windows); the third symbol is bypassed;
//   query 3: Symbol == 3, COUNT over 5 panes on the last pipeline (63),
//            which exercises the longest route through the chain.
// Panes are 3 time units, the stream is in order. Results must match a
// reference model, in order per pipeline; while the output is always ready
// the punctuation-to-result latency must be 2*N_S+11+g for pipeline g
// (13 .. 78 cycles for N_S = 2, N_G = 64). A congested phase lets the
// output accept only one cycle in 32, so the union's FIFOs fill and the
// admission control holds the input; the source then waits for in_ready.
//
// The run ends with a count of every mechanism seen: configuration tuples,
// tuples matching no query, claims per pipeline, new groups, bypassed
// tuples, input stall cycles, late tuples, window results of each circuit.
module tb_query_accel_top;
  import sq_pkg::*;
  localparam int NSP = 64, NG = 64, NS = 2, S = 3;
  localparam int LAT0 = 2 * NS + 11;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic wid_load, wid_in_punct, wid_in_valid, wid_out_punct, wid_out_valid;
  logic pane_load, pane_in_punct, pane_in_valid, pane_out_punct, pane_out_valid;
  attr_t wid_wattr_start, wid_out_time, wid_out_value;
  attr_t pane_wattr_start, pane_out_time, pane_out_value;
  tuple_t wid_in_data, pane_in_data;
  logic cq_in_cfg, cq_in_punct, cq_in_valid, cq_in_ready, cq_out_valid, cq_out_ready, cq_bypass_valid;
  tuple_t cq_in_data, cq_out_data, cq_bypass_data;
  logic [NG-1:0] cq_bypass_vflags;

  query_accel_top dut (.*);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int edge_no = 0;
  always @(posedge clk) edge_no <= edge_no + 1;

  // ---------------------------------------------------------------- stream 1
  localparam int RANGE = 600, SLIDE = 60, WLAT = 4, PLAT = 7;
  localparam attr_t UBSN = 32'h5542_534E;
  int per_cnt[int];
  int w_due[$], w_time[$], w_val[$];
  int p_due[$], p_time[$], p_val[$];
  int wid_results = 0, pane_results = 0, late_tuples = 0;
  bit s1_done = 0;

  always @(posedge clk) begin
    #1;
    if (!rst) begin
      if (w_due.size() > 0 && w_due[0] == edge_no) begin
        checks++;
        if (!(wid_out_punct && wid_out_valid && int'(wid_out_time) == w_time[0] && int'(wid_out_value) == w_val[0])) begin
          failures++; $display("FAIL window-ID result %0d/%0d expected %0d/%0d", wid_out_time, wid_out_value, w_time[0], w_val[0]);
        end else wid_results++;
        void'(w_due.pop_front()); void'(w_time.pop_front()); void'(w_val.pop_front());
      end else if (wid_out_punct || wid_out_valid) begin
        checks++; failures++; $display("FAIL window-ID unexpected output at edge %0d", edge_no);
      end
      if (p_due.size() > 0 && p_due[0] == edge_no) begin
        checks++;
        if (!(pane_out_punct && pane_out_valid && int'(pane_out_time) == p_time[0] && int'(pane_out_value) == p_val[0])) begin
          failures++; $display("FAIL pane result %0d/%0d expected %0d/%0d", pane_out_time, pane_out_value, p_time[0], p_val[0]);
        end else pane_results++;
        void'(p_due.pop_front()); void'(p_time.pop_front()); void'(p_val.pop_front());
      end else if (pane_out_punct || pane_out_valid) begin
        checks++; failures++; $display("FAIL pane unexpected output at edge %0d", edge_no);
      end
    end
  end

  task automatic send1(bit p, bit v, attr_t sym, int t);
    @(negedge clk);
    wid_in_punct = p; wid_in_valid = v;
    wid_in_data = {sym, 32'($urandom % 1000), 32'($urandom % 5000), 32'(t)};
    pane_in_punct = wid_in_punct; pane_in_valid = wid_in_valid; pane_in_data = wid_in_data;
    @(posedge clk);  // edge_no still holds the previous edge here
    if (p && t >= RANGE) begin
      int s;
      s = 0;
      for (int q = (t - RANGE) / SLIDE; q < t / SLIDE; q++)
        if (per_cnt.exists(q)) s += per_cnt[q];
      w_due.push_back(edge_no + WLAT); w_time.push_back(t); w_val.push_back(s);
      p_due.push_back(edge_no + PLAT); p_time.push_back(t); p_val.push_back(s);
    end
  endtask

  initial begin
    wid_in_punct = 0; wid_in_valid = 0; wid_in_data = '0; wid_load = 0; wid_wattr_start = 0;
    pane_in_punct = 0; pane_in_valid = 0; pane_in_data = '0; pane_load = 0; pane_wattr_start = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) begin wid_load = 1; pane_load = 1; end
    @(negedge clk) begin wid_load = 0; pane_load = 0; end
    for (int p = 0; p < 40; p++) begin
      int n;
      n = 16 + $urandom % 16;   // punctuations at least 16 cycles apart
      for (int k = 0; k < n; k++) begin
        int q, t;
        attr_t sym;
        q = (p > 0 && ($urandom % 4) == 0) ? p - 1 : p;
        if (q != p) late_tuples++;
        t = q * SLIDE + 1 + $urandom % (SLIDE - 1);
        sym = ($urandom % 3 == 0) ? UBSN : 32'h4142_4344;
        if (($urandom % 4) == 0) send1(0, 0, UBSN, t);   // idle cycle
        send1(0, 1, sym, t);
        if (sym == UBSN) per_cnt[q] = per_cnt.exists(q) ? per_cnt[q] + 1 : 1;
      end
      send1(1, 0, '0, p * SLIDE);
    end
    @(negedge clk) begin wid_in_punct = 0; wid_in_valid = 0; pane_in_punct = 0; pane_in_valid = 0; end
    repeat (PLAT + 2) @(posedge clk);
    s1_done = 1;
  end

  // ---------------------------------------------------------------- stream 2
  localparam int NP = 5;                        // pipelines in use
  localparam int PG[NP] = '{0, 1, 2, 3, 63};    // their indices
  localparam int PQ[NP] = '{0, 1, 2, 2, 3};     // query of each
  localparam int PP[NP] = '{4, 2, 3, 1, 5};     // panes per window
  localparam int PF[NP] = '{0, 1, 3, 2, 0};     // COUNT, SUM, MAX, MIN, COUNT

  tuple_t exp_q[NP][$];
  int     due_q[NP][$];
  bit     lat_check = 1;
  int results = 0, lat_checked = 0, bypass_seen = 0, stall_cycles = 0;
  int cfg_tuples = 0;
  bit congested = 0;
  bit s2_done = 0;

  always @(negedge clk) cq_out_ready = !congested || (($urandom % 32) == 0);

  function automatic int slot_of(int g);
    for (int i = 0; i < NP; i++) if (PG[i] == g) return i;
    return -1;
  endfunction

  always @(posedge clk) begin
    #1;
    if (!rst) begin
      if (cq_bypass_valid) bypass_seen++;
      if (cq_out_valid) begin
        int i;
        i = slot_of(cq_out_data[127:96]);
        checks++;
        if (i < 0 || exp_q[i].size() == 0) begin
          failures++; $display("FAIL unexpected result %h", cq_out_data);
        end else begin
          if (cq_out_data !== exp_q[i][0]) begin
            failures++; $display("FAIL pipeline %0d got %h exp %h", PG[i], cq_out_data, exp_q[i][0]);
          end
          if (lat_check) begin
            checks++; lat_checked++;
            if (edge_no != due_q[i][0]) begin
              failures++; $display("FAIL pipeline %0d latency: edge %0d expected %0d", PG[i], edge_no, due_q[i][0]);
            end
          end
          void'(exp_q[i].pop_front()); void'(due_q[i].pop_front());
          results++;
        end
      end
    end
  end

  task automatic put(bit c, bit p, bit v, tuple_t d);
    @(negedge clk);
    while (!cq_in_ready) begin stall_cycles++; @(negedge clk); end
    cq_in_cfg = c; cq_in_punct = p; cq_in_valid = v; cq_in_data = d;
    if (c) cfg_tuples++;
    @(posedge clk);
    @(negedge clk);
    cq_in_cfg = 0; cq_in_punct = 0; cq_in_valid = 0;
  endtask

  int pc[NP][$], ps[NP][$], pmn[NP][$], pmx[NP][$];
  int c_cnt[NP], c_sum[NP], c_mn[NP], c_mx[NP];
  bit gset[NP]; attr_t gval[NP];
  int claims[NP], sel_none = 0, exp_bypass = 0, new_groups = 0;

  task automatic configure();
    // predicates: 0: Symbol == 1, 1: Symbol == 2, 2: Price > 0,
    //             3: Volume >= 0, 4: Symbol == 3
    put(1, 0, 0, {16'd0, 4'd0, 70'd0, 1'b1, 2'(ATTR_SYMBOL), 3'(OP_EQ), 32'd1});
    put(1, 0, 0, {16'd1, 4'd0, 70'd0, 1'b1, 2'(ATTR_SYMBOL), 3'(OP_EQ), 32'd2});
    put(1, 0, 0, {16'd2, 4'd0, 70'd0, 1'b1, 2'(ATTR_PRICE), 3'(OP_GT), 32'd0});
    put(1, 0, 0, {16'd3, 4'd0, 70'd0, 1'b1, 2'(ATTR_VOLUME), 3'(OP_GE), 32'd0});
    put(1, 0, 0, {16'd4, 4'd0, 70'd0, 1'b1, 2'(ATTR_SYMBOL), 3'(OP_EQ), 32'd3});
    // trees: LEFT along the leftmost path down to a leaf that holds the
    // query's condition
    for (int t = 0; t < 4; t++) begin
      int j, op, l;
      op = (t == 1) ? BR_AND : BR_LEFT;
      l = (t == 0) ? 0 : (t == 1) ? 1 : (t == 2) ? 3 : 4;
      j = 0;
      while (j < NSP / 2 - 1) begin
        put(1, 0, 0, {16'(id_br(NSP, t) + j), 4'd0, 84'd0, 5'd0, 3'd0, 5'd0, 3'd0, 5'd0, 3'(BR_LEFT)});
        j = 2 * j + 1;
      end
      put(1, 0, 0, {16'(id_br(NSP, t) + j), 4'd0, 84'd0, 5'd0, 3'(2), 5'd0, 3'(l), 5'd0, 3'(op)});
    end
    // group-by managers and aggregation pipelines
    for (int i = 0; i < NP; i++) begin
      put(1, 0, 0, {16'(id_gm(NSP, NG, PG[i])), 4'd0, 94'd0, 6'(PQ[i]), 4'd0,
                    2'(ATTR_SYMBOL), PQ[i] == 2, 1'b1});
      gset[i] = 0; gval[i] = 0;
      put(1, 0, 0, {16'(id_plq(NSP, NG, PG[i])), 4'd0, 12'd0, 32'(S), 32'(S), 32'd0});
      put(1, 0, 0, {16'(id_plq(NSP, NG, PG[i])), 4'd1, 101'd0, 2'(ATTR_TIME), 2'(ATTR_PRICE), 2'(PF[i]), 1'b1});
      put(1, 0, 0, {16'(id_wlq(NSP, NG, PG[i])), 4'd0, 92'd0, 16'(PP[i])});
      put(1, 0, 0, {16'(id_wlq(NSP, NG, PG[i])), 4'd1, 105'd0, 2'(PF[i] == 0 ? 1 : PF[i]), 1'b1});
    end
  endtask

  task automatic add(int i, int v);
    if (c_cnt[i] == 0 || v < c_mn[i]) c_mn[i] = v;
    if (c_cnt[i] == 0 || v > c_mx[i]) c_mx[i] = v;
    c_cnt[i]++; c_sum[i] += v; claims[i]++;
  endtask

  initial begin
    foreach (c_cnt[i]) begin c_cnt[i] = 0; c_sum[i] = 0; c_mn[i] = 0; c_mx[i] = 0; claims[i] = 0; end
    cq_in_cfg = 0; cq_in_punct = 0; cq_in_valid = 0; cq_in_data = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    configure();
    for (int k = 1; k <= 300; k++) begin
      int n;
      n = $urandom % 7;
      if (k == 120) lat_check = 0;
      congested = k >= 120 && k < 270;
      for (int j = 0; j < n; j++) begin
        int sym, price, vol, t;
        bit q0, q1, q2, q3, v;
        sym = 1 + $urandom % 3; price = int'($urandom % 101) - 50; vol = $urandom % 100;
        t = (k - 1) * S + 1 + $urandom % S;
        v = ($urandom % 8) != 0;
        put(0, 0, v, {32'(sym), 32'(price), 32'(vol), 32'(t)});
        q0 = v && sym == 1; q1 = v && sym == 2 && price > 0; q2 = v; q3 = v && sym == 3;
        if (!q0 && !q1 && !q2 && !q3) sel_none++;
        if (q0) add(0, price);
        if (q1) add(1, price);
        if (q2) begin
          if (!gset[2]) begin gset[2] = 1; gval[2] = sym; new_groups++; end
          if (gval[2] == sym) add(2, price);
          else begin
            if (!gset[3]) begin gset[3] = 1; gval[3] = sym; new_groups++; end
            if (gval[3] == sym) add(3, price);
            else exp_bypass++;
          end
        end
        if (q3) add(4, price);
      end
      repeat (lat_check ? NG + 8 : 0) @(posedge clk);
      put(0, 1, 0, {96'd0, 32'(k * S)});
      for (int i = 0; i < NP; i++) begin
        int tc, ts, tmn, tmx;
        pc[i].push_back(c_cnt[i]); ps[i].push_back(c_sum[i]);
        pmn[i].push_back(c_mn[i]); pmx[i].push_back(c_mx[i]);
        c_cnt[i] = 0; c_sum[i] = 0;
        if (k >= PP[i]) begin
          tc = 0; ts = 0; tmn = 0; tmx = 0;
          for (int q = k - PP[i]; q < k; q++) begin
            if (pc[i][q] != 0) begin
              if (tc == 0 || pmn[i][q] < tmn) tmn = pmn[i][q];
              if (tc == 0 || pmx[i][q] > tmx) tmx = pmx[i][q];
            end
            tc += pc[i][q]; ts += ps[i][q];
          end
          if (tc != 0) begin
            exp_q[i].push_back({32'(PG[i]), gset[i] ? gval[i] : 32'd0, 32'(k * S),
                                32'(PF[i] == 0 ? tc : PF[i] == 1 ? ts : PF[i] == 2 ? tmn : tmx)});
            due_q[i].push_back(edge_no + LAT0 - 1 + PG[i]);  // edge_no: edge that took the punctuation
          end
        end
      end
    end
    congested = 0;
    repeat (NP * 140 + 200) @(posedge clk);
    s2_done = 1;
  end

  initial begin
    wait (s1_done && s2_done);
    for (int i = 0; i < NP; i++) begin
      checks++;
      if (exp_q[i].size() != 0) begin failures++; $display("FAIL pipeline %0d: %0d results missing", PG[i], exp_q[i].size()); end
    end
    checks++;
    if (bypass_seen != exp_bypass) begin failures++; $display("FAIL bypass %0d expected %0d", bypass_seen, exp_bypass); end
    checks++;
    if (wid_results != 30 || pane_results != 30 || w_due.size() != 0 || p_due.size() != 0) begin
      failures++; $display("FAIL stream 1: %0d / %0d results", wid_results, pane_results);
    end
    checks++;
    if (results < 300 || stall_cycles < 10 || exp_bypass < 10 || lat_checked < 100 || sel_none < 10 ||
        late_tuples < 10 || new_groups != 2 || claims[4] < 10) begin
      failures++; $display("FAIL coverage");
    end
    $display("mechanisms: config_tuples=%0d no_query_tuples=%0d claims=%0d/%0d/%0d/%0d/%0d new_groups=%0d bypassed=%0d",
             cfg_tuples, sel_none, claims[0], claims[1], claims[2], claims[3], claims[4], new_groups, exp_bypass);
    $display("mechanisms: admission_stall_cycles=%0d cq_results=%0d latency_checked=%0d late_tuples=%0d wid_results=%0d pane_results=%0d",
             stall_cycles, results, lat_checked, late_tuples, wid_results, pane_results);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
