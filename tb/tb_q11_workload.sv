// Workload test of cqph at its full default size (64 predicates, 64
// group-by managers and pipelines). It runs the benchmark query template
//   SELECT Time, Symbol, <AGG> FROM Trades [RANGE r SLIDE s WATTR Time]
//   WHERE Symbol in (<K symbols>) GROUP BY Symbol
// in three phases that differ only in size: 64 queries of 1 symbol,
// 16 queries of 4 symbols and 4 queries of 16 symbols, so 64 groups each
// time. Per query the K symbols (of the 25 benchmark tickers), the aggregate (COUNT(*),
// MAX/MIN/SUM of Price or of Volume) and the window (RANGE {60, 300} x
// SLIDE {5, 10, 30} seconds) are random. The longer ranges of the
// benchmark, up to 1800 s with 1 s slides, are left out only to keep the
// run short: a window of P panes is re-read in P cycles, so the stream
// would need thousands of cycles per second of stream time.
// Each phase starts with a reset and loads all queries through
// configuration tuples: 25 symbol predicates, an OR tree per query (each
// used leaf ORs two symbol predicates, unused leaves give FALSE), K
// group-by managers per query and one aggregation pipeline per manager.
// Then an in-order stream of 600 s is sent, a few trades per second, each
// second closed by a punctuation. The reference model assigns a query's
// symbols to its managers in order of first appearance, as the manager
// chain does, and predicts each window result of each pipeline. Results
// must arrive in order per pipeline with the right group (symbol), window
// end and aggregate; nothing may reach the bypass port. The output channel
// is always ready. The run reports configuration tuples, results and
// input stall cycles per phase.
module tb_q11_workload;
  import sq_pkg::*;
  localparam int NSP = 64, NG = 64, NSYM = 25, T_END = 600;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_cfg, in_punct, in_valid, in_ready, out_valid, out_ready, bypass_valid;
  tuple_t in_data, out_data, bypass_data;
  logic [NG-1:0] bypass_vflags;

  cqph dut (.*);

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // per query
  int q_fn[NG], q_attr[NG], q_s[NG], q_p[NG];
  int q_syms[NG][$];
  // per pipeline (manager)
  int g_sym[NG];       // claimed symbol, -1 while free
  tuple_t exp_q[NG][$];
  int pc[NG][$], ps[NG][$], pmn[NG][$], pmx[NG][$];
  int c_cnt[NG], c_sum[NG], c_mn[NG], c_mx[NG];
  int results = 0, stall_cycles = 0, cfg_tuples = 0, bypass_seen = 0;

  assign out_ready = 1'b1;

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
          void'(exp_q[g].pop_front());
          results++;
        end
      end
    end
  end

  task automatic put(bit c, bit p, bit v, tuple_t d);
    @(negedge clk);
    while (!in_ready) begin stall_cycles++; @(negedge clk); end
    in_cfg = c; in_punct = p; in_valid = v; in_data = d;
    if (c) cfg_tuples++;
    @(posedge clk);
    @(negedge clk);
    in_cfg = 0; in_punct = 0; in_valid = 0;
  endtask

  // The 25 ticker symbols of the benchmark, four ASCII characters each.
  function automatic attr_t sym_code(int i);
    attr_t names[25] = '{"AAPL", "AMAT", "BPOP", "BRCD", "CALP", "CMCS", "CSCO",
                         "DELL", "EBAY", "FITB", "GOOG", "HBAN", "INTC", "LVL ",
                         "MSFT", "MU_L", "NVDA", "NWSA", "ORCL", "QCOM", "RIMM",
                         "SIRI", "SNDK", "WIN_", "YHOO"};
    return names[i];
  endfunction

  task automatic run_phase(int k);
    int ranges[2] = '{60, 300};
    int slides[3] = '{5, 10, 30};
    int nq, used[NSYM];
    nq = NG / k;
    results = 0; stall_cycles = 0; cfg_tuples = 0; bypass_seen = 0;
    for (int g = 0; g < NG; g++) begin
      g_sym[g] = -1;
      exp_q[g].delete(); pc[g].delete(); ps[g].delete(); pmn[g].delete(); pmx[g].delete();
      c_cnt[g] = 0; c_sum[g] = 0; c_mn[g] = 0; c_mx[g] = 0;
    end
    for (int q = 0; q < nq; q++) begin
      int f;
      for (int i = 0; i < NSYM; i++) used[i] = 0;
      q_syms[q].delete();
      while (q_syms[q].size() < k) begin
        int s;
        s = $urandom % NSYM;
        if (used[s] == 0) begin used[s] = 1; q_syms[q].push_back(s); end
      end
      f = $urandom % 7;   // COUNT, MAX/MIN/SUM(Price), MAX/MIN/SUM(Volume)
      q_fn[q] = (f == 0) ? 0 : (f % 3 == 1) ? 3 : (f % 3 == 2) ? 2 : 1;
      q_attr[q] = (f >= 4) ? ATTR_VOLUME : ATTR_PRICE;
      q_s[q] = slides[$urandom % 3];
      q_p[q] = ranges[$urandom % 2] / q_s[q];
    end
    @(negedge clk) rst = 1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // symbol predicates
    for (int i = 0; i < NSYM; i++)
      put(1, 0, 0, {16'(i), 4'd0, 70'd0, 1'b1, 2'(ATTR_SYMBOL), 3'(OP_EQ), sym_code(i)});
    // OR trees: internal nodes 0..NSP/2-2, leaves from NSP/2-1
    for (int q = 0; q < nq; q++) begin
      for (int j = 0; j < NSP / 2 - 1; j++)
        put(1, 0, 0, {16'(id_br(NSP, q) + j), 4'd0, 105'd0, 3'(BR_OR)});
      for (int l = 0; l < NSP / 2; l++) begin
        int a, b;
        if (2 * l < k) begin
          a = q_syms[q][2 * l];
          b = (2 * l + 1 < k) ? q_syms[q][2 * l + 1] : a;
          put(1, 0, 0, {16'(id_br(NSP, q) + NSP / 2 - 1 + l), 4'd0, 84'd0, 8'(b), 8'(a), 5'd0, 3'(BR_OR)});
        end else
          put(1, 0, 0, {16'(id_br(NSP, q) + NSP / 2 - 1 + l), 4'd0, 105'd0, 3'(BR_FALSE)});
      end
    end
    // managers and pipelines: manager g serves query g / k
    for (int g = 0; g < NG; g++) begin
      int q;
      q = g / k;
      put(1, 0, 0, {16'(id_gm(NSP, NG, g)), 4'd0, 94'd0, 6'(q), 4'd0, 2'(ATTR_SYMBOL), 1'b1, 1'b1});
      put(1, 0, 0, {16'(id_plq(NSP, NG, g)), 4'd0, 12'd0, 32'(q_s[q]), 32'(q_s[q]), 32'd0});
      put(1, 0, 0, {16'(id_plq(NSP, NG, g)), 4'd1, 101'd0, 2'(ATTR_TIME), 2'(q_attr[q]), 2'(q_fn[q]), 1'b1});
      put(1, 0, 0, {16'(id_wlq(NSP, NG, g)), 4'd0, 92'd0, 16'(q_p[q])});
      put(1, 0, 0, {16'(id_wlq(NSP, NG, g)), 4'd1, 105'd0, 2'(q_fn[q] == 0 ? 1 : q_fn[q]), 1'b1});
    end
    // stream
    for (int t = 1; t <= T_END; t++) begin
      int n;
      n = 2 + $urandom % 8;
      for (int j = 0; j < n; j++) begin
        int sy, pr, vo;
        sy = $urandom % NSYM; pr = int'($urandom % 2001) - 1000; vo = $urandom % 10000;
        put(0, 0, 1, {sym_code(sy), 32'(pr), 32'(vo), 32'(t)});
        for (int q = 0; q < nq; q++) begin
          int hit;
          hit = 0;
          foreach (q_syms[q][i]) if (q_syms[q][i] == sy) hit = 1;
          if (hit != 0)
            for (int g = q * k; g < q * k + k; g++)
              if (g_sym[g] == sy || g_sym[g] == -1) begin
                int v;
                g_sym[g] = sy;
                v = (q_attr[q] == ATTR_VOLUME) ? vo : pr;
                if (c_cnt[g] == 0 || v < c_mn[g]) c_mn[g] = v;
                if (c_cnt[g] == 0 || v > c_mx[g]) c_mx[g] = v;
                c_cnt[g]++; c_sum[g] += v;
                break;
              end
        end
      end
      put(0, 1, 0, {96'd0, 32'(t)});
      for (int g = 0; g < NG; g++) begin
        int q;
        q = g / k;
        if (t % q_s[q] == 0) begin
          int w, tc, ts, tmn, tmx;
          pc[g].push_back(c_cnt[g]); ps[g].push_back(c_sum[g]);
          pmn[g].push_back(c_mn[g]); pmx[g].push_back(c_mx[g]);
          c_cnt[g] = 0; c_sum[g] = 0;
          w = t / q_s[q];
          if (w >= q_p[q]) begin
            tc = 0; ts = 0; tmn = 0; tmx = 0;
            for (int i = w - q_p[q]; i < w; i++) begin
              if (pc[g][i] != 0) begin
                if (tc == 0 || pmn[g][i] < tmn) tmn = pmn[g][i];
                if (tc == 0 || pmx[g][i] > tmx) tmx = pmx[g][i];
              end
              tc += pc[g][i]; ts += ps[g][i];
            end
            if (tc != 0)
              exp_q[g].push_back({32'(g), sym_code(g_sym[g]), 32'(t),
                                  32'(q_fn[q] == 0 ? tc : q_fn[q] == 1 ? ts : q_fn[q] == 2 ? tmn : tmx)});
          end
        end
      end
    end
    repeat (2000) @(posedge clk);
    for (int g = 0; g < NG; g++) begin
      checks++;
      if (exp_q[g].size() != 0) begin failures++; $display("FAIL pipeline %0d: %0d results missing", g, exp_q[g].size()); end
    end
    checks++;
    if (bypass_seen != 0 || results < 1000) begin
      failures++; $display("FAIL bypass=%0d results=%0d", bypass_seen, results);
    end
    $display("workload %0d queries x %0d symbols: config_tuples=%0d results=%0d stall_cycles=%0d",
             nq, k, cfg_tuples, results, stall_cycles);
  endtask

  initial begin
    in_cfg = 0; in_punct = 0; in_valid = 0; in_data = '0;
    repeat (3) @(posedge clk);
    run_phase(1);
    run_phase(4);
    run_phase(16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
