// Testbench of aggregation_pipeline (pane-level stage, 16-entry pane buffer,
// window-level stage) for one query. Several phases each reconfigure the
// query through configuration tuples with a random aggregate (COUNT, SUM,
// MIN, MAX), a random slide S and a random number P of panes per window
// (range P*S), then send an in-order stream: for every pane a few tuples,
// some not selected for this query, with random signed prices, followed by
// a punctuation carrying the pane's end time. From the P-th punctuation on,
// each punctuation must produce one window result: end time, aggregate over
// the selected tuples stamped in (end - P*S, end], and a valid flag that is
// low for a window without selected tuples. Punctuations are at least P+8
// cycles apart so that the result must come LAT clock edges after the
// punctuation is taken.
module tb_aggregation_pipeline;
  import sq_pkg::*;
  localparam int LAT = 6;
  localparam int PLQ_ID = 1, WLQ_ID = 2;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_cfg, in_punct, in_valid, out_eos, out_valid;
  tuple_t in_data;
  attr_t out_time, out_value;

  aggregation_pipeline #(.PLQ_ID(PLQ_ID), .WLQ_ID(WLQ_ID), .PB_DEPTH(16)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int edge_no = 0;
  int due_edge[$], due_time[$], due_val[$];
  bit due_valid[$];
  int results = 0, empty_windows = 0;

  always @(posedge clk) begin
    edge_no <= edge_no + 1;
    #1;
    if (!rst) begin
      if (due_edge.size() > 0 && due_edge[0] == edge_no) begin
        checks++;
        if (!(out_eos && out_valid == due_valid[0] && int'(out_time) == due_time[0] &&
              (!due_valid[0] || int'(out_value) == due_val[0]))) begin
          failures++;
          $display("FAIL edge %0d: got eos=%0b v=%0b %0d/%0d expected v=%0b %0d/%0d", edge_no,
                   out_eos, out_valid, out_time, out_value, due_valid[0], due_time[0], due_val[0]);
        end
        results++;
        if (!due_valid[0]) empty_windows++;
        void'(due_edge.pop_front()); void'(due_time.pop_front());
        void'(due_val.pop_front()); void'(due_valid.pop_front());
      end else if (out_eos || out_valid) begin
        checks++; failures++;
        $display("FAIL edge %0d: unexpected output %0d/%0d", edge_no, out_time, out_value);
      end
    end
  end

  task automatic put(bit c, bit p, bit v, tuple_t d);
    @(negedge clk);
    in_cfg = c; in_punct = p; in_valid = v; in_data = d;
    @(posedge clk);
    @(negedge clk);
    in_cfg = 0; in_punct = 0; in_valid = 0;
  endtask

  // per-pane reference aggregates
  int pc[$], ps[$], pmin[$], pmax[$];

  initial begin
    int fn_seen[4];
    foreach (fn_seen[k]) fn_seen[k] = 0;
    in_cfg = 0; in_punct = 0; in_valid = 0; in_data = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int ph = 0; ph < 16; ph++) begin
      int fn, s, np, wfn;
      fn = ph % 4; s = 2 + $urandom % 4; np = 1 + $urandom % 8;
      wfn = (fn == 0) ? 1 : fn;   // COUNT per pane, SUM of counts per window
      fn_seen[fn]++;
      put(1, 0, 0, {16'(PLQ_ID), 4'd0, 12'd0, 32'(s), 32'(s), 32'd0});
      put(1, 0, 0, {16'(PLQ_ID), 4'd1, 101'd0, 2'(ATTR_TIME), 2'(ATTR_PRICE), 2'(fn), 1'b1});
      put(1, 0, 0, {16'(WLQ_ID), 4'd0, 92'd0, 16'(np)});
      put(1, 0, 0, {16'(WLQ_ID), 4'd1, 105'd0, 2'(wfn), 1'b1});
      put(1, 0, 0, {16'(WLQ_ID + 1), 4'd0, 92'd0, 16'd3});   // another unit's setting
      pc.delete(); ps.delete(); pmin.delete(); pmax.delete();
      for (int k = 1; k <= 30; k++) begin
        int n, c, sm, mn, mx;
        n = $urandom % 5; c = 0; sm = 0; mn = 0; mx = 0;
        for (int j = 0; j < n; j++) begin
          int t, v;
          bit sel;
          t = (k - 1) * s + 1 + $urandom % s;
          v = int'($urandom % 101) - 50;
          sel = ($urandom % 4) != 0;
          put(0, 0, sel, {32'h5542_534E, 32'(v), 32'($urandom % 100), 32'(t)});
          if (sel) begin
            if (c == 0 || v < mn) mn = v;
            if (c == 0 || v > mx) mx = v;
            c++; sm += v;
          end
        end
        pc.push_back(c); ps.push_back(sm); pmin.push_back(mn); pmax.push_back(mx);
        repeat (np + 8) @(posedge clk);
        @(negedge clk);
        in_punct = 1; in_data = {96'd0, 32'(k * s)};
        @(posedge clk);
        if (k >= np) begin
          int tc, ts, tmn, tmx;
          tc = 0; ts = 0; tmn = 0; tmx = 0;
          for (int q = k - np; q < k; q++) begin
            if (pc[q] != 0) begin
              if (tc == 0 || pmin[q] < tmn) tmn = pmin[q];
              if (tc == 0 || pmax[q] > tmx) tmx = pmax[q];
            end
            tc += pc[q]; ts += ps[q];
          end
          due_edge.push_back(edge_no + LAT);  // edge_no still holds the previous edge here
          due_time.push_back(k * s);
          due_valid.push_back(tc != 0);
          due_val.push_back(fn == 0 ? tc : fn == 1 ? ts : fn == 2 ? tmn : tmx);
        end
        @(negedge clk) in_punct = 0;
      end
      repeat (20) @(posedge clk);
    end
    checks++;
    if (results < 200 || empty_windows < 1 || due_edge.size() != 0) begin
      failures++;
      $display("FAIL coverage results=%0d empty=%0d pending=%0d", results, empty_windows, due_edge.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
