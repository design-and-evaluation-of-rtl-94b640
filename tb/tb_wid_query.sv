// Testbench of wid_query with its default parameters: count the trades of
// symbol "UBSN" over a 600 s window that slides by 60 s, with tuples up to
// 60 s late. Tuples are produced one 60 s period at a time: period p holds
// timestamps in [60p, 60p+60) mixed with late tuples of period p-1, random
// symbols and idle cycles; a punctuation with timestamp 60p follows period p.
// At every punctuation T >= 600 the reference expects exactly one result:
// time T and the number of UBSN tuples stamped in [T-600, T). The result
// must appear LAT clock edges after the edge that takes the punctuation and
// no output may appear at any other time.
module tb_wid_query;
  import sq_pkg::*;
  localparam int LAT = 4;
  localparam int RANGE = 600, SLIDE = 60;
  localparam attr_t UBSN = 32'h5542_534E;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic load, in_punct, in_valid, out_punct, out_valid;
  attr_t wattr_start, out_time, out_value;
  tuple_t in_data;

  wid_query dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: UBSN count per 60 s period, expected results by due edge.
  int per_cnt[int];
  int edge_no = 0;
  int due_edge[$], due_time[$], due_val[$];
  int results = 0;

  always @(posedge clk) begin
    edge_no <= edge_no + 1;
    #1;
    if (!rst) begin
      if (due_edge.size() > 0 && due_edge[0] == edge_no) begin
        checks++;
        if (!(out_punct && out_valid && int'(out_time) == due_time[0] && int'(out_value) == due_val[0])) begin
          failures++;
          $display("FAIL edge %0d: got p=%0b v=%0b %0d/%0d expected %0d/%0d", edge_no,
                   out_punct, out_valid, out_time, out_value, due_time[0], due_val[0]);
        end else results++;
        void'(due_edge.pop_front()); void'(due_time.pop_front()); void'(due_val.pop_front());
      end else if (out_punct || out_valid) begin
        checks++; failures++;
        $display("FAIL edge %0d: unexpected output %0d/%0d", edge_no, out_time, out_value);
      end
    end
  end

  task automatic send(bit p, bit v, attr_t sym, int t);
    @(negedge clk);
    in_punct = p; in_valid = v;
    in_data = {sym, 32'($urandom % 1000), 32'($urandom % 5000), 32'(t)};
    @(posedge clk);  // taken at this edge; edge_no is the edge number
    if (p && t >= RANGE) begin
      int s = 0;
      for (int q = (t - RANGE) / SLIDE; q < t / SLIDE; q++)
        if (per_cnt.exists(q)) s += per_cnt[q];
      due_edge.push_back(edge_no + LAT);  // edge_no still holds the previous edge here
      due_time.push_back(t);
      due_val.push_back(s);
    end
  endtask

  initial begin
    localparam int PERIODS = 60;
    in_punct = 0; in_valid = 0; in_data = '0; load = 0; wattr_start = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    load = 1;
    @(negedge clk) load = 0;
    for (int p = 0; p < PERIODS; p++) begin
      int n;
      n = 16 + $urandom % 16;  // punctuations at least 16 cycles apart
      for (int k = 0; k < n; k++) begin
        int q, t;
        attr_t sym;
        q = (p > 0 && ($urandom % 4) == 0) ? p - 1 : p;
        t = q * SLIDE + 1 + $urandom % (SLIDE - 1);
        sym = ($urandom % 3 == 0) ? UBSN : ((($urandom % 2) == 0) ? 32'h4142_4344 : UBSN ^ 32'h1);
        if (($urandom % 4) == 0) send(0, 0, UBSN, t);   // idle cycle
        send(0, 1, sym, t);
        if (sym == UBSN) per_cnt[q] = per_cnt.exists(q) ? per_cnt[q] + 1 : 1;
      end
      send(1, 0, '0, p * SLIDE);
    end
    @(negedge clk) in_punct = 0; in_valid = 0;
    repeat (LAT + 5) @(posedge clk);
    checks++;
    if (results != PERIODS - RANGE / SLIDE || due_edge.size() != 0) begin
      failures++;
      $display("FAIL %0d results, %0d still due", results, due_edge.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
