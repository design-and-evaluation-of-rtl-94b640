// Testbench of union_rr with five sources, two multiplexer stages and
// 8-entry FIFOs (admission threshold 4). Each word carries its source and a
// per-source sequence number. Three phases:
//   1. latency: single words into an idle union must appear 2*N_S+2 edges
//      after the edge that pushes them;
//   2. round robin: all FIFOs are filled while the output is held, then
//      released; the served sources must rotate 0,1,2,3,4,0,...;
//   3. random traffic with a randomly stalling output; sources push only
//      while admit is high, as the engine's input does.
// In all phases every output word must be the oldest unsent word of its
// source, nothing may be lost, and admit must have fallen at least once.
module tb_union_rr;
  localparam int N = 5, NS = 2, DEPTH = 8, MARGIN = 4, W = 16;
  localparam int LAT = 2 * NS + 2;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [N-1:0] push;
  logic [W-1:0] din [N];
  logic out_ready, out_valid, admit;
  logic [W-1:0] out_data;

  union_rr #(.N(N), .N_S(NS), .DEPTH(DEPTH), .MARGIN(MARGIN), .W(W)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int sent[N], recv[N];
  int last_src = -1;
  bit check_rr = 0;
  int rr_ok = 0, admit_low = 0, outputs = 0;

  // output monitor
  always @(posedge clk) begin
    #1;
    if (!rst) begin
      if (!admit) admit_low++;
      if (out_valid) begin
        int s, q;
        s = out_data[W-1:8]; q = out_data[7:0];
        checks++; outputs++;
        if (s >= N || q != (recv[s] & 8'hff)) begin
          failures++; $display("FAIL word src %0d seq %0d, expected seq %0d", s, q, recv[s]);
        end else recv[s]++;
        if (check_rr) begin
          checks++;
          if (last_src >= 0 && s != (last_src + 1) % N) begin
            failures++; $display("FAIL round robin: %0d after %0d", s, last_src);
          end else rr_ok++;
        end
        last_src = s;
      end
    end
  end

  task automatic set_push(logic [N-1:0] p);
    push = p;
    for (int s = 0; s < N; s++) begin
      din[s] = {8'(s), 8'(sent[s])};
      if (p[s]) sent[s]++;
    end
  endtask

  initial begin
    foreach (sent[s]) begin sent[s] = 0; recv[s] = 0; end
    push = '0; out_ready = 1;
    foreach (din[s]) din[s] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // phase 1: latency
    for (int n = 0; n < 20; n++) begin
      int k;
      @(negedge clk) set_push(N'(1) << ($urandom % N));
      @(posedge clk);
      @(negedge clk) push = '0;
      k = 0;
      while (!out_valid && k < 20) begin @(posedge clk); #1; k++; end
      checks++;
      if (k != LAT - 1) begin failures++; $display("FAIL latency %0d edges", k + 1); end
      repeat (3) @(posedge clk);
    end
    // phase 2: round robin from full FIFOs
    @(negedge clk) out_ready = 0;
    for (int n = 0; n < 6; n++) begin
      @(negedge clk) set_push('1);
    end
    @(negedge clk) push = '0;
    repeat (LAT + 2) @(posedge clk);
    @(negedge clk) begin check_rr = 1; last_src = -1; out_ready = 1; end
    repeat (6 * N + LAT + 4) @(posedge clk);
    check_rr = 0;
    // phase 3: random traffic
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      out_ready = ($urandom % 3) != 0;
      if (n < 19000 && admit) set_push(N'($urandom) & N'($urandom));
      else push = '0;
    end
    @(negedge clk) begin push = '0; out_ready = 1; end
    repeat (N * DEPTH + 20) @(posedge clk);
    for (int s = 0; s < N; s++) begin
      checks++;
      if (recv[s] != sent[s]) begin failures++; $display("FAIL src %0d sent %0d received %0d", s, sent[s], recv[s]); end
    end
    checks++;
    if (admit_low < 10 || rr_ok < 25) begin
      failures++; $display("FAIL coverage admit_low=%0d rr=%0d", admit_low, rr_ok);
    end
    $display("union: outputs=%0d admit_low_cycles=%0d rr_checked=%0d", outputs, admit_low, rr_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
