// Testbench of union_mux: one random source fires per cycle (sometimes
// none); the output registers must carry that source's valid flag and data
// one cycle later, and out_punct the OR of the punctuation flags.
//
// Inputs change on the falling clock edge and outputs are sampled just
// after the rising edge; a watchdog ends a run that hangs. Lowest-index
// priority is this design's choice; the description only asks that one
// result leave per cycle.
module tb_union_mux;
  localparam int N = 11, W = 64;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [N-1:0] in_punct, in_valid;
  logic [W-1:0] in_data [N];
  logic out_punct, out_valid;
  logic [W-1:0] out_data;

  union_mux #(.N(N), .W(W)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k;
    logic [W-1:0] e_data;
    bit e_punct, e_valid;
    in_punct = '0; in_valid = '0;
    for (int i = 0; i < N; i++) in_data[i] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      k = $urandom % (N + 3);
      in_punct = '0;
      in_valid = N'($urandom);
      for (int i = 0; i < N; i++) in_data[i] = {$urandom, $urandom};
      if (k < N) in_punct[k] = 1'b1;
      e_punct = (k < N);
      e_valid = (k < N) && in_valid[k];
      e_data = (k < N) ? in_data[k] : '0;
      @(posedge clk); #1;
      checks++;
      if (out_punct !== e_punct || out_valid !== e_valid || (e_punct && out_data !== e_data)) begin
        failures++;
        $display("FAIL n=%0d k=%0d", n, k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
