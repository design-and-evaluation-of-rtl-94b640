// Testbench of bin_reducer: one leaf node (ID 5, picks two of eight
// predicate bits) and one inner node (ID 6, combines its two child inputs).
// Both are reconfigured at random through configuration tuples; the output
// is combinational and is compared after every change with a reference
// evaluation of FALSE / TRUE / LEFT / AND / OR.
//
// Inputs change on the falling clock edge and outputs are sampled just
// after the rising edge; a watchdog ends a run that hangs. LEFT/AND/OR
// come from the description; TRUE/FALSE and the leaf input selection are
// this design's.
module tb_bin_reducer;
  import sq_pkg::*;
  localparam int N = 8;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cfg_valid, l_in, r_in, y_leaf, y_inner;
  tuple_t cfg_data;
  logic [N-1:0] pred;

  bin_reducer #(.ID(5), .N_SP(N), .LEAF(1'b1)) u_leaf (
    .clk, .rst, .cfg_valid, .cfg_data, .pred, .l_in(1'b0), .r_in(1'b0), .y(y_leaf));
  bin_reducer #(.ID(6), .N_SP(N), .LEAF(1'b0)) u_inner (
    .clk, .rst, .cfg_valid, .cfg_data, .pred, .l_in, .r_in, .y(y_inner));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit f(int op, bit a, bit b);
    case (op)
      1: return 1'b1;
      2: return a;
      3: return a & b;
      4: return a | b;
      default: return 1'b0;
    endcase
  endfunction

  initial begin
    int op[2], ls[2], rs[2];
    int seen[5];
    for (int k = 0; k < 2; k++) begin op[k] = 0; ls[k] = 0; rs[k] = 0; end
    for (int k = 0; k < 5; k++) seen[k] = 0;
    cfg_valid = 0; cfg_data = '0; pred = '0; l_in = 0; r_in = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      cfg_valid = ($urandom % 4) == 0;
      if (cfg_valid) begin
        int k, o, a, b;
        k = $urandom % 3;   // 0: leaf, 1: inner, 2: some other node
        o = $urandom % 5; a = $urandom % N; b = $urandom % N;
        cfg_data = {16'(k == 2 ? 7 : 5 + k), 4'h0, 84'($urandom), 5'(0), 3'(b), 5'(0), 3'(a), 5'(0), 3'(o)};
        if (k < 2) begin op[k] = o; ls[k] = a; rs[k] = b; end
      end
      @(posedge clk);
      @(negedge clk) cfg_valid = 0;
      pred = N'($urandom); l_in = $urandom; r_in = $urandom;
      #1;
      checks += 2;
      seen[op[0]]++;
      if (y_leaf !== f(op[0], pred[ls[0]], pred[rs[0]])) begin
        failures++; $display("FAIL leaf op=%0d", op[0]);
      end
      if (y_inner !== f(op[1], l_in, r_in)) begin
        failures++; $display("FAIL inner op=%0d", op[1]);
      end
    end
    checks++;
    foreach (seen[k]) if (seen[k] < 50) begin failures++; $display("FAIL op %0d seen %0d times", k, seen[k]); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
