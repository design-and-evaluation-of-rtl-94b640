// Testbench of bool_expr_tree for eight predicates (seven reducer nodes,
// IDs 10..16, nodes 3..6 are leaves). Nodes are reconfigured at random by
// configuration tuples; after each change random predicate vectors are
// applied and the combinational tree output is compared with a recursive
// reference evaluation of the same node settings.
//
// Inputs change on the falling clock edge and outputs are sampled just
// after the rising edge; a watchdog ends a run that hangs. The heap-
// ordered node numbering is this design's own.
module tb_bool_expr_tree;
  import sq_pkg::*;
  localparam int N = 8, BASE = 10, NN = N - 1, FL = N / 2 - 1;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cfg_valid, y;
  tuple_t cfg_data;
  logic [N-1:0] pred;

  bool_expr_tree #(.N_SP(N), .ID_BASE(BASE)) dut (.*);

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int op[NN], ls[NN], rs[NN];

  function automatic bit f(int o, bit a, bit b);
    case (o)
      1: return 1'b1;
      2: return a;
      3: return a & b;
      4: return a | b;
      default: return 1'b0;
    endcase
  endfunction

  function automatic bit eval(int j, logic [N-1:0] p);
    if (j >= FL) return f(op[j], p[ls[j]], p[rs[j]]);
    return f(op[j], eval(2 * j + 1, p), eval(2 * j + 2, p));
  endfunction

  initial begin
    int ones = 0, zeros = 0;
    for (int j = 0; j < NN; j++) begin op[j] = 0; ls[j] = 0; rs[j] = 0; end
    cfg_valid = 0; cfg_data = '0; pred = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 3000; n++) begin
      int j, o, a, b;
      j = $urandom % NN;
      o = 2 + $urandom % 3;            // mostly LEFT / AND / OR
      if (($urandom % 10) == 0) o = $urandom % 2;
      a = $urandom % N; b = $urandom % N;
      @(negedge clk);
      cfg_valid = 1;
      cfg_data = {16'(BASE + j), 4'h0, 84'($urandom), 5'(0), 3'(b), 5'(0), 3'(a), 5'(0), 3'(o)};
      op[j] = o; ls[j] = a; rs[j] = b;
      @(negedge clk) cfg_valid = 0;
      for (int k = 0; k < 4; k++) begin
        pred = N'($urandom);
        #1;
        checks++;
        if (y) ones++; else zeros++;
        if (y !== eval(0, pred)) begin
          failures++; $display("FAIL n=%0d pred=%b got %0b", n, pred, y);
        end
        #1;
      end
    end
    checks++;
    if (ones < 500 || zeros < 500) begin failures++; $display("FAIL coverage %0d/%0d", ones, zeros); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
