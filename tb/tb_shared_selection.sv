// Testbench of shared_selection with four predicates and three queries.
// Configuration tuples, punctuations and data tuples with small random
// attribute values are mixed at random. A reference holds the predicate and
// tree settings; each data tuple must come out two clock edges later with
// its per-query valid flags set exactly where the query's expression is
// true; configuration tuples and punctuations come out with clear flags.
//
// Inputs change on the falling clock edge and outputs are sampled just
// after the rising edge; a watchdog ends a run that hangs. The two-cycle
// latency is the one the description gives for shared selection.
module tb_shared_selection;
  import sq_pkg::*;
  localparam int NSP = 4, NQ = 3, NN = NSP - 1, FL = NSP / 2 - 1;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_cfg, in_punct, in_valid, out_cfg, out_punct;
  tuple_t in_data, out_data;
  logic [NQ-1:0] out_vflags;

  shared_selection #(.N_SP(NSP), .N_Q(NQ)) dut (.*);

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference configuration
  bit p_en[NSP]; int p_op[NSP], p_at[NSP]; attr_t p_lit[NSP];
  int op[NQ][NN], ls[NQ][NN], rs[NQ][NN];

  function automatic bit cmp(int o, attr_t a, attr_t l);
    case (o)
      0: return a == l;
      1: return a != l;
      2: return $signed(a) > $signed(l);
      3: return $signed(a) >= $signed(l);
      4: return $signed(a) < $signed(l);
      5: return $signed(a) <= $signed(l);
      default: return 0;
    endcase
  endfunction
  function automatic bit f(int o, bit a, bit b);
    case (o)
      1: return 1'b1;
      2: return a;
      3: return a & b;
      4: return a | b;
      default: return 1'b0;
    endcase
  endfunction
  function automatic bit eval(int q, int j, logic [NSP-1:0] p);
    if (j >= FL) return f(op[q][j], p[ls[q][j]], p[rs[q][j]]);
    return f(op[q][j], eval(q, 2 * j + 1, p), eval(q, 2 * j + 2, p));
  endfunction

  logic [NQ-1:0] e_flags[$];
  bit e_cfg[$], e_punct[$];
  tuple_t e_data[$];
  int flag_ones = 0, tuples = 0;

  initial begin
    foreach (p_en[i]) begin p_en[i] = 0; p_op[i] = 0; p_at[i] = 0; p_lit[i] = 0; end
    foreach (op[q, j]) begin op[q][j] = 0; ls[q][j] = 0; rs[q][j] = 0; end
    in_cfg = 0; in_punct = 0; in_valid = 0; in_data = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 6000; n++) begin
      int kind;
      logic [NSP-1:0] pv;
      logic [NQ-1:0] fl;
      kind = $urandom % 10;   // 0,1: configuration, 2: punctuation, else data
      @(negedge clk);
      in_cfg = kind < 2; in_punct = kind == 2; in_valid = kind > 2 || ($urandom % 2);
      if (kind < 2) begin
        if ($urandom % 2) begin
          int i;
          i = $urandom % NSP;
          p_en[i] = ($urandom % 6) != 0; p_op[i] = $urandom % 6; p_at[i] = $urandom % 4;
          p_lit[i] = $urandom % 4;
          in_data = {16'(i), 4'h0, 70'($urandom), p_en[i], 2'(p_at[i]), 3'(p_op[i]), p_lit[i]};
        end else begin
          int q, j;
          q = $urandom % NQ; j = $urandom % NN;
          op[q][j] = 2 + $urandom % 3; ls[q][j] = $urandom % NSP; rs[q][j] = $urandom % NSP;
          in_data = {16'(id_br(NSP, q) + j), 4'h0, 84'($urandom),
                     5'(0), 3'(rs[q][j]), 5'(0), 3'(ls[q][j]), 5'(0), 3'(op[q][j])};
        end
      end else begin
        for (int k = 0; k < 4; k++) in_data[127-32*k -: 32] = $urandom % 4;
      end
      fl = '0;
      if (kind > 2) begin
        for (int i = 0; i < NSP; i++)
          pv[i] = p_en[i] && cmp(p_op[i], in_data[127-32*p_at[i] -: 32], p_lit[i]);
        for (int q = 0; q < NQ; q++) fl[q] = eval(q, 0, pv);
        tuples++;
        flag_ones += $countones(fl);
      end
      e_flags.push_back(fl); e_cfg.push_back(in_cfg); e_punct.push_back(in_punct);
      e_data.push_back(in_data);
      @(posedge clk); #1;
      if (e_flags.size() == 2) begin  // output after the second edge
        checks++;
        if (out_vflags !== e_flags[0] || out_cfg !== e_cfg[0] || out_punct !== e_punct[0] ||
            out_data !== e_data[0]) begin
          failures++;
          $display("FAIL n=%0d flags %b exp %b cfg %0b/%0b punct %0b/%0b", n, out_vflags, e_flags[0],
                   out_cfg, e_cfg[0], out_punct, e_punct[0]);
        end
        void'(e_flags.pop_front()); void'(e_cfg.pop_front()); void'(e_punct.pop_front());
        void'(e_data.pop_front());
      end
    end
    checks++;
    if (flag_ones < 500 || flag_ones > tuples * NQ - 500) begin
      failures++; $display("FAIL coverage %0d flags set in %0d tuples", flag_ones, tuples);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
