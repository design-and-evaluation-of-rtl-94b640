// Testbench of sel_predicate (ID 3). Each cycle carries either a
// configuration tuple (addressed to this predicate or to another one) or a
// data tuple with random attributes, often equal or close to the literal.
// A reference copy of the configuration gives the expected result, which
// must appear one clock edge after the data tuple (one register stage).
//
// Inputs change on the falling clock edge and outputs are sampled just
// after the rising edge; a watchdog ends a run that hangs. The comparison
// set follows the description; the configuration layout is this design's.
module tb_sel_predicate;
  import sq_pkg::*;
  localparam int ID = 3;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cfg_valid, result;
  tuple_t cfg_data, data;

  sel_predicate #(.ID(ID)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit cmp(int op, attr_t a, attr_t l);
    case (op)
      0: return a == l;
      1: return a != l;
      2: return $signed(a) > $signed(l);
      3: return $signed(a) >= $signed(l);
      4: return $signed(a) < $signed(l);
      5: return $signed(a) <= $signed(l);
      default: return 0;
    endcase
  endfunction

  initial begin
    bit en; int op, at; attr_t lit;
    bit exp_r; int hits = 0, misses = 0, cfgs = 0;
    en = 0; op = 0; at = 0; lit = 0;
    cfg_valid = 0; cfg_data = '0; data = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      cfg_valid = ($urandom % 10) == 0;
      if (cfg_valid) begin
        int tgt, nop, nat;
        bit nen;
        attr_t nlit;
        tgt = ($urandom % 2) ? ID : $urandom % 8;
        nen = ($urandom % 8) != 0;
        nop = $urandom % 6; nat = $urandom % 4;
        nlit = $urandom % 20 - 10;
        cfg_data = {16'(tgt), 4'h0, 70'($urandom), nen, 2'(nat), 3'(nop), nlit};
        if (tgt == ID) begin en = nen; op = nop; at = nat; lit = nlit; cfgs++; end
        data = cfg_data;
      end else begin
        for (int k = 0; k < 4; k++) data[127-32*k -: 32] = $urandom % 20 - 10;
      end
      cfg_data = cfg_valid ? cfg_data : tuple_t'({$urandom, $urandom, $urandom, $urandom});
      exp_r = en && cmp(op, data[127-32*at -: 32], lit);
      @(posedge clk); #1;
      if (!cfg_valid) begin
        checks++;
        if (result !== exp_r) begin
          failures++;
          $display("FAIL n=%0d op=%0d attr=%0d lit=%0d got %0b exp %0b", n, op, at, lit, result, exp_r);
        end
        if (exp_r) hits++; else misses++;
      end
    end
    checks++;
    if (hits < 100 || misses < 100 || cfgs < 50) begin
      failures++; $display("FAIL coverage hits=%0d misses=%0d cfgs=%0d", hits, misses, cfgs);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
