// Testbench of agg_unit: random streams of values with random eis/eos,
// compared with a behavioural model of COUNT, SUM, MIN and MAX for all four
// function selections; checks the one-cycle result timing and the valid
// flag of empty windows.
//
// Inputs change on the falling clock edge and outputs are sampled just
// after the rising edge; a watchdog ends a run that hangs. The functions
// are those the design description lists; the register timing is this
// design's.
module tb_agg_unit;
  import sq_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  agg_fn_e fn;
  logic eis, eos;
  logic [31:0] din;
  logic out_eos, out_valid;
  logic [31:0] out_value;

  agg_unit #(.W(32)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int m_cnt, m_sum, m_min, m_max;
  task automatic model_reset();
    m_cnt = 0; m_sum = 0; m_min = 32'sh7FFF_FFFF; m_max = 32'sh8000_0000;
  endtask

  initial begin
    int exp_v;
    bit exp_valid;
    fn = AGG_COUNT; eis = 0; eos = 0; din = 0;
    model_reset();
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int f = 0; f < 4; f++) begin
      fn = agg_fn_e'(f);
      for (int n = 0; n < 600; n++) begin
        @(negedge clk);
        eis = ($urandom % 3) != 0;
        eos = ($urandom % 9) == 0;
        din = $urandom % 2000 - 1000;
        if (eis) begin
          m_cnt++; m_sum += int'(din);
          if (int'(din) < m_min) m_min = int'(din);
          if (int'(din) > m_max) m_max = int'(din);
        end
        case (f)
          0: exp_v = m_cnt;
          1: exp_v = m_sum;
          2: exp_v = m_min;
          default: exp_v = m_max;
        endcase
        exp_valid = eos && (m_cnt > 0);
        @(posedge clk); #1;
        checks++;
        if (out_eos !== eos || out_valid !== exp_valid || (eos && out_value !== exp_v) ||
            (!eos && out_value !== exp_v)) begin
          failures++;
          $display("FAIL fn=%0d n=%0d eos=%0b got %0d/%0b exp %0d/%0b", f, n, eos, int'(out_value), out_valid, exp_v, exp_valid);
        end
        if (eos) model_reset();
      end
      @(negedge clk); eis = 0; eos = 1; @(posedge clk); #1; model_reset();
    end
    @(negedge clk); eis = 0; eos = 1; @(posedge clk); #1;
    checks++;
    if (out_valid !== 1'b0) begin failures++; $display("FAIL empty window valid"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
