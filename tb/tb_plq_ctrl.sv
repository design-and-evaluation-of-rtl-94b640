// Testbench of plq_ctrl: random tuples and punctuations around the pane
// of instance IDX = 1, compared each cycle with a model of the pane
// bounds (begin = start + IDX*SLIDE, end = begin + SLIDE, moved by
// N_PLQ*SLIDE on a closing punctuation) and of the eis/eos equations.
//
// Inputs change on the falling clock edge and outputs are sampled just
// after the rising edge; a watchdog ends a run that hangs. The model
// restates the two pane-control algorithms of the description.
module tb_plq_ctrl;
  import sq_pkg::*;
  localparam int SLIDE = 60, N_PLQ = 2, IDX = 1;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic load, punct, valid, eis, eos;
  attr_t wattr_start, wattr, pane_end;

  plq_ctrl #(.SLIDE_PLQ(SLIDE), .N_PLQ(N_PLQ), .IDX(IDX)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int mb, me, closes;
    bit e_eis, e_eos;
    load = 0; punct = 0; valid = 0; wattr = 0; wattr_start = 1000;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0; load = 1;
    @(posedge clk); #1;
    mb = 1000 + IDX * SLIDE; me = mb + SLIDE;
    closes = 0;
    @(negedge clk) load = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      punct = ($urandom % 6) == 0;
      valid = ($urandom % 4) != 0;
      wattr = me - 100 + ($urandom % 150);
      #1;
      e_eis = !punct && valid && (mb <= int'(wattr)) && (int'(wattr) < me);
      e_eos = punct && (int'(wattr) >= me);
      checks++;
      if (eis !== e_eis || eos !== e_eos || int'(pane_end) !== me) begin
        failures++;
        $display("FAIL n=%0d t=%0d p=%0b v=%0b eis %0b/%0b eos %0b/%0b end %0d/%0d",
                 n, wattr, punct, valid, eis, e_eis, eos, e_eos, pane_end, me);
      end
      @(posedge clk);
      if (e_eos) begin mb += N_PLQ * SLIDE; me += N_PLQ * SLIDE; closes++; end
    end
    checks++;
    if (closes < 10) begin failures++; $display("FAIL too few window closes %0d", closes); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
