// Testbench of wid_ctrl: random tuples and punctuations around the window
// of instance IDX = 2, compared each cycle with a model of the window
// bounds (begin = start + IDX*SLIDE, end = begin + RANGE, moved by
// N_WIN*SLIDE on a closing punctuation) and of the eis/eos equations.
//
// Inputs change on the falling clock edge and outputs are sampled just
// after the rising edge; a watchdog ends a run that hangs. The model
// restates the two window-control algorithms of the description.
module tb_wid_ctrl;
  import sq_pkg::*;
  localparam int RANGE = 600, SLIDE = 60, N_WIN = 11, IDX = 2;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic load, punct, valid, eis, eos;
  attr_t wattr_start, wattr, win_end;

  wid_ctrl #(.RANGE(RANGE), .SLIDE(SLIDE), .N_WIN(N_WIN), .IDX(IDX)) dut (.*);

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
    mb = 1000 + IDX * SLIDE; me = mb + RANGE;
    closes = 0;
    @(negedge clk) load = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      punct = ($urandom % 6) == 0;
      valid = ($urandom % 4) != 0;
      wattr = me - 700 + ($urandom % 800);
      #1;
      e_eis = !punct && valid && (mb <= int'(wattr)) && (int'(wattr) < me);
      e_eos = punct && (int'(wattr) >= me);
      checks++;
      if (eis !== e_eis || eos !== e_eos || int'(win_end) !== me) begin
        failures++;
        $display("FAIL n=%0d t=%0d p=%0b v=%0b eis %0b/%0b eos %0b/%0b end %0d/%0d",
                 n, wattr, punct, valid, eis, e_eis, eos, e_eos, win_end, me);
      end
      @(posedge clk);
      if (e_eos) begin mb += N_WIN * SLIDE; me += N_WIN * SLIDE; closes++; end
    end
    checks++;
    if (closes < 10) begin failures++; $display("FAIL too few window closes %0d", closes); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
