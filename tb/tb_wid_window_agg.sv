// Testbench of wid_window_agg (instance IDX = 1 of N_WIN = 3 windows of
// RANGE 30, SLIDE 10, aggregate SUM): random tuples with random timestamps
// and punctuations; each closed window must give, one cycle after the
// punctuation, its end time and the sum of the values whose timestamps lay
// in the window.
//
// Inputs change on the falling clock edge and outputs are sampled just
// after the rising edge; a watchdog ends a run that hangs. Window bounds
// follow the description's algorithms; the one-cycle result timing is this
// design's.
module tb_wid_window_agg;
  import sq_pkg::*;
  localparam int RANGE = 30, SLIDE = 10, N_WIN = 3, IDX = 1;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic load, punct, valid, out_punct, out_valid;
  agg_fn_e fn;
  attr_t wattr_start, wattr, value, out_time, out_value;

  wid_window_agg #(.RANGE(RANGE), .SLIDE(SLIDE), .N_WIN(N_WIN), .IDX(IDX)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int mb, me, sum, closes, tnow;
    bit e_close;
    int e_end, e_sum;
    fn = AGG_SUM; load = 0; punct = 0; valid = 0; wattr = 0; value = 0; wattr_start = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    mb = IDX * SLIDE; me = mb + RANGE; sum = 0; closes = 0; tnow = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      punct = ($urandom % 5) == 0;
      valid = !punct;
      if (punct) begin tnow += $urandom % 6; wattr = tnow; end
      else wattr = tnow + ($urandom % 20);
      value = $urandom % 100;
      e_close = punct && int'(wattr) >= me;
      e_end = me; e_sum = sum;
      if (!punct && mb <= int'(wattr) && int'(wattr) < me) sum += int'(value);
      @(posedge clk); #1;
      checks++;
      if (out_punct !== e_close || out_valid !== e_close ||
          (e_close && (int'(out_time) !== e_end || int'(out_value) !== e_sum))) begin
        failures++;
        $display("FAIL n=%0d close=%0b got %0d/%0d exp %0d/%0d", n, e_close, out_time, out_value, e_end, e_sum);
      end
      if (e_close) begin mb += N_WIN * SLIDE; me += N_WIN * SLIDE; sum = 0; closes++; end
    end
    checks++;
    if (closes < 20) begin failures++; $display("FAIL only %0d windows closed", closes); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
