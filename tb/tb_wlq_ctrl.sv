// Testbench of wlq_ctrl (PANES = 5, 16-entry buffer). Pane-aggregates
// arrive first sparsely, then back to back. For every window k the
// addresses read while eis is high must be exactly the slots of panes
// k..k+PANES-1 (pane p is written at slot p+1), the last of them together
// with eos; with sparse arrival eos must follow the window's last pane by
// two clock edges (pointer update, then the counter reaches PANES).
//
// Inputs change on the falling clock edge and outputs are sampled just
// after the rising edge; a watchdog ends a run that hangs. The read order
// is the one the description's window-level algorithm produces.
module tb_wlq_ctrl;
  localparam int AW = 4, P = 5, D = 16;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic clr, pane_in, eis, eos;
  logic [15:0] panes;
  logic [AW-1:0] wr_addr, rd_addr;

  wlq_ctrl #(.ADDR_W(AW), .CNT_W(16)) dut (.*);

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int reads[$];
  int win = 0;
  int pane_cnt = 0;
  int last_pane_cyc = 0;
  bit sparse = 1;

  // Monitor: sample the combinational controls just before each edge.
  always @(negedge clk) begin
    if (!rst) begin
      if (eis) reads.push_back(int'(rd_addr));
      if (eos) begin
        bit ok;
        ok = (reads.size() == P);
        for (int j = 0; j < reads.size() && ok; j++)
          if (reads[j] != (win + j + 1) % D) ok = 0;
        checks++;
        if (!ok) begin
          failures++;
          $display("FAIL window %0d reads %p", win, reads);
        end
        if (sparse) begin
          checks++;
          if (cyc - last_pane_cyc != 2) begin
            failures++;
            $display("FAIL window %0d eos %0d cycles after its last pane", win, cyc - last_pane_cyc);
          end
        end
        reads.delete();
        win++;
      end
    end
  end

  initial begin
    clr = 0; pane_in = 0; panes = P;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 60; n++) begin
      @(negedge clk) pane_in = 1;
      @(posedge clk) last_pane_cyc = cyc;
      pane_cnt++;
      @(negedge clk) pane_in = 0;
      repeat (P + 4) @(posedge clk);
    end
    sparse = 0;
    for (int n = 0; n < 60; n++) begin
      @(negedge clk) pane_in = ($urandom % 3) == 0;
      if (pane_in) pane_cnt++;
      // keep the writer within the buffer's reach of the reader
      if (pane_in) begin
        @(negedge clk) pane_in = 0;
        @(posedge clk);
      end
    end
    @(negedge clk) pane_in = 0;
    repeat (200) @(posedge clk);
    checks++;
    if (win != pane_cnt - P + 1) begin
      failures++;
      $display("FAIL %0d windows for %0d panes", win, pane_cnt);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
