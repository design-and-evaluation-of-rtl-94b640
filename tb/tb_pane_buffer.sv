// Testbench of pane_buffer: random writes and reads of a small buffer
// against a shadow array; read data must appear one cycle after the
// address (synchronous read) and hold the last value written there.
//
// Inputs change on the falling clock edge and outputs are sampled just
// after the rising edge; a watchdog ends a run that hangs. Depth and width
// here are reduced; the one-cycle read is this design's choice for block
// RAM.
module tb_pane_buffer;
  localparam int DEPTH = 16, W = 65;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic we;
  logic [3:0] waddr, raddr;
  logic [W-1:0] wdata, rdata;
  logic [W-1:0] shadow [DEPTH];
  bit written [DEPTH];

  pane_buffer #(.DEPTH(DEPTH), .W(W)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] exp_d;
    bit exp_ok;
    we = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int i = 0; i < DEPTH; i++) written[i] = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      we = $urandom % 2;
      waddr = 4'($urandom);
      wdata = {1'($urandom), $urandom, $urandom};
      raddr = 4'($urandom);
      if (raddr == waddr) raddr = raddr + 1'b1;
      exp_ok = written[raddr];
      exp_d = shadow[raddr];
      @(posedge clk); #1;
      if (we) begin shadow[waddr] = wdata; written[waddr] = 1; end
      if (exp_ok) begin
        checks++;
        if (rdata !== exp_d) begin failures++; $display("FAIL n=%0d addr=%0d", n, raddr); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
