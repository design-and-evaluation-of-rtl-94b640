// Pane buffer: a cyclic buffer of pane-aggregates in simple dual-port mode,
// one write-only port and one read-only port, as a block RAM provides.
//
// The write and read addresses come from the window-level control
// (wlq_ctrl), which uses the buffer as a FIFO that it can re-read: every
// pane-aggregate is read once for each window it belongs to.
//
// Timing: the write takes effect on the clock edge where we is high; the
// read is synchronous, rdata shows the entry at raddr one clock after raddr
// is presented. The memory is not reset; the controller never reads an
// entry before writing it.
module pane_buffer #(
  parameter int unsigned DEPTH = 2048,
  parameter int unsigned W     = 65
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [W-1:0]             wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [W-1:0]             rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
