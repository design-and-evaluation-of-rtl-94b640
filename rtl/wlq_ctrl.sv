// Window-level control of the pane-based aggregation (WLQ control module).
//
// Pane-aggregates are written to the cyclic pane buffer in arrival order.
// The controller walks a read pointer over the last `panes` entries of each
// window: it advances one entry per cycle while the entry is already
// written, counting the panes of the current window in pane_counter. When
// the counter reaches `panes` the window is complete: eos is raised and the
// read pointer jumps back to rd_addr-panes+2, the second pane of the window
// just finished, which is the first pane of the next window. That pane is
// read by the jump itself, so the counter restarts at 1. With a single
// pane per window there is nothing to re-read: the counter returns to 0 and
// the next pane is awaited as usual.
//
// Interface and timing: pane_in (the punctuation flag of the incoming pane
// aggregate) advances wr_addr on the clock edge; the buffer is written at
// the old wr_addr. eis is high in the cycle after a read step or a jump,
// eos while pane_counter equals `panes`; both come straight from registers.
// After a pane is written, its read address appears one cycle later and its
// data one more cycle later through the synchronous buffer read, so a user
// registers eis/eos next to the read data. clr (and reset) restores the
// initial state wr_addr = 1, rd_addr = 0, pane_counter = 0.
//
// The register updates and the eos equation follow the document's
// algorithms. Own choices: eis is a registered "a pane was read" flag
// instead of "rd_addr differs from its previous value" (with two panes per
// window the jump lands on the same address, and the compare would drop
// that pane); single-pane windows; pointer wrap-around at the buffer size
// and the clr input. The buffer needs at least panes+2 entries.
module wlq_ctrl #(
  parameter int unsigned ADDR_W = 11,
  parameter int unsigned CNT_W  = 16
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              clr,
  input  logic [CNT_W-1:0]  panes,
  input  logic              pane_in,
  output logic [ADDR_W-1:0] wr_addr,
  output logic [ADDR_W-1:0] rd_addr,
  output logic              eis,
  output logic              eos
);

  logic              read_q;
  logic [CNT_W-1:0]  pane_counter;

  always_ff @(posedge clk) begin
    if (rst || clr) begin
      wr_addr      <= ADDR_W'(1);
      rd_addr      <= '0;
      read_q       <= 1'b0;
      pane_counter <= '0;
    end else begin
      read_q <= 1'b0;
      if (pane_counter < panes) begin
        if (rd_addr != wr_addr && rd_addr + 1'b1 != wr_addr) begin
          rd_addr      <= rd_addr + 1'b1;
          pane_counter <= pane_counter + 1'b1;
          read_q       <= 1'b1;
        end
      end else if (panes > CNT_W'(1)) begin
        rd_addr      <= rd_addr - ADDR_W'(panes) + ADDR_W'(2);
        pane_counter <= CNT_W'(1);
        read_q       <= 1'b1;
      end else begin
        // single-pane windows: nothing to re-read, wait for the next pane
        pane_counter <= '0;
      end
      if (pane_in) wr_addr <= wr_addr + 1'b1;
    end
  end

  assign eis = read_q;
  assign eos = !(pane_counter < panes);

endmodule
