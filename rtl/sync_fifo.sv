// Synchronous FIFO with show-ahead output, used by the union module.
//
// push writes din on the clock edge; dout always shows the oldest entry
// while empty is low, and pop removes it on the clock edge. count gives the
// fill level for admission control. Pushing into a full FIFO is an error
// (checked by an assertion); the data is then dropped. A push and a pop in
// the same cycle on a full FIFO are both accepted. The document only asks
// for a FIFO per union input; this implementation is this design's own.
module sync_fifo #(
  parameter int unsigned DEPTH = 128,
  parameter int unsigned W     = 128
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   push,
  input  logic [W-1:0]           din,
  input  logic                   pop,
  output logic [W-1:0]           dout,
  output logic                   empty,
  output logic [$clog2(DEPTH):0] count
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic          do_push, do_pop;

  assign empty   = (count == '0);
  assign do_pop  = pop && !empty;
  assign do_push = push && (count != (AW+1)'(DEPTH) || do_pop);
  assign dout    = mem[rp];

  always_ff @(posedge clk) begin
    if (do_push) mem[wp] <= din;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_push) wp <= wp + 1'b1;
      if (do_pop)  rp <= rp + 1'b1;
      count <= count + (AW+1)'(do_push) - (AW+1)'(do_pop);
      assert (!(push && !do_push)) else $error("sync_fifo: push into full FIFO");
    end
  end

endmodule
