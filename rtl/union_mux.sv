// n-way union of the static query circuits (WID and pane-based designs).
//
// Every source raises its punctuation flag for one cycle when it has a
// result. A binary encoder turns the N punctuation flags into the index of
// the source that fired, and a multiplexer copies that source's valid flag
// and data into the output registers. With one punctuation per window
// slide only one source fires per cycle; if several fire, the lowest index
// wins (this design's choice).
//
// Timing: one cycle, all outputs registered. out_punct is the OR of all
// punctuation flags.
module union_mux #(
  parameter int unsigned N = 11,
  parameter int unsigned W = 64
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] in_punct,
  input  logic [N-1:0] in_valid,
  input  logic [W-1:0] in_data [N],
  output logic         out_punct,
  output logic         out_valid,
  output logic [W-1:0] out_data
);

  localparam int unsigned SEL_W = (N > 1) ? $clog2(N) : 1;

  logic [SEL_W-1:0] sel;

  // Binary encoder.
  always_comb begin
    sel = '0;
    for (int i = N - 1; i >= 0; i--) begin
      if (in_punct[i]) sel = SEL_W'(i);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_punct <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_punct <= |in_punct;
      out_valid <= |in_punct && in_valid[sel];
      out_data  <= in_data[sel];
    end
  end

endmodule
