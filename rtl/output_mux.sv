// output_mux: N-to-1 multiplexer of W-bit words (32-to-1 by default) with an
// enable.
//
// When en is high, out is the word of input sel; when en is low (no project
// selected) out is all zeros, so nothing reaches the shared outputs. An index
// at or above N also gives zeros. Purely combinational. The framework uses
// one such multiplexer per project output bundle to return the active
// project's Wishbone, logic-analyzer, GPIO and interrupt outputs.
module output_mux #(
  parameter int unsigned N     = 32,
  parameter int unsigned W     = 32,
  parameter int unsigned SEL_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0][W-1:0] in,
  input  logic [SEL_W-1:0]    sel,
  input  logic                en,
  output logic [W-1:0]        out
);

  always_comb begin
    out = '0;
    if (en && (32'(sel) < N))
      out = in[sel];
  end

endmodule
