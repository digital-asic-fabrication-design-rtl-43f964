// nbit_register: N-bit storage register with write enable and synchronous
// reset.
//
// On a rising clk edge the register loads RESET_VALUE while reset is high,
// otherwise it loads d when we is high and holds its value when we is low.
// q is the register output, valid from the edge that wrote it (one cycle of
// latency from d to q).
//
// The write-enable/reset behaviour is the framework's generic register. The
// reset being synchronous and the RESET_VALUE parameter (default zero, so
// that reset clears the register) are this design's choices; the framework
// uses RESET_VALUE to make its control registers come up idle.
module nbit_register #(
  parameter int unsigned  N           = 32,
  parameter logic [N-1:0] RESET_VALUE = '0
) (
  input  logic         clk,
  input  logic         reset,
  input  logic         we,
  input  logic [N-1:0] d,
  output logic [N-1:0] q
);

  always_ff @(posedge clk) begin
    if (reset)   q <= RESET_VALUE;
    else if (we) q <= d;
  end

endmodule
