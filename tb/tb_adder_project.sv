// tb_adder_project: behavioural model of a small Wishbone adder user project,
// used only by the framework testbench to fill project slots.
//
// Wishbone registers (classic cycle, ack one cycle after cyc & stb):
//   0x3000_0000  A   (read/write)
//   0x3000_0004  B   (read/write)
//   0x3000_0008  A + B (read only)
//   0x3000_000C  ID  (read only, the slot's parameter)
// Other outputs are simple functions of the state and inputs so that the
// testbench can tell which project is driving the shared pins:
//   la_data_out = {la_data_in[127:64], ID, A + B}
//   io_out      = {ID[5:0], A + B}
//   io_oeb      = io_in ^ {38{ID[0]}}
//   irq         = la_data_in[2:0] ^ ID[2:0]
// A and B clear while the slot's reset is high.
module tb_adder_project
  import framework_pkg::*;
#(
  parameter int unsigned ID = 0
) (
  input  logic      clk,
  input  proj_in_t  pin,
  output proj_out_t pout
);
  logic [31:0] a, b, sum;
  logic        ack;
  logic [31:0] rdat;

  assign sum = a + b;

  always_ff @(posedge clk) begin
    if (pin.rst) begin
      a <= '0; b <= '0; ack <= 1'b0; rdat <= '0;
    end else begin
      ack <= pin.cyc & pin.stb & ~ack;
      if (pin.cyc & pin.stb & ~ack) begin
        if (pin.we) begin
          if (pin.adr == 32'h3000_0000) a <= pin.dat;
          if (pin.adr == 32'h3000_0004) b <= pin.dat;
        end
        unique case (pin.adr)
          32'h3000_0000: rdat <= a;
          32'h3000_0004: rdat <= b;
          32'h3000_0008: rdat <= sum;
          32'h3000_000C: rdat <= 32'(ID);
          default:       rdat <= 32'hDEAD_0000 | 32'(ID);
        endcase
      end
    end
  end

  always_comb begin
    pout.ack         = ack;
    pout.dat         = ack ? rdat : '0;
    pout.la_data_out = {pin.la_data_in[127:64], 32'(ID), sum};
    pout.io_out      = {6'(ID), sum};
    pout.io_oeb      = pin.io_in ^ {IO_W{ID[0]}};
    pout.irq         = pin.la_data_in[2:0] ^ 3'(ID);
  end
endmodule
