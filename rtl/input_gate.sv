// input_gate: the input side of one project slot.
//
// Every shared input resource (Wishbone request, logic-analyzer inputs and
// enables, GPIO inputs) passes through a 2-to-1 selection between the shared
// value and zero: the active slot (active = 1) sees the resources, every other
// slot sees all zeros. The slot's reset is the Wishbone bus reset OR'ed with
// this slot's bit of the project-reset register, so the management core can
// reset one project without disturbing the others. Purely combinational.
//
// Zeroing inactive inputs and per-project reset follow the framework's
// design; combining the two reset sources with an OR, and not gating the
// reset with the select, are this design's choices.
module input_gate
  import framework_pkg::*;
(
  input  logic       active,     // this slot is the selected project
  input  logic       bus_rst,    // Wishbone bus reset (wb_rst_i)
  input  logic       proj_rst,   // this slot's bit of the project-reset register
  input  shared_in_t shared,     // shared resources
  output proj_in_t   slot        // what the project in this slot receives
);

  always_comb begin
    shared_in_t gated;
    gated = active ? shared : '0;
    slot.rst        = bus_rst | proj_rst;
    slot.cyc        = gated.cyc;
    slot.stb        = gated.stb;
    slot.we         = gated.we;
    slot.sel        = gated.sel;
    slot.adr        = gated.adr;
    slot.dat        = gated.dat;
    slot.la_data_in = gated.la_data_in;
    slot.la_oenb    = gated.la_oenb;
    slot.io_in      = gated.io_in;
  end

endmodule
