// Testbench for input_gate: random shared inputs with every combination of
// active, bus reset and project reset. The slot must see the shared values
// only when active, zeros otherwise, and reset when either reset is high.
module tb_input_gate;
  import framework_pkg::*;
  logic active, bus_rst, proj_rst;
  shared_in_t shared;
  proj_in_t slot;
  int checks = 0, failures = 0;

  input_gate dut (.active, .bus_rst, .proj_rst, .shared, .slot);

  initial begin
    for (int n = 0; n < 400; n++) begin
      logic [$bits(shared_in_t)-1:0] r;
      for (int k = 0; k < $bits(shared_in_t); k += 32) r[k +: 32] = $urandom;
      shared = r;
      {active, bus_rst, proj_rst} = 3'(n);
      #5;
      checks++;
      if (slot.rst !== (bus_rst | proj_rst)) begin
        failures++; $display("FAIL rst n=%0d", n);
      end
      checks++;
      if (active) begin
        if (slot.cyc !== shared.cyc || slot.stb !== shared.stb || slot.we !== shared.we ||
            slot.sel !== shared.sel || slot.adr !== shared.adr || slot.dat !== shared.dat ||
            slot.la_data_in !== shared.la_data_in || slot.la_oenb !== shared.la_oenb ||
            slot.io_in !== shared.io_in) begin
          failures++; $display("FAIL active pass-through n=%0d", n);
        end
      end else begin
        if (slot.cyc || slot.stb || slot.we || slot.sel != 0 || slot.adr != 0 || slot.dat != 0 ||
            slot.la_data_in != 0 || slot.la_oenb != 0 || slot.io_in != 0) begin
          failures++; $display("FAIL inactive not zero n=%0d", n);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
