// Testbench for onehot_decoder: every 5-bit input, as in the decoder's unit
// test sweep 0x00..0x1F, must give exactly bit 2**in set.
module tb_onehot_decoder;
  logic [4:0]  in;
  logic [31:0] out;
  int checks = 0, failures = 0;

  onehot_decoder dut (.in, .out);

  initial begin
    for (int i = 0; i < 32; i++) begin
      in = 5'(i);
      #10;
      checks++;
      if (out !== (32'd1 << i)) begin
        failures++;
        $display("FAIL in=%0d out=%h", i, out);
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
