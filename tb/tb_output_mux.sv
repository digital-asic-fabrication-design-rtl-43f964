// Testbench for output_mux: 32 random 40-bit words, every select value with
// the enable high, then with it low (all zeros expected); repeated with new
// data. A 20-input instance checks that out-of-range selects give zeros.
module tb_output_mux;
  localparam int unsigned W = 40;
  logic [31:0][W-1:0] in;
  logic [19:0][W-1:0] in20;
  logic [4:0] sel;
  logic en;
  logic [W-1:0] out, out20;
  int checks = 0, failures = 0;

  output_mux #(.N(32), .W(W)) dut   (.in(in),   .sel, .en, .out(out));
  output_mux #(.N(20), .W(W)) dut20 (.in(in20), .sel, .en, .out(out20));

  initial begin
    for (int rep = 0; rep < 8; rep++) begin
      for (int i = 0; i < 32; i++) in[i] = {8'(i), 32'($urandom)};
      for (int i = 0; i < 20; i++) in20[i] = {8'(i + 100), 32'($urandom)};
      for (int s = 0; s < 32; s++) begin
        for (int e = 0; e < 2; e++) begin
          sel = 5'(s); en = e[0];
          #5;
          checks++;
          if (out !== (en ? {8'(s), in[s][31:0]} : '0)) begin
            failures++;
            $display("FAIL sel=%0d en=%0b out=%h", s, en, out);
          end
          checks++;
          if (out20 !== ((en && s < 20) ? {8'(s + 100), in20[s][31:0]} : '0)) begin
            failures++;
            $display("FAIL N=20 sel=%0d en=%0b out=%h", s, en, out20);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
