// Testbench for nbit_register: replays the write/hold/reset pattern of the
// register's unit test (0x00AA, 0x0055 at 16 bits), then random traffic
// against a reference copy held in the testbench, including a non-zero
// reset value.
module tb_nbit_register;
  localparam int unsigned N = 16;
  localparam logic [N-1:0] RV = 16'hA5C3;

  logic clk = 1'b0, reset, we;
  logic [N-1:0] d, q0, q1, ref0, ref1;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  nbit_register #(.N(N))                   dut0 (.clk, .reset, .we, .d, .q(q0));
  nbit_register #(.N(N), .RESET_VALUE(RV)) dut1 (.clk, .reset, .we, .d, .q(q1));

  task automatic step(input logic r, input logic w, input logic [N-1:0] v);
    reset = r; we = w; d = v;
    @(posedge clk);
    if (r) begin ref0 = '0; ref1 = RV; end
    else if (w) begin ref0 = v; ref1 = v; end
    #1;
    checks++;
    if (q0 !== ref0 || q1 !== ref1) begin
      failures++;
      $display("FAIL r=%0b we=%0b d=%h q0=%h/%h q1=%h/%h", r, w, v, q0, ref0, q1, ref1);
    end
  endtask

  initial begin
    reset = 1'b0; we = 1'b0; d = '0;
    @(negedge clk);
    step(1, 0, '0);
    step(0, 0, 16'h00AA);          // held: we low
    step(0, 1, 16'h00AA);
    step(0, 0, 16'h0055);
    step(0, 1, 16'h0055);
    step(0, 1, 16'h00AA);
    step(0, 1, 16'h0055);
    step(1, 1, 16'hFFFF);          // reset wins over write
    for (int i = 0; i < 400; i++)
      step(($urandom_range(0, 15) == 0), $urandom_range(0, 1), N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
