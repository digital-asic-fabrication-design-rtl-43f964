// Testbench for the framework in its as-built tapeout configuration: eight
// projects in slots 0..7 (behavioural Wishbone adders standing in for the
// student designs) and slots 8..31 left empty with their outputs tied to
// zero. It follows the firmware sequence of the bring-up guide for the two
// adders in slots 0 and 1 (select, reset, release, test, switch, reset each
// independently), then checks that selecting an empty slot connects nothing:
// the shared outputs stay zero and project addresses are not acknowledged.
module tb_tapeout_config;
  import framework_pkg::*;

  localparam int unsigned NP   = 32;
  localparam int unsigned USED = 8;

  logic clk = 1'b0, rst;
  logic stb, cyc, we, ack;
  logic [3:0] sel;
  logic [31:0] dat_w, adr, dat_r;
  logic [LA_W-1:0] la_in, la_out, la_oenb;
  logic [IO_W-1:0] io_in, io_out, io_oeb;
  logic [IRQ_W-1:0] irq;
  proj_in_t  [NP-1:0] pin;
  proj_out_t [NP-1:0] pout;
  logic [NP-1:0] active, in_reset;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  user_project_wrapper dut (
    .wb_clk_i(clk), .wb_rst_i(rst), .wbs_stb_i(stb), .wbs_cyc_i(cyc), .wbs_we_i(we),
    .wbs_sel_i(sel), .wbs_dat_i(dat_w), .wbs_adr_i(adr), .wbs_ack_o(ack), .wbs_dat_o(dat_r),
    .la_data_in(la_in), .la_data_out(la_out), .la_oenb(la_oenb),
    .io_in(io_in), .io_out(io_out), .io_oeb(io_oeb), .user_irq(irq),
    .proj_in(pin), .proj_out(pout), .proj_active(active), .proj_in_reset(in_reset)
  );

  for (genvar i = 0; i < NP; i++) begin : g_slot
    if (i < USED) begin : g_used
      tb_adder_project #(.ID(i)) u_proj (.clk(clk), .pin(pin[i]), .pout(pout[i]));
    end else begin : g_empty
      assign pout[i] = '0;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  task automatic wb(input logic w, input logic [31:0] a, input logic [31:0] d,
                    output logic [31:0] rd, output bit acked);
    int n = 0;
    @(negedge clk);
    cyc = 1; stb = 1; we = w; adr = a; dat_w = d; sel = 4'hF;
    acked = 0;
    while (n < 8) begin
      @(posedge clk); #1; n++;
      if (ack) begin acked = 1; break; end
    end
    rd = dat_r;
    if (acked) check(n == 1, "one-cycle acknowledge");
    @(negedge clk);
    cyc = 0; stb = 0; we = 0;
  endtask

  task automatic wr(input logic [31:0] a, input logic [31:0] d);
    logic [31:0] rd; bit ok;
    wb(1, a, d, rd, ok);
    check(ok, $sformatf("write %h acknowledged", a));
  endtask

  task automatic rd_expect(input logic [31:0] a, input logic [31:0] exp, input string what);
    logic [31:0] rd; bit ok;
    wb(0, a, 0, rd, ok);
    check(ok && rd == exp, $sformatf("%s: got %h expected %h", what, rd, exp));
  endtask

  // One adder test case: write both operands, read the sum, check the pins.
  task automatic adder_case(input int k, input logic [31:0] a, input logic [31:0] b);
    wr(32'h3000_0000, a);
    wr(32'h3000_0004, b);
    rd_expect(32'h3000_0008, a + b, $sformatf("adder %0d sum", k));
    #1;
    check(la_out[63:0] == {32'(k), a + b}, $sformatf("adder %0d la_data_out", k));
    check(io_out == {6'(k), a + b}, $sformatf("adder %0d io_out", k));
  endtask

  logic [31:0] rd; bit ok;

  initial begin
    cyc = 0; stb = 0; we = 0; sel = 0; adr = 0; dat_w = 0;
    la_in = '0; la_oenb = '1; io_in = '0;
    rst = 1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;

    // Adder in slot 0.
    wr(PROJ_SELECT_ADR, 32'h0000_0000);
    wr(PROJ_RESET_ADR,  32'h0000_0000);
    #1 check(pin[0].rst && !pin[1].rst, "slot 0 held in reset");
    wr(PROJ_RESET_ADR,  32'hFFFF_FFFF);
    adder_case(0, 32'd15, 32'd45);
    adder_case(0, 32'hFFFF_FFF0, 32'h20);

    // Adder in slot 1; slot 0 keeps its last sum meanwhile.
    wr(PROJ_SELECT_ADR, 32'h0000_0001);
    wr(PROJ_RESET_ADR,  32'h0000_0001);
    wr(PROJ_RESET_ADR,  32'hFFFF_FFFF);
    rd_expect(32'h3000_0008, 32'd0, "adder 1 sum after reset");
    adder_case(1, 32'd40, 32'd20);
    check(g_slot[0].g_used.u_proj.sum == 32'h10, "adder 0 kept its state");

    // Reset adder 0 while adder 1 stays active and untouched.
    wr(PROJ_RESET_ADR, 32'h0000_0000);
    wr(PROJ_RESET_ADR, 32'hFFFF_FFFF);
    rd_expect(32'h3000_0008, 32'd60, "adder 1 unaffected by reset of 0");
    wr(PROJ_SELECT_ADR, 32'h0000_0000);
    rd_expect(32'h3000_0008, 32'd0, "adder 0 cleared by its reset");

    // Each of the other used slots answers with its own ID.
    for (int k = 2; k < USED; k++) begin
      wr(PROJ_SELECT_ADR, 32'(k));
      rd_expect(32'h3000_000C, 32'(k), $sformatf("slot %0d id", k));
    end

    // Empty slots connect nothing.
    for (int k = USED; k < NP; k++) begin
      wr(PROJ_SELECT_ADR, 32'(k));
      la_in = {4{$urandom}}; io_in = {6'($urandom), 32'($urandom)};
      #1;
      check(la_out == '0 && io_out == '0 && io_oeb == '0 && irq == '0,
            $sformatf("empty slot %0d drives zeros", k));
      wb(0, 32'h3000_0008, 0, rd, ok);
      check(!ok, $sformatf("empty slot %0d does not acknowledge", k));
    end

    // Deselect all.
    wr(PROJ_SELECT_ADR, 32'hFFFF_FFFF);
    #1 check(active == '0, "all deselected");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
