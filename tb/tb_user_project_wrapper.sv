// End-to-end testbench for user_project_wrapper at its default size (32
// project slots), every slot filled with a behavioural Wishbone adder
// project. Firmware-style Wishbone accesses select each project in turn,
// program and read it back, check that the logic-analyzer, GPIO and IRQ
// outputs come from the selected project only and that every unselected
// slot receives zeros. It then exercises individual project reset, state
// kept by a deselected project, deselecting all projects, an out-of-range
// index, and the bus reset. Each of these mechanisms is counted and a
// mechanism that never happened counts as a failure.
module tb_user_project_wrapper;
  import framework_pkg::*;

  localparam int unsigned NP = 32;

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
  // mechanism counters
  int n_select = 0, n_deselect = 0, n_proj_reset = 0, n_ctrl_intercept = 0;
  int n_gated = 0, n_out_of_range = 0, n_retained = 0, n_bus_reset = 0;

  // reference state of every project
  logic [31:0] ref_a [NP], ref_b [NP];
  int cur = -1;  // selected project, -1 for none

  always #5 clk = ~clk;

  user_project_wrapper dut (
    .wb_clk_i(clk), .wb_rst_i(rst), .wbs_stb_i(stb), .wbs_cyc_i(cyc), .wbs_we_i(we),
    .wbs_sel_i(sel), .wbs_dat_i(dat_w), .wbs_adr_i(adr), .wbs_ack_o(ack), .wbs_dat_o(dat_r),
    .la_data_in(la_in), .la_data_out(la_out), .la_oenb(la_oenb),
    .io_in(io_in), .io_out(io_out), .io_oeb(io_oeb), .user_irq(irq),
    .proj_in(pin), .proj_out(pout), .proj_active(active), .proj_in_reset(in_reset)
  );

  for (genvar i = 0; i < NP; i++) begin : g_proj
    tb_adder_project #(.ID(i)) u_proj (.clk(clk), .pin(pin[i]), .pout(pout[i]));
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  // Wishbone cycle from the management core. Returns 0 if no ack came.
  task automatic wb(input logic w, input logic [31:0] a, input logic [31:0] d,
                    output logic [31:0] rd, output bit acked);
    int n = 0;
    bit is_ctrl;
    is_ctrl = (a == PROJ_SELECT_ADR) || (a == PROJ_RESET_ADR);
    cyc = 1; stb = 1; we = w; adr = a; dat_w = d; sel = 4'hF;
    #1;
    if (is_ctrl) begin
      bit leaked = 0;
      for (int i = 0; i < NP; i++) if (pin[i].cyc || pin[i].stb) leaked = 1;
      check(!leaked, "control access reached a project");
      n_ctrl_intercept++;
    end
    acked = 0;
    while (n < 8) begin
      @(posedge clk); #1; n++;
      if (ack) begin acked = 1; break; end
    end
    rd = dat_r;
    if (acked) check(n == 1, $sformatf("ack latency %0d at adr %h", n, a));
    @(negedge clk);
    cyc = 0; stb = 0; we = 0;
    @(negedge clk);
  endtask

  task automatic wr(input logic [31:0] a, input logic [31:0] d);
    logic [31:0] rd; bit ok;
    wb(1, a, d, rd, ok);
    check(ok, $sformatf("write %h acknowledged", a));
  endtask

  task automatic rd_expect(input logic [31:0] a, input logic [31:0] exp, input string what);
    logic [31:0] rd; bit ok;
    wb(0, a, 0, rd, ok);
    check(ok && rd == exp, $sformatf("%s: read %h got %h expected %h", what, a, rd, exp));
  endtask

  task automatic select(input int k);
    wr(PROJ_SELECT_ADR, 32'(k));
    cur = (k >= 0 && k < NP) ? k : -1;
    if (cur >= 0) n_select++;
  endtask

  // Check every shared output and the gating of every slot against the model.
  task automatic check_pins(input string what);
    logic [31:0] s;
    la_in   = {$urandom, $urandom, $urandom, $urandom};
    la_oenb = {$urandom, $urandom, $urandom, $urandom};
    io_in   = {6'($urandom), 32'($urandom)};
    #1;
    if (cur < 0) begin
      check(la_out == '0 && io_out == '0 && io_oeb == '0 && irq == '0 && active == '0,
            {what, ": outputs zero with no project selected"});
    end else begin
      s = ref_a[cur] + ref_b[cur];
      check(la_out == {la_in[127:64], 32'(cur), s}, {what, ": la_data_out"});
      check(io_out == {6'(cur), s}, {what, ": io_out"});
      check(io_oeb == (io_in ^ {IO_W{cur[0]}}), {what, ": io_oeb"});
      check(irq == (la_in[2:0] ^ 3'(cur)), {what, ": user_irq"});
      check(active == (NP'(1) << cur), {what, ": one-hot active"});
      check(pin[cur].la_data_in == la_in && pin[cur].la_oenb == la_oenb &&
            pin[cur].io_in == io_in, {what, ": active slot sees inputs"});
    end
    for (int i = 0; i < NP; i++) if (i != cur) begin
      check(pin[i].la_data_in == '0 && pin[i].la_oenb == '0 && pin[i].io_in == '0 &&
            !pin[i].cyc && !pin[i].stb && pin[i].adr == '0 && pin[i].dat == '0,
            $sformatf("%s: slot %0d gated to zero", what, i));
      n_gated++;
    end
  endtask

  task automatic program_proj(input int k);
    ref_a[k] = $urandom; ref_b[k] = $urandom;
    wr(32'h3000_0000, ref_a[k]);
    wr(32'h3000_0004, ref_b[k]);
  endtask

  task automatic verify(input int k, input string what);
    rd_expect(32'h3000_000C, 32'(k), {what, " id"});
    rd_expect(32'h3000_0008, ref_a[k] + ref_b[k], {what, " sum"});
  endtask

  int order [NP];
  logic [31:0] rd; bit ok;

  initial begin
    cyc = 0; stb = 0; we = 0; sel = 0; adr = 0; dat_w = 0;
    la_in = '0; la_oenb = '0; io_in = '0;
    rst = 1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < NP; i++) begin ref_a[i] = 0; ref_b[i] = 0; order[i] = i; end
    order.shuffle();

    // After reset nothing is selected and nothing is held in reset.
    rd_expect(PROJ_SELECT_ADR, 32'hFFFF_FFFF, "select after reset");
    rd_expect(PROJ_RESET_ADR,  32'hFFFF_FFFF, "reset after reset");
    check(in_reset == '0, "no slot in reset after bus reset");
    check_pins("after reset");
    n_deselect++;

    // Select every project in turn and program it.
    foreach (order[j]) begin
      int k = order[j];
      select(k);
      check_pins($sformatf("slot %0d fresh", k));
      program_proj(k);
      verify(k, $sformatf("slot %0d", k));
      check_pins($sformatf("slot %0d programmed", k));
    end

    // A deselected project keeps its state: revisit every one.
    foreach (order[j]) begin
      int k = order[NP - 1 - j];
      select(k);
      verify(k, $sformatf("slot %0d revisited", k));
      n_retained++;
    end

    // Reset one project while another is active.
    select(0);
    wr(PROJ_RESET_ADR, 32'd1);
    #1 check(in_reset == 32'h2 && pin[1].rst && !pin[0].rst, "only slot 1 in reset");
    repeat (2) @(negedge clk);
    wr(PROJ_RESET_ADR, 32'hFFFF_FFFF);
    #1 check(in_reset == '0 && !pin[1].rst, "reset released");
    ref_a[1] = 0; ref_b[1] = 0;
    n_proj_reset++;
    verify(0, "slot 0 unaffected by reset of 1");
    select(1);
    verify(1, "slot 1 after its reset");
    check_pins("slot 1 after reset");

    // Reset the active project itself, then release and reprogram it.
    select(7);
    wr(PROJ_RESET_ADR, 32'd7);
    #1 check(pin[7].rst, "slot 7 in reset");
    wr(PROJ_RESET_ADR, 32'hFFFF_FFFF);
    ref_a[7] = 0; ref_b[7] = 0;
    n_proj_reset++;
    verify(7, "slot 7 after own reset");
    program_proj(7);
    verify(7, "slot 7 reprogrammed");

    // Deselect all: outputs go to zero and project addresses are not answered.
    select(-1);
    check_pins("all deselected");
    wb(0, 32'h3000_0008, 0, rd, ok);
    check(!ok && rd == 0, "no project answers while none is selected");
    n_deselect++;

    // Index 32 has low bits 0 but is not a slot: nothing may be selected.
    wr(PROJ_SELECT_ADR, 32'd32);
    cur = -1;
    check_pins("index 32");
    wb(0, 32'h3000_000C, 0, rd, ok);
    check(!ok, "index 32 selects no project");
    n_out_of_range++;

    // Bus reset clears every project and the control registers.
    select(5);
    @(negedge clk) rst = 1;
    #1 check(&{pin[0].rst, pin[5].rst, pin[31].rst}, "bus reset reaches slots");
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    cur = -1;
    for (int i = 0; i < NP; i++) begin ref_a[i] = 0; ref_b[i] = 0; end
    check_pins("after bus reset");
    select(5);
    verify(5, "slot 5 after bus reset");
    n_bus_reset++;

    $display("mechanisms: select=%0d deselect=%0d proj_reset=%0d ctrl_intercept=%0d gated=%0d out_of_range=%0d retained=%0d bus_reset=%0d",
             n_select, n_deselect, n_proj_reset, n_ctrl_intercept, n_gated, n_out_of_range,
             n_retained, n_bus_reset);
    check(n_select > 0, "select happened");
    check(n_deselect > 0, "deselect happened");
    check(n_proj_reset > 0, "project reset happened");
    check(n_ctrl_intercept > 0, "control access happened");
    check(n_gated > 0, "input gating observed");
    check(n_out_of_range > 0, "out-of-range index happened");
    check(n_retained > 0, "state retention observed");
    check(n_bus_reset > 0, "bus reset happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
