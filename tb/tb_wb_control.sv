// Testbench for wb_control: Wishbone writes and reads of PROJ_SELECT and
// PROJ_RESET, reset values, byte enables, address decode (hit) and the
// one-cycle acknowledge. Expected values come from a reference copy of the
// two registers kept in the testbench.
module tb_wb_control;
  import framework_pkg::*;

  logic clk = 1'b0, rst;
  logic cyc, stb, we, ack, hit;
  logic [3:0] sel;
  logic [31:0] adr, dat_w, dat_r, psel, prst;
  logic [31:0] ref_sel, ref_rst;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  wb_control dut (
    .clk, .rst, .cyc_i(cyc), .stb_i(stb), .we_i(we), .sel_i(sel), .adr_i(adr),
    .dat_i(dat_w), .ack_o(ack), .dat_o(dat_r), .hit, .proj_sel(psel), .proj_rst(prst)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [31:0] merge(logic [31:0] old, logic [31:0] nw, logic [3:0] be);
    for (int b = 0; b < 4; b++) if (be[b]) old[8*b +: 8] = nw[8*b +: 8];
    return old;
  endfunction

  // One Wishbone classic cycle; checks that ack comes exactly one cycle after
  // the request and returns the data seen with ack.
  task automatic wb_cycle(input logic w, input logic [31:0] a, input logic [31:0] d,
                          input logic [3:0] be, output logic [31:0] rd);
    int wait_cycles = 0;
    cyc = 1; stb = 1; we = w; adr = a; dat_w = d; sel = be;
    #1;
    check(hit == ((a == PROJ_SELECT_ADR) || (a == PROJ_RESET_ADR)), "hit decode");
    check(ack == 1'b0, "no ack in request cycle");
    do begin
      @(posedge clk); #1; wait_cycles++;
    end while (!ack && wait_cycles < 4);
    check(wait_cycles == 1, $sformatf("ack latency %0d", wait_cycles));
    rd = dat_r;
    @(negedge clk);
    cyc = 0; stb = 0; we = 0;
    #1;
    @(posedge clk); #1;
    check(ack == 1'b0, "ack dropped after cycle");
  endtask

  logic [31:0] rd;

  initial begin
    cyc = 0; stb = 0; we = 0; sel = 0; adr = 0; dat_w = 0; rst = 1;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    ref_sel = '1; ref_rst = '1;
    check(psel == 32'hFFFF_FFFF && prst == 32'hFFFF_FFFF, "reset values");

    // Address outside the two registers: no hit, no ack.
    cyc = 1; stb = 1; we = 1; adr = 32'h3000_0000; dat_w = 32'h1234; sel = 4'hF;
    repeat (3) begin @(posedge clk); #1; check(!ack && !hit, "no ack for project address"); end
    cyc = 0; stb = 0;
    check(psel == ref_sel && prst == ref_rst, "registers untouched by other address");

    // Firmware sequence: select 1, reset 1, release reset.
    wb_cycle(1, PROJ_SELECT_ADR, 32'h0000_0001, 4'hF, rd); ref_sel = 32'h1;
    check(psel == ref_sel, "select written");
    wb_cycle(1, PROJ_RESET_ADR, 32'h0000_0001, 4'hF, rd); ref_rst = 32'h1;
    check(prst == ref_rst, "reset written");
    wb_cycle(1, PROJ_RESET_ADR, 32'hFFFF_FFFF, 4'hF, rd); ref_rst = '1;
    check(prst == ref_rst, "reset cleared");
    wb_cycle(0, PROJ_SELECT_ADR, 0, 4'hF, rd);
    check(rd == ref_sel, "select read-back");

    // Random traffic with byte enables, including cycles held across the ack.
    for (int n = 0; n < 300; n++) begin
      logic w; logic [31:0] a, d; logic [3:0] be;
      w  = $urandom_range(0, 1);
      a  = $urandom_range(0, 1) ? PROJ_SELECT_ADR : PROJ_RESET_ADR;
      d  = $urandom;
      be = 4'($urandom);
      wb_cycle(w, a, d, be, rd);
      if (w) begin
        if (a == PROJ_SELECT_ADR) ref_sel = merge(ref_sel, d, be);
        else                      ref_rst = merge(ref_rst, d, be);
      end else begin
        check(rd == ((a == PROJ_SELECT_ADR) ? ref_sel : ref_rst), "random read");
      end
      check(psel == ref_sel && prst == ref_rst, $sformatf("registers after op %0d", n));
    end

    // A request held for several cycles is acknowledged and written once per
    // ack; ack toggles while stb stays high.
    cyc = 1; stb = 1; we = 1; adr = PROJ_SELECT_ADR; dat_w = 32'h5; sel = 4'hF;
    @(posedge clk); #1; check(ack, "held request ack 1");
    @(posedge clk); #1; check(!ack, "held request ack gap");
    @(posedge clk); #1; check(ack, "held request ack 2");
    cyc = 0; stb = 0;
    check(psel == 32'h5, "held write value");

    // Bus reset restores idle values.
    rst = 1; @(posedge clk); #1 rst = 0;
    check(psel == '1 && prst == '1 && !ack, "reset restores idle");

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
