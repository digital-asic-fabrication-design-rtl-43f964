// wb_control: Wishbone slave holding the framework's two control registers.
//
//   PROJ_SELECT (0x3800_0000)  index of the active project; any value that is
//                              not a valid slot index (0xFFFF_FFFF by
//                              convention) deselects every project.
//   PROJ_RESET  (0x3800_0004)  index of the project held in reset; the reset
//                              lasts until another value (0xFFFF_FFFF by
//                              convention) is written.
//
// The helper part decodes the address (hit is high whenever the request is
// for one of these two words, so the framework can keep the request away
// from the projects) and acknowledges every request to them one cycle after
// cyc & stb rise: ack_o is registered and drops again the following cycle
// (a classic master ends the cycle after the ack; one that keeps stb high
// gets a new ack every second cycle). A write updates the bytes enabled
// by sel at the acknowledging clock edge; a read returns the register on
// dat_o while ack_o is high. Both registers reset to 0xFFFF_FFFF (nothing
// selected, nothing in reset).
//
// The two addresses, the index meaning and the 0xFFFF_FFFF idle value follow
// the framework's firmware interface. Byte enables, read-back and the
// one-cycle acknowledge are this design's choices.
module wb_control
  import framework_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic             cyc_i,
  input  logic             stb_i,
  input  logic             we_i,
  input  logic [WB_SW-1:0] sel_i,
  input  logic [WB_AW-1:0] adr_i,
  input  logic [WB_DW-1:0] dat_i,
  output logic             ack_o,
  output logic [WB_DW-1:0] dat_o,
  output logic             hit,        // request addresses a control register
  output logic [WB_DW-1:0] proj_sel,   // PROJ_SELECT contents
  output logic [WB_DW-1:0] proj_rst    // PROJ_RESET contents
);

  logic is_sel, is_rst, req, wr;

  assign is_sel = (adr_i == PROJ_SELECT_ADR);
  assign is_rst = (adr_i == PROJ_RESET_ADR);
  assign hit    = is_sel | is_rst;
  assign req    = cyc_i & stb_i & hit;
  // Write at the edge where ack_o rises.
  assign wr     = req & we_i & ~ack_o;

  always_ff @(posedge clk) begin
    if (rst) ack_o <= 1'b0;
    else     ack_o <= req & ~ack_o;
  end

  // Each 32-bit register is four byte-lane registers.
  for (genvar b = 0; b < WB_SW; b++) begin : g_lane
    nbit_register #(.N(8), .RESET_VALUE(CTRL_IDLE[8*b +: 8])) u_sel_reg (
      .clk  (clk),
      .reset(rst),
      .we   (wr & is_sel & sel_i[b]),
      .d    (dat_i[8*b +: 8]),
      .q    (proj_sel[8*b +: 8])
    );
    nbit_register #(.N(8), .RESET_VALUE(CTRL_IDLE[8*b +: 8])) u_rst_reg (
      .clk  (clk),
      .reset(rst),
      .we   (wr & is_rst & sel_i[b]),
      .d    (dat_i[8*b +: 8]),
      .q    (proj_rst[8*b +: 8])
    );
  end

  always_comb begin
    dat_o = '0;
    if (ack_o) dat_o = is_sel ? proj_sel : proj_rst;
  end

  // A request to the control registers is acknowledged exactly one cycle later.
  a_ack_follows_req: assert property (@(posedge clk) disable iff (rst)
    (req && !ack_o) |=> ack_o);
  a_ack_single: assert property (@(posedge clk) disable iff (rst)
    ack_o |=> !ack_o);

endmodule
