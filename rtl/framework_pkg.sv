// framework_pkg: widths, register addresses and port bundles shared by the
// multi-project framework.
//
// The framework sits in the Caravel user area. The resource widths below are
// the Caravel user-area pin counts (32-bit Wishbone, 128 logic-analyzer
// lines, 38 GPIO pads, 3 interrupt lines). The two control register addresses,
// PROJ_SELECT and PROJ_RESET, are the framework's firmware interface; user
// projects must keep their own Wishbone registers below PROJ_SELECT_ADR.
//
// proj_in_t is everything one project slot receives from the framework and
// proj_out_t everything it returns. Bundling them lets the framework gate and
// multiplex whole slots at once.
package framework_pkg;

  localparam int unsigned WB_AW  = 32;
  localparam int unsigned WB_DW  = 32;
  localparam int unsigned WB_SW  = WB_DW / 8;
  localparam int unsigned LA_W   = 128;
  localparam int unsigned IO_W   = 38;
  localparam int unsigned IRQ_W  = 3;

  // Framework control registers (word addresses on the Wishbone bus).
  localparam logic [WB_AW-1:0] PROJ_SELECT_ADR = 32'h3800_0000;
  localparam logic [WB_AW-1:0] PROJ_RESET_ADR  = 32'h3800_0004;

  // Value held in both registers after reset: no project selected, no
  // project held in reset. Writing it again deselects / releases.
  localparam logic [WB_DW-1:0] CTRL_IDLE = '1;

  // Signals driven into one project slot.
  typedef struct packed {
    logic                rst;         // wb_rst_i of the slot
    logic                cyc;         // wbs_cyc_i
    logic                stb;         // wbs_stb_i
    logic                we;          // wbs_we_i
    logic [WB_SW-1:0]    sel;         // wbs_sel_i
    logic [WB_AW-1:0]    adr;         // wbs_adr_i
    logic [WB_DW-1:0]    dat;         // wbs_dat_i
    logic [LA_W-1:0]     la_data_in;  // la_data_in
    logic [LA_W-1:0]     la_oenb;     // la_oenb
    logic [IO_W-1:0]     io_in;       // io_in
  } proj_in_t;

  // The shared resources before they are gated to a slot (no reset).
  typedef struct packed {
    logic                cyc;
    logic                stb;
    logic                we;
    logic [WB_SW-1:0]    sel;
    logic [WB_AW-1:0]    adr;
    logic [WB_DW-1:0]    dat;
    logic [LA_W-1:0]     la_data_in;
    logic [LA_W-1:0]     la_oenb;
    logic [IO_W-1:0]     io_in;
  } shared_in_t;

  // Signals returned by one project slot.
  typedef struct packed {
    logic                ack;         // wbs_ack_o
    logic [WB_DW-1:0]    dat;         // wbs_dat_o
    logic [LA_W-1:0]     la_data_out; // la_data_out
    logic [IO_W-1:0]     io_out;      // io_out
    logic [IO_W-1:0]     io_oeb;      // io_oeb
    logic [IRQ_W-1:0]    irq;         // user_irq
  } proj_out_t;

  localparam int unsigned PROJ_OUT_W = $bits(proj_out_t);

endpackage
