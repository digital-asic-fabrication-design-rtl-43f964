// user_project_wrapper: multi-project framework for the Caravel user area.
//
// Up to NUM_PROJECTS independent user projects share one set of chip
// resources: the management core's Wishbone bus and logic analyzer, the GPIO
// pads and the interrupt lines. Exactly one project (or none) is active at a
// time. Firmware picks it by writing the project's index to PROJ_SELECT
// (0x3800_0000) and can hold any one project in reset by writing its index
// to PROJ_RESET (0x3800_0004); 0xFFFF_FFFF in either register means "none".
//
// Structure:
//   wb_control      answers Wishbone requests to the two registers.
//   onehot_decoder  x2 turns each register's index into one line per slot;
//                   an index outside 0..NUM_PROJECTS-1 enables no slot.
//   input_gate      one per slot: the active slot receives the shared
//                   inputs, all other slots receive zeros; slot reset is
//                   wb_rst_i OR its PROJ_RESET line.
//   output_mux      returns the active slot's output bundle (Wishbone ack and
//                   data, logic-analyzer outputs, GPIO outputs and output
//                   enables, interrupts); all zeros when nothing is active.
//
// Requests to the two control registers never reach a project; every other
// Wishbone address goes to the active project, so projects must place their
// registers below 0x3800_0000. The Wishbone acknowledge back to the
// management core is the OR of the control-register ack and the active
// project's ack. Apart from the registered acknowledge and the two control
// registers the framework is combinational: a project's response reaches the
// shared outputs in the same cycle.
//
// The project slots are brought out as ports (proj_in / proj_out, one packed
// struct per slot); the projects themselves run on wb_clk_i and user_clock2,
// which they take directly. The slot count of 32, the two register addresses,
// zero-gating of inactive inputs and multiplexed outputs follow the
// framework's design. The "no slot" meaning of out-of-range indexes for both
// registers, keeping control-register requests away from projects and
// bringing slots out as ports are this design's choices.
module user_project_wrapper
  import framework_pkg::*;
#(
  parameter int unsigned NUM_PROJECTS = 32
) (
  // Wishbone slave port from the management core
  input  logic                                 wb_clk_i,
  input  logic                                 wb_rst_i,
  input  logic                                 wbs_stb_i,
  input  logic                                 wbs_cyc_i,
  input  logic                                 wbs_we_i,
  input  logic [WB_SW-1:0]                     wbs_sel_i,
  input  logic [WB_DW-1:0]                     wbs_dat_i,
  input  logic [WB_AW-1:0]                     wbs_adr_i,
  output logic                                 wbs_ack_o,
  output logic [WB_DW-1:0]                     wbs_dat_o,
  // Logic analyzer
  input  logic [LA_W-1:0]                      la_data_in,
  output logic [LA_W-1:0]                      la_data_out,
  input  logic [LA_W-1:0]                      la_oenb,
  // GPIO pads
  input  logic [IO_W-1:0]                      io_in,
  output logic [IO_W-1:0]                      io_out,
  output logic [IO_W-1:0]                      io_oeb,
  // Interrupts to the management core
  output logic [IRQ_W-1:0]                     user_irq,
  // Project slots
  output proj_in_t  [NUM_PROJECTS-1:0]         proj_in,
  input  proj_out_t [NUM_PROJECTS-1:0]         proj_out,
  // Decoded control state, for observation
  output logic      [NUM_PROJECTS-1:0]         proj_active,
  output logic      [NUM_PROJECTS-1:0]         proj_in_reset
);

  localparam int unsigned SEL_W = (NUM_PROJECTS > 1) ? $clog2(NUM_PROJECTS) : 1;
  localparam int unsigned DEC_W = 1 << SEL_W;

  // ---------------------------------------------------------------- control
  logic             ctrl_ack, ctrl_hit;
  logic [WB_DW-1:0] ctrl_dat, sel_reg, rst_reg;

  wb_control u_ctrl (
    .clk     (wb_clk_i),
    .rst     (wb_rst_i),
    .cyc_i   (wbs_cyc_i),
    .stb_i   (wbs_stb_i),
    .we_i    (wbs_we_i),
    .sel_i   (wbs_sel_i),
    .adr_i   (wbs_adr_i),
    .dat_i   (wbs_dat_i),
    .ack_o   (ctrl_ack),
    .dat_o   (ctrl_dat),
    .hit     (ctrl_hit),
    .proj_sel(sel_reg),
    .proj_rst(rst_reg)
  );

  // An index is valid only if the whole register holds a slot number.
  logic sel_valid, rst_valid;
  assign sel_valid = (sel_reg < WB_DW'(NUM_PROJECTS));
  assign rst_valid = (rst_reg < WB_DW'(NUM_PROJECTS));

  logic [DEC_W-1:0] sel_onehot, rst_onehot;

  onehot_decoder #(.IN_W(SEL_W)) u_sel_dec (.in(sel_reg[SEL_W-1:0]), .out(sel_onehot));
  onehot_decoder #(.IN_W(SEL_W)) u_rst_dec (.in(rst_reg[SEL_W-1:0]), .out(rst_onehot));

  assign proj_active   = sel_onehot[NUM_PROJECTS-1:0] & {NUM_PROJECTS{sel_valid}};
  assign proj_in_reset = rst_onehot[NUM_PROJECTS-1:0] & {NUM_PROJECTS{rst_valid}};

  // ------------------------------------------------------------- input side
  shared_in_t shared;

  always_comb begin
    shared.cyc        = wbs_cyc_i & ~ctrl_hit;
    shared.stb        = wbs_stb_i & ~ctrl_hit;
    shared.we         = wbs_we_i;
    shared.sel        = wbs_sel_i;
    shared.adr        = wbs_adr_i;
    shared.dat        = wbs_dat_i;
    shared.la_data_in = la_data_in;
    shared.la_oenb    = la_oenb;
    shared.io_in      = io_in;
  end

  for (genvar i = 0; i < NUM_PROJECTS; i++) begin : g_slot
    input_gate u_gate (
      .active  (proj_active[i]),
      .bus_rst (wb_rst_i),
      .proj_rst(proj_in_reset[i]),
      .shared  (shared),
      .slot    (proj_in[i])
    );
  end

  // ------------------------------------------------------------ output side
  proj_out_t active_out;

  output_mux #(.N(NUM_PROJECTS), .W(PROJ_OUT_W), .SEL_W(SEL_W)) u_out_mux (
    .in (proj_out),
    .sel(sel_reg[SEL_W-1:0]),
    .en (sel_valid),
    .out(active_out)
  );

  assign wbs_ack_o   = ctrl_ack | active_out.ack;
  assign wbs_dat_o   = ctrl_ack ? ctrl_dat : active_out.dat;
  assign la_data_out = active_out.la_data_out;
  assign io_out      = active_out.io_out;
  assign io_oeb      = active_out.io_oeb;
  assign user_irq    = active_out.irq;

  // At most one project is active, and a control-register request never
  // reaches a project.
  a_one_active: assert property (@(posedge wb_clk_i) $onehot0(proj_active));
  a_ctrl_private: assert property (@(posedge wb_clk_i)
    ctrl_hit |-> !(shared.cyc || shared.stb));

endmodule
