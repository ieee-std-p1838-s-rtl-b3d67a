// fpp_test_at_first: flexible parallel port of one die, Test@First architecture.
//
// The FPP gives the die stack a multi-bit test access path next to the
// one-bit TAP. Test data enters the die on the up channel (PRI_UP). With
// BYPASS = 0 it is sent into the core under test (TO_CORE) and the core's
// responses (FROM_CORE) travel on; with BYPASS = 1 the core is skipped and the
// incoming data is registered once and travels on. "Travels on" means up to
// the next die (SEC_UP) and, through the side connection LaneConn, to the
// down channel. With TURN = 1 the down channel returns the LaneConn data to
// the previous die (PRI_DOWN), turning the access path around in this die;
// with TURN = 0 it registers what the next die sends down (SEC_DOWN) and
// passes that on. The core is thus tested on the way up, the first time the
// data reaches the die.
//
// Parts:
//   u_cfg   4-bit configuration register {PRI_DOWN_OE, SEC_UP_OE, TURN, BYPASS},
//           a test data register of the die's TAP (tck/trst_n/tdi/tdo and
//           the select/capture/shift/update strobes of its controller).
//   u_clk   non-registered clock lane: TestClock (PRI) -> FppClock (clock of
//           both channels) and -> TestClock_UP (SEC, to the next die).
//   u_up    UpChannel, LANES UpLanes: SEC and TO_SIDE select PRI through one
//           rising-edge register (!BYPASS = 0) or FROM_CORE (!BYPASS = 1);
//           TO_CORE follows PRI.
//   u_down  DownChannel, LANES DownLanes: PRI selects FROM_SIDE (!TURN = 0)
//           or SEC through one rising-edge register (!TURN = 1).
// Every registered-lane output passes a lock-up latch on the inverted
// FppClock, so outputs change after the falling clock edge.
//
// Latency, counted in FppClock rising edges: PRI_UP -> SEC_UP 1 (bypass);
// PRI_UP -> TO_CORE 0 and FROM_CORE -> SEC_UP 0 (both through latches only);
// SEC_DOWN -> PRI_DOWN 1; PRI_UP -> PRI_DOWN 1 when BYPASS = TURN = 1.
//
// FPP_PRI and FPP_SEC are bidirectional terminals; this example uses each in
// one direction only, so each appears as an input or as an output with its
// output enable, and the pad drivers are outside this module. Unused
// directions of the lanes are left open and their inputs tied to 0.
module fpp_test_at_first #(
  parameter int unsigned LANES = 8   // regLaneCount of both channels
) (
  // TAP side of the configuration register
  input  logic             tck_i,
  input  logic             trst_ni,
  input  logic             tdi_i,
  input  logic             cfg_select_i,
  input  logic             capture_dr_i,
  input  logic             shift_dr_i,
  input  logic             update_dr_i,
  output logic             cfg_tdo_o,
  // clock lane
  input  logic             test_clock_i,       // TestClock
  output logic             test_clock_up_o,    // TestClock_UP
  output logic             test_clock_up_oe_o,
  // up channel
  input  logic [LANES-1:0] pri_up_i,           // PRI_UP
  output logic [LANES-1:0] sec_up_o,           // SEC_UP
  output logic [LANES-1:0] sec_up_oe_o,
  output logic [LANES-1:0] to_core_o,          // TO_CORE
  input  logic [LANES-1:0] from_core_i,        // FROM_CORE
  // down channel
  output logic [LANES-1:0] pri_down_o,         // PRI_DOWN
  output logic [LANES-1:0] pri_down_oe_o,
  input  logic [LANES-1:0] sec_down_i          // SEC_DOWN
);
  import fpp_pkg::*;

  taf_cfg_t cfg;
  logic     fpp_clock;                         // FppClock
  logic [LANES-1:0] lane_conn;                 // LaneConn

  fpp_config_reg #(.WIDTH(TAF_CFG_BITS)) u_cfg (
    .tck_i        (tck_i),
    .trst_ni      (trst_ni),
    .tdi_i        (tdi_i),
    .select_i     (cfg_select_i),
    .capture_dr_i (capture_dr_i),
    .shift_dr_i   (shift_dr_i),
    .update_dr_i  (update_dr_i),
    .tdo_o        (cfg_tdo_o),
    .cfg_o        (cfg)
  );

  // ---- clock lane ----
  logic clk_pri_o, clk_pri_oe, clk_to_side, clk_to_core;

  fpp_nonreg_lane #(.CFG(CLK_LANE_CFG)) u_clk (
    .pri_i       (test_clock_i),
    .pri_o       (clk_pri_o),
    .pri_oe_o    (clk_pri_oe),
    .sec_i       (1'b0),
    .sec_o       (test_clock_up_o),
    .sec_oe_o    (test_clock_up_oe_o),
    .to_side_o   (clk_to_side),
    .from_side_i (1'b0),
    .to_core_o   (clk_to_core),
    .from_core_i (1'b0),
    .clk_out_o   (fpp_clock),
    .mux_ctrl_i  ('0),
    .pri_oe_i    (1'b0),
    .sec_oe_i    (cfg.sec_up_oe)
  );

  // ---- up channel ----
  mux_ctrl_t [NUM_REG_DST-1:0] up_mux;
  always_comb begin
    up_mux              = '0;
    up_mux[DST_SEC]     = mux_ctrl_t'(!cfg.bypass);
    up_mux[DST_TO_SIDE] = mux_ctrl_t'(!cfg.bypass);
  end

  logic [LANES-1:0] up_pri_o, up_pri_oe;

  fpp_reg_channel #(.LANES(LANES), .CFG(UP_LANE_CFG)) u_up (
    .clk_i       (fpp_clock),
    .pri_i       (pri_up_i),
    .pri_o       (up_pri_o),
    .pri_oe_o    (up_pri_oe),
    .sec_i       ('0),
    .sec_o       (sec_up_o),
    .sec_oe_o    (sec_up_oe_o),
    .to_side_o   (lane_conn),
    .from_side_i ('0),
    .to_core_o   (to_core_o),
    .from_core_i (from_core_i),
    .mux_ctrl_i  (up_mux),
    .pl_bypass_i ('0),
    .pri_oe_i    (1'b0),
    .sec_oe_i    (cfg.sec_up_oe)
  );

  // ---- down channel ----
  mux_ctrl_t [NUM_REG_DST-1:0] down_mux;
  always_comb begin
    down_mux          = '0;
    down_mux[DST_PRI] = mux_ctrl_t'(!cfg.turn);
  end

  logic [LANES-1:0] dn_sec_o, dn_sec_oe, dn_to_side, dn_to_core;

  fpp_reg_channel #(.LANES(LANES), .CFG(DOWN_LANE_CFG)) u_down (
    .clk_i       (fpp_clock),
    .pri_i       ('0),
    .pri_o       (pri_down_o),
    .pri_oe_o    (pri_down_oe_o),
    .sec_i       (sec_down_i),
    .sec_o       (dn_sec_o),
    .sec_oe_o    (dn_sec_oe),
    .to_side_o   (dn_to_side),
    .from_side_i (lane_conn),
    .to_core_o   (dn_to_core),
    .from_core_i ('0),
    .mux_ctrl_i  (down_mux),
    .pl_bypass_i ('0),
    .pri_oe_i    (cfg.pri_down_oe),
    .sec_oe_i    (1'b0)
  );

endmodule
