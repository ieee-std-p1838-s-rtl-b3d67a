// fpp_reg_channel: a channel of identical registered FPP lanes.
//
// LANES copies of fpp_reg_lane with the same path description CFG. All lanes
// share one clock (the clock lane that serves the channel) and one set of
// configuration bits, so a channel moves a LANES-bit word per clock with the
// timing of a single lane. Lane i connects to bit i of every terminal bus.
// The defaults are the UpChannel of the Test@First example: eight UpLanes.
module fpp_reg_channel #(
  parameter int unsigned            LANES = 8,
  parameter fpp_pkg::reg_lane_cfg_t CFG   = fpp_pkg::UP_LANE_CFG
) (
  input  logic                                                  clk_i,
  input  logic [LANES-1:0]                                      pri_i,
  output logic [LANES-1:0]                                      pri_o,
  output logic [LANES-1:0]                                      pri_oe_o,
  input  logic [LANES-1:0]                                      sec_i,
  output logic [LANES-1:0]                                      sec_o,
  output logic [LANES-1:0]                                      sec_oe_o,
  output logic [LANES-1:0]                                      to_side_o,
  input  logic [LANES-1:0]                                      from_side_i,
  output logic [LANES-1:0]                                      to_core_o,
  input  logic [LANES-1:0]                                      from_core_i,
  input  fpp_pkg::mux_ctrl_t [fpp_pkg::NUM_REG_DST-1:0]         mux_ctrl_i,
  input  logic [fpp_pkg::NUM_REG_DST-1:0][fpp_pkg::NUM_SRC-1:0] pl_bypass_i,
  input  logic                                                  pri_oe_i,
  input  logic                                                  sec_oe_i
);

  for (genvar i = 0; i < LANES; i++) begin : g_lane
    fpp_reg_lane #(.CFG(CFG)) u_lane (
      .clk_i       (clk_i),
      .pri_i       (pri_i[i]),
      .pri_o       (pri_o[i]),
      .pri_oe_o    (pri_oe_o[i]),
      .sec_i       (sec_i[i]),
      .sec_o       (sec_o[i]),
      .sec_oe_o    (sec_oe_o[i]),
      .to_side_o   (to_side_o[i]),
      .from_side_i (from_side_i[i]),
      .to_core_o   (to_core_o[i]),
      .from_core_i (from_core_i[i]),
      .mux_ctrl_i  (mux_ctrl_i),
      .pl_bypass_i (pl_bypass_i),
      .pri_oe_i    (pri_oe_i),
      .sec_oe_i    (sec_oe_i)
    );
  end

endmodule
