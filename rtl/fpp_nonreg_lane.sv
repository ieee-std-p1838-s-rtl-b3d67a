// fpp_nonreg_lane: non-registered FPP lane, generated from a path description.
//
// Carries signals that must not be pipelined, such as a test clock, so it
// has no clock, no pipeline registers and no hold elements: every path is
// combinational. CFG lists the paths [destination][source]; a destination
// serving several paths selects the one whose select value equals
// mux_ctrl_i[d]. Besides the six lane terminals it has the destination
// FPP_CLK_OUT, which feeds the FPP_CLK_IN of registered lanes. Unused
// destinations drive 0. FPP_PRI and FPP_SEC are split into input, output and
// output enable as in fpp_reg_lane.
//
// The default CFG is the ClkLane of the Test@First example: FPP_PRI drives
// both FPP_CLK_OUT and FPP_SEC. In that form the lane is wiring plus the
// FPP_SEC output enable; multiplexers appear for path tables in which several
// paths share a destination.
module fpp_nonreg_lane #(
  parameter fpp_pkg::nonreg_lane_cfg_t CFG = fpp_pkg::CLK_LANE_CFG
) (
  input  logic                                          pri_i,
  output logic                                          pri_o,
  output logic                                          pri_oe_o,
  input  logic                                          sec_i,
  output logic                                          sec_o,
  output logic                                          sec_oe_o,
  output logic                                          to_side_o,
  input  logic                                          from_side_i,
  output logic                                          to_core_o,
  input  logic                                          from_core_i,
  output logic                                          clk_out_o,    // FPP_CLK_OUT
  input  fpp_pkg::mux_ctrl_t [fpp_pkg::NUM_NONREG_DST-1:0] mux_ctrl_i,
  input  logic                                          pri_oe_i,
  input  logic                                          sec_oe_i
);
  import fpp_pkg::*;

  function automatic int unsigned n_paths(input int unsigned d);
    int unsigned n = 0;
    for (int unsigned s = 0; s < NUM_SRC; s++) n += int'(CFG[d][s].en);
    return n;
  endfunction

  if (CFG[DST_PRI][SRC_PRI].en || CFG[DST_SEC][SRC_SEC].en) begin : g_err_bidir
    $error("fpp_nonreg_lane: FPP_PRI/FPP_SEC cannot be source and destination of one path");
  end

  // Two paths into one destination need different select values.
  for (genvar d = 0; d < NUM_NONREG_DST; d++) begin : g_chk_sel
    for (genvar s1 = 0; s1 < NUM_SRC; s1++) begin : g_s1
      for (genvar s2 = s1 + 1; s2 < NUM_SRC; s2++) begin : g_s2
        if (CFG[d][s1].en && CFG[d][s2].en && CFG[d][s1].mux_val == CFG[d][s2].mux_val) begin : g_err_sel
          $error("fpp_nonreg_lane: two paths into one destination share a select value");
        end
      end
    end
  end

  logic [NUM_SRC-1:0] src;
  assign src[SRC_PRI]       = pri_i;
  assign src[SRC_SEC]       = sec_i;
  assign src[SRC_FROM_SIDE] = from_side_i;
  assign src[SRC_FROM_CORE] = from_core_i;

  logic [NUM_NONREG_DST-1:0] dst;

  for (genvar d = 0; d < NUM_NONREG_DST; d++) begin : g_dst
    if (n_paths(d) == 0) begin : g_unused
      assign dst[d] = 1'b0;
    end else if (n_paths(d) == 1) begin : g_single
      logic [NUM_SRC-1:0] en_mask;
      for (genvar s = 0; s < NUM_SRC; s++) begin : g_m
        assign en_mask[s] = CFG[d][s].en;
      end
      assign dst[d] = |(src & en_mask);
    end else begin : g_mux
      always_comb begin
        dst[d] = 1'b0;
        for (int unsigned s = 0; s < NUM_SRC; s++) begin
          if (CFG[d][s].en && CFG[d][s].mux_val == mux_ctrl_i[d]) dst[d] = src[s];
        end
      end
    end
  end

  assign pri_o     = dst[DST_PRI];
  assign sec_o     = dst[DST_SEC];
  assign to_side_o = dst[DST_TO_SIDE];
  assign to_core_o = dst[DST_TO_CORE];
  assign clk_out_o = dst[DST_CLK_OUT];
  assign pri_oe_o  = (n_paths(DST_PRI) != 0) && pri_oe_i;
  assign sec_oe_o  = (n_paths(DST_SEC) != 0) && sec_oe_i;

endmodule
