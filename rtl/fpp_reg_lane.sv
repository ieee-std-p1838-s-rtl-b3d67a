// fpp_reg_lane: registered FPP lane, generated from a path description.
//
// A lane moves one bit of test data between its terminals. CFG lists which
// of the possible paths exist ([destination][source], at most 4 x 4 - 2 = 14,
// as FPP_PRI and FPP_SEC may not be source and destination of one path).
// Each path runs through its own pipeline (fpp_path_pipe: plRegs stages with
// per-stage trigger edge and an optional bypass). Where a destination serves
// several paths, a multiplexer picks the path whose select value (muxCtrlVal)
// equals that destination's control word mux_ctrl_i[d]; a destination with a
// single path needs no select. Every used destination ends in a lock-up
// latch on the inverted clock (fpp_lockup_latch). Unused destinations drive 0.
//
// The bidirectional terminals FPP_PRI and FPP_SEC are split into an input,
// an output and an output enable; the pad driver itself is outside the lane.
// pri_oe_o / sec_oe_o follow the configuration inputs pri_oe_i / sec_oe_i
// when FPP_PRI / FPP_SEC is a destination of this lane and are 0 otherwise.
//
// Timing: a path with k rising-edge registers delivers its source k cycles
// later, visible at the destination from the falling clock edge on. A path
// without registers is transparent while the clock is low.
//
// The default CFG is the five-path UpLane of the Test@First example. Private
// pipeline registers per path are this design's choice: the standard allows,
// but does not require, sharing registers between paths.
module fpp_reg_lane #(
  parameter fpp_pkg::reg_lane_cfg_t CFG = fpp_pkg::UP_LANE_CFG
) (
  input  logic                                             clk_i,        // FPP_CLK_IN
  // data terminals
  input  logic                                             pri_i,
  output logic                                             pri_o,
  output logic                                             pri_oe_o,
  input  logic                                             sec_i,
  output logic                                             sec_o,
  output logic                                             sec_oe_o,
  output logic                                             to_side_o,
  input  logic                                             from_side_i,
  output logic                                             to_core_o,
  input  logic                                             from_core_i,
  // configuration bits
  input  fpp_pkg::mux_ctrl_t [fpp_pkg::NUM_REG_DST-1:0]    mux_ctrl_i,
  input  logic [fpp_pkg::NUM_REG_DST-1:0][fpp_pkg::NUM_SRC-1:0] pl_bypass_i,
  input  logic                                             pri_oe_i,
  input  logic                                             sec_oe_i
);
  import fpp_pkg::*;

  // Number of paths ending in destination d.
  function automatic int unsigned n_paths(input int unsigned d);
    int unsigned n = 0;
    for (int unsigned s = 0; s < NUM_SRC; s++) n += int'(CFG[d][s].en);
    return n;
  endfunction

  // Elaboration-time checks of the rules of the specification language.
  if (CFG[DST_PRI][SRC_PRI].en || CFG[DST_SEC][SRC_SEC].en) begin : g_err_bidir
    $error("fpp_reg_lane: FPP_PRI/FPP_SEC cannot be source and destination of one path");
  end
  for (genvar d = 0; d < NUM_REG_DST; d++) begin : g_chk_d
    for (genvar s = 0; s < NUM_SRC; s++) begin : g_chk_s
      if (CFG[d][s].en && int'(CFG[d][s].pl_regs) > int'(MAX_PL)) begin : g_err_pl
        $error("fpp_reg_lane: plRegs above MAX_PL");
      end
    end
  end

  // Two paths into one destination need different select values.
  for (genvar d = 0; d < NUM_REG_DST; d++) begin : g_chk_sel
    for (genvar s1 = 0; s1 < NUM_SRC; s1++) begin : g_s1
      for (genvar s2 = s1 + 1; s2 < NUM_SRC; s2++) begin : g_s2
        if (CFG[d][s1].en && CFG[d][s2].en && CFG[d][s1].mux_val == CFG[d][s2].mux_val) begin : g_err_sel
          $error("fpp_reg_lane: two paths into one destination share a select value");
        end
      end
    end
  end

  logic [NUM_SRC-1:0] src;
  assign src[SRC_PRI]       = pri_i;
  assign src[SRC_SEC]       = sec_i;
  assign src[SRC_FROM_SIDE] = from_side_i;
  assign src[SRC_FROM_CORE] = from_core_i;

  logic [NUM_REG_DST-1:0][NUM_SRC-1:0] path_q;   // path outputs
  logic [NUM_REG_DST-1:0]              dst_sel;  // after the destination multiplexer
  logic [NUM_REG_DST-1:0]              dst_q;    // after the hold element

  for (genvar d = 0; d < NUM_REG_DST; d++) begin : g_dst
    for (genvar s = 0; s < NUM_SRC; s++) begin : g_src
      if (CFG[d][s].en) begin : g_path
        fpp_path_pipe #(
          .N          (int'(CFG[d][s].pl_regs)),
          .POS        (CFG[d][s].pl_pos),
          .HAS_BYPASS (CFG[d][s].pl_bypass)
        ) u_pipe (
          .clk      (clk_i),
          .bypass_i (pl_bypass_i[d][s]),
          .d_i      (src[s]),
          .q_o      (path_q[d][s])
        );
      end else begin : g_nopath
        assign path_q[d][s] = 1'b0;
      end
    end

    if (n_paths(d) == 0) begin : g_unused
      assign dst_sel[d] = 1'b0;
      assign dst_q[d]   = 1'b0;
    end else begin : g_used
      if (n_paths(d) == 1) begin : g_single
        assign dst_sel[d] = |path_q[d];
      end else begin : g_mux
        always_comb begin
          dst_sel[d] = 1'b0;
          for (int unsigned s = 0; s < NUM_SRC; s++) begin
            if (CFG[d][s].en && CFG[d][s].mux_val == mux_ctrl_i[d]) dst_sel[d] = path_q[d][s];
          end
        end
      end
      fpp_lockup_latch u_hold (
        .clk (clk_i),
        .d   (dst_sel[d]),
        .q   (dst_q[d])
      );
    end
  end

  assign pri_o     = dst_q[DST_PRI];
  assign sec_o     = dst_q[DST_SEC];
  assign to_side_o = dst_q[DST_TO_SIDE];
  assign to_core_o = dst_q[DST_TO_CORE];
  assign pri_oe_o  = (n_paths(DST_PRI) != 0) && pri_oe_i;
  assign sec_oe_o  = (n_paths(DST_SEC) != 0) && sec_oe_i;

endmodule
