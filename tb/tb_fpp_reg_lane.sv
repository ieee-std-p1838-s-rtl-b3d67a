// tb_fpp_reg_lane: self-checking test of the registered lane.
//
// Three lanes see the same random source stream (new values just after each
// rising clock edge, cycle k carrying pri[k], sec[k], fs[k], fc[k]):
//   A  default configuration, the five-path UpLane;
//   B  the DownLane (FPP_PRI as destination, two-way select);
//   C  a custom lane: a four-way select on FPP_TO_CORE over paths with no
//      register, two rising-edge registers with bypass, one falling-edge
//      register and no register; FPP_PRI fed from FPP_FROM_CORE through one
//      register; FPP_SEC unused;
//   D  the largest lane the template allows, all (4 x 4) - 2 = 14 paths, with
//      pipelines of zero to four stages in mixed edge orders and two bypasses.
//      Its expected outputs come from the edge strings: a value launched at
//      half-cycle time t is taken by a P stage at the next even time and by an
//      N stage at the next odd time (rising edge of cycle k = 2k), and the
//      hold element passes what was launched before the last falling edge.
// Selects and bypass change at random every cycle. Expected outputs are
// written out per path from the cycle history. Checks run just before every
// falling edge (data outputs must still hold the value of the end of the
// previous cycle: the lock-up latch) and just before every rising edge.
module tb_fpp_reg_lane;
  import fpp_pkg::*;
  localparam int NCYC = 400;

  function automatic reg_lane_cfg_t custom_cfg();
    reg_lane_cfg_t c = '0;
    c[DST_TO_CORE][SRC_PRI]       = reg_path(2'd0, 0, '0, 1'b0);
    c[DST_TO_CORE][SRC_SEC]       = reg_path(2'd1, 2, 4'b0011, 1'b1);
    c[DST_TO_CORE][SRC_FROM_SIDE] = reg_path(2'd2, 1, 4'b0000, 1'b0);
    c[DST_TO_CORE][SRC_FROM_CORE] = reg_path(2'd3, 0, '0, 1'b0);
    c[DST_PRI][SRC_FROM_CORE]     = reg_path(2'd0, 1, 4'b0001, 1'b0);
    return c;
  endfunction

  // lane D: one row per path: destination, source, stages, edge string
  // (bit i = stage i, 1 = P), bypass
  typedef struct packed { logic [2:0] d; logic [1:0] s; logic [2:0] n; logic [3:0] pos; logic byp; } path_row_t;
  localparam int ND = 14;
  localparam path_row_t [0:ND-1] ROWS = '{
    '{3'(DST_PRI), 2'(SRC_SEC), 3'd1, 4'b0001, 1'b0},
    '{3'(DST_PRI), 2'(SRC_FROM_SIDE), 3'd1, 4'b0000, 1'b0},
    '{3'(DST_PRI), 2'(SRC_FROM_CORE), 3'd2, 4'b0001, 1'b1},
    '{3'(DST_SEC), 2'(SRC_PRI), 3'd0, 4'b0000, 1'b0},
    '{3'(DST_SEC), 2'(SRC_FROM_SIDE), 3'd2, 4'b0011, 1'b0},
    '{3'(DST_SEC), 2'(SRC_FROM_CORE), 3'd2, 4'b0010, 1'b0},
    '{3'(DST_TO_SIDE), 2'(SRC_PRI), 3'd1, 4'b0001, 1'b0},
    '{3'(DST_TO_SIDE), 2'(SRC_SEC), 3'd1, 4'b0000, 1'b0},
    '{3'(DST_TO_SIDE), 2'(SRC_FROM_SIDE), 3'd0, 4'b0000, 1'b0},
    '{3'(DST_TO_SIDE), 2'(SRC_FROM_CORE), 3'd3, 4'b0101, 1'b0},
    '{3'(DST_TO_CORE), 2'(SRC_PRI), 3'd2, 4'b0000, 1'b0},
    '{3'(DST_TO_CORE), 2'(SRC_SEC), 3'd0, 4'b0000, 1'b0},
    '{3'(DST_TO_CORE), 2'(SRC_FROM_SIDE), 3'd1, 4'b0001, 1'b1},
    '{3'(DST_TO_CORE), 2'(SRC_FROM_CORE), 3'd4, 4'b1111, 1'b0}
  };

  function automatic reg_lane_cfg_t full_cfg();
    reg_lane_cfg_t c = '0;
    for (int i = 0; i < ND; i++)
      c[ROWS[i].d][ROWS[i].s] = reg_path(mux_ctrl_t'(ROWS[i].s), int'(ROWS[i].n), ROWS[i].pos, ROWS[i].byp);
    return c;
  endfunction

  // half-cycle time at which the value entered in cycle 0 leaves the pipeline
  function automatic int launch0(input int n, input logic [3:0] pos);
    int t = 0;
    for (int i = 0; i < n; i++) begin
      t++;
      while ((t % 2 == 0) != pos[i]) t++;
    end
    return t;
  endfunction

  logic clk = 1'b0;
  logic pri, sec, fs, fc;
  logic hp [NCYC], hs [NCYC], hfs [NCYC], hfc [NCYC];
  logic oe_pri, oe_sec;
  mux_ctrl_t [NUM_REG_DST-1:0] ctrl_a, ctrl_b, ctrl_c;
  logic [NUM_REG_DST-1:0][NUM_SRC-1:0] byp_c;

  typedef struct packed { logic pri, pri_oe, sec, sec_oe, to_side, to_core; } lane_out_t;
  lane_out_t out_a, out_b, out_c, exp_a, exp_b, exp_c, prev_a, prev_b, prev_c;

  int checks = 0, failures = 0;
  int n_sel[4];      // how often each select value of lane C was checked
  int n_byp;
  int n_path_d[ND];
  lane_out_t out_d, exp_d, prev_d;
  mux_ctrl_t [NUM_REG_DST-1:0] ctrl_d;
  logic [NUM_REG_DST-1:0][NUM_SRC-1:0] byp_d;
  logic [3:0] dval;

  fpp_reg_lane dut_a (
    .clk_i(clk), .pri_i(pri), .pri_o(out_a.pri), .pri_oe_o(out_a.pri_oe),
    .sec_i(sec), .sec_o(out_a.sec), .sec_oe_o(out_a.sec_oe), .to_side_o(out_a.to_side),
    .from_side_i(fs), .to_core_o(out_a.to_core), .from_core_i(fc),
    .mux_ctrl_i(ctrl_a), .pl_bypass_i('0), .pri_oe_i(oe_pri), .sec_oe_i(oe_sec));

  fpp_reg_lane #(.CFG(DOWN_LANE_CFG)) dut_b (
    .clk_i(clk), .pri_i(pri), .pri_o(out_b.pri), .pri_oe_o(out_b.pri_oe),
    .sec_i(sec), .sec_o(out_b.sec), .sec_oe_o(out_b.sec_oe), .to_side_o(out_b.to_side),
    .from_side_i(fs), .to_core_o(out_b.to_core), .from_core_i(fc),
    .mux_ctrl_i(ctrl_b), .pl_bypass_i('1), .pri_oe_i(oe_pri), .sec_oe_i(oe_sec));

  fpp_reg_lane #(.CFG(custom_cfg())) dut_c (
    .clk_i(clk), .pri_i(pri), .pri_o(out_c.pri), .pri_oe_o(out_c.pri_oe),
    .sec_i(sec), .sec_o(out_c.sec), .sec_oe_o(out_c.sec_oe), .to_side_o(out_c.to_side),
    .from_side_i(fs), .to_core_o(out_c.to_core), .from_core_i(fc),
    .mux_ctrl_i(ctrl_c), .pl_bypass_i(byp_c), .pri_oe_i(oe_pri), .sec_oe_i(oe_sec));

  fpp_reg_lane #(.CFG(full_cfg())) dut_d (
    .clk_i(clk), .pri_i(pri), .pri_o(out_d.pri), .pri_oe_o(out_d.pri_oe),
    .sec_i(sec), .sec_o(out_d.sec), .sec_oe_o(out_d.sec_oe), .to_side_o(out_d.to_side),
    .from_side_i(fs), .to_core_o(out_d.to_core), .from_core_i(fc),
    .mux_ctrl_i(ctrl_d), .pl_bypass_i(byp_d), .pri_oe_i(oe_pri), .sec_oe_i(oe_sec));

  // value of source s entered in cycle j
  function automatic logic src_hist(input int s, input int j);
    case (s)
      SRC_PRI:       return hp[j];
      SRC_SEC:       return hs[j];
      SRC_FROM_SIDE: return hfs[j];
      default:       return hfc[j];
    endcase
  endfunction

  task automatic check(input lane_out_t got, input lane_out_t exp, input string what, input int k);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s cycle %0d: got %b expected %b (pri,oe,sec,oe,to_side,to_core)",
               what, k, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (NCYC + 20) #10;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < NCYC; k++) begin
      clk = 1'b1;
      #1;
      hp[k] = 1'($urandom); hs[k] = 1'($urandom); hfs[k] = 1'($urandom); hfc[k] = 1'($urandom);
      pri = hp[k]; sec = hs[k]; fs = hfs[k]; fc = hfc[k];
      oe_pri = 1'($urandom); oe_sec = 1'($urandom);
      ctrl_a = '0; ctrl_a[DST_SEC] = 2'($urandom_range(0, 1)); ctrl_a[DST_TO_SIDE] = 2'($urandom_range(0, 1));
      ctrl_b = '0; ctrl_b[DST_PRI] = 2'($urandom_range(0, 1));
      ctrl_c = '0; ctrl_c[DST_TO_CORE] = 2'($urandom_range(0, 3));
      byp_c = '0;  byp_c[DST_TO_CORE][SRC_SEC] = 1'($urandom);
      // lane D: pick one existing path per destination
      ctrl_d = '0;
      ctrl_d[DST_PRI] = 2'($urandom_range(1, 3));
      ctrl_d[DST_SEC] = 2'($urandom_range(0, 2));
      if (ctrl_d[DST_SEC] == 2'd1) ctrl_d[DST_SEC] = 2'd3;
      ctrl_d[DST_TO_SIDE] = 2'($urandom_range(0, 3));
      ctrl_d[DST_TO_CORE] = 2'($urandom_range(0, 3));
      byp_d = '0;
      byp_d[DST_PRI][SRC_FROM_CORE]     = 1'($urandom);
      byp_d[DST_TO_CORE][SRC_FROM_SIDE] = 1'($urandom);
      #3;
      if (k >= 4) begin
        // data outputs hold; output enables are not latched and follow the configuration
        prev_a.sec_oe = oe_sec;
        prev_b.pri_oe = oe_pri;
        prev_c.pri_oe = oe_pri;
        check(out_a, prev_a, "A hold", k);
        check(out_b, prev_b, "B hold", k);
        check(out_c, prev_c, "C hold", k);
        prev_d.pri_oe = oe_pri;
        prev_d.sec_oe = oe_sec;
        check(out_d, prev_d, "D hold", k);
      end
      #1 clk = 1'b0;
      #4;
      if (k >= 4) begin
        // A: UpLane
        exp_a = '0;
        exp_a.to_core = hp[k];
        exp_a.sec     = ctrl_a[DST_SEC]     == 2'd1 ? hfc[k] : hp[k-1];
        exp_a.to_side = ctrl_a[DST_TO_SIDE] == 2'd1 ? hfc[k] : hp[k-1];
        exp_a.sec_oe  = oe_sec;
        // B: DownLane
        exp_b = '0;
        exp_b.pri    = ctrl_b[DST_PRI] == 2'd1 ? hs[k-1] : hfs[k];
        exp_b.pri_oe = oe_pri;
        // C: custom
        exp_c = '0;
        exp_c.pri    = hfc[k-1];
        exp_c.pri_oe = oe_pri;
        case (ctrl_c[DST_TO_CORE])
          2'd0: exp_c.to_core = hp[k];
          2'd1: exp_c.to_core = byp_c[DST_TO_CORE][SRC_SEC] ? hs[k] : hs[k-2];
          2'd2: exp_c.to_core = hfs[k];
          default: exp_c.to_core = hfc[k];
        endcase
        n_sel[ctrl_c[DST_TO_CORE]]++;
        if (ctrl_c[DST_TO_CORE] == 2'd1 && byp_c[DST_TO_CORE][SRC_SEC]) n_byp++;
        check(out_a, exp_a, "A", k);
        check(out_b, exp_b, "B", k);
        check(out_c, exp_c, "C", k);
        // D: every destination through its selected path
        for (int i = 0; i < ND; i++) begin
          if (ctrl_d[ROWS[i].d] == mux_ctrl_t'(ROWS[i].s)) begin
            if (ROWS[i].byp && byp_d[ROWS[i].d][ROWS[i].s]) dval[ROWS[i].d] = src_hist(int'(ROWS[i].s), k);
            else dval[ROWS[i].d] = src_hist(int'(ROWS[i].s), (2*k + 1 - launch0(int'(ROWS[i].n), ROWS[i].pos)) / 2);
            n_path_d[i]++;
          end
        end
        exp_d = '0;
        exp_d.pri     = dval[DST_PRI];
        exp_d.sec     = dval[DST_SEC];
        exp_d.to_side = dval[DST_TO_SIDE];
        exp_d.to_core = dval[DST_TO_CORE];
        exp_d.pri_oe  = oe_pri;
        exp_d.sec_oe  = oe_sec;
        check(out_d, exp_d, "D", k);
        prev_a = exp_a; prev_b = exp_b; prev_c = exp_c; prev_d = exp_d;
      end else begin
        prev_a = out_a; prev_b = out_b; prev_c = out_c; prev_d = out_d;
      end
      #1;
    end
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (n_sel[i] == 0) begin failures++; $display("FAIL select %0d never used", i); end
    end
    for (int i = 0; i < ND; i++) begin
      checks++;
      if (n_path_d[i] == 0) begin failures++; $display("FAIL lane D path %0d never used", i); end
    end
    checks++;
    if (n_byp == 0) begin failures++; $display("FAIL pipeline bypass never used"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
