// tb_fpp_nonreg_lane: self-checking test of the non-registered lane.
//
// A: default configuration, the ClkLane (FPP_PRI -> FPP_CLK_OUT and FPP_SEC).
// B: a custom lane with a three-way select on FPP_PRI (FROM_SIDE, FROM_CORE,
//    SEC), FPP_TO_CORE from FPP_SEC, FPP_TO_SIDE from FPP_PRI and FPP_CLK_OUT
//    from FPP_FROM_CORE.
// Random inputs and selects; every output, including the output enables, is
// compared with the value expected from the path list. The lane has no
// clock, so outputs are checked one time step after each input change.
module tb_fpp_nonreg_lane;
  import fpp_pkg::*;

  function automatic nonreg_lane_cfg_t custom_cfg();
    nonreg_lane_cfg_t c = '0;
    c[DST_PRI][SRC_FROM_SIDE]     = '{en: 1'b1, mux_val: 2'd0};
    c[DST_PRI][SRC_FROM_CORE]     = '{en: 1'b1, mux_val: 2'd1};
    c[DST_PRI][SRC_SEC]           = '{en: 1'b1, mux_val: 2'd2};
    c[DST_TO_CORE][SRC_SEC]       = '{en: 1'b1, mux_val: 2'd0};
    c[DST_TO_SIDE][SRC_PRI]       = '{en: 1'b1, mux_val: 2'd0};
    c[DST_CLK_OUT][SRC_FROM_CORE] = '{en: 1'b1, mux_val: 2'd0};
    return c;
  endfunction

  typedef struct packed { logic pri, pri_oe, sec, sec_oe, to_side, to_core, clk_out; } out_t;

  logic pri, sec, fs, fc, oe_pri, oe_sec;
  mux_ctrl_t [NUM_NONREG_DST-1:0] ctrl_b;
  out_t out_a, out_b, exp_a, exp_b;
  int checks = 0, failures = 0;
  int n_sel[3];

  fpp_nonreg_lane dut_a (
    .pri_i(pri), .pri_o(out_a.pri), .pri_oe_o(out_a.pri_oe), .sec_i(sec), .sec_o(out_a.sec),
    .sec_oe_o(out_a.sec_oe), .to_side_o(out_a.to_side), .from_side_i(fs), .to_core_o(out_a.to_core),
    .from_core_i(fc), .clk_out_o(out_a.clk_out), .mux_ctrl_i('0), .pri_oe_i(oe_pri), .sec_oe_i(oe_sec));

  fpp_nonreg_lane #(.CFG(custom_cfg())) dut_b (
    .pri_i(pri), .pri_o(out_b.pri), .pri_oe_o(out_b.pri_oe), .sec_i(sec), .sec_o(out_b.sec),
    .sec_oe_o(out_b.sec_oe), .to_side_o(out_b.to_side), .from_side_i(fs), .to_core_o(out_b.to_core),
    .from_core_i(fc), .clk_out_o(out_b.clk_out), .mux_ctrl_i(ctrl_b), .pri_oe_i(oe_pri), .sec_oe_i(oe_sec));

  task automatic check(input out_t got, input out_t exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b (pri,oe,sec,oe,to_side,to_core,clk_out)", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      {pri, sec, fs, fc, oe_pri, oe_sec} = 6'($urandom);
      ctrl_b = '0;
      ctrl_b[DST_PRI] = 2'($urandom_range(0, 2));
      #1;
      exp_a = '0;
      exp_a.clk_out = pri;
      exp_a.sec     = pri;
      exp_a.sec_oe  = oe_sec;
      exp_b = '0;
      case (ctrl_b[DST_PRI])
        2'd0:    exp_b.pri = fs;
        2'd1:    exp_b.pri = fc;
        default: exp_b.pri = sec;
      endcase
      n_sel[ctrl_b[DST_PRI]]++;
      exp_b.pri_oe  = oe_pri;
      exp_b.to_core = sec;
      exp_b.to_side = pri;
      exp_b.clk_out = fc;
      check(out_a, exp_a, "ClkLane");
      check(out_b, exp_b, "custom");
    end
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (n_sel[i] == 0) begin failures++; $display("FAIL select %0d never used", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
