// tb_fpp_reg_channel: self-checking test of a channel of registered lanes.
//
// Two eight-lane channels run on one clock with independent random words on
// every terminal bus (new words just after each rising edge):
//   up    default configuration (eight UpLanes);
//   down  eight DownLanes.
// Selects and output enables change at random. Each lane must carry its own
// bit with the path latency of a single lane: one cycle through a pipelined
// path, none through an unregistered one. Data outputs are checked just
// before each rising edge and, for the hold behaviour, before each falling
// edge.
module tb_fpp_reg_channel;
  import fpp_pkg::*;
  localparam int L = 8;
  localparam int NCYC = 300;

  logic clk = 1'b0;
  logic [L-1:0] pri, sec, fs, fc;
  logic [L-1:0] hp [NCYC], hs [NCYC], hfs [NCYC], hfc [NCYC];
  logic oe_pri, oe_sec, sel_up, sel_dn;
  mux_ctrl_t [NUM_REG_DST-1:0] ctrl_up, ctrl_dn;

  typedef struct packed {
    logic [L-1:0] pri, pri_oe, sec, sec_oe, to_side, to_core;
  } ch_out_t;
  ch_out_t out_up, out_dn, exp_up, exp_dn, prev_up, prev_dn;
  int checks = 0, failures = 0;

  assign ctrl_up = {2'b00, {1'b0, sel_up}, {1'b0, sel_up}, 2'b00};  // TO_CORE, TO_SIDE, SEC, PRI
  assign ctrl_dn = {6'b0, {1'b0, sel_dn}};

  fpp_reg_channel dut_up (
    .clk_i(clk), .pri_i(pri), .pri_o(out_up.pri), .pri_oe_o(out_up.pri_oe), .sec_i(sec),
    .sec_o(out_up.sec), .sec_oe_o(out_up.sec_oe), .to_side_o(out_up.to_side), .from_side_i(fs),
    .to_core_o(out_up.to_core), .from_core_i(fc), .mux_ctrl_i(ctrl_up), .pl_bypass_i('0),
    .pri_oe_i(oe_pri), .sec_oe_i(oe_sec));

  fpp_reg_channel #(.LANES(L), .CFG(DOWN_LANE_CFG)) dut_dn (
    .clk_i(clk), .pri_i(pri), .pri_o(out_dn.pri), .pri_oe_o(out_dn.pri_oe), .sec_i(sec),
    .sec_o(out_dn.sec), .sec_oe_o(out_dn.sec_oe), .to_side_o(out_dn.to_side), .from_side_i(fs),
    .to_core_o(out_dn.to_core), .from_core_i(fc), .mux_ctrl_i(ctrl_dn), .pl_bypass_i('0),
    .pri_oe_i(oe_pri), .sec_oe_i(oe_sec));

  task automatic check(input ch_out_t got, input ch_out_t exp, input string what, input int k);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s cycle %0d: got %h expected %h", what, k, got, exp);
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
      hp[k] = L'($urandom); hs[k] = L'($urandom); hfs[k] = L'($urandom); hfc[k] = L'($urandom);
      pri = hp[k]; sec = hs[k]; fs = hfs[k]; fc = hfc[k];
      {oe_pri, oe_sec, sel_up, sel_dn} = 4'($urandom);
      #3;
      if (k >= 3) begin
        prev_up.sec_oe = {L{oe_sec}};
        prev_dn.pri_oe = {L{oe_pri}};
        check(out_up, prev_up, "up hold", k);
        check(out_dn, prev_dn, "down hold", k);
      end
      #1 clk = 1'b0;
      #4;
      if (k >= 3) begin
        exp_up = '0;
        exp_up.to_core = hp[k];
        exp_up.sec     = sel_up ? hfc[k] : hp[k-1];
        exp_up.to_side = sel_up ? hfc[k] : hp[k-1];
        exp_up.sec_oe  = {L{oe_sec}};
        exp_dn = '0;
        exp_dn.pri     = sel_dn ? hs[k-1] : hfs[k];
        exp_dn.pri_oe  = {L{oe_pri}};
        check(out_up, exp_up, "up", k);
        check(out_dn, exp_dn, "down", k);
        prev_up = exp_up; prev_dn = exp_dn;
      end else begin
        prev_up = out_up; prev_dn = out_dn;
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
