// tb_fpp_test_at_first: end-to-end test of a three-die stack of Test@First FPPs.
//
// Three copies of the top-level FPP, at their default size (eight lanes per
// channel), are stacked: SEC_UP and TestClock_UP of die d drive PRI_UP and
// TestClock of die d+1, and PRI_DOWN of die d+1 drives SEC_DOWN of die d.
// A bidirectional terminal whose output enable is off is modelled as 0.
// Each die has a core model: per lane a scan chain of CORE_LEN[d] flip-flops
// between TO_CORE and FROM_CORE, clocked by the die's test clock.
//
// The test programs each die's configuration register through its TAP-side
// strobes, streams a random word per clock into PRI_UP of the bottom die and
// checks the words coming back on its PRI_DOWN. The expected latency is
// computed from the configuration: one cycle per die passed with BYPASS = 1,
// CORE_LEN cycles per die whose core is in the path, plus one cycle per die
// passed on the way down. Scenarios turn the path around at each die and mix
// bypassed and tested cores. It also checks the output enables against the
// configuration, reads the configuration back on TDO, and checks that the
// test clock reaches the top die. Every mechanism (core bypass, core in the
// path, turn-around in each die, upward and downward forwarding, clock
// forwarding, enabled and disabled drivers, configuration readback) is
// counted, and one that never happened counts as a failure.
module tb_fpp_test_at_first;
  import fpp_pkg::*;
  localparam int L = 8;                 // lanes of the default configuration
  localparam int D = 3;                 // dies in the stack
  localparam int CORE_LEN [D] = '{2, 3, 1};
  localparam int HIST = 8192;

  // ---- stack wiring ----
  logic tclk = 1'b1;
  logic tck = 1'b0, trst_n = 1'b1, tdi = 1'b0, cap = 1'b0, sh = 1'b0, upd = 1'b0;
  logic [D-1:0] sel = '0, tdo;
  logic [D-1:0] die_clk, clk_up, clk_up_oe;
  logic [L-1:0] pri_up [D], sec_up [D], sec_up_oe [D], to_core [D], from_core [D];
  logic [L-1:0] pri_down [D], pri_down_oe [D], sec_down [D];
  logic [L-1:0] stim;

  for (genvar d = 0; d < D; d++) begin : g_die
    fpp_test_at_first u_fpp (
      .tck_i(tck), .trst_ni(trst_n), .tdi_i(tdi), .cfg_select_i(sel[d]),
      .capture_dr_i(cap), .shift_dr_i(sh), .update_dr_i(upd), .cfg_tdo_o(tdo[d]),
      .test_clock_i(die_clk[d]), .test_clock_up_o(clk_up[d]), .test_clock_up_oe_o(clk_up_oe[d]),
      .pri_up_i(pri_up[d]), .sec_up_o(sec_up[d]), .sec_up_oe_o(sec_up_oe[d]),
      .to_core_o(to_core[d]), .from_core_i(from_core[d]),
      .pri_down_o(pri_down[d]), .pri_down_oe_o(pri_down_oe[d]), .sec_down_i(sec_down[d]));

    if (d == 0) begin : g_bottom
      assign die_clk[d] = tclk;
      assign pri_up[d]  = stim;
    end else begin : g_upper
      assign die_clk[d] = clk_up[d-1] & clk_up_oe[d-1];
      assign pri_up[d]  = sec_up[d-1] & sec_up_oe[d-1];
    end
    if (d == D - 1) begin : g_top
      assign sec_down[d] = '0;
    end else begin : g_below
      assign sec_down[d] = pri_down[d+1] & pri_down_oe[d+1];
    end

    // core under test: a scan chain per lane
    logic [L-1:0] chain [CORE_LEN[d]];
    always_ff @(posedge die_clk[d]) begin
      chain[0] <= to_core[d];
      for (int i = 1; i < CORE_LEN[d]; i++) chain[i] <= chain[i-1];
    end
    assign from_core[d] = chain[CORE_LEN[d]-1];
  end

  // ---- bookkeeping ----
  int checks = 0, failures = 0;
  int cyc = 0;
  logic [L-1:0] hist [HIST];
  bit   check_en = 1'b0;
  int   lat = 0, scen_start = 0, turn_die = 0;
  taf_cfg_t cfg [D];
  // mechanism counters
  int n_bypass = 0, n_core = 0, n_up = 0, n_down = 0, n_clk_fwd = 0, n_readback = 0;
  int n_oe_on = 0, n_oe_off = 0;
  int n_turn [D];

  task automatic fail(input string msg);
    failures++;
    $display("FAIL %s (cycle %0d)", msg, cyc);
  endtask

  // test clock, period 10; rising edges at multiples of 10
  always begin
    #5 tclk = 1'b0;
    #5 tclk = 1'b1;
  end

  // stimulus: a new random word just after each rising edge
  always @(posedge tclk) begin
    cyc <= cyc + 1;
    #1;
    hist[cyc % HIST] = L'($urandom);
    stim = hist[cyc % HIST];
  end

  // response check just before the next rising edge
  always @(posedge tclk) begin
    #9;
    if (check_en && (cyc - lat) > scen_start) begin
      checks++;
      if (pri_down[0] !== hist[(cyc - lat) % HIST])
        fail($sformatf("PRI_DOWN got %h expected %h, latency %0d", pri_down[0],
                       hist[(cyc - lat) % HIST], lat));
      for (int d = 0; d <= turn_die; d++) begin
        if (cfg[d].bypass) n_bypass++; else n_core++;
        if (d < turn_die) begin n_up++; n_down++; end
      end
      n_turn[turn_die]++;
    end
  end

  // ---- TAP-side access to one die's configuration register ----
  task automatic tck_cycle();
    #5 tck = 1'b1;
    #5 tck = 1'b0;
    #1;
  endtask

  task automatic program_die(input int d, input taf_cfg_t v);
    logic [TAF_CFG_BITS-1:0] old_bits;
    sel = '0; sel[d] = 1'b1;
    cap = 1'b1; tck_cycle(); cap = 1'b0;
    sh = 1'b1;
    for (int i = 0; i < TAF_CFG_BITS; i++) begin
      tdi = v[i];
      old_bits[i] = tdo[d];
      tck_cycle();
    end
    sh = 1'b0;
    checks++;
    if (old_bits !== cfg[d]) fail($sformatf("die %0d readback %b expected %b", d, old_bits, cfg[d]));
    else n_readback++;
    upd = 1'b1; tck_cycle(); upd = 1'b0;
    sel = '0;
    cfg[d] = v;
  endtask

  function automatic taf_cfg_t mk(input bit bypass, input bit turn, input bit up_oe, input bit dn_oe);
    taf_cfg_t c;
    c.bypass = bypass; c.turn = turn; c.sec_up_oe = up_oe; c.pri_down_oe = dn_oe;
    return c;
  endfunction

  // check output enables and forwarded clocks against the configuration
  task automatic check_static();
    for (int d = 0; d < D; d++) begin
      checks++;
      if (sec_up_oe[d] !== {L{cfg[d].sec_up_oe}} || clk_up_oe[d] !== cfg[d].sec_up_oe ||
          pri_down_oe[d] !== {L{cfg[d].pri_down_oe}})
        fail($sformatf("die %0d output enables", d));
      if (cfg[d].pri_down_oe) n_oe_on++; else n_oe_off++;
    end
    if (cfg[0].sec_up_oe && cfg[1].sec_up_oe) begin
      @(posedge tclk); #1;
      checks++;
      if (die_clk[2] !== 1'b1) fail("test clock high does not reach top die");
      #5;
      checks++;
      if (die_clk[2] !== 1'b0) fail("test clock low does not reach top die");
      else n_clk_fwd++;
    end
  endtask

  // run one scenario: program the dies, then stream for n cycles
  task automatic scenario(input taf_cfg_t c0, input taf_cfg_t c1, input taf_cfg_t c2, input int n);
    int t;
    program_die(0, c0);
    program_die(1, c1);
    program_die(2, c2);
    check_static();
    t = 0;
    while (t < D - 1 && !cfg[t].turn) t++;
    lat = 0;
    for (int d = 0; d <= t; d++) lat += cfg[d].bypass ? 1 : CORE_LEN[d];
    lat += t;
    turn_die = t;
    @(posedge tclk); #2;
    scen_start = cyc;
    check_en = 1'b1;
    repeat (n) @(posedge tclk);
    #2 check_en = 1'b0;
  endtask

  initial begin : watchdog
    #200000;
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < D; d++) cfg[d] = '0;
    #1 trst_n = 1'b0;
    #2 trst_n = 1'b1;
    //         bypass turn up_oe dn_oe
    scenario(mk(1, 1, 0, 1), mk(0, 0, 0, 0), mk(0, 0, 0, 0), 40);   // turn in die 0, core bypassed
    scenario(mk(0, 1, 0, 1), mk(0, 0, 0, 0), mk(0, 0, 0, 0), 40);   // turn in die 0, core tested
    scenario(mk(1, 0, 1, 1), mk(0, 1, 0, 1), mk(0, 0, 0, 0), 40);   // die 1 core tested, turn
    scenario(mk(0, 0, 1, 1), mk(1, 0, 1, 1), mk(0, 1, 0, 1), 40);   // cores 0 and 2 tested
    scenario(mk(1, 0, 1, 1), mk(1, 0, 1, 1), mk(1, 1, 0, 1), 40);   // all bypassed, turn at top
    scenario(mk(0, 0, 1, 1), mk(0, 0, 1, 1), mk(0, 1, 0, 1), 40);   // all three cores in the path
    // drivers off: the bottom die's PRI_DOWN enable low
    program_die(0, mk(1, 1, 0, 0));
    check_static();
    checks++;
    if (pri_down_oe[0] !== '0) fail("PRI_DOWN enable not off");
    // readback of the last value
    program_die(0, mk(1, 1, 0, 0));

    if (n_bypass == 0)   fail("core bypass never exercised");
    if (n_core == 0)     fail("core path never exercised");
    if (n_up == 0)       fail("upward forwarding never exercised");
    if (n_down == 0)     fail("downward forwarding never exercised");
    if (n_clk_fwd == 0)  fail("clock forwarding never exercised");
    if (n_readback == 0) fail("configuration readback never exercised");
    if (n_oe_on == 0)    fail("enabled PRI_DOWN drivers never seen");
    if (n_oe_off == 0)   fail("disabled PRI_DOWN drivers never seen");
    for (int d = 0; d < D; d++) if (n_turn[d] == 0) fail($sformatf("turn in die %0d never exercised", d));
    checks += 8 + D;
    $display("mechanisms: bypass=%0d core=%0d up=%0d down=%0d clk_fwd=%0d readback=%0d oe_on=%0d oe_off=%0d turn=%0d/%0d/%0d",
             n_bypass, n_core, n_up, n_down, n_clk_fwd, n_readback, n_oe_on, n_oe_off,
             n_turn[0], n_turn[1], n_turn[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
