// tb_fpp_config_reg: self-checking test of the configuration register.
//
// Drives the TAP-side strobes directly, as a TAP controller would in its
// Capture-DR, Shift-DR and Update-DR states. Checks: reset value; that a
// shifted word appears on cfg_o only after the update edge; that tdo_o
// returns the captured configuration bit 0 first; that nothing changes while
// select_i is low; and asynchronous reset in the middle of operation.
module tb_fpp_config_reg;
  localparam int W = 4;
  logic tck = 1'b0, trst_n = 1'b1, tdi = 1'b0, sel = 1'b0, cap = 1'b0, sh = 1'b0, upd = 1'b0;
  logic tdo;
  logic [W-1:0] cfg, cur;
  int checks = 0, failures = 0;

  fpp_config_reg dut (
    .tck_i(tck), .trst_ni(trst_n), .tdi_i(tdi), .select_i(sel), .capture_dr_i(cap),
    .shift_dr_i(sh), .update_dr_i(upd), .tdo_o(tdo), .cfg_o(cfg));

  task automatic check(input logic [W-1:0] got, input logic [W-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b at %0t", what, got, exp, $time);
    end
  endtask

  task automatic tck_cycle();
    #5 tck = 1'b1;
    #5 tck = 1'b0;
    #1;
  endtask

  // capture, shift W bits in (bit 0 first), compare shifted-out bits, update
  task automatic access(input logic [W-1:0] val, input logic [W-1:0] old_val, input logic s);
    logic [W-1:0] out;
    sel = s;
    cap = 1'b1; tck_cycle(); cap = 1'b0;
    sh = 1'b1;
    for (int i = 0; i < W; i++) begin
      tdi = val[i];                  // bit 0 first
      out[i] = tdo;                  // bit i of the captured word
      tck_cycle();
    end
    sh = 1'b0;
    if (s) check(out, old_val, "captured value on tdo");
    check(cfg, old_val, "no change before update");
    upd = 1'b1; #5 tck = 1'b1; #3 check(cfg, old_val, "no change at rising edge of update");
    #2 tck = 1'b0; #1 upd = 1'b0;
    check(cfg, s ? val : old_val, "value after update edge");
    sel = 1'b0;
  endtask

  initial begin : watchdog
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 trst_n = 1'b0;
    #2 check(cfg, '0, "reset value");
    trst_n = 1'b1;
    cur = '0;
    for (int n = 0; n < 100; n++) begin
      logic [W-1:0] v;
      logic s;
      v = W'($urandom);
      s = (n % 5) != 3;
      access(v, cur, s);
      if (s) cur = v;
      check(cfg, cur, s ? "updated value" : "unselected access ignored");
    end
    // asynchronous reset
    sel = 1'b1; sh = 1'b1; tdi = 1'b1;
    #2 trst_n = 1'b0;
    #1 check(cfg, '0, "asynchronous reset");
    tck_cycle();
    check(cfg, '0, "held in reset");
    trst_n = 1'b1; sh = 1'b0; sel = 1'b0;
    access(4'b1010, '0, 1'b1);
    check(cfg, 4'b1010, "works after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
