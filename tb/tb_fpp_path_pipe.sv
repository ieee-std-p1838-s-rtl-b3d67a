// tb_fpp_path_pipe: self-checking test of the per-path pipeline.
//
// Three pipelines share one input stream: the default (one rising-edge
// register), "NP" (falling then rising edge) and "PNP" with a bypass. The
// input changes just after each rising edge (cycle k carries value hist[k]).
// The expected output is derived from the edge string alone: a value
// launched at half-cycle time t is taken by a P stage at the next even time
// and by an N stage at the next odd time (rising edge of cycle k = 2k,
// falling edge = 2k+1). Outputs are checked just before every clock edge,
// and with the bypass on the output must equal the input in the same cycle.
module tb_fpp_path_pipe;
  localparam int NCYC = 300;
  logic clk = 1'b0;
  logic d = 1'b0;
  logic byp = 1'b0;
  logic q_a, q_b, q_c;
  logic hist [NCYC];
  int checks = 0, failures = 0;

  fpp_path_pipe dut_a (.clk(clk), .bypass_i(1'b0), .d_i(d), .q_o(q_a));
  fpp_path_pipe #(.N(2), .POS(4'b0010)) dut_b (.clk(clk), .bypass_i(1'b1), .d_i(d), .q_o(q_b));
  fpp_path_pipe #(.N(3), .POS(4'b0101), .HAS_BYPASS(1'b1)) dut_c (.clk(clk), .bypass_i(byp), .d_i(d), .q_o(q_c));

  // half-cycle time at which hist[0] leaves the last stage
  function automatic int launch0(input int n, input logic [3:0] pos);
    int t = 0;
    for (int i = 0; i < n; i++) begin
      t++;
      while ((t % 2 == 0) != pos[i]) t++;
    end
    return t;
  endfunction

  // expected output when sampled just before edge time tt
  function automatic logic expect_q(input int n, input logic [3:0] pos, input int tt);
    int k = (tt - 1 - launch0(n, pos));
    if (k < 0) return 1'bx;
    return hist[k / 2];
  endfunction

  task automatic check(input logic got, input logic exp, input string what, input int tt);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b (half-cycle %0d)", what, got, exp, tt);
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
    int bypass_cycles = 0;
    for (int k = 0; k < NCYC - 1; k++) begin
      // rising edge of cycle k at time 10k
      clk = 1'b1;
      #1;
      hist[k] = 1'($urandom);
      d = hist[k];
      byp = (k % 17) > 12;
      #3;
      // just before the falling edge, half-cycle 2k+1
      if (k >= 4) begin
        check(q_a, expect_q(1, 4'b0001, 2*k+1), "P", 2*k+1);
        check(q_b, expect_q(2, 4'b0010, 2*k+1), "NP", 2*k+1);
        if (byp) check(q_c, d, "PNP bypass", 2*k+1);
        else     check(q_c, expect_q(3, 4'b0101, 2*k+1), "PNP", 2*k+1);
      end
      #1 clk = 1'b0;
      #4;
      // just before the next rising edge, half-cycle 2k+2
      if (k >= 4) begin
        check(q_a, expect_q(1, 4'b0001, 2*k+2), "P", 2*k+2);
        check(q_b, expect_q(2, 4'b0010, 2*k+2), "NP", 2*k+2);
        if (byp) begin
          check(q_c, d, "PNP bypass", 2*k+2);
          bypass_cycles++;
        end else begin
          check(q_c, expect_q(3, 4'b0101, 2*k+2), "PNP", 2*k+2);
        end
      end
      #1;
    end
    // latencies in half cycles: P = 2, NP = 2 (falling edge, then next rising), PNP = 4
    checks++;
    if (launch0(1, 4'b0001) != 2 || launch0(2, 4'b0010) != 2 || launch0(3, 4'b0101) != 4) begin
      failures++;
      $display("FAIL latency model");
    end
    checks++;
    if (bypass_cycles == 0) begin failures++; $display("FAIL bypass never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
