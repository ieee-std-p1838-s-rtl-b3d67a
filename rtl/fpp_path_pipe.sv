// fpp_path_pipe: pipeline registers of one path in a registered lane.
//
// A chain of N one-bit registers from a source terminal towards the
// destination multiplexer. Stage i triggers on the rising edge of the lane
// clock if POS[i] is 1 ("P") and on the falling edge if it is 0 ("N"), as the
// per-stage trigger-edge string of the path description gives. If HAS_BYPASS
// is set, bypass_i = 1 skips all stages and passes d_i on combinationally;
// without a bypass the input bypass_i is ignored. N = 0 gives a path without
// registers. Latency is N stages; no reset, as scan data is flushed through.
// The defaults are a single rising-edge register without bypass, the
// pipelined paths of the Test@First lanes.
module fpp_path_pipe #(
  parameter int unsigned                N          = 1,
  parameter logic [fpp_pkg::MAX_PL-1:0] POS        = '1,
  parameter bit                         HAS_BYPASS = 1'b0
) (
  input  logic clk,
  input  logic bypass_i,
  input  logic d_i,
  output logic q_o
);

  logic [N:0] stage;
  assign stage[0] = d_i;

  for (genvar i = 0; i < N; i++) begin : g_stage
    if (POS[i]) begin : g_pos
      always_ff @(posedge clk) stage[i+1] <= stage[i];
    end else begin : g_neg
      always_ff @(negedge clk) stage[i+1] <= stage[i];
    end
  end

  if (HAS_BYPASS) begin : g_byp
    assign q_o = bypass_i ? d_i : stage[N];
  end else begin : g_nobyp
    assign q_o = stage[N];
  end

endmodule
