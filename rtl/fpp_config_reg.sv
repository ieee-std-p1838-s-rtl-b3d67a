// fpp_config_reg: FPP configuration register, a test data register of the TAP.
//
// Holds the configuration bits that steer the lanes (multiplexer selects,
// output enables). It is built like an IEEE 1149.1 test data register: a
// shift stage between tdi_i and tdo_o and an update stage that drives cfg_o,
// so the lanes keep their configuration while new bits are shifted in.
// The TAP controller that produces select/capture/shift/update is not part
// of this module.
//
// Timing (all on tck_i, active only while select_i is 1):
//   rising edge,  capture_dr_i: shift stage <= current cfg_o
//   rising edge,  shift_dr_i:   shift stage shifts one bit towards tdo_o;
//                               tdi_i enters at bit WIDTH-1, tdo_o = bit 0,
//                               so the bit for cfg_o[0] is shifted in first
//   falling edge, update_dr_i:  cfg_o <= shift stage
// trst_ni (asynchronous, active low) clears both stages to RESET_VAL.
// WIDTH = 4 matches the Test@First example (BYPASS, TURN, SEC_UP_OE,
// PRI_DOWN_OE). The register structure, bit order and reset value are this
// design's choices.
module fpp_config_reg #(
  parameter int unsigned      WIDTH     = fpp_pkg::TAF_CFG_BITS,
  parameter logic [WIDTH-1:0] RESET_VAL = '0
) (
  input  logic             tck_i,
  input  logic             trst_ni,
  input  logic             tdi_i,
  input  logic             select_i,
  input  logic             capture_dr_i,
  input  logic             shift_dr_i,
  input  logic             update_dr_i,
  output logic             tdo_o,
  output logic [WIDTH-1:0] cfg_o
);

  logic [WIDTH-1:0] shift_q;

  always_ff @(posedge tck_i or negedge trst_ni) begin
    if (!trst_ni) begin
      shift_q <= RESET_VAL;
    end else if (select_i && capture_dr_i) begin
      shift_q <= cfg_o;
    end else if (select_i && shift_dr_i) begin
      shift_q <= WIDTH'({tdi_i, shift_q} >> 1);
    end
  end

  always_ff @(negedge tck_i or negedge trst_ni) begin
    if (!trst_ni) begin
      cfg_o <= RESET_VAL;
    end else if (select_i && update_dr_i) begin
      cfg_o <= shift_q;
    end
  end

  assign tdo_o = shift_q[0];

endmodule
