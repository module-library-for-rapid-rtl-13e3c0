// vc_structure: one vector control structure (one configuration) built from
// the module library: a d-channel PI controller (the flux controller), a
// q-channel PI controller and the inverse coordinate transformation
// CooT[D(-lambda)].
//
// The d and q components are computed in parallel, each by its own
// controller, and the two controller outputs (field-oriented references:
// current references in one configuration, voltage references in the other)
// are rotated into the stator frame with the flux phasor of the same sample
// (the phasor is delayed by one clock to line up with the controllers).  Each controller has its own gains and
// limits, so the same structure serves either configuration.  What the
// q-channel controller regulates (its reference and feedback) is left to the
// instantiating design; this module only fixes the chain PI -> CooT.
//
// Interface: in_valid strobes one sample of ref_i/fb_i (dq_t) and of the flux
// unit phasor cos_i/sin_i.  ctrl_o (dq_t, the controller outputs) is valid one
// clock later with ctrl_valid; ab_o (stator frame) two clocks later with
// out_valid.  sat_o/windup_o report output and integrator clamping of either
// controller.
module vc_structure
  import vc_pkg::*;
#(
  parameter logic signed [15:0] KP_D    = 16'sd2048,
  parameter logic signed [15:0] KI_D    = 16'sd41,
  parameter logic signed [15:0] KP_Q    = 16'sd2048,
  parameter logic signed [15:0] KI_Q    = 16'sd41,
  parameter int unsigned        K_FRAC  = 12,
  parameter sample_t            OUT_MAX = 16'sd8192,
  parameter sample_t            OUT_MIN = -16'sd8192,
  parameter int unsigned        TRIG_FRAC = 15
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    clr_i,
  input  logic    in_valid,
  input  dq_t     ref_i,
  input  dq_t     fb_i,
  input  sample_t cos_i,
  input  sample_t sin_i,
  output logic    ctrl_valid,
  output dq_t     ctrl_o,
  output logic    out_valid,
  output ab_t     ab_o,
  output logic    sat_o,
  output logic    windup_o
);

  logic    vd, vq, sat_d, sat_q, wu_d, wu_q;
  sample_t cos_q, sin_q;

  // The flux phasor is held for one clock so that the rotation uses the
  // phasor of the same sample as the controller outputs it rotates.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cos_q <= '0;
      sin_q <= '0;
    end else if (in_valid) begin
      cos_q <= cos_i;
      sin_q <= sin_i;
    end
  end

  pi_controller #(
    .KP(KP_D), .KI(KI_D), .K_FRAC(K_FRAC), .OUT_MAX(OUT_MAX), .OUT_MIN(OUT_MIN)
  ) u_pi_d (
    .clk, .rst_n, .clr_i, .in_valid,
    .ref_i(ref_i.d), .fb_i(fb_i.d),
    .out_valid(vd), .y_o(ctrl_o.d), .sat_o(sat_d), .windup_o(wu_d)
  );

  pi_controller #(
    .KP(KP_Q), .KI(KI_Q), .K_FRAC(K_FRAC), .OUT_MAX(OUT_MAX), .OUT_MIN(OUT_MIN)
  ) u_pi_q (
    .clk, .rst_n, .clr_i, .in_valid,
    .ref_i(ref_i.q), .fb_i(fb_i.q),
    .out_valid(vq), .y_o(ctrl_o.q), .sat_o(sat_q), .windup_o(wu_q)
  );

  assign ctrl_valid = vd & vq;
  assign sat_o      = sat_d | sat_q;
  assign windup_o   = wu_d | wu_q;

  coot_inv #(.TRIG_FRAC(TRIG_FRAC)) u_coot (
    .clk, .rst_n,
    .in_valid(ctrl_valid), .dq_i(ctrl_o), .cos_i(cos_q), .sin_i(sin_q),
    .out_valid, .ab_o
  );

endmodule
