// vc_reconfig_top: reconfigurable vector control system for a tandem
// converter fed induction motor, built from the module library.
//
// Two complete vector control structures work side by side on the same
// measured quantities: configuration 1 for the tandem converter (current
// source inverter + voltage source inverter) and configuration 2 for the
// current source inverter alone.  A reconfiguration state machine holds the
// active configuration, and a multiplexer passes on the stator-frame
// references of that configuration only.  This is context switching
// ("ping-pong"): since both structures, and all modules in them, are always
// computing, the PI controllers of the configuration that takes over are
// already settled and no controller state has to be transferred when the
// configuration changes.
//
// Interface (all data 16-bit two's complement, see vc_pkg):
//   sample_en      one control sample of ref_i, fb_i, cos_i, sin_i
//   ref_i, fb_i    d/q references and feedbacks of the two channel controllers
//                  (d = rotor flux, q = the q-channel quantity)
//   cos_i, sin_i   unit phasor of the rotor flux direction lambda (Q1.15)
//   reconf_req     reconfiguration condition (e.g. VSI failure), edge-acting
//   out_valid/ab_o stator-frame references of the active configuration
//   state_o        active configuration, switch_o pulses on a change
//   ctrl1_o/ctrl2_o field-oriented controller outputs of each structure,
//                  valid with ctrl_valid_o[0]/[1]
//   sat_o/windup_o clamping of controller outputs/integrators (either structure)
// Timing: ab_o appears 3 clocks after sample_en (PI 1, CooT 1, mux 1); a
// new sample may be given every clock.
// The gains of both structures are parameters; their default values are this
// design's own, since they depend on the motor.
module vc_reconfig_top
  import vc_pkg::*;
#(
  parameter int unsigned        K_FRAC    = 12,
  parameter int unsigned        TRIG_FRAC = 15,
  // configuration 1 (tandem converter)
  parameter logic signed [15:0] C1_KP_D    = 16'sd4096,  // 1.0
  parameter logic signed [15:0] C1_KI_D    = 16'sd205,   // 0.05
  parameter logic signed [15:0] C1_KP_Q    = 16'sd4096,
  parameter logic signed [15:0] C1_KI_Q    = 16'sd205,
  parameter sample_t            C1_OUT_MAX = 16'sd8192,
  parameter sample_t            C1_OUT_MIN = -16'sd8192,
  // configuration 2 (CSI alone)
  parameter logic signed [15:0] C2_KP_D    = 16'sd2048,  // 0.5
  parameter logic signed [15:0] C2_KI_D    = 16'sd82,    // 0.02
  parameter logic signed [15:0] C2_KP_Q    = 16'sd2048,
  parameter logic signed [15:0] C2_KI_Q    = 16'sd82,
  parameter sample_t            C2_OUT_MAX = 16'sd8192,
  parameter sample_t            C2_OUT_MIN = -16'sd8192
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sample_en,
  input  dq_t        ref_i,
  input  dq_t        fb_i,
  input  sample_t    cos_i,
  input  sample_t    sin_i,
  input  logic       reconf_req,
  output logic       out_valid,
  output ab_t        ab_o,
  output cfg_state_e state_o,
  output cfg_state_e out_state_o,
  output logic       switch_o,
  output logic [1:0] ctrl_valid_o,
  output dq_t        ctrl1_o,
  output dq_t        ctrl2_o,
  output logic [1:0] sat_o,
  output logic [1:0] windup_o
);

  logic v1, v2;
  ab_t  ab1, ab2;

  reconfig_fsm u_fsm (
    .clk, .rst_n, .reconf_req, .state_o, .switch_o
  );

  vc_structure #(
    .KP_D(C1_KP_D), .KI_D(C1_KI_D), .KP_Q(C1_KP_Q), .KI_Q(C1_KI_Q),
    .K_FRAC(K_FRAC), .OUT_MAX(C1_OUT_MAX), .OUT_MIN(C1_OUT_MIN),
    .TRIG_FRAC(TRIG_FRAC)
  ) u_cfg1 (
    .clk, .rst_n, .clr_i(1'b0), .in_valid(sample_en),
    .ref_i, .fb_i, .cos_i, .sin_i,
    .ctrl_valid(ctrl_valid_o[0]), .ctrl_o(ctrl1_o), .out_valid(v1), .ab_o(ab1),
    .sat_o(sat_o[0]), .windup_o(windup_o[0])
  );

  vc_structure #(
    .KP_D(C2_KP_D), .KI_D(C2_KI_D), .KP_Q(C2_KP_Q), .KI_Q(C2_KI_Q),
    .K_FRAC(K_FRAC), .OUT_MAX(C2_OUT_MAX), .OUT_MIN(C2_OUT_MIN),
    .TRIG_FRAC(TRIG_FRAC)
  ) u_cfg2 (
    .clk, .rst_n, .clr_i(1'b0), .in_valid(sample_en),
    .ref_i, .fb_i, .cos_i, .sin_i,
    .ctrl_valid(ctrl_valid_o[1]), .ctrl_o(ctrl2_o), .out_valid(v2), .ab_o(ab2),
    .sat_o(sat_o[1]), .windup_o(windup_o[1])
  );

  cfg_mux u_mux (
    .clk, .rst_n, .sel_i(state_o),
    .valid1_i(v1), .ab1_i(ab1), .valid2_i(v2), .ab2_i(ab2),
    .out_valid, .ab_o, .sel_o(out_state_o)
  );

  // The two structures are driven by the same strobe and have the same
  // latency, so their samples always line up at the multiplexer.
  a_aligned: assert property (@(posedge clk) disable iff (!rst_n) v1 == v2);

endmodule
