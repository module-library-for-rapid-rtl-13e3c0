// reconfig_fsm: reconfiguration state machine of the reconfigurable vector
// control system.  Each state stands for one control-structure configuration:
// STATE1 is the tandem converter (CSI + VSI), STATE2 the CSI working alone.
//
// After power-on reset the machine is in STATE1.  When a reconfiguration
// condition occurs (a rising edge on reconf_req, e.g. the VSI failing) it
// switches from the current configuration to the next one: STATE1 -> STATE2,
// and, with two configurations, STATE2 -> STATE1.  Because every configuration
// is computed all the time (context switching), the switch takes effect at
// once: state_o changes one clock after the edge is seen, and switch_o pulses
// for that clock.  Reacting to the edge of the request rather than its level
// is this design's choice, so that a held fault does not toggle the state.
//
// Interface: reconf_req in (level, sampled each clock); state_o, switch_o out.
module reconfig_fsm
  import vc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       reconf_req,
  output cfg_state_e state_o,
  output logic       switch_o
);

  logic       req_q;
  logic       req_edge;
  cfg_state_e state_d;

  assign req_edge = reconf_req & ~req_q;

  always_comb begin
    state_d = state_o;
    if (req_edge) begin
      unique case (state_o)
        STATE1: state_d = STATE2;
        STATE2: state_d = STATE1;
        default: state_d = STATE1;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_o  <= STATE1;
      req_q    <= 1'b0;
      switch_o <= 1'b0;
    end else begin
      state_o  <= state_d;
      req_q    <= reconf_req;
      switch_o <= req_edge;
    end
  end

endmodule
