// cfg_mux: configuration multiplexer of the reconfigurable vector control
// system.  Both control structures run in parallel all the time; this
// multiplexer passes on the stator-frame references of the structure that
// belongs to the active configuration (selection 1 = STATE1, the tandem
// converter; selection 2 = STATE2, the CSI alone).
//
// The selected sample is registered together with its valid flag, so the
// output is free of glitches when the selection changes between samples.
//
// Interface: sel_i (cfg_state_e), one valid/ab_t pair per configuration in;
// out_valid/ab_o/sel_o (the configuration the sample came from) out.
// Timing: latency 1 clock.
module cfg_mux
  import vc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  cfg_state_e sel_i,
  input  logic       valid1_i,
  input  ab_t        ab1_i,
  input  logic       valid2_i,
  input  ab_t        ab2_i,
  output logic       out_valid,
  output ab_t        ab_o,
  output cfg_state_e sel_o
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      ab_o      <= '0;
      sel_o     <= STATE1;
    end else begin
      sel_o <= sel_i;
      if (sel_i == STATE1) begin
        out_valid <= valid1_i;
        if (valid1_i) ab_o <= ab1_i;
      end else begin
        out_valid <= valid2_i;
        if (valid2_i) ab_o <= ab2_i;
      end
    end
  end

endmodule
