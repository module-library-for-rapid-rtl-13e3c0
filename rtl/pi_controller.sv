// pi_controller: discrete proportional-integral controller of the vector
// control module library (used as the flux controller and as the other
// d/q-channel controllers).
//
// On each sample strobe (in_valid) the controller forms the error
// e = ref_i - fb_i (saturated to 16 bits), adds KI*e to its integrator and
// outputs y = (KP*e + integrator) >> K_FRAC, clamped to [OUT_MIN, OUT_MAX].
// Data are 16-bit two's complement words, as in the library's data format; the
// gains KP and KI are 16-bit words too, with their binary point K_FRAC bits
// from the right, so the binary point of the constants is a parameter chosen
// for the motor.  The integrator is kept at the gains' full resolution
// (scaled by 2^K_FRAC, ACC_W bits) so that small errors still integrate; the
// shift truncates toward minus infinity.  Anti-windup is by clamping the
// integrator to the output limits.  These internal choices (error saturation,
// truncation, clamping anti-windup) are this design's own: the library only
// fixes the data format and the PI function.
//
// Interface: in_valid/ref_i/fb_i in; out_valid/y_o out one clock later.
// sat_o marks an output that was clamped, windup_o an integrator that was
// clamped on that sample.  clr_i empties the integrator.
// Timing: latency 1 clock, one sample accepted per clock.
module pi_controller
  import vc_pkg::*;
#(
  parameter logic signed [15:0] KP      = 16'sd2048,  // 0.5  at K_FRAC=12
  parameter logic signed [15:0] KI      = 16'sd41,    // 0.01 at K_FRAC=12
  parameter int unsigned        K_FRAC  = 12,
  parameter sample_t            OUT_MAX = 16'sd8192,
  parameter sample_t            OUT_MIN = -16'sd8192
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    clr_i,
  input  logic    in_valid,
  input  sample_t ref_i,
  input  sample_t fb_i,
  output logic    out_valid,
  output sample_t y_o,
  output logic    sat_o,
  output logic    windup_o
);

  localparam int ACC_W = 48;
  typedef logic signed [ACC_W-1:0] acc_t;

  localparam acc_t ACC_MAX = acc_t'(OUT_MAX) <<< K_FRAC;
  localparam acc_t ACC_MIN = acc_t'(OUT_MIN) <<< K_FRAC;

  acc_t    integ_q;
  sample_t err;
  acc_t    p_term, i_term, integ_sum, integ_next, y_full, y_shift;
  logic    windup;

  always_comb begin
    err        = sat16(48'(ref_i) - 48'(fb_i));
    p_term     = acc_t'(KP) * acc_t'(err);
    i_term     = acc_t'(KI) * acc_t'(err);
    integ_sum  = integ_q + i_term;
    windup     = 1'b0;
    integ_next = integ_sum;
    if (integ_sum > ACC_MAX) begin
      integ_next = ACC_MAX;
      windup     = 1'b1;
    end else if (integ_sum < ACC_MIN) begin
      integ_next = ACC_MIN;
      windup     = 1'b1;
    end
    y_full  = p_term + integ_next;
    y_shift = y_full >>> K_FRAC;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      integ_q   <= '0;
      y_o       <= '0;
      out_valid <= 1'b0;
      sat_o     <= 1'b0;
      windup_o  <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (clr_i) begin
        integ_q  <= '0;
        windup_o <= 1'b0;
        sat_o    <= 1'b0;
      end else if (in_valid) begin
        integ_q  <= integ_next;
        windup_o <= windup;
        if (y_shift > acc_t'(OUT_MAX)) begin
          y_o   <= OUT_MAX;
          sat_o <= 1'b1;
        end else if (y_shift < acc_t'(OUT_MIN)) begin
          y_o   <= OUT_MIN;
          sat_o <= 1'b1;
        end else begin
          y_o   <= sample_t'(y_shift);
          sat_o <= 1'b0;
        end
      end
    end
  end

endmodule
