// coot_inv: inverse coordinate transformation CooT[D(-lambda)] of the vector
// control module library.
//
// It turns a pair of field-oriented references (d, q components in the frame
// that turns with the rotor flux at angle lambda) into stator-frame references
// by rotating them through lambda:
//     sd = d*cos(lambda) - q*sin(lambda)
//     sq = d*sin(lambda) + q*cos(lambda)
// The flux direction enters as its unit phasor (cos_i, sin_i), 16-bit words
// with TRIG_FRAC fractional bits (Q1.15 by default), rather than as an angle,
// so no sine table is needed.  Both output components are computed in
// parallel by four multipliers; the sums are shifted right by TRIG_FRAC
// (truncating toward minus infinity) and saturated to 16 bits.  The rotation
// follows the module's name and role; the unit-phasor input, the truncation
// and the saturation are this design's own choices.
//
// Interface: in_valid/dq_i/cos_i/sin_i in; out_valid/ab_o out.
// Timing: latency 1 clock, one sample accepted per clock.
module coot_inv
  import vc_pkg::*;
#(
  parameter int unsigned TRIG_FRAC = 15
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  dq_t     dq_i,
  input  sample_t cos_i,
  input  sample_t sin_i,
  output logic    out_valid,
  output ab_t     ab_o
);

  logic signed [47:0] sd_full, sq_full;

  always_comb begin
    sd_full = (48'(dq_i.d) * 48'(cos_i)) - (48'(dq_i.q) * 48'(sin_i));
    sq_full = (48'(dq_i.d) * 48'(sin_i)) + (48'(dq_i.q) * 48'(cos_i));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      ab_o      <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        ab_o.sd <= sat16(sd_full >>> TRIG_FRAC);
        ab_o.sq <= sat16(sq_full >>> TRIG_FRAC);
      end
    end
  end

endmodule
