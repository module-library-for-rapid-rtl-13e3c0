// vc_pkg: types, constants and fixed-point helpers shared by the vector
// control module library.
//
// Every signal that passes between modules is a 16-bit two's complement
// fixed-point word (sample_t), as the library's data format prescribes.  Where
// the binary point of a signal sits is a matter of scaling chosen per signal by
// the user; constants (controller gains) use the same 16-bit word with a
// binary point set by a parameter of the module that holds them.  A pair of
// field-oriented components is a dq_t, a pair of stator-frame components an
// ab_t.  The configurations of the reconfigurable controller are the states of
// cfg_state_e.
package vc_pkg;

  localparam int unsigned DATA_W = 16;

  typedef logic signed [DATA_W-1:0] sample_t;

  // Field-oriented (rotating frame) components.
  typedef struct packed {
    sample_t d;
    sample_t q;
  } dq_t;

  // Stator-frame components (d and q axes of the stator frame).
  typedef struct packed {
    sample_t sd;
    sample_t sq;
  } ab_t;

  // Configuration states of the reconfiguration state machine.
  typedef enum logic [0:0] {
    STATE1 = 1'b0,   // configuration 1: tandem converter (CSI + VSI)
    STATE2 = 1'b1    // configuration 2: CSI alone
  } cfg_state_e;

  localparam sample_t SAMPLE_MAX = sample_t'(16'sh7FFF);
  localparam sample_t SAMPLE_MIN = sample_t'(16'sh8000);

  // Clamp a wide signed value to the 16-bit sample range.
  function automatic sample_t sat16(input logic signed [47:0] x);
    if (x > 48'sd32767)       return SAMPLE_MAX;
    else if (x < -48'sd32768) return SAMPLE_MIN;
    else                      return sample_t'(x);
  endfunction

endpackage
