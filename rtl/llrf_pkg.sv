// Shared widths, types and helpers of the pulsed low-level RF controller.
//
// All sample paths are two's-complement fixed point. I, Q and the detected
// amplitude are DATA_W-bit ADC/DAC codes. Phases are binary angles of PHASE_W
// bits: the full code range spans one turn, so -2^(PHASE_W-1) is -pi and the
// difference of two phases wraps correctly without any extra logic. The
// controller gains are signed GAIN_W-bit numbers with GAIN_FRAC fractional
// bits. None of these widths is fixed by the original system description;
// they are this design's choice (16-bit converters are a common choice for
// base-band LLRF boards).
package llrf_pkg;

  localparam int DATA_W    = 16;  // ADC / DAC sample width
  localparam int PHASE_W   = 16;  // binary angle width
  localparam int GAIN_W    = 16;  // controller gain width
  localparam int GAIN_FRAC = 8;   // fractional bits of a gain
  localparam int ACC_W     = 32;  // integral accumulator width

  typedef logic signed [DATA_W-1:0]  sample_t;
  typedef logic signed [PHASE_W-1:0] phase_t;
  typedef logic signed [GAIN_W-1:0]  gain_t;

  // Gains of one P+I+D controller, as loaded by the host computer.
  typedef struct packed {
    gain_t kp;  // proportional gain
    gain_t ki;  // integral gain (per sample)
    gain_t kd;  // differential gain (normally zero)
  } pid_gains_t;

  // Where the pulse trigger comes from.
  typedef enum logic {
    TRIG_INTERNAL = 1'b0,  // periodic trigger generated in the FPGA
    TRIG_EXTERNAL = 1'b1   // trigger input from the accelerator timing
  } trig_src_e;

  // Width of the sums formed inside the controllers, wide enough that the
  // sum of the three terms cannot overflow before it is saturated.
  localparam int WIDE_W = ACC_W + GAIN_W + 2;
  typedef logic signed [WIDE_W-1:0] wide_t;

  localparam wide_t SAMPLE_MAX = wide_t'((64'sd1 <<< (DATA_W-1)) - 1);
  localparam wide_t SAMPLE_MIN = -wide_t'(64'sd1 <<< (DATA_W-1));

  // Saturate a wide signed value to DATA_W bits.
  function automatic sample_t sat_sample(input wide_t v);
    if (v > SAMPLE_MAX)      return sample_t'(SAMPLE_MAX);
    else if (v < SAMPLE_MIN) return sample_t'(SAMPLE_MIN);
    else                     return sample_t'(v);
  endfunction

endpackage
