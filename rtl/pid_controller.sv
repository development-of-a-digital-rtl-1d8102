// Discrete P+I+D controller with its error junction.
//
// Each sample the controller forms the error e = measurement - setpoint and
// outputs  u = (Kp*e + I + Kd*(e - e_prev)) / 2^GAIN_FRAC,  where the integral
// I accumulates Ki*e every sample. The integral term removes the steady-state
// offset a purely proportional loop leaves; the differential term exists but
// is meant to run with Kd = 0, since it mainly amplifies noise. While `hold`
// is high the accumulator keeps its value: the phase loop uses this between RF
// pulses, where the measured phase has no meaning.
//
// The sign of the junction follows the original block diagram, where the set
// value enters with the minus sign; a loop whose actuator raises the
// measurement therefore needs negative gains.
//
// For a phase loop (WRAP_ERROR = 1) all angles are binary angles and wrap
// modulo one turn: a setpoint of +179 degrees and a measurement of -179
// degrees give an error of +2 degrees, and the accumulator and the output
// (the drive phase) wrap past +-180 degrees instead of saturating, so the loop
// cannot get stuck at the end of a range that a phase does not have. For an
// amplitude loop (WRAP_ERROR = 0) the error saturates, the accumulator is
// clamped so that its contribution alone never exceeds the output range
// (anti-windup), and the output saturates to DATA_W bits.
// The P/I/D structure, the error junction and the integral hold follow the
// original system; the fixed-point format, the clamping and the pipelining
// are this design's choices.
//
// Timing: in_valid/setpoint/measurement are sampled on a clock edge; the
// output appears 2 clocks later with out_valid. Gains may change at any time.
// Synchronous active-high reset clears the accumulator and the error history.
module pid_controller
  import llrf_pkg::*;
#(
  parameter bit WRAP_ERROR = 1'b0   // 1: error modulo one turn (phase loop)
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       in_valid,
  input  sample_t    setpoint,
  input  sample_t    measurement,
  input  pid_gains_t gains,
  input  logic       hold,          // freeze the integral accumulator
  output logic       out_valid,
  output sample_t    out,
  output logic       out_saturated  // the output was limited (never in a phase loop)
);

  localparam wide_t ACC_MAX = SAMPLE_MAX <<< GAIN_FRAC;
  localparam wide_t ACC_MIN = SAMPLE_MIN <<< GAIN_FRAC;

  // Stage 1: error junction.
  logic signed [DATA_W:0] diff;
  sample_t                err_now;
  sample_t                err, err_prev;
  logic                   v1, hold1;

  assign diff = {measurement[DATA_W-1], measurement} - {setpoint[DATA_W-1], setpoint};

  always_comb begin
    if (WRAP_ERROR)
      err_now = diff[DATA_W-1:0];
    else
      err_now = sat_sample(wide_t'(diff));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      v1       <= 1'b0;
      hold1    <= 1'b1;
      err      <= '0;
      err_prev <= '0;
    end else begin
      v1    <= in_valid;
      hold1 <= hold;
      if (in_valid) begin
        err      <= err_now;
        err_prev <= err;
      end
    end
  end

  // Stage 2: the three terms, the accumulator and the output.
  wide_t p_term, d_term, i_step, acc, acc_sum, acc_next, sum, sum_scaled;
  logic signed [DATA_W:0] err_delta;

  assign err_delta = {err[DATA_W-1], err} - {err_prev[DATA_W-1], err_prev};
  assign p_term    = wide_t'(gains.kp) * wide_t'(err);
  assign i_step    = wide_t'(gains.ki) * wide_t'(err);
  assign d_term    = wide_t'(gains.kd) * wide_t'(err_delta);
  assign acc_sum   = acc + i_step;

  // A binary angle accumulated with GAIN_FRAC extra fraction bits wraps at
  // 2^(DATA_W+GAIN_FRAC): keep the low bits and sign-extend them.
  function automatic wide_t wrap_turn(input logic [DATA_W+GAIN_FRAC-1:0] v);
    return wide_t'($signed(v));
  endfunction

  always_comb begin
    if (hold1)                  acc_next = acc;
    else if (WRAP_ERROR)        acc_next = wrap_turn(acc_sum[DATA_W+GAIN_FRAC-1:0]);
    else if (acc_sum > ACC_MAX) acc_next = ACC_MAX;
    else if (acc_sum < ACC_MIN) acc_next = ACC_MIN;
    else                        acc_next = acc_sum;
  end

  assign sum        = p_term + acc_next + d_term;
  assign sum_scaled = sum >>> GAIN_FRAC;

  always_ff @(posedge clk) begin
    if (rst) begin
      acc           <= '0;
      out           <= '0;
      out_valid     <= 1'b0;
      out_saturated <= 1'b0;
    end else begin
      out_valid <= v1;
      if (v1) begin
        acc           <= acc_next;
        if (WRAP_ERROR) begin
          out           <= sample_t'(sum_scaled);
          out_saturated <= 1'b0;
        end else begin
          out           <= sat_sample(sum_scaled);
          out_saturated <= (sum_scaled > SAMPLE_MAX) || (sum_scaled < SAMPLE_MIN);
        end
      end
    end
  end

  // The amplitude controller's accumulator never leaves its clamp range.
  a_acc_range: assert property (@(posedge clk) disable iff (rst)
    WRAP_ERROR || (acc <= ACC_MAX && acc >= ACC_MIN));

endmodule
