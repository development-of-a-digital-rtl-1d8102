// Digital low-level RF controller for a pulsed, normal-conducting cavity.
//
// The cavity field is demodulated to base band outside the FPGA: an I/Q pair
// gives its phase and a separate power detector gives its amplitude. Phase and
// amplitude are controlled by two independent loops, and the corrected drive
// is turned back into I/Q for the modulator that feeds the klystron.
//
//   phase loop:     (adc_i, adc_q) -> CORDIC vectoring -> phase
//                   -> PID(phase_setpoint - phase)     -> drive phase
//   amplitude loop: trigger -> pulse shape memory -> x pulse_amp_setpoint
//                   -> PID(set value - adc_amp)         -> drive amplitude
//                      (or the set value itself when amplitude control is
//                       off) -> limited to >= 0
//   output:         (drive amplitude, drive phase) -> CORDIC rotation
//                   -> (dac_i, dac_q)
//
// The phase controller's integral is held while no pulse is running, since the
// measured phase of an empty cavity is meaningless. The trigger is either made
// internally every trigger_period clocks or taken from ext_trig.
// This structure follows the original system's control algorithm; widths,
// number formats, latencies and the host-side register ports are this
// design's choices. The host computer interface itself is not part of this
// module: its settings appear as plain input ports.
//
// Timing: one ADC sample per clock on every input, one DAC sample per clock on
// every output (dac_valid marks the first samples after reset). Latency from
// an ADC sample to its effect on the DAC: phase path ITER+2 (CORDIC) + 2 (PID)
// + ITER+3 (CORDIC) clocks; amplitude path 2 (PID) + 1 (select/limit) +
// ITER+3 clocks. The amplitude loop does not wait for the slower phase path.
// Synchronous active-high reset; the shape memory keeps its contents.
module llrf_top
  import llrf_pkg::*;
#(
  parameter int SHAPE_DEPTH = 2048,   // pulse shape memory entries
  parameter int SHAPE_W     = 16,     // pulse shape entry width
  parameter int STEP_W      = 16,     // width of the clocks-per-entry setting
  parameter int PERIOD_W    = 32,     // width of the internal trigger period
  parameter int CORDIC_ITER = 16,     // iterations of both CORDICs
  localparam int SAW        = $clog2(SHAPE_DEPTH)
) (
  input  logic               clk,
  input  logic               rst,
  // ADC samples from the RF board (one per clock)
  input  sample_t            adc_i,
  input  sample_t            adc_q,
  input  sample_t            adc_amp,
  // DAC samples to the RF board's I/Q modulator
  output sample_t            dac_i,
  output sample_t            dac_q,
  output logic               dac_valid,
  // host settings
  input  phase_t             phase_setpoint,
  input  sample_t            pulse_amp_setpoint,
  input  pid_gains_t         phase_gains,
  input  pid_gains_t         amp_gains,
  input  logic               amp_ctrl_on,
  input  trig_src_e          trig_src,
  input  logic [PERIOD_W-1:0] trigger_period,
  input  logic [SAW:0]       pulse_len,
  input  logic [STEP_W-1:0]  step_cycles,
  input  logic               shape_wr_en,
  input  logic [SAW-1:0]     shape_wr_addr,
  input  logic [SHAPE_W-1:0] shape_wr_data,
  // external trigger
  input  logic               ext_trig,
  // monitoring
  output phase_t             meas_phase,
  output sample_t            amp_set_value,
  output sample_t            drive_amp,
  output phase_t             drive_phase,
  output logic               pulse_active,
  output logic               pulse_start,
  output logic               trigger,
  output logic               amp_clamped,
  output logic               amp_ctrl_sat
);

  // ---------------------------------------------------------------- trigger
  trigger_gen #(.PERIOD_W(PERIOD_W)) u_trigger (
    .clk, .rst,
    .src      (trig_src),
    .period   (trigger_period),
    .ext_trig,
    .trigger
  );

  // ---------------------------------------------------------- pulse shape
  logic               shape_active;
  logic [SHAPE_W-1:0] shape_value;

  pulse_shape_gen #(.DEPTH(SHAPE_DEPTH), .SHAPE_W(SHAPE_W), .STEP_W(STEP_W)) u_shape (
    .clk, .rst,
    .wr_en       (shape_wr_en),
    .wr_addr     (shape_wr_addr),
    .wr_data     (shape_wr_data),
    .pulse_len,
    .step_cycles,
    .trigger,
    .shape_active,
    .shape_value,
    .pulse_start
  );

  logic set_active;
  setpoint_scaler #(.SHAPE_W(SHAPE_W)) u_scale (
    .clk, .rst,
    .shape_value,
    .shape_active,
    .pulse_amp    (pulse_amp_setpoint),
    .setpoint     (amp_set_value),
    .active       (set_active)
  );
  assign pulse_active = set_active;

  // ----------------------------------------------------------- phase loop
  logic   phase_valid;
  cordic_vectoring #(.ITER(CORDIC_ITER)) u_iq2phase (
    .clk, .rst,
    .in_valid  (1'b1),
    .in_i      (adc_i),
    .in_q      (adc_q),
    .out_valid (phase_valid),
    .out_phase (meas_phase)
  );

  logic   phase_pid_valid;
  logic   phase_pid_sat;   // always 0: the phase controller wraps
  pid_controller #(.WRAP_ERROR(1'b1)) u_phase_pid (
    .clk, .rst,
    .in_valid      (phase_valid),
    .setpoint      (phase_setpoint),
    .measurement   (meas_phase),
    .gains         (phase_gains),
    .hold          (!set_active),
    .out_valid     (phase_pid_valid),
    .out           (drive_phase),
    .out_saturated (phase_pid_sat)
  );

  // ------------------------------------------------------- amplitude loop
  sample_t amp_pid_out;
  logic    amp_pid_valid;
  pid_controller #(.WRAP_ERROR(1'b0)) u_amp_pid (
    .clk, .rst,
    .in_valid      (1'b1),
    .setpoint      (amp_set_value),
    .measurement   (adc_amp),
    .gains         (amp_gains),
    .hold          (1'b0),
    .out_valid     (amp_pid_valid),
    .out           (amp_pid_out),
    .out_saturated (amp_ctrl_sat)
  );

  // The open-loop path is delayed like the controller so that switching
  // between the two does not shift the pulse in time.
  sample_t set_d1, set_d2;
  always_ff @(posedge clk) begin
    if (rst) begin
      set_d1 <= '0;
      set_d2 <= '0;
    end else begin
      set_d1 <= amp_set_value;
      set_d2 <= set_d1;
    end
  end

  amp_output_stage u_amp_out (
    .clk, .rst,
    .ctrl_on   (amp_ctrl_on),
    .pid_out   (amp_pid_out),
    .set_value (set_d2),
    .drive_amp,
    .clamped   (amp_clamped)
  );

  // ------------------------------------------------------------ to I/Q
  cordic_rotation #(.ITER(CORDIC_ITER)) u_ap2iq (
    .clk, .rst,
    .in_valid  (amp_pid_valid && phase_pid_valid),
    .in_amp    (drive_amp),
    .in_phase  (drive_phase),
    .out_valid (dac_valid),
    .out_i     (dac_i),
    .out_q     (dac_q)
  );

  logic unused;
  assign unused = phase_pid_sat;

endmodule
