// Workload testbench: 200 us RF pulses with a step in the set value.
//
// llrf_top at its default parameters drives the same behavioural cavity model
// as tb_llrf_top (first-order resonator, loaded Q 1000 at 325.224 MHz, time
// constant 98 clocks at an assumed 100 MHz sample clock, +-2 LSB noise). The
// shape memory holds a flat 1.0, so the amplitude set value jumps from 0 to
// its full value at the start of the pulse. 2048 entries of 10 clocks give a
// pulse of 20,480 clocks = 204.8 us. Three pulses run back to back on the
// internal trigger at 30,000-clock spacing.
// Checked for every pulse: its length is 20,480 clocks; from 50 us (5000
// clocks) after the start to the end, the cavity amplitude stays within 1e-3
// of the set value and the phase within 0.1 degree of its setpoint, sample
// by sample. The time at which each pulse first reaches the amplitude target
// is printed.
module tb_pulse_200us;
  import llrf_pkg::*;

  localparam int  DEPTH   = 2048;
  localparam int  STEP    = 10;
  localparam int  PULSE   = DEPTH * STEP;
  localparam int  PERIOD  = 30000;
  localparam int  SETTLE  = 5000;           // 50 us at 100 MHz
  localparam int  AMP_SET = 16000;
  localparam real PH_SET  = -60.0;
  localparam real PI      = 3.14159265358979323846;
  localparam real TAU     = 98.0;
  localparam real CABLE   = 115.0;
  localparam real COUPLE  = 1.2;

  logic        clk = 1'b0;
  logic        rst;
  sample_t     adc_i, adc_q, adc_amp;
  sample_t     dac_i, dac_q;
  logic        dac_valid;
  phase_t      phase_setpoint;
  sample_t     pulse_amp_setpoint;
  pid_gains_t  phase_gains, amp_gains;
  logic        amp_ctrl_on;
  trig_src_e   trig_src;
  logic [31:0] trigger_period;
  logic [11:0] pulse_len;
  logic [15:0] step_cycles;
  logic        shape_wr_en;
  logic [10:0] shape_wr_addr;
  logic [15:0] shape_wr_data;
  logic        ext_trig;
  phase_t      meas_phase;
  sample_t     amp_set_value, drive_amp;
  phase_t      drive_phase;
  logic        pulse_active, pulse_start, trigger;
  logic        amp_clamped, amp_ctrl_sat;

  int checks = 0, failures = 0;

  llrf_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (150000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Cavity model.
  real cav_re = 0.0, cav_im = 0.0;

  function automatic sample_t to_sample(real v);
    if (v > 32767.0)  return 16'sd32767;
    if (v < -32768.0) return -16'sd32768;
    return sample_t'($rtoi(v + ((v >= 0.0) ? 0.5 : -0.5)));
  endfunction

  always @(posedge clk) begin
    real dr, di, c, s;
    c  = $cos(CABLE / 180.0 * PI);
    s  = $sin(CABLE / 180.0 * PI);
    dr = COUPLE * (real'(dac_i) * c - real'(dac_q) * s);
    di = COUPLE * (real'(dac_i) * s + real'(dac_q) * c);
    if (rst) begin
      cav_re = 0.0;
      cav_im = 0.0;
    end else begin
      cav_re = cav_re + (dr - cav_re) / TAU;
      cav_im = cav_im + (di - cav_im) / TAU;
    end
    adc_i   <= to_sample(cav_re + real'($urandom_range(4)) - 2.0);
    adc_q   <= to_sample(cav_im + real'($urandom_range(4)) - 2.0);
    adc_amp <= to_sample($sqrt(cav_re * cav_re + cav_im * cav_im) + real'($urandom_range(4)) - 2.0);
  end

  // One pulse: length, settling time and flat-top errors.
  task automatic one_pulse(int k);
    int  t, first_ok, bad_amp, bad_ph;
    real a, ph, d;
    while (!pulse_active) @(posedge clk);
    t = 0; first_ok = -1; bad_amp = 0; bad_ph = 0;
    while (pulse_active) begin
      a  = $sqrt(cav_re * cav_re + cav_im * cav_im);
      ph = $atan2(cav_im, cav_re) * 180.0 / PI;
      d  = ph - PH_SET;
      while (d > 180.0)  d -= 360.0;
      while (d < -180.0) d += 360.0;
      if (first_ok < 0 && (a - AMP_SET) ** 2 < (1.0e-3 * AMP_SET) ** 2) first_ok = t;
      if (t >= SETTLE) begin
        if ((a - AMP_SET) ** 2 > (1.0e-3 * AMP_SET) ** 2) bad_amp++;
        if (d * d > 0.01) bad_ph++;
      end
      t++;
      @(posedge clk);
    end
    $display("pulse %0d: %0d clocks, amplitude within 1e-3 after %0d clocks (%0.1f us)",
             k, t, first_ok, real'(first_ok) / 100.0);
    checks++;
    if (t != PULSE) begin
      failures++;
      $display("pulse length %0d, expected %0d", t, PULSE);
    end
    checks++;
    if (bad_amp != 0) begin
      failures++;
      $display("%0d samples after 50 us with amplitude error above 1e-3", bad_amp);
    end
    checks++;
    if (bad_ph != 0) begin
      failures++;
      $display("%0d samples after 50 us with phase error above 0.1 degree", bad_ph);
    end
  endtask

  initial begin
    rst = 1'b1;
    ext_trig = 1'b0;
    phase_setpoint = phase_t'($rtoi(PH_SET / 360.0 * 65536.0));
    pulse_amp_setpoint = sample_t'(AMP_SET);
    phase_gains = '{kp: -16'sd256, ki: -16'sd2, kd: 16'sd0};
    amp_gains   = '{kp: -16'sd768, ki: -16'sd4, kd: 16'sd0};
    amp_ctrl_on = 1'b1;
    trig_src = TRIG_INTERNAL;
    trigger_period = '0;
    pulse_len = 12'(DEPTH);
    step_cycles = 16'(STEP);
    shape_wr_en = 1'b0; shape_wr_addr = '0; shape_wr_data = '0;
    repeat (5) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < DEPTH; n++) begin
      @(negedge clk);
      shape_wr_en = 1'b1; shape_wr_addr = 11'(n); shape_wr_data = 16'h8000;
    end
    @(negedge clk);
    shape_wr_en = 1'b0;
    trigger_period = 32'(PERIOD);
    for (int k = 1; k <= 3; k++) one_pulse(k);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
