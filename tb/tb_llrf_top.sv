// End-to-end testbench for llrf_top at its default parameters.
//
// The controller is closed around a behavioural cavity model (tb-only): the
// DAC's I/Q drive, turned by a cable phase and scaled by a coupling gain,
// fills a first-order resonator with time constant TAU clocks; the ADC inputs
// are the resonator's I, Q and magnitude plus +-2 LSB of noise. With a
// loaded Q of 1000 at 325.224 MHz the field time constant is 2*Q/omega =
// 0.98 us, i.e. TAU = 98 clocks at an assumed 100 MHz sample clock.
//
// Sequence: the full 2048-entry shape memory is loaded (a short rise, then a
// flat top). Then pulses of all 2048 entries run with
//   1. internal periodic trigger, amplitude control on (two pulses),
//   2. amplitude control off (open loop),
//   3. external trigger, phase setpoint next to +-180 degrees.
// Checked: trigger spacing equals the programmed period; during the last 1000
// clocks of every closed-loop pulse the cavity's amplitude and phase (taken
// from the model, not from the controller) are within 1e-3 rms relative
// amplitude error and 0.1 degree rms phase error of their setpoints; the
// phase integral does not move between pulses; in open loop the drive
// amplitude equals the set value three clocks later; the DAC vector has the
// drive amplitude 19 clocks later. Every mechanism (internal and external
// trigger, full-length pulse, integral hold, open and closed loop, >= 0 limit,
// controller saturation, phase error wrap-around) is counted, and one that
// never happened counts as a failure.
module tb_llrf_top;
  import llrf_pkg::*;

  localparam int    DEPTH   = 2048;
  localparam int    STEP    = 2;            // clocks per shape entry
  localparam int    PULSE   = DEPTH * STEP; // clocks per pulse
  localparam int    PERIOD  = 6000;         // internal trigger period
  localparam real   PI      = 3.14159265358979323846;
  localparam real   TAU     = 98.0;         // cavity time constant, clocks
  localparam real   CABLE   = 40.0;         // cable phase, degrees
  localparam real   COUPLE  = 0.8;          // drive to field gain
  localparam int    AMP_SET = 20000;

  logic               clk = 1'b0;
  logic               rst;
  sample_t            adc_i, adc_q, adc_amp;
  sample_t            dac_i, dac_q;
  logic               dac_valid;
  phase_t             phase_setpoint;
  sample_t            pulse_amp_setpoint;
  pid_gains_t         phase_gains, amp_gains;
  logic               amp_ctrl_on;
  trig_src_e          trig_src;
  logic [31:0]        trigger_period;
  logic [11:0]        pulse_len;
  logic [15:0]        step_cycles;
  logic               shape_wr_en;
  logic [10:0]        shape_wr_addr;
  logic [15:0]        shape_wr_data;
  logic               ext_trig;
  phase_t             meas_phase;
  sample_t            amp_set_value, drive_amp;
  phase_t             drive_phase;
  logic               pulse_active, pulse_start, trigger;
  logic               amp_clamped, amp_ctrl_sat;

  int checks = 0, failures = 0;

  llrf_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------------- cavity model
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

  // ------------------------------------------------------ mechanisms
  int cycle = 0;
  int n_int_trig = 0, n_ext_trig = 0, n_pulses = 0, n_full_pulses = 0;
  int n_hold = 0, n_open = 0, n_closed = 0, n_clamp = 0, n_sat = 0, n_wrap = 0;
  int last_trig = -1, bad_period = 0, pulse_clocks = 0;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (!rst) begin
      if (trigger) begin
        if (trig_src == TRIG_INTERNAL) begin
          if (last_trig >= 0 && cycle - last_trig != PERIOD) bad_period++;
          last_trig = cycle;
          n_int_trig++;
        end else begin
          n_ext_trig++;
        end
      end
      if (pulse_start) begin
        n_pulses++;
        pulse_clocks = 0;
      end
      if (pulse_active) begin
        pulse_clocks++;
        if (amp_ctrl_on) n_closed++; else n_open++;
      end else if (pulse_clocks == PULSE) begin
        n_full_pulses++;
        pulse_clocks = 0;
      end
      if (!pulse_active && n_pulses > 0) n_hold++;
      if (amp_clamped)  n_clamp++;
      if (amp_ctrl_sat) n_sat++;
      // Measured phase and setpoint on opposite sides of +-180 degrees.
      if (pulse_active && phase_setpoint > 16'sd16384 && meas_phase < -16'sd16384) n_wrap++;
      if (pulse_active && phase_setpoint < -16'sd16384 && meas_phase > 16'sd16384) n_wrap++;
    end
  end

  // ------------------------------------------- pulse quality (model side)
  // Accumulates squared errors over the last 1000 clocks of a pulse.
  real amp_sq = 0.0, ph_sq = 0.0;
  int  n_q = 0;

  task automatic measure_flat_top(real set_deg);
    real a, ph, d;
    amp_sq = 0.0; ph_sq = 0.0; n_q = 0;
    repeat (1000) begin
      @(posedge clk);
      a  = $sqrt(cav_re * cav_re + cav_im * cav_im);
      ph = $atan2(cav_im, cav_re) * 180.0 / PI;
      d  = ph - set_deg;
      while (d > 180.0)  d -= 360.0;
      while (d < -180.0) d += 360.0;
      amp_sq += ((a - AMP_SET) / AMP_SET) ** 2;
      ph_sq  += d * d;
      n_q++;
    end
  endtask

  // Wait for the next pulse and check its flat top.
  task automatic closed_loop_pulse(real set_deg, string name);
    real arms, prms;
    while (!pulse_start) @(posedge clk);
    while (!pulse_active) @(posedge clk);
    repeat (PULSE - 1100) @(posedge clk);
    measure_flat_top(set_deg);
    arms = $sqrt(amp_sq / n_q);
    prms = $sqrt(ph_sq / n_q);
    $display("%s: rms amplitude error %e, rms phase error %f deg", name, arms, prms);
    check(arms < 1.0e-3, {name, ": amplitude error above 1e-3 rms"});
    check(prms < 0.1, {name, ": phase error above 0.1 deg rms"});
    while (pulse_active) @(posedge clk);
  endtask

  // DAC magnitude against the drive amplitude 19 clocks earlier.
  sample_t amp_hist [32];
  int      dac_bad = 0, dac_checked = 0;
  always @(posedge clk) begin
    for (int k = 31; k > 0; k--) amp_hist[k] <= amp_hist[k-1];
    amp_hist[0] <= drive_amp;
    if (!rst && dac_valid && cycle > 100) begin
      real m;
      m = $sqrt(real'(dac_i) ** 2 + real'(dac_q) ** 2);
      dac_checked++;
      if ((m - real'(amp_hist[18])) ** 2 > 25.0) dac_bad++;
    end
  end

  // Open loop: drive amplitude = set value three clocks later.
  sample_t set_hist [4];
  int      open_bad = 0, open_checked = 0;
  logic    ctrl_on_d = 1'b1;   // the switch acts on the next registered value
  always @(posedge clk) begin
    ctrl_on_d   <= amp_ctrl_on;
    set_hist[0] <= amp_set_value;
    for (int k = 1; k < 4; k++) set_hist[k] <= set_hist[k-1];
    if (!rst && !amp_ctrl_on && !ctrl_on_d && cycle > 10) begin
      open_checked++;
      if (drive_amp != ((set_hist[2] < 0) ? 16'sd0 : set_hist[2])) begin
        open_bad++;
        if (open_bad < 4) $display("open loop: drive %0d set %0d %0d %0d", drive_amp, set_hist[0], set_hist[1], set_hist[2]);
      end
    end
  end

  // ------------------------------------------------------------- sequence
  function automatic phase_t deg(real d);
    return phase_t'($rtoi(d / 360.0 * 65536.0));
  endfunction

  initial begin
    longint acc_before;
    rst = 1'b1;
    ext_trig = 1'b0;
    phase_setpoint = deg(30.0);
    pulse_amp_setpoint = sample_t'(AMP_SET);
    phase_gains = '{kp: -16'sd256, ki: -16'sd2, kd: 16'sd0};   // -1.0, -1/128
    amp_gains   = '{kp: -16'sd768, ki: -16'sd4, kd: 16'sd0};   // -3.0, -1/64
    amp_ctrl_on = 1'b1;
    trig_src = TRIG_INTERNAL;
    trigger_period = '0;
    pulse_len = 12'(DEPTH);
    step_cycles = 16'(STEP);
    shape_wr_en = 1'b0; shape_wr_addr = '0; shape_wr_data = '0;
    repeat (5) @(negedge clk);
    rst = 1'b0;

    // Load the shape: 8-entry linear rise, then 1.0 to the end.
    for (int n = 0; n < DEPTH; n++) begin
      @(negedge clk);
      shape_wr_en   = 1'b1;
      shape_wr_addr = 11'(n);
      shape_wr_data = (n < 8) ? 16'(n * 4096) : 16'h8000;
    end
    @(negedge clk);
    shape_wr_en = 1'b0;

    // 1. Internal trigger, closed loop, two pulses.
    trigger_period = 32'(PERIOD);
    closed_loop_pulse(30.0, "pulse 1");
    repeat (20) @(posedge clk);
    acc_before = longint'(dut.u_phase_pid.acc);
    repeat (PERIOD - PULSE - 200) @(posedge clk);
    check(longint'(dut.u_phase_pid.acc) == acc_before, "phase integral moved between pulses");
    closed_loop_pulse(30.0, "pulse 2");

    // 2. Open loop.
    @(negedge clk);
    amp_ctrl_on = 1'b0;
    while (!pulse_start) @(posedge clk);
    while (!pulse_active) @(posedge clk);
    while (pulse_active) @(posedge clk);
    repeat (10) @(posedge clk);
    @(negedge clk);
    amp_ctrl_on = 1'b1;
    check(open_checked > PULSE && open_bad == 0, "open loop: drive differs from set value");

    // 3. External trigger, phase setpoint at -179 degrees.
    trig_src = TRIG_EXTERNAL;
    phase_setpoint = deg(-179.0);
    repeat (PERIOD) @(negedge clk);
    check(!pulse_active, "internal trigger leaked while external selected");
    fork
      closed_loop_pulse(-179.0, "pulse 4 (external)");
      begin
        @(negedge clk);
        ext_trig = 1'b1;
        repeat (50) @(negedge clk);
        ext_trig = 1'b0;
      end
    join
    repeat (100) @(posedge clk);

    check(bad_period == 0, "internal trigger period wrong");
    check(dac_checked > 0 && dac_bad == 0, "DAC vector differs from drive amplitude");

    $display("mechanisms: internal triggers %0d, external triggers %0d, pulses %0d (full length %0d)",
             n_int_trig, n_ext_trig, n_pulses, n_full_pulses);
    $display("            integral hold clocks %0d, closed-loop clocks %0d, open-loop clocks %0d",
             n_hold, n_closed, n_open);
    $display("            >=0 limit %0d, amplitude controller saturated %0d, phase wrap %0d",
             n_clamp, n_sat, n_wrap);
    check(n_int_trig > 0,    "internal trigger never happened");
    check(n_ext_trig == 1,   "external trigger count wrong");
    check(n_pulses == 4,     "pulse count wrong");
    check(n_full_pulses == 4, "full-length pulse count wrong");
    check(n_hold > 0,        "integral hold never happened");
    check(n_closed > 0,      "closed loop never ran");
    check(n_open > 0,        "open loop never ran");
    check(n_clamp > 0,       ">=0 limit never acted");
    check(n_sat > 0,         "controller saturation never happened");
    check(n_wrap > 0,        "phase wrap-around never happened");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
