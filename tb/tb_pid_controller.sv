// Self-checking testbench for pid_controller.
//
// Two controllers run side by side on the same stimulus: a phase-type one
// (error modulo one turn) and an amplitude-type one (saturating error). A
// reference model written with 64-bit integers predicts every output from the
// controller equation  u = (Kp*e + I + Kd*(e - e_prev)) >> GAIN_FRAC,
// I += Ki*e unless held, with the accumulator clamp and output saturation.
// The stimulus is random, with the hold input toggled in bursts and the gains
// changed between bursts. The error is measurement - setpoint. Directed
// checks: the output follows the input by 2 clocks; a constant error makes
// the output ramp while the integral runs and stay put while it is held; a
// +179/-179 degree pair gives a small error; a large phase output wraps.
module tb_pid_controller;
  import llrf_pkg::*;

  logic       clk = 1'b0;
  logic       rst;
  logic       in_valid;
  sample_t    setpoint, measurement;
  pid_gains_t gains;
  logic       hold;
  logic       w_valid, s_valid;
  sample_t    w_out, s_out;
  logic       w_sat, s_sat;

  int checks = 0, failures = 0;

  pid_controller #(.WRAP_ERROR(1'b1)) dut_wrap (
    .clk, .rst, .in_valid, .setpoint, .measurement, .gains, .hold,
    .out_valid (w_valid), .out (w_out), .out_saturated (w_sat));

  pid_controller #(.WRAP_ERROR(1'b0)) dut_sat (
    .clk, .rst, .in_valid, .setpoint, .measurement, .gains, .hold,
    .out_valid (s_valid), .out (s_out), .out_saturated (s_sat));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- model
  typedef struct {
    longint acc;
    longint e_prev;
  } model_t;

  model_t mw, ms;
  longint exp_w[$], exp_s[$];
  int     sat_seen = 0;

  function automatic longint sat16(longint v);
    if (v > 32767)  return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  function automatic longint step(ref model_t m, input logic wrap, input longint sp,
                                  input longint meas, input pid_gains_t g, input logic h);
    longint d, e, a, u;
    d = meas - sp;
    if (wrap) e = (((d % 65536) + 65536 + 32768) % 65536) - 32768;
    else      e = sat16(d);
    a = m.acc + longint'(g.ki) * e;
    if (wrap) begin
      a = (((a % (1 << 24)) + (1 << 24) + (1 << 23)) % (1 << 24)) - (1 << 23);
    end else begin
      if (a > 32767 * 256)  a = 32767 * 256;
      if (a < -32768 * 256) a = -32768 * 256;
    end
    if (!h) m.acc = a;
    u = longint'(g.kp) * e + m.acc + longint'(g.kd) * (e - m.e_prev);
    m.e_prev = e;
    if (wrap) return (((u >>> 8) % 65536 + 65536 + 32768) % 65536) - 32768;
    return sat16(u >>> 8);
  endfunction

  function automatic void reset_models();
    mw.acc = 0; mw.e_prev = 0; ms.acc = 0; ms.e_prev = 0;
  endfunction

  // Drive one sample and remember what both controllers must answer.
  task automatic send(sample_t sp, sample_t m, logic h);
    in_valid    <= 1'b1;
    setpoint    <= sp;
    measurement <= m;
    hold        <= h;
    exp_w.push_back(step(mw, 1'b1, sp, m, gains, h));
    exp_s.push_back(step(ms, 1'b0, sp, m, gains, h));
    @(posedge clk);
  endtask

  task automatic idle(int n);
    in_valid <= 1'b0;
    repeat (n) @(posedge clk);
  endtask

  // Checker: compares every valid output with the model.
  always @(posedge clk) begin
    if (!rst) begin
      if (w_valid !== s_valid) begin
        checks++; failures++;
        $display("valid mismatch between the two controllers");
      end
      if (w_valid) begin
        longint ew, es;
        ew = exp_w.pop_front();
        es = exp_s.pop_front();
        checks += 2;
        if (longint'(w_out) != ew) begin
          failures++;
          if (failures < 10) $display("wrap pid: got %0d expected %0d", w_out, ew);
        end
        if (longint'(s_out) != es) begin
          failures++;
          if (failures < 10) $display("sat pid: got %0d expected %0d", s_out, es);
        end
        if (s_sat) sat_seen++;
      end
    end
  end

  // Latency probe.
  int cycle = 0, t_in = 0, t_out = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic set_gains(int kp, int ki, int kd);
    idle(3);                     // let the pipeline drain before the change
    gains <= '{kp: gain_t'(kp), ki: gain_t'(ki), kd: gain_t'(kd)};
    @(posedge clk);
  endtask

  initial begin
    sample_t held;
    rst = 1'b1; in_valid = 1'b0; setpoint = '0; measurement = '0; hold = 1'b0;
    gains = '{kp: 16'sd256, ki: 16'sd0, kd: 16'sd0};
    reset_models();
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);

    // Latency: a single sample with Kp = 1.0.
    t_in = cycle;
    send(16'sd0, 16'sd1000, 1'b0);
    in_valid <= 1'b0;
    while (!w_valid) @(posedge clk);
    t_out = cycle;
    checks++;
    if (t_out - t_in != 3) begin   // 2 clocks, seen one edge later
      failures++;
      $display("latency %0d, expected 2", t_out - t_in - 1);
    end
    checks++;
    if (w_out != 16'sd1000) begin
      failures++;
      $display("P only: got %0d expected 1000", w_out);
    end

    // Integral ramp with a constant error, then hold.
    set_gains(0, 64, 0);          // Ki = 0.25 per sample
    for (int n = 0; n < 20; n++) send(16'sd0, 16'sd400, 1'b0);
    idle(3);
    checks++;
    if (w_out != 16'sd2000) begin  // 20 * 400 * 0.25
      failures++;
      $display("integral ramp: got %0d expected 2000", w_out);
    end
    held = w_out;
    for (int n = 0; n < 20; n++) send(16'sd0, 16'sd400, 1'b1);
    idle(3);
    checks++;
    if (w_out != held) begin
      failures++;
      $display("held integral moved: %0d -> %0d", held, w_out);
    end

    // Wrap-around of the phase error: +179 degrees set, -179 measured. The
    // held integral (2000) still adds to the proportional term. Then a
    // large phase output must wrap rather than saturate.
    set_gains(256, 0, 0);
    send(16'sd32586, -16'sd32586, 1'b1);
    idle(3);
    checks++;
    if (w_out != 16'sd2364 || s_out != -16'sd30768) begin
      failures++;
      $display("wrap: got %0d / %0d expected 2364 / -30768", w_out, s_out);
    end
    send(16'sd0, 16'sd31000, 1'b1);   // 2000 + 31000 = 33000 -> -32536
    idle(3);
    checks++;
    if (w_out != -16'sd32536 || s_out != 16'sd32767) begin
      failures++;
      $display("output wrap: got %0d / %0d expected -32536 / 32767", w_out, s_out);
    end

    // Random stimulus in bursts with changing gains and hold.
    for (int burst = 0; burst < 200; burst++) begin
      logic h;
      set_gains($urandom_range(600) - 300, $urandom_range(40) - 20, $urandom_range(3) == 0 ? 0 : $urandom_range(200) - 100);
      h = ($urandom_range(3) == 0);
      for (int n = 0; n < 100; n++) begin
        if ($urandom_range(7) == 0) idle(1);   // gaps in the sample stream
        send(sample_t'($urandom), sample_t'($urandom), h);
      end
    end
    idle(5);
    checks++;
    if (exp_w.size() != 0) begin
      failures++;
      $display("%0d results missing", exp_w.size());
    end
    checks++;
    if (sat_seen == 0) begin
      failures++;
      $display("output saturation never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
