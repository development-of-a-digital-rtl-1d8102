// Self-checking testbench for cordic_rotation.
//
// Feeds one random (amplitude, phase) pair per clock plus the four axis
// directions, computes A*cos(phase) and A*sin(phase) in floating point and
// checks both outputs to within 4 LSB. Also checks that the first result
// arrives exactly ITER+3 clocks after the first input.
module tb_cordic_rotation;
  import llrf_pkg::*;

  localparam int ITER    = 16;
  localparam int LATENCY = ITER + 3;
  localparam int N       = 4000;
  localparam real PI     = 3.14159265358979323846;

  logic    clk = 1'b0;
  logic    rst;
  logic    in_valid;
  sample_t in_amp;
  phase_t  in_phase;
  logic    out_valid;
  sample_t out_i, out_q;

  int checks = 0, failures = 0;

  cordic_rotation dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real ei_q[$], eq_q[$];
  int  cycle = 0, first_in = -1, first_out = -1;

  always @(posedge clk) cycle <= cycle + 1;

  task automatic send(sample_t a, phase_t p);
    real ang;
    ang = real'(p) / 65536.0 * 2.0 * PI;
    in_valid <= 1'b1;
    in_amp   <= a;
    in_phase <= p;
    ei_q.push_back(real'(a) * $cos(ang));
    eq_q.push_back(real'(a) * $sin(ang));
    if (first_in < 0) first_in = cycle;
    @(posedge clk);
  endtask

  always @(posedge clk) begin
    if (!rst && out_valid) begin
      real ei, eq;
      if (first_out < 0) first_out = cycle;
      ei = ei_q.pop_front();
      eq = eq_q.pop_front();
      checks++;
      if ((real'(out_i) - ei) ** 2 > 16.0 || (real'(out_q) - eq) ** 2 > 16.0) begin
        failures++;
        if (failures < 10)
          $display("mismatch: got (%0d,%0d) expected (%f,%f)", out_i, out_q, ei, eq);
      end
    end
  end

  initial begin
    rst = 1'b1; in_valid = 1'b0; in_amp = '0; in_phase = '0;
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    send(16'sd30000, 16'sd0);
    send(16'sd30000, 16'sd16384);
    send(16'sd30000, -16'sd32768);
    send(16'sd30000, -16'sd16384);
    send(16'sd32767, 16'sd8192);
    send(16'sd0, 16'sd1234);
    for (int n = 0; n < N; n++) send(sample_t'($urandom_range(32767)), phase_t'($urandom));
    in_valid <= 1'b0;
    repeat (LATENCY + 5) @(posedge clk);
    checks++;
    // The result is registered LATENCY edges after the input edge and seen
    // by the checker on the edge after that.
    if (first_out - first_in != LATENCY + 1) begin
      failures++;
      $display("latency %0d, expected %0d", first_out - first_in - 1, LATENCY);
    end
    checks++;
    if (ei_q.size() != 0) begin
      failures++;
      $display("%0d results missing", ei_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
