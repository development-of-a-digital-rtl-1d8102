// Self-checking testbench for cordic_vectoring.
//
// Feeds one random I/Q pair per clock (plus the axes and all four quadrant
// diagonals), computes the expected phase with $atan2 and checks every result
// to within 3 LSB of the 16-bit binary angle (about 0.016 degrees) for inputs
// of magnitude above 4096. Also checks that the first result arrives exactly
// ITER+2 clocks after the first input.
module tb_cordic_vectoring;
  import llrf_pkg::*;

  localparam int ITER    = 16;
  localparam int LATENCY = ITER + 2;
  localparam int N       = 4000;
  localparam real PI     = 3.14159265358979323846;

  logic    clk = 1'b0;
  logic    rst;
  logic    in_valid;
  sample_t in_i, in_q;
  logic    out_valid;
  phase_t  out_phase;

  int checks = 0, failures = 0;

  cordic_vectoring dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real    exp_q[$];
  logic   big_q[$];
  int     cycle = 0, first_in = -1, first_out = -1;

  always @(posedge clk) cycle <= cycle + 1;

  // Expected phase in binary-angle LSBs.
  function automatic real ref_phase(sample_t i, sample_t q);
    return $atan2(real'(q), real'(i)) / (2.0 * PI) * 65536.0;
  endfunction

  task automatic send(sample_t i, sample_t q);
    in_valid <= 1'b1;
    in_i     <= i;
    in_q     <= q;
    exp_q.push_back(ref_phase(i, q));
    big_q.push_back(($sqrt(real'(i) * real'(i) + real'(q) * real'(q))) > 4096.0);
    if (first_in < 0) first_in = cycle;
    @(posedge clk);
  endtask

  // Checker.
  always @(posedge clk) begin
    if (!rst && out_valid) begin
      real e, d;
      logic big;
      if (first_out < 0) first_out = cycle;
      e   = exp_q.pop_front();
      big = big_q.pop_front();
      d   = real'(out_phase) - e;
      while (d > 32768.0)  d -= 65536.0;
      while (d < -32768.0) d += 65536.0;
      if (big) begin
        checks++;
        if (d > 3.0 || d < -3.0) begin
          failures++;
          if (failures < 10) $display("phase mismatch: got %0d expected %f", out_phase, e);
        end
      end
    end
  end

  initial begin
    rst = 1'b1; in_valid = 1'b0; in_i = '0; in_q = '0;
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    send(16'sd20000, 16'sd0);
    send(16'sd0, 16'sd20000);
    send(-16'sd20000, 16'sd0);
    send(16'sd0, -16'sd20000);
    send(16'sd15000, 16'sd15000);
    send(-16'sd15000, 16'sd15000);
    send(-16'sd15000, -16'sd15000);
    send(16'sd15000, -16'sd15000);
    send(-16'sd32768, -16'sd32768);
    send(16'sd32767, 16'sd32767);
    for (int n = 0; n < N; n++) send(sample_t'($urandom), sample_t'($urandom));
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
    if (exp_q.size() != 0) begin
      failures++;
      $display("%0d results missing", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
