// Self-checking testbench for setpoint_scaler.
//
// Random shape values and pulse amplitudes, plus the corner cases (shape 1.0,
// shape 0, the largest shape with the largest and smallest amplitudes). The
// expected set value is round(amp * shape / 2^15), saturated to 16 bits, one
// clock after the input; the active flag follows with the same delay.
module tb_setpoint_scaler;
  import llrf_pkg::*;

  logic        clk = 1'b0;
  logic        rst;
  logic [15:0] shape_value;
  logic        shape_active;
  sample_t     pulse_amp;
  sample_t     setpoint;
  logic        active;

  int checks = 0, failures = 0;

  setpoint_scaler dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint expected(logic [15:0] s, sample_t a);
    longint p;
    p = (longint'(a) * longint'(s) + 16384) >>> 15;
    if (p > 32767)  p = 32767;
    if (p < -32768) p = -32768;
    return p;
  endfunction

  task automatic try_one(logic [15:0] s, sample_t a, logic act);
    @(negedge clk);
    shape_value = s; pulse_amp = a; shape_active = act;
    @(negedge clk);
    checks++;
    if (longint'(setpoint) != expected(s, a) || active !== act) begin
      failures++;
      if (failures < 10)
        $display("shape %0d amp %0d: got %0d/%0d expected %0d/%0d",
                 s, a, setpoint, active, expected(s, a), act);
    end
  endtask

  initial begin
    rst = 1'b1; shape_value = '0; shape_active = 1'b0; pulse_amp = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    try_one(16'h8000, 16'sd12345, 1'b1);
    try_one(16'h0000, 16'sd12345, 1'b0);
    try_one(16'hFFFF, 16'sd32767, 1'b1);
    try_one(16'hFFFF, -16'sd32768, 1'b1);
    try_one(16'h4000, -16'sd1001, 1'b1);
    for (int n = 0; n < 3000; n++)
      try_one(16'($urandom), sample_t'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
