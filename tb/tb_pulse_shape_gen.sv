// Self-checking testbench for pulse_shape_gen at its full 2048-entry depth.
//
// Loads the memory with entry(n) = (n*37 + 5) mod 2^16, then plays pulses
// and checks, clock by clock, against a model: shape_active rises two clocks
// after the trigger, entry n is output during clocks [n*S, (n+1)*S) of the
// pulse for S = step_cycles, the pulse lasts pulse_len*S clocks, the value is
// 0 outside a pulse, and pulse_start marks the first clock. Covered: short
// pulses with several step settings, a trigger during a pulse (ignored),
// pulse_len = 0 (no pulse), step_cycles = 0 (treated as 1), a full 2048-entry
// pulse, and reset in the middle of a pulse.
module tb_pulse_shape_gen;

  localparam int DEPTH = 2048;
  localparam int AW    = 11;

  logic          clk = 1'b0;
  logic          rst;
  logic          wr_en;
  logic [AW-1:0] wr_addr;
  logic [15:0]   wr_data;
  logic [AW:0]   pulse_len;
  logic [15:0]   step_cycles;
  logic          trigger;
  logic          shape_active;
  logic [15:0]   shape_value;
  logic          pulse_start;

  int checks = 0, failures = 0;

  pulse_shape_gen dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] entry(int n);
    return 16'(n * 37 + 5);
  endfunction

  // Compare the outputs with the expected values on this clock.
  task automatic expect_out(logic act, logic [15:0] val, logic start);
    checks++;
    if (shape_active !== act || shape_value !== val || pulse_start !== start) begin
      failures++;
      if (failures < 10)
        $display("t=%0t: got act=%0d val=%0d start=%0d expected %0d %0d %0d",
                 $time, shape_active, shape_value, pulse_start, act, val, start);
    end
  endtask

  // Trigger a pulse and check it clock by clock. retrig: pulse the trigger
  // again in the middle of the pulse.
  task automatic run_pulse(int len, int step, bit retrig);
    int s;
    s = (step == 0) ? 1 : step;
    @(negedge clk);
    pulse_len = (AW+1)'(len); step_cycles = 16'(step); trigger = 1'b1;
    @(negedge clk);
    trigger = 1'b0;
    expect_out(1'b0, 16'd0, 1'b0);           // one clock after the trigger
    for (int t = 0; t < len * s; t++) begin
      @(negedge clk);
      if (retrig && t == len * s / 2) trigger = 1'b1; else trigger = 1'b0;
      expect_out(1'b1, entry(t / s), t == 0);
    end
    @(negedge clk);
    trigger = 1'b0;
    expect_out(1'b0, 16'd0, 1'b0);
    repeat (3) begin
      @(negedge clk);
      expect_out(1'b0, 16'd0, 1'b0);
    end
  endtask

  initial begin
    rst = 1'b1; wr_en = 1'b0; wr_addr = '0; wr_data = '0;
    pulse_len = '0; step_cycles = '0; trigger = 1'b0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    // Load the shape.
    for (int n = 0; n < DEPTH; n++) begin
      @(negedge clk);
      wr_en = 1'b1; wr_addr = AW'(n); wr_data = entry(n);
    end
    @(negedge clk);
    wr_en = 1'b0;

    run_pulse(10, 1, 1'b0);
    run_pulse(7, 3, 1'b0);
    run_pulse(25, 2, 1'b1);
    run_pulse(5, 0, 1'b0);
    run_pulse(DEPTH, 1, 1'b0);
    run_pulse(64, 7, 1'b1);

    // pulse_len = 0: nothing happens.
    @(negedge clk);
    pulse_len = '0; step_cycles = 16'd1; trigger = 1'b1;
    @(negedge clk);
    trigger = 1'b0;
    repeat (5) begin
      @(negedge clk);
      expect_out(1'b0, 16'd0, 1'b0);
    end

    // Reset in the middle of a pulse stops it.
    @(negedge clk);
    pulse_len = 12'd100; step_cycles = 16'd1; trigger = 1'b1;
    @(negedge clk);
    trigger = 1'b0;
    repeat (10) @(negedge clk);
    rst = 1'b1;
    @(negedge clk);
    rst = 1'b0;
    repeat (3) begin
      @(negedge clk);
      expect_out(1'b0, 16'd0, 1'b0);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
