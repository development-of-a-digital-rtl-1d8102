// Self-checking testbench for trigger_gen.
//
// Internal source: with period P the trigger must be high for exactly one
// clock every P clocks (checked over many periods for several P), and never
// while P = 0. External source: each rising edge of ext_trig, held high for
// any number of clocks, must give exactly one trigger, three clocks after the
// edge is applied; the internal counter must not leak through meanwhile.
module tb_trigger_gen;
  import llrf_pkg::*;

  logic        clk = 1'b0;
  logic        rst;
  trig_src_e   src;
  logic [31:0] period;
  logic        ext_trig;
  logic        trigger;

  int checks = 0, failures = 0;

  trigger_gen dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Count triggers and measure the spacing between them.
  int cycle = 0, n_trig = 0, last_trig = -1, bad_gap = 0, want_gap = 0;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (!rst && trigger) begin
      if (want_gap != 0 && last_trig >= 0 && cycle - last_trig != want_gap) bad_gap++;
      last_trig = cycle;
      n_trig++;
    end
  end

  task automatic internal_run(int p, int n_periods);
    int n_start;
    @(negedge clk);
    src = TRIG_INTERNAL; period = 0;
    @(negedge clk);
    last_trig = -1; bad_gap = 0; want_gap = p;
    n_start = n_trig;
    period = 32'(p);
    repeat (p * n_periods + 1) @(negedge clk);
    checks++;
    if (n_trig - n_start != n_periods || bad_gap != 0) begin
      failures++;
      $display("period %0d: %0d triggers, %0d bad gaps", p, n_trig - n_start, bad_gap);
    end
  endtask

  initial begin
    int n_start, t_edge;
    rst = 1'b1; src = TRIG_INTERNAL; period = '0; ext_trig = 1'b0;
    repeat (3) @(negedge clk);
    rst = 1'b0;

    // Period 0: silent.
    n_start = n_trig;
    repeat (100) @(negedge clk);
    checks++;
    if (n_trig != n_start) begin
      failures++;
      $display("trigger with period 0");
    end

    internal_run(1, 20);
    internal_run(2, 20);
    internal_run(10, 30);
    internal_run(97, 20);

    // External source: a long period on the internal counter must not leak.
    @(negedge clk);
    period = 32'd5; src = TRIG_EXTERNAL; want_gap = 0;
    repeat (5) @(negedge clk);
    for (int k = 0; k < 20; k++) begin
      int hi;
      hi = $urandom_range(1, 30);
      n_start = n_trig;
      ext_trig = 1'b1;
      t_edge = cycle;
      repeat (hi) @(negedge clk);
      ext_trig = 1'b0;
      repeat ($urandom_range(5, 20)) @(negedge clk);
      checks++;
      if (n_trig - n_start != 1) begin
        failures++;
        $display("external edge %0d gave %0d triggers", k, n_trig - n_start);
      end
      checks++;
      if (last_trig - t_edge != 3) begin
        failures++;
        $display("external trigger delay %0d, expected 3", last_trig - t_edge);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
