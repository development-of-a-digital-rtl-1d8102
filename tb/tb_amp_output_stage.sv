// Self-checking testbench for amp_output_stage.
//
// For random controller outputs and set values, in both switch positions,
// checks that one clock later drive_amp is the selected input limited to
// >= 0, and that `clamped` is high exactly when the limit acted.
module tb_amp_output_stage;
  import llrf_pkg::*;

  logic    clk = 1'b0;
  logic    rst;
  logic    ctrl_on;
  sample_t pid_out, set_value;
  sample_t drive_amp;
  logic    clamped;

  int checks = 0, failures = 0, n_clamp = 0;

  amp_output_stage dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; ctrl_on = 1'b0; pid_out = '0; set_value = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 4000; n++) begin
      sample_t sel, want;
      @(negedge clk);
      ctrl_on   = 1'($urandom);
      pid_out   = sample_t'($urandom);
      set_value = sample_t'($urandom);
      if (n == 0) begin ctrl_on = 1'b1; pid_out = -16'sd1; end
      if (n == 1) begin ctrl_on = 1'b0; set_value = 16'sd0; end
      sel  = ctrl_on ? pid_out : set_value;
      want = (sel < 0) ? '0 : sel;
      @(negedge clk);
      checks++;
      if (drive_amp !== want || clamped !== (sel < 0)) begin
        failures++;
        if (failures < 10)
          $display("on=%0d pid=%0d set=%0d: got %0d/%0d expected %0d/%0d",
                   ctrl_on, pid_out, set_value, drive_amp, clamped, want, sel < 0);
      end
      if (clamped) n_clamp++;
    end
    checks++;
    if (n_clamp == 0) begin
      failures++;
      $display("limit never acted");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
