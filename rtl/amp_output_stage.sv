// Amplitude drive selection and non-negative limit.
//
// With amplitude control switched on, the drive amplitude is the output of the
// amplitude controller; switched off, the amplitude set value is passed on
// directly (open loop, useful for commissioning a cavity). Either way the
// result is limited to values >= 0, because a negative amplitude would turn
// the drive phase by 180 degrees. Both the switch and the limit are in the
// original block diagram.
//
// Timing: one clock from the inputs to drive_amp. `clamped` is high with a
// drive value that had to be limited.
module amp_output_stage
  import llrf_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    ctrl_on,      // 1: closed loop, 0: set value passed on
  input  sample_t pid_out,
  input  sample_t set_value,
  output sample_t drive_amp,
  output logic    clamped
);

  sample_t selected;
  assign selected = ctrl_on ? pid_out : set_value;

  always_ff @(posedge clk) begin
    if (rst) begin
      drive_amp <= '0;
      clamped   <= 1'b0;
    end else begin
      drive_amp <= (selected < 0) ? '0 : selected;
      clamped   <= (selected < 0);
    end
  end

endmodule
