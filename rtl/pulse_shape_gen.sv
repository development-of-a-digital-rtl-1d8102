// Pulse shape generator: plays a stored amplitude set-value curve per trigger.
//
// In pulsed operation the amplitude set value is not constant: on every
// trigger a pulse shape is read out of a memory of DEPTH set values, one entry
// after the other, and fed to the amplitude loop. Between pulses the set
// value is zero. The memory is loaded by the host computer through a simple
// write port. The host also sets how many entries a pulse uses (pulse_len)
// and how many clocks each entry is held (step_cycles), which sets the pulse
// length: 2048 entries held for 1 us each give a pulse of about 2 ms.
// The 2048-entry memory and the trigger-started read-out follow the original
// system; the write port, the run-time length and step settings and the data
// format are this design's choices.
//
// Data format: entries are unsigned fractions with 1.0 = 2^(SHAPE_W-1), so a
// shape can be scaled exactly by the pulse amplitude setpoint afterwards.
//
// Timing: a one-clock `trigger` while idle starts a pulse; triggers during a
// pulse are ignored. Two clocks after the trigger, shape_active rises and
// shape_value carries entry 0; entry n follows n*step_cycles clocks later.
// shape_active falls pulse_len*step_cycles clocks after it rose. pulse_len = 0
// disables the generator; step_cycles = 0 counts as 1. Synchronous
// active-high reset stops a running pulse; the memory keeps its contents.
module pulse_shape_gen #(
  parameter int DEPTH   = 2048,           // set values in the shape memory
  parameter int SHAPE_W = 16,             // width of one set value
  parameter int STEP_W  = 16,             // width of step_cycles
  localparam int AW     = $clog2(DEPTH)
) (
  input  logic               clk,
  input  logic               rst,
  // host write port
  input  logic               wr_en,
  input  logic [AW-1:0]      wr_addr,
  input  logic [SHAPE_W-1:0] wr_data,
  // run-time settings
  input  logic [AW:0]        pulse_len,   // entries per pulse, 0..DEPTH
  input  logic [STEP_W-1:0]  step_cycles, // clocks per entry
  // pulse control
  input  logic               trigger,
  output logic               shape_active,
  output logic [SHAPE_W-1:0] shape_value,
  output logic               pulse_start  // one clock, with the first entry
);

  logic [SHAPE_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  logic              running;
  logic              first;
  logic [AW:0]       index;     // entry being played
  logic [STEP_W-1:0] step_cnt;  // clocks the entry has been held, minus one
  logic [STEP_W-1:0] step_last;

  assign step_last = (step_cycles == '0) ? '0 : step_cycles - 1'b1;

  always_ff @(posedge clk) begin
    if (rst) begin
      running  <= 1'b0;
      first    <= 1'b0;
      index    <= '0;
      step_cnt <= '0;
    end else if (!running) begin
      first <= 1'b0;
      if (trigger && pulse_len != '0 && pulse_len <= (AW+1)'(DEPTH)) begin
        running  <= 1'b1;
        first    <= 1'b1;
        index    <= '0;
        step_cnt <= '0;
      end
    end else begin
      first <= 1'b0;
      if (step_cnt == step_last) begin
        step_cnt <= '0;
        if (index == pulse_len - 1'b1) running <= 1'b0;
        else                           index   <= index + 1'b1;
      end else begin
        step_cnt <= step_cnt + 1'b1;
      end
    end
  end

  // Synchronous read: the value follows its address by one clock.
  always_ff @(posedge clk) begin
    if (rst) begin
      shape_active <= 1'b0;
      shape_value  <= '0;
      pulse_start  <= 1'b0;
    end else begin
      shape_active <= running;
      shape_value  <= running ? mem[index[AW-1:0]] : '0;
      pulse_start  <= first;
    end
  end

  // Output rules: the start mark lies inside a pulse and the set value is
  // zero outside one.
  a_start_in_pulse: assert property (@(posedge clk) disable iff (rst)
    pulse_start |-> shape_active);
  a_zero_between_pulses: assert property (@(posedge clk) disable iff (rst)
    !shape_active |-> shape_value == '0);

endmodule
