// Pulse trigger source: internal periodic trigger or external trigger input.
//
// The pulse shape generator is started by a trigger. For tests without the
// accelerator timing system the trigger is made inside the FPGA by a counter
// that fires every `period` clocks (4 Hz, the maximum repetition rate, is
// 25,000,000 clocks at a 100 MHz clock). At the test stand an external trigger
// is used instead; it is asynchronous to the FPGA clock, so it passes a
// two-flip-flop synchroniser and its rising edge is taken. `src` selects
// between the two at run time.
// Both trigger sources follow the original system; the counter, the
// synchroniser and the run-time selection are this design's choices.
//
// Timing: `trigger` is high for one clock. Internal: the first trigger comes
// `period` clocks after reset or after `period` changes from zero, then every
// `period` clocks; period = 0 stops it. External: the trigger follows a rising
// edge of ext_trig by three clocks. Synchronous active-high reset.
module trigger_gen
  import llrf_pkg::*;
#(
  parameter int PERIOD_W = 32              // width of the period setting
) (
  input  logic                clk,
  input  logic                rst,
  input  trig_src_e           src,
  input  logic [PERIOD_W-1:0] period,      // internal trigger period, clocks
  input  logic                ext_trig,    // asynchronous external trigger
  output logic                trigger
);

  // Internal periodic trigger.
  logic [PERIOD_W-1:0] count;
  logic                int_fire;

  assign int_fire = (period != '0) && (count >= period - 1'b1);

  always_ff @(posedge clk) begin
    if (rst || period == '0 || int_fire) count <= '0;
    else                                  count <= count + 1'b1;
  end

  // External trigger: synchroniser and rising-edge detector.
  logic [2:0] ext_sync;
  always_ff @(posedge clk) begin
    if (rst) ext_sync <= '0;
    else     ext_sync <= {ext_sync[1:0], ext_trig};
  end

  logic ext_fire;
  assign ext_fire = ext_sync[1] && !ext_sync[2];

  always_ff @(posedge clk) begin
    if (rst) trigger <= 1'b0;
    else     trigger <= (src == TRIG_EXTERNAL) ? ext_fire : int_fire;
  end

endmodule
