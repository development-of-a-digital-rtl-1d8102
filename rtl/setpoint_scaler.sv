// Pulse amplitude scaling: amplitude set value = pulse shape x pulse amplitude.
//
// The stored pulse shape is normalised; multiplying it by the pulse amplitude
// setpoint from the host gives the amplitude set value of the loop, so the
// pulse height can be changed without reloading the shape memory. The shape
// is an unsigned fraction with 1.0 = 2^(SHAPE_W-1); the product is rounded
// and saturated to DATA_W bits. The multiplier itself is in the original
// block diagram; the number formats are this design's choice.
//
// Timing: one clock from shape_value/shape_active to setpoint/active.
module setpoint_scaler
  import llrf_pkg::*;
#(
  parameter int SHAPE_W = 16
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [SHAPE_W-1:0] shape_value,
  input  logic               shape_active,
  input  sample_t            pulse_amp,     // pulse amplitude setpoint
  output sample_t            setpoint,
  output logic               active
);

  wide_t product, rounded;

  assign product = wide_t'(pulse_amp) * wide_t'({1'b0, shape_value});
  assign rounded = (product + (wide_t'(1) <<< (SHAPE_W - 2))) >>> (SHAPE_W - 1);

  always_ff @(posedge clk) begin
    if (rst) begin
      setpoint <= '0;
      active   <= 1'b0;
    end else begin
      setpoint <= sat_sample(rounded);
      active   <= shape_active;
    end
  end

endmodule
