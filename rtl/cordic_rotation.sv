// Amplitude/phase to I/Q converter: a fully pipelined CORDIC in rotation mode.
//
// The two controllers produce a drive amplitude and a drive phase; the RF
// board's I/Q modulator needs Cartesian I and Q. The CORDIC starts from the
// vector (A, 0) and turns it through the requested phase in ITER
// shift-and-add steps. The CORDIC stretches the vector by the constant gain
// K = prod sqrt(1 + 2^-2i) (about 1.6468), so the amplitude is first
// multiplied by round(2^16 / K). A coarse first step handles phases beyond
// +-90 degrees.
//
// The conversion itself is taken from the original system's block diagram;
// doing it with a CORDIC, the pipelining and the widths are this design's
// choices.
//
// Interface: in_valid/in_amp/in_phase are sampled every clock; in_phase is a
// binary angle (full code range = one turn). LATENCY = ITER + 3 clocks later
// out_valid/out_i/out_q hold in_amp*cos(phase) and in_amp*sin(phase),
// saturated to DATA_W bits. One new sample can enter every clock.
// Synchronous active-high reset clears the valid pipeline only.
module cordic_rotation
  import llrf_pkg::*;
#(
  parameter int ITER = 16          // CORDIC iterations
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    in_valid,
  input  sample_t in_amp,
  input  phase_t  in_phase,
  output logic    out_valid,
  output sample_t out_i,
  output sample_t out_q
);

  localparam int XG      = 4;            // fractional guard bits of x/y
  localparam int XW      = DATA_W + 2 + XG; // x/y width: room for the CORDIC gain
  localparam int GUARD   = 4;
  localparam int ZW      = PHASE_W + GUARD;
  localparam int LATENCY = ITER + 3;

  typedef logic signed [XW-1:0] xy_t;
  typedef logic signed [ZW-1:0] z_t;

  function automatic z_t atan_code(input int i);
    real a;
    a = $atan(1.0 / (2.0 ** i)) / (2.0 * 3.14159265358979323846) * (2.0 ** ZW);
    return z_t'(longint'(a + 0.5));
  endfunction

  // 1/K as an unsigned 16-bit fraction.
  function automatic logic [16:0] inv_gain_code();
    real k;
    k = 1.0;
    for (int i = 0; i < ITER; i++) k = k * $sqrt(1.0 + 2.0 ** (-2 * i));
    return 17'(longint'((2.0 ** 16) / k + 0.5));
  endfunction

  localparam logic [16:0] INV_K   = inv_gain_code();
  localparam z_t          QUARTER = z_t'(longint'(1) <<< (ZW - 2));

  // Stage A: remove the CORDIC gain from the amplitude.
  logic signed [DATA_W+17:0] amp_scaled;
  sample_t                   amp_a;
  phase_t                    phase_a;
  always_ff @(posedge clk) begin
    amp_a   <= sample_t'((amp_scaled + (DATA_W+18)'(1 <<< 15)) >>> 16);
    phase_a <= in_phase;
  end
  assign amp_scaled = in_amp * $signed({1'b0, INV_K});

  xy_t  x [ITER+1];
  xy_t  y [ITER+1];
  z_t   z [ITER+1];
  logic v [LATENCY+1];

  xy_t amp_ext;
  assign amp_ext = xy_t'(amp_a) <<< XG;

  // Stage 0: start vector, turned by +-90 degrees if the phase lies beyond.
  z_t phase_z;
  assign phase_z = z_t'(phase_a) <<< GUARD;

  always_ff @(posedge clk) begin
    if (phase_z > QUARTER) begin
      x[0] <= '0;
      y[0] <= amp_ext;
      z[0] <= phase_z - QUARTER;
    end else if (phase_z < -QUARTER) begin
      x[0] <= '0;
      y[0] <= -amp_ext;
      z[0] <= phase_z + QUARTER;
    end else begin
      x[0] <= amp_ext;
      y[0] <= '0;
      z[0] <= phase_z;
    end
  end

  // Stages 1..ITER: turn until the residual angle is zero.
  for (genvar s = 0; s < ITER; s++) begin : g_stage
    localparam z_t ATAN = atan_code(s);
    always_ff @(posedge clk) begin
      if (z[s] >= 0) begin
        x[s+1] <= x[s] - (y[s] >>> s);
        y[s+1] <= y[s] + (x[s] >>> s);
        z[s+1] <= z[s] - ATAN;
      end else begin
        x[s+1] <= x[s] + (y[s] >>> s);
        y[s+1] <= y[s] - (x[s] >>> s);
        z[s+1] <= z[s] + ATAN;
      end
    end
  end

  // Output stage: saturate to the DAC width.
  always_ff @(posedge clk) begin
    out_i <= sat_sample((wide_t'(x[ITER]) + wide_t'(1 <<< (XG - 1))) >>> XG);
    out_q <= sat_sample((wide_t'(y[ITER]) + wide_t'(1 <<< (XG - 1))) >>> XG);
  end

  assign v[0] = in_valid;
  always_ff @(posedge clk) begin
    for (int k = 1; k <= LATENCY; k++) v[k] <= rst ? 1'b0 : v[k-1];
  end
  assign out_valid = v[LATENCY];

  // The residual angle after the last stage is not needed.
  logic unused;
  assign unused = ^z[ITER];

endmodule
