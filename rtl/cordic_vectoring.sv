// I/Q to phase converter: a fully pipelined CORDIC in vectoring mode.
//
// The demodulated cavity signal arrives as an I/Q pair. The controller needs
// only its phase, because the amplitude is measured by a separate RF power
// detector. The CORDIC rotates the vector onto the positive x axis in ITER
// shift-and-add steps and adds up the rotation angles; the sum is the phase of
// the input. A first stage turns vectors in the left half-plane by +-90 degrees
// so the iterations only need to cover +-90 degrees.
//
// Using the CORDIC algorithm for this step follows the original system; the
// pipelined structure, the widths and the iteration count are this design's
// choices. The magnitude that the CORDIC also produces is not brought out.
//
// Interface: in_valid/in_i/in_q are sampled every clock. LATENCY = ITER + 2
// clocks later out_valid/out_phase carry the result. out_phase is a binary
// angle (full code range = one turn, -2^(PHASE_W-1) = -180 degrees). One new
// sample can enter every clock. An all-zero input gives phase 0.
// Synchronous active-high reset clears the valid pipeline only.
module cordic_vectoring
  import llrf_pkg::*;
#(
  parameter int ITER = 16          // CORDIC iterations
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    in_valid,
  input  sample_t in_i,
  input  sample_t in_q,
  output logic    out_valid,
  output phase_t  out_phase
);

  localparam int XG      = 4;            // fractional guard bits of x/y
  localparam int XW      = DATA_W + 2 + XG; // x/y width: room for the CORDIC gain
  localparam int GUARD   = 4;            // extra angle bits inside the pipeline
  localparam int ZW      = PHASE_W + GUARD;
  localparam int LATENCY = ITER + 2;

  typedef logic signed [XW-1:0] xy_t;
  typedef logic signed [ZW-1:0] z_t;

  // atan(2^-i) as a binary angle of ZW bits.
  function automatic z_t atan_code(input int i);
    real a;
    a = $atan(1.0 / (2.0 ** i)) / (2.0 * 3.14159265358979323846) * (2.0 ** ZW);
    return z_t'(longint'(a + 0.5));
  endfunction

  localparam z_t QUARTER = z_t'(longint'(1) <<< (ZW - 2));  // 90 degrees

  xy_t  x [ITER+1];
  xy_t  y [ITER+1];
  z_t   z [ITER+1];
  logic v [LATENCY+1];

  xy_t i_ext, q_ext;
  assign i_ext = xy_t'(in_i) <<< XG;
  assign q_ext = xy_t'(in_q) <<< XG;

  // Stage 0: coarse rotation into the right half-plane.
  always_ff @(posedge clk) begin
    if (in_i < 0) begin
      if (in_q >= 0) begin              // second quadrant: turn by -90 degrees
        x[0] <= q_ext;
        y[0] <= -i_ext;
        z[0] <= QUARTER;
      end else begin                    // third quadrant: turn by +90 degrees
        x[0] <= -q_ext;
        y[0] <= i_ext;
        z[0] <= -QUARTER;
      end
    end else begin
      x[0] <= i_ext;
      y[0] <= q_ext;
      z[0] <= '0;
    end
  end

  // Stages 1..ITER: drive y to zero, accumulating the angle turned through.
  for (genvar s = 0; s < ITER; s++) begin : g_stage
    localparam z_t ATAN = atan_code(s);
    always_ff @(posedge clk) begin
      if (y[s] >= 0) begin
        x[s+1] <= x[s] + (y[s] >>> s);
        y[s+1] <= y[s] - (x[s] >>> s);
        z[s+1] <= z[s] + ATAN;
      end else begin
        x[s+1] <= x[s] - (y[s] >>> s);
        y[s+1] <= y[s] + (x[s] >>> s);
        z[s+1] <= z[s] - ATAN;
      end
    end
  end

  // Output stage: round the angle to PHASE_W bits (wrapping is intended).
  z_t z_round;
  assign z_round = z[ITER] + z_t'(1 <<< (GUARD - 1));

  always_ff @(posedge clk) begin
    out_phase <= phase_t'(z_round >>> GUARD);
  end

  // Valid pipeline.
  assign v[0] = in_valid;
  always_ff @(posedge clk) begin
    for (int k = 1; k <= LATENCY; k++) v[k] <= rst ? 1'b0 : v[k-1];
  end
  assign out_valid = v[LATENCY];

  // The x/y words lose their meaning after the last stage.
  logic unused;
  assign unused = ^{x[ITER], y[ITER]};

endmodule
