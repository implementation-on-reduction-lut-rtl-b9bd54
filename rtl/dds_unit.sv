// dds_unit: one DDS block of the parallel DDS chirp generator. It chains the
// lane's phase accumulator (chirp_phase_acc) with its own quarter-wave
// phase-to-amplitude converter (quarter_wave_sincos), so each of the N_DDS
// units carries one quarter-period LUT, as in the reference PDDS structure.
//
// The top PHASE_BITS bits of the PHASE_W-bit phase word address the LUT
// (phase truncation; the lower bits only carry the accumulation, so lint
// reports them as unused on purpose).
//
// Timing: everything advances on ce. The controller's active flag, which is
// high while the phase register holds a sample of the pulse, enters as
// in_valid; sin_o/cos_o and out_valid follow it three ce edges later (the
// phase word registered at ce edge e leaves the converter at edge e+3).
module dds_unit #(
  parameter int PHASE_W    = 32,
  parameter int N_DDS      = 4,
  parameter int LANE       = 0,
  parameter int PHASE_BITS = 10,
  parameter int OUT_W      = 10
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    ce,
  input  logic                    load,
  input  logic                    in_valid,
  input  logic [PHASE_W-1:0]      fcw_start,
  input  logic [PHASE_W-1:0]      chirp_rate,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] sin_o,
  output logic signed [OUT_W-1:0] cos_o
);

  logic [PHASE_W-1:0] phase;

  chirp_phase_acc #(
    .PHASE_W (PHASE_W),
    .N_DDS   (N_DDS),
    .LANE    (LANE)
  ) u_acc (
    .clk        (clk),
    .rst_n      (rst_n),
    .ce         (ce),
    .load       (load),
    .fcw_start  (fcw_start),
    .chirp_rate (chirp_rate),
    .phase_o    (phase)
  );

  quarter_wave_sincos #(
    .PHASE_BITS (PHASE_BITS),
    .OUT_W      (OUT_W)
  ) u_sincos (
    .clk       (clk),
    .rst_n     (rst_n),
    .ce        (ce),
    .in_valid  (in_valid),
    .phase     (phase[PHASE_W-1 -: PHASE_BITS]),
    .out_valid (out_valid),
    .sin_o     (sin_o),
    .cos_o     (cos_o)
  );

endmodule
