// chirp_phase_acc: frequency and phase accumulators of one DDS lane of the
// parallel DDS chirp generator.
//
// The full-rate chirp is defined sample by sample as
//   f[n+1]   = f[n] + K,      f[0]   = F0
//   phi[n+1] = phi[n] + f[n], phi[0] = 0        (all modulo 2^PHASE_W)
// so phi[n] = n*F0 + K*n*(n-1)/2, the discrete form of pi*K*t^2.
// Lane LANE of N_DDS lanes produces only samples n = N_DDS*m + LANE, so it
// steps N_DDS samples at a time:
//   f   <- f   + N_DDS*K
//   phi <- phi + N_DDS*f + K*N_DDS*(N_DDS-1)/2
// and is loaded with f = F0 + LANE*K, phi = LANE*F0 + K*LANE*(LANE-1)/2.
// The lanes together thus reproduce the single fast DDS bit-exactly while
// each runs at 1/N_DDS of the output rate. The strided update is this
// design's formulation; the reference design only states that the lanes run in
// parallel at a lower clock.
//
// Timing: on a ce cycle with load high the lane takes its first sample
// (m = 0); every later ce cycle advances it by one lane word (m + 1).
// phase_o is the registered phase word of the current sample.
module chirp_phase_acc #(
  parameter int PHASE_W = 32,  // accumulator width
  parameter int N_DDS   = 4,   // number of parallel lanes
  parameter int LANE    = 0    // index of this lane, 0 .. N_DDS-1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               ce,
  input  logic               load,
  input  logic [PHASE_W-1:0] fcw_start,   // F0, frequency word of sample 0
  input  logic [PHASE_W-1:0] chirp_rate,  // K, frequency step per sample
  output logic [PHASE_W-1:0] phase_o
);

  localparam logic [PHASE_W-1:0] N_W      = PHASE_W'(N_DDS);
  localparam logic [PHASE_W-1:0] L_W      = PHASE_W'(LANE);
  localparam logic [PHASE_W-1:0] TRI_STEP = PHASE_W'(N_DDS * (N_DDS - 1) / 2);
  localparam logic [PHASE_W-1:0] TRI_LANE = PHASE_W'(LANE * (LANE - 1) / 2);

  logic [PHASE_W-1:0] freq;
  logic [PHASE_W-1:0] freq_init, phase_init, freq_step, phase_const;

  assign freq_init   = fcw_start + L_W * chirp_rate;
  assign phase_init  = L_W * fcw_start + TRI_LANE * chirp_rate;
  assign freq_step   = N_W * chirp_rate;
  assign phase_const = TRI_STEP * chirp_rate;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      freq    <= '0;
      phase_o <= '0;
    end else if (ce) begin
      if (load) begin
        freq    <= freq_init;
        phase_o <= phase_init;
      end else begin
        freq    <= freq + freq_step;
        phase_o <= phase_o + N_W * freq + phase_const;
      end
    end
  end

endmodule
