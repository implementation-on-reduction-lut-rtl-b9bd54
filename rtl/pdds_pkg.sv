// pdds_pkg: constants shared by the parallel-DDS (PDDS) chirp generator.
//
// The generator builds a linear-FM chirp s[n] = A*exp(j*2*pi*phi[n]) with
//   f[n]   = FCW_START + n*CHIRP_RATE          (frequency word, cycles/sample * 2^PHASE_W)
//   phi[n] = phi[n-1] + f[n-1], phi[0] = 0     (phase word, modulo 2^PHASE_W)
// computed by N_DDS lanes in parallel, lane k producing samples n = N_DDS*m + k.
//
// From the reference design: 4 DDS lanes, 10-bit output, 13.3 us pulse,
// 75 MHz bandwidth. This design's own choices: a 200 MS/s output rate (so
// each lane runs at 50 MS/s), a 32-bit phase accumulator, a 10-bit phase
// word into the LUT, and a chirp swept from -37.5 MHz to +37.5 MHz around
// DC. The default frequency words below follow from those numbers:
//   FCW_START  = -37.5e6/200e6 * 2^32                  = -805306368
//   CHIRP_RATE = 75e6/(13.3e-6 * (200e6)^2) * 2^32     ~  605494
//   PULSE_SAMPLES = 13.3e-6 * 200e6                    =  2660
package pdds_pkg;

  localparam int N_DDS         = 4;    // parallel DDS lanes 
  localparam int OUT_W         = 10;   // output sample width 
  localparam int PHASE_W       = 32;   // phase/frequency accumulator width
  localparam int PHASE_BITS    = 10;   // phase bits addressing one full period
  localparam int CNT_W         = 16;   // pulse-length counter width (lane words)

  localparam int PULSE_SAMPLES = 2660;                   // 13.3 us at 200 MS/s
  localparam int PULSE_WORDS   = PULSE_SAMPLES / N_DDS;  // 665 lane words

  localparam logic [PHASE_W-1:0] FCW_START_DEFAULT  = 32'hD000_0000;  // -37.5 MHz
  localparam logic [PHASE_W-1:0] CHIRP_RATE_DEFAULT = 32'd605494;     // 75 MHz / 13.3 us

endpackage
