// pdds_chirp_top: parallel direct digital synthesizer (PDDS) chirp generator
// with quarter-wave look-up tables, for an on-board SAR transmitter.
//
// A linear-FM chirp needs a DDS clocked at the full sample rate. Here N_DDS
// slower DDS units run side by side, unit k computing samples
// n = N_DDS*m + k, and an output MUX interleaves them back into one
// full-rate stream. Each unit has its own LUT, so the design keeps only one
// quarter of a sine period in each and rebuilds the full period by mirroring
// the address and inverting the sign.
//
//   chirp_ctrl  -> ce (one clock in N_DDS), load, active (pulse window)
//   dds_unit[k] -> chirp_phase_acc (strided phase) -> quarter_wave_sincos
//   pdds_mux    -> serial I/Q stream, zero outside the pulse
//
// Interface: raise start for one clock (or more) while busy is low to emit
// one pulse of pulse_words*N_DDS samples swept from fcw_start with
// chirp_rate per sample (frequency words in units of fs/2^PHASE_W). The
// three settings are captured on the clock where start is accepted. The
// complex sample out_i + j*out_q = A*exp(j*2*pi*phi[n]) appears one per
// clock with out_valid; lane_i/lane_q/lane_valid give the same samples N_DDS
// at a time at the lane rate.
//
// Timing: the load ce edge is followed by 3 ce edges in the LUT pipeline and
// one in the MUX, so sample 0 leaves out_i/out_q 4*N_DDS+1 clocks after the
// clock on which load is high, then one sample per clock for the whole pulse.
//
// From the reference design: 4 lanes, 10-bit output, one quarter-wave LUT per lane,
// MUX at the output, 13.3 us pulse and 75 MHz bandwidth (see pdds_pkg for the
// default frequency words). This design's own choices: I/Q output, 32-bit
// accumulators, 10-bit LUT phase, the 200 MS/s rate and the controller.
module pdds_chirp_top
  import pdds_pkg::*;
#(
  parameter int P_N_DDS      = N_DDS,
  parameter int P_PHASE_W    = PHASE_W,
  parameter int P_PHASE_BITS = PHASE_BITS,
  parameter int P_OUT_W      = OUT_W,
  parameter int P_CNT_W      = CNT_W
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic                                  start,
  input  logic [P_PHASE_W-1:0]                  fcw_start,
  input  logic [P_PHASE_W-1:0]                  chirp_rate,
  input  logic [P_CNT_W-1:0]                    pulse_words,
  output logic                                  busy,
  output logic                                  out_valid,
  output logic signed [P_OUT_W-1:0]             out_i,
  output logic signed [P_OUT_W-1:0]             out_q,
  output logic                                  lane_valid,
  output logic [P_N_DDS-1:0][P_OUT_W-1:0]       lane_i,
  output logic [P_N_DDS-1:0][P_OUT_W-1:0]       lane_q
);

  logic ce, load, active, accept;

  // chirp settings, captured on the clock where a start is accepted so the
  // inputs may change while a pulse runs
  logic [P_PHASE_W-1:0] fcw_start_q, chirp_rate_q;

  always_ff @(posedge clk) begin
    if (accept) begin
      fcw_start_q  <= fcw_start;
      chirp_rate_q <= chirp_rate;
    end
  end

  chirp_ctrl #(
    .N_DDS (P_N_DDS),
    .CNT_W (P_CNT_W)
  ) u_ctrl (
    .clk         (clk),
    .rst_n       (rst_n),
    .start       (start),
    .pulse_words (pulse_words),
    .ce          (ce),
    .load        (load),
    .active      (active),
    .busy        (busy),
    .accept      (accept)
  );

  logic [P_N_DDS-1:0]                   lv;
  logic [P_N_DDS-1:0][2*P_OUT_W-1:0]    lane_iq;

  for (genvar k = 0; k < P_N_DDS; k++) begin : g_lane
    logic signed [P_OUT_W-1:0] s, c;

    dds_unit #(
      .PHASE_W    (P_PHASE_W),
      .N_DDS      (P_N_DDS),
      .LANE       (k),
      .PHASE_BITS (P_PHASE_BITS),
      .OUT_W      (P_OUT_W)
    ) u_dds (
      .clk        (clk),
      .rst_n      (rst_n),
      .ce         (ce),
      .load       (load),
      .in_valid   (active),
      .fcw_start  (fcw_start_q),
      .chirp_rate (chirp_rate_q),
      .out_valid  (lv[k]),
      .sin_o      (s),
      .cos_o      (c)
    );

    assign lane_i[k]  = c;          // I = cos(2*pi*phi)
    assign lane_q[k]  = s;          // Q = sin(2*pi*phi)
    assign lane_iq[k] = {c, s};
  end

  // all lanes see the same enables, so their valid flags are identical
  assign lane_valid = lv[0];

  a_lanes_aligned: assert property (@(posedge clk) disable iff (!rst_n)
                                    lv == '0 || lv == '1)
    else $error("pdds_chirp_top: DDS lanes out of step");

  logic [2*P_OUT_W-1:0] iq;

  pdds_mux #(
    .N_DDS (P_N_DDS),
    .W     (2 * P_OUT_W)
  ) u_mux (
    .clk        (clk),
    .rst_n      (rst_n),
    .ce         (ce),
    .din_valid  (lane_valid),
    .din        (lane_iq),
    .dout_valid (out_valid),
    .dout       (iq)
  );

  assign out_i = iq[2*P_OUT_W-1 -: P_OUT_W];
  assign out_q = iq[P_OUT_W-1:0];

endmodule
