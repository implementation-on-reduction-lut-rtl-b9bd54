// quarter_wave_sincos: phase-to-amplitude converter that rebuilds a full
// period of sine and cosine from the quarter-wave table in sine_quarter_rom.
//
// The top two bits of the phase word give the quadrant q, the rest the index
// i inside the quadrant. Following the quarter-wave method (store a quarter,
// mirror it in time, then invert it in amplitude):
//   q = 0 : +ROM[i]        first quarter as stored
//   q = 1 : +ROM[~i]       second quarter: the stored one read backwards
//   q = 2 : -ROM[i]        third quarter: first half negated
//   q = 3 : -ROM[~i]       fourth quarter: second quarter negated
// The cosine is the sine a quarter period later, i.e. the same rules applied
// to quadrant q+1 with the same index, read through the ROM's second port.
//
// Timing: a three-stage pipeline advanced by ce (the lane clock enable).
//   stage 1 registers the mirrored addresses and the two sign flags,
//   stage 2 is the registered ROM read,
//   stage 3 applies the sign and registers the signed outputs.
// An input accepted at a ce edge appears on sin_o/cos_o after the second
// ce edge that follows (three ce edges in all, counting the accepting one);
// in_valid travels with it as out_valid. Outputs are
// two's complement, range -(2^(OUT_W-1)-1) .. +(2^(OUT_W-1)-1).
module quarter_wave_sincos #(
  parameter int PHASE_BITS = 10,  // phase bits per full period
  parameter int OUT_W      = 10   // signed output width
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    ce,
  input  logic                    in_valid,
  input  logic [PHASE_BITS-1:0]   phase,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] sin_o,
  output logic signed [OUT_W-1:0] cos_o
);

  localparam int IDX_W = PHASE_BITS - 2;
  localparam int MAG_W = OUT_W - 1;

  logic [1:0]       quad;
  logic [IDX_W-1:0] idx;
  assign quad = phase[PHASE_BITS-1 -: 2];
  assign idx  = phase[IDX_W-1:0];

  // stage 1: quadrant decode
  logic [IDX_W-1:0] addr_s, addr_c;
  logic             neg_s1, neg_c1, v1;

  always_ff @(posedge clk) begin
    if (ce) begin
      addr_s <= quad[0] ? ~idx : idx;          // mirror in 2nd and 4th quarter
      addr_c <= quad[0] ? idx : ~idx;          // cosine: quadrant q+1
      neg_s1 <= quad[1];                       // negate in 3rd and 4th quarter
      neg_c1 <= quad[1] ^ quad[0];             // cosine negative for q = 1, 2
    end
  end

  // stage 2: quarter-wave table
  logic [MAG_W-1:0] mag_s, mag_c;
  logic             neg_s2, neg_c2, v2;

  sine_quarter_rom #(
    .ADDR_W (IDX_W),
    .DATA_W (MAG_W)
  ) u_rom (
    .clk    (clk),
    .en     (ce),
    .addr_a (addr_s),
    .addr_b (addr_c),
    .data_a (mag_s),
    .data_b (mag_c)
  );

  always_ff @(posedge clk) begin
    if (ce) begin
      neg_s2 <= neg_s1;
      neg_c2 <= neg_c1;
    end
  end

  // stage 3: amplitude inversion
  logic signed [OUT_W-1:0] mag_s_ext, mag_c_ext;
  assign mag_s_ext = signed'({1'b0, mag_s});
  assign mag_c_ext = signed'({1'b0, mag_c});

  always_ff @(posedge clk) begin
    if (ce) begin
      sin_o <= neg_s2 ? -mag_s_ext : mag_s_ext;
      cos_o <= neg_c2 ? -mag_c_ext : mag_c_ext;
    end
  end

  // valid pipeline
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1        <= 1'b0;
      v2        <= 1'b0;
      out_valid <= 1'b0;
    end else if (ce) begin
      v1        <= in_valid;
      v2        <= v1;
      out_valid <= v2;
    end
  end

endmodule
