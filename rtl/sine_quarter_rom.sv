// sine_quarter_rom: the look-up table that holds a single quarter period of
// the sine wave, the memory-saving idea of the design. Entry i holds the
// magnitude
//     ROM[i] = round((2^DATA_W - 1) * sin(2*pi*(i + 0.5) / 2^(ADDR_W+2)))
// for i = 0 .. 2^ADDR_W - 1, i.e. the first quadrant of a period sampled at
// 2^(ADDR_W+2) points. The half-step offset makes the quadrant exactly
// mirror-symmetric, so the second quadrant is the first read backwards and
// no entry has to be duplicated; this offset is this design's choice.
//
// Storing one quadrant of unsigned magnitudes instead of a full signed period
// shrinks the table from 2^(ADDR_W+2) x (DATA_W+1) bits to
// 2^ADDR_W x DATA_W bits (1024x10 -> 256x9 at the defaults).
//
// Two synchronous read ports (A and B) share the one table, so a single
// ROM serves both the sine and the cosine of one DDS lane. Each port registers
// its data one clock after its address when en is high.
module sine_quarter_rom #(
  parameter int ADDR_W = 8,   // quarter-period address bits (10-bit phase - 2)
  parameter int DATA_W = 9    // magnitude bits (10-bit signed output - sign)
) (
  input  logic              clk,
  input  logic              en,
  input  logic [ADDR_W-1:0] addr_a,
  input  logic [ADDR_W-1:0] addr_b,
  output logic [DATA_W-1:0] data_a,
  output logic [DATA_W-1:0] data_b
);

  localparam int DEPTH = 2 ** ADDR_W;

  typedef logic [DATA_W-1:0] rom_t [DEPTH];

  function automatic rom_t build_rom();
    rom_t t;
    real  pi, amp, x;
    pi  = 3.14159265358979323846;
    amp = real'((2 ** DATA_W) - 1);
    for (int i = 0; i < DEPTH; i++) begin
      x    = amp * $sin(2.0 * pi * (real'(i) + 0.5) / real'(4 * DEPTH));
      t[i] = DATA_W'($rtoi(x + 0.5));
    end
    return t;
  endfunction

  localparam rom_t ROM = build_rom();

  always_ff @(posedge clk) begin
    if (en) begin
      data_a <= ROM[addr_a];
      data_b <= ROM[addr_b];
    end
  end

endmodule
