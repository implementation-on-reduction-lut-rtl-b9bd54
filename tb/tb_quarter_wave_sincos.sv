// tb_quarter_wave_sincos: sweeps all 2^PHASE_BITS phase words (in order, then
// in random order) through the quarter-wave converter with an irregular
// clock enable, and compares every sine and cosine output with the ideal
// full-period value. Checks the three-ce latency and the valid pipeline.
// A second instance at 12-bit phase and 12-bit output is swept in full to
// show the same folding with a larger table.
module tb_quarter_wave_sincos;
  import pdds_tb_pkg::*;

  localparam int PB    = 10;
  localparam int OUT_W = 10;
  localparam int NP    = 2 ** PB;

  logic                    clk = 1'b0;
  logic                    rst_n, ce, in_valid, out_valid;
  logic [PB-1:0]           phase;
  logic signed [OUT_W-1:0] sin_o, cos_o;
  int checks = 0, failures = 0;
  int quad_seen [4];

  always #5 clk = ~clk;

  quarter_wave_sincos #(.PHASE_BITS(PB), .OUT_W(OUT_W)) dut (.*);

  // a wider instance: 12-bit phase and 12-bit output (1024 x 11-bit table)
  localparam int PB2 = 12, OW2 = 12;
  logic                  v2_in, v2_out;
  logic [PB2-1:0]        ph2;
  logic signed [OW2-1:0] s2, c2;

  quarter_wave_sincos #(.PHASE_BITS(PB2), .OUT_W(OW2)) dut12 (
    .clk(clk), .rst_n(rst_n), .ce(1'b1), .in_valid(v2_in), .phase(ph2),
    .out_valid(v2_out), .sin_o(s2), .cos_o(c2));

  // expected values wait in a pipeline of ce-stages
  int exp_s [$], exp_c [$];
  bit exp_v [$];

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic step(bit v, int unsigned p, bit use_ce);
    @(negedge clk);
    ce       = use_ce;
    in_valid = v;
    phase    = PB'(p);
    @(posedge clk);
    if (use_ce) begin
      exp_v.push_back(v);
      exp_s.push_back(v ? ref_amp(p, 1'b0, PB, OUT_W) : 0);
      exp_c.push_back(v ? ref_amp(p, 1'b1, PB, OUT_W) : 0);
      if (v) quad_seen[p >> (PB - 2)]++;
    end
    #1;
    if (use_ce && exp_v.size() > 2) begin
      bit v_e; int s_e, c_e;
      v_e = exp_v.pop_front(); s_e = exp_s.pop_front(); c_e = exp_c.pop_front();
      check("out_valid", int'(out_valid), int'(v_e));
      if (v_e) begin
        check("sin", int'(sin_o), s_e);
        check("cos", int'(cos_o), c_e);
      end
    end
  endtask

  initial begin
    rst_n = 1'b0; ce = 1'b0; in_valid = 1'b0; phase = '0;
    v2_in = 1'b0; ph2 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // prime the pipeline with invalid words
    repeat (3) step(1'b0, 0, 1'b1);
    // ordered sweep, ce every clock
    for (int p = 0; p < NP; p++) step(1'b1, p, 1'b1);
    // random sweep, ce in one clock out of 1..4, gaps of invalid words
    for (int n = 0; n < 3 * NP; n++) begin
      int gap;
      gap = int'($urandom_range(0, 3));
      repeat (gap) step(1'b1, $urandom, 1'b0);   // no ce: nothing accepted
      step(($urandom_range(0, 7) != 0), $urandom_range(0, NP - 1), 1'b1);
    end
    repeat (3) step(1'b0, 0, 1'b1);
    // wider instance: full sweep with ce every clock, latency 3 clocks
    for (int p = 0; p < 2 ** PB2 + 3; p++) begin
      @(negedge clk);
      v2_in = (p < 2 ** PB2);
      ph2   = PB2'(p);
      if (p >= 3) begin
        check("12-bit valid", int'(v2_out), 1);
        check("12-bit sin", int'(s2), ref_amp(p - 3, 1'b0, PB2, OW2));
        check("12-bit cos", int'(c2), ref_amp(p - 3, 1'b1, PB2, OW2));
      end
    end
    for (int q = 0; q < 4; q++) begin
      checks++;
      if (quad_seen[q] == 0) begin
        failures++;
        $display("FAIL quadrant %0d never used", q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
