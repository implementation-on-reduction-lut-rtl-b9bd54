// tb_dds_unit: one DDS lane (lane 2 of 4) driven through a whole default
// chirp pulse with a clock enable of one clock in four, as in the full
// generator. Every output is compared with the ideal I/Q amplitude at the
// closed-form phase of sample n = 4*m + 2; the three-ce latency and the
// valid flag are checked.
module tb_dds_unit;
  import pdds_tb_pkg::*;
  import pdds_pkg::*;

  localparam int LANE = 2;

  logic                    clk = 1'b0;
  logic                    rst_n, ce, load, in_valid, out_valid;
  logic [31:0]             fcw_start, chirp_rate;
  logic signed [OUT_W-1:0] sin_o, cos_o;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dds_unit #(.PHASE_W(32), .N_DDS(N_DDS), .LANE(LANE), .PHASE_BITS(10), .OUT_W(OUT_W)) dut (.*);

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // one ce cycle; returns after the ce edge
  task automatic tick(bit ld, bit v);
    @(negedge clk); load = ld; in_valid = v; ce = 1'b0;
    repeat (N_DDS - 1) @(negedge clk);
    ce = 1'b1;
    @(posedge clk); #1;
  endtask

  initial begin
    int e_count;
    rst_n = 1'b0; ce = 1'b0; load = 1'b0; in_valid = 1'b0;
    fcw_start = FCW_START_DEFAULT; chirp_rate = CHIRP_RATE_DEFAULT;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    tick(1'b0, 1'b0);
    // load edge: phase register takes sample m = 0; in_valid rises with it
    tick(1'b1, 1'b0);
    e_count = 0;
    for (int t = 1; t < PULSE_WORDS + 4; t++) begin
      // before edge t the phase register holds word t-1 (valid if < PULSE_WORDS)
      tick(1'b0, (t - 1) < PULSE_WORDS);
      // after edge t the output shows the word registered at edge t-3
      if (t >= 3) begin
        int m;
        m = t - 3;
        check("out_valid", int'(out_valid), int'(m < PULSE_WORDS));
        if (m < PULSE_WORDS) begin
          logic [31:0] p;
          p = ref_phase(longint'(N_DDS * m + LANE), fcw_start, chirp_rate);
          check("sin", int'(sin_o), ref_amp(int'(p[31:22]), 1'b0));
          check("cos", int'(cos_o), ref_amp(int'(p[31:22]), 1'b1));
          e_count++;
        end
      end else begin
        check("out_valid early", int'(out_valid), 0);
      end
    end
    check("word count", e_count, PULSE_WORDS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
