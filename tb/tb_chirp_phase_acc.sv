// tb_chirp_phase_acc: runs N_DDS lane accumulators side by side and checks
// that lane k, word m holds the closed-form chirp phase of sample
// n = N_DDS*m + k, for the default chirp and for random start/rate words,
// with irregular clock enables and a reload in the middle of a sweep.
module tb_chirp_phase_acc;
  import pdds_tb_pkg::*;
  import pdds_pkg::*;

  localparam int NL = 4;

  logic        clk = 1'b0;
  logic        rst_n, ce, load;
  logic [31:0] f0, k;
  logic [31:0] ph [NL];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar l = 0; l < NL; l++) begin : g_l
    chirp_phase_acc #(.PHASE_W(32), .N_DDS(NL), .LANE(l)) dut (
      .clk(clk), .rst_n(rst_n), .ce(ce), .load(load),
      .fcw_start(f0), .chirp_rate(k), .phase_o(ph[l]));
  end

  task automatic run(logic [31:0] f0_i, logic [31:0] k_i, int words);
    @(negedge clk);
    f0 = f0_i; k = k_i; ce = 1'b1; load = 1'b1;
    for (int m = 0; m < words; m++) begin
      @(posedge clk); #1;
      for (int l = 0; l < NL; l++) begin
        logic [31:0] e;
        e = ref_phase(longint'(NL * m + l), f0_i, k_i);
        checks++;
        if (ph[l] !== e) begin
          failures++;
          if (failures < 20)
            $display("FAIL lane %0d word %0d: got %h expected %h", l, m, ph[l], e);
        end
      end
      @(negedge clk);
      load = 1'b0;
      // a few clocks without ce must leave the phase unchanged
      if ($urandom_range(0, 3) == 0) begin
        logic [31:0] hold0;
        ce = 1'b0; hold0 = ph[0];
        repeat ($urandom_range(1, 3)) @(posedge clk);
        #1; checks++;
        if (ph[0] !== hold0) begin failures++; $display("FAIL phase moved without ce"); end
        @(negedge clk);
        ce = 1'b1;
      end
    end
  endtask

  initial begin
    rst_n = 1'b0; ce = 1'b0; load = 1'b0; f0 = '0; k = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    run(FCW_START_DEFAULT, CHIRP_RATE_DEFAULT, PULSE_WORDS);
    run($urandom, $urandom, 300);           // reload mid-sweep
    run($urandom, $urandom_range(0, 1000), 300);
    run(32'h0000_1000, 32'h0, 50);          // constant tone
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
