// tb_pdds_chirp_top: end-to-end test of the PDDS chirp generator at its
// default size (4 lanes, 10-bit output, 32-bit accumulators). It emits the
// default 13.3 us / 75 MHz pulse (2660 samples at 200 MS/s), then pulses with
// other start frequencies, rates and lengths, and compares every serial I/Q
// sample and every parallel lane word with the ideal chirp computed from the
// closed-form phase phi[n] = n*F0 + K*n*(n-1)/2. It also checks the latency
// from the load edge to the first sample (4*N_DDS clocks), that a pulse is
// exactly pulse_words*N_DDS consecutive samples, and that the output is zero
// outside the pulse. Mechanisms counted (each must occur): the four
// quadrants of the quarter-wave folding on I and on Q, a start ignored while
// busy, the window forcing zeros, a change of chirp settings between pulses,
// and inputs changed during a pulse (the captured settings must hold).
module tb_pdds_chirp_top;
  import pdds_pkg::*;
  import pdds_tb_pkg::*;

  logic                          clk = 1'b0;
  logic                          rst_n, start, busy, out_valid, lane_valid;
  logic [PHASE_W-1:0]            fcw_start, chirp_rate;
  logic [CNT_W-1:0]              pulse_words;
  logic signed [OUT_W-1:0]       out_i, out_q;
  logic [N_DDS-1:0][OUT_W-1:0]   lane_i, lane_q;

  int checks = 0, failures = 0;
  int quad_i [4], quad_q [4];
  int ignored_starts = 0, zero_window = 0, reconfigs = 0, pulses = 0;
  int changed_in_pulse = 0;

  always #2.5 clk = ~clk;   // 200 MHz output clock

  pdds_chirp_top dut (.*);

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // ---- sample monitor -------------------------------------------------------
  logic [31:0] m_f0, m_k;
  int          n_ser = 0, n_lane = 0;
  bit          monitor_on = 1'b0;

  always @(posedge clk) begin
    #1;
    if (monitor_on) begin
      if (out_valid) begin
        logic [31:0] p;
        int          pq;
        p  = ref_phase(longint'(n_ser), m_f0, m_k);
        pq = int'(p[31:22]);
        check($sformatf("I[%0d]", n_ser), int'(out_i), ref_amp(pq, 1'b1));
        check($sformatf("Q[%0d]", n_ser), int'(out_q), ref_amp(pq, 1'b0));
        quad_i[(pq + 256) % 1024 / 256]++;   // quadrant the cosine read used
        quad_q[pq / 256]++;
        n_ser++;
      end else begin
        checks++;
        if (out_i != 0 || out_q != 0) begin
          failures++;
          $display("FAIL output not zero outside the pulse");
        end else zero_window++;
      end
      if (lane_valid && dut.u_ctrl.ce) begin
        for (int k = 0; k < N_DDS; k++) begin
          logic [31:0] p;
          p = ref_phase(longint'(N_DDS * n_lane) + longint'(k), m_f0, m_k);
          check("lane I", int'(signed'(lane_i[k])), ref_amp(int'(p[31:22]), 1'b1));
          check("lane Q", int'(signed'(lane_q[k])), ref_amp(int'(p[31:22]), 1'b0));
        end
        n_lane++;
      end
    end
  end

  // one pulse: configure, start, measure latency and length
  task automatic pulse(logic [31:0] f0, logic [31:0] k, int words, bit poke);
    int t, t_load, t_first, run_len;
    @(negedge clk);
    if (pulses > 0 && (f0 != m_f0 || k != m_k)) reconfigs++;
    fcw_start = f0; chirp_rate = k; pulse_words = CNT_W'(words);
    m_f0 = f0; m_k = k; n_ser = 0; n_lane = 0;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    // settings were captured with the start; new values must not disturb
    // this pulse
    if (poke) begin
      fcw_start = $urandom; chirp_rate = $urandom; pulse_words = CNT_W'($urandom);
      changed_in_pulse++;
    end
    t = 0;
    while (!dut.u_ctrl.load && t < 10) begin @(negedge clk); t++; end
    check("load reached", int'(dut.u_ctrl.load), 1);
    t_load = t;
    // clocks from the load clock to the first valid sample
    while (!out_valid && t < 1000) begin
      if (poke && t == t_load + 5) begin
        start = 1'b1; ignored_starts++;
      end else start = 1'b0;
      @(negedge clk); t++;
    end
    start = 1'b0;
    t_first = t;
    check("latency load->first sample", t_first - t_load, 4 * N_DDS + 1);
    run_len = 0;
    while (out_valid && run_len < 100000) begin
      if (poke && run_len == 100) begin
        start = 1'b1; ignored_starts++;
      end else start = 1'b0;
      @(negedge clk); run_len++;
    end
    start = 1'b0;
    check("pulse length (samples)", run_len, N_DDS * words);
    check("serial samples checked", n_ser, N_DDS * words);
    check("lane words checked", n_lane, words);
    // nothing more comes out: the ignored start must not have made a pulse
    repeat (8 * N_DDS) @(negedge clk);
    check("no extra pulse", int'(out_valid), 0);
    check("idle", int'(busy), 0);
    pulses++;
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0;
    fcw_start = FCW_START_DEFAULT; chirp_rate = CHIRP_RATE_DEFAULT;
    pulse_words = CNT_W'(PULSE_WORDS);
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    monitor_on = 1'b1;
    repeat (10) @(negedge clk);
    // the reference pulse: 13.3 us, 75 MHz
    pulse(FCW_START_DEFAULT, CHIRP_RATE_DEFAULT, PULSE_WORDS, 1'b1);
    // down-chirp over the same band
    pulse(32'h3000_0000, -CHIRP_RATE_DEFAULT, PULSE_WORDS, 1'b0);
    // random settings, shorter pulses
    for (int i = 0; i < 4; i++)
      pulse($urandom, $urandom_range(0, 32'h0010_0000), int'($urandom_range(1, 200)), i[0]);
    for (int q = 0; q < 4; q++) begin
      check($sformatf("I quadrant %0d used", q), int'(quad_i[q] > 0), 1);
      check($sformatf("Q quadrant %0d used", q), int'(quad_q[q] > 0), 1);
    end
    check("start ignored while busy", int'(ignored_starts > 0), 1);
    check("zero outside pulse", int'(zero_window > 0), 1);
    check("chirp settings changed", int'(reconfigs > 0), 1);
    check("inputs changed during a pulse", int'(changed_in_pulse > 0), 1);
    $display("mechanisms: quadI %0d/%0d/%0d/%0d quadQ %0d/%0d/%0d/%0d ignored_starts %0d zero_clocks %0d reconfigs %0d changed_in_pulse %0d pulses %0d",
             quad_i[0], quad_i[1], quad_i[2], quad_i[3], quad_q[0], quad_q[1], quad_q[2], quad_q[3],
             ignored_starts, zero_window, reconfigs, changed_in_pulse, pulses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
