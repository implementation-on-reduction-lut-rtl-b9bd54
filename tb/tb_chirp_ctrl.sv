// tb_chirp_ctrl: checks the lane clock enable (exactly one clock in N_DDS),
// that a start request is served at the next ce with a one-cycle load, that
// active then lasts exactly pulse_words ce periods (the length taken with
// the start, even if the input changes afterwards), that starts during a
// pulse are ignored, and that pulse_words = 0 gives a one-word pulse.
module tb_chirp_ctrl;

  localparam int N = 4;
  localparam int CW = 16;

  logic          clk = 1'b0;
  logic          rst_n, start, ce, load, active, busy, accept;
  logic [CW-1:0] pulse_words;
  int checks = 0, failures = 0;
  int ignored_starts = 0;

  always #5 clk = ~clk;

  chirp_ctrl #(.N_DDS(N), .CNT_W(CW)) dut (.*);

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // ce period monitor
  int last_ce = -1, cyc = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (ce) begin
        if (last_ce >= 0) check("ce period", cyc - last_ce, N);
        last_ce = cyc;
      end
      if (load) check("load only with ce", int'(ce), 1);
    end
    cyc++;
  end

  // request one pulse, wait for it and measure it
  task automatic pulse(int words, int start_delay, bit poke_busy);
    int load_cyc, act_cyc, ce_while_active;
    repeat (start_delay) @(negedge clk);
    start = 1'b1;
    #1 check("accept with start while idle", int'(accept), 1);
    @(negedge clk);
    start = 1'b0;
    // the length was taken with the start: changing it now has no effect
    pulse_words = CW'($urandom_range(1, 50));
    check("busy after start", int'(busy), 1);
    // wait for load, at most N clocks
    load_cyc = 0;
    while (!load && load_cyc < N + 1) begin @(negedge clk); load_cyc++; end
    check("load within N clocks", int'(load), 1);
    check("load cycles", int'(load_cyc <= N), 1);
    @(negedge clk);
    check("active after load", int'(active), 1);
    ce_while_active = 0; act_cyc = 0;
    while (active && act_cyc < 100000) begin
      if (poke_busy && act_cyc == 3) begin
        start = 1'b1; ignored_starts++;
        #1 check("no accept while busy", int'(accept), 0);
      end else start = 1'b0;
      if (ce) ce_while_active++;
      @(negedge clk);
      act_cyc++;
    end
    start = 1'b0;
    check("active length in ce", ce_while_active, (words == 0) ? 1 : words);
    check("active length in clocks", act_cyc, N * ((words == 0) ? 1 : words));
    check("idle after pulse", int'(busy), 0);
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0; pulse_words = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    check("idle after reset", int'(busy), 0);
    pulse_words = 16'd665; pulse(665, 1, 1'b0);
    pulse_words = 16'd3;   pulse(3, 0, 1'b1);
    pulse_words = 16'd1;   pulse(1, 2, 1'b0);
    pulse_words = 16'd0;   pulse(0, 3, 1'b0);
    for (int i = 0; i < 10; i++) begin
      int w;
      w = int'($urandom_range(1, 40));
      pulse_words = CW'(w);
      pulse(w, int'($urandom_range(0, 5)), 1'b1);
    end
    check("starts ignored during pulse", int'(ignored_starts > 0), 1);
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
