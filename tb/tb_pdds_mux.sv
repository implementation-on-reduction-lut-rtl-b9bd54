// tb_pdds_mux: feeds random lane words on a lane clock enable of one clock in
// N_DDS and checks that each word leaves the MUX lane 0 first, one lane per
// clock, starting the clock after its ce edge, with zeros and a low valid
// for words that are not valid.
module tb_pdds_mux;

  localparam int N = 4;
  localparam int W = 20;

  logic                clk = 1'b0;
  logic                rst_n, ce, din_valid, dout_valid;
  logic [N-1:0][W-1:0] din;
  logic [W-1:0]        dout;
  int checks = 0, failures = 0;
  int valid_words = 0, gap_words = 0;

  always #5 clk = ~clk;

  pdds_mux #(.N_DDS(N), .W(W)) dut (.*);

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    logic [N-1:0][W-1:0] word;
    bit                  v;
    rst_n = 1'b0; ce = 1'b0; din_valid = 1'b0; din = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    check("idle valid", int'(dout_valid), 0);
    check("idle data", int'(dout), 0);
    repeat (N - 1) @(negedge clk);
    for (int m = 0; m < 400; m++) begin
      // present a word and raise ce for one clock out of N; the previous
      // word's last lane was checked on this same falling edge
      for (int k = 0; k < N; k++) word[k] = W'($urandom);
      v = ($urandom_range(0, 4) != 0);
      din = word; din_valid = v; ce = 1'b1;
      @(negedge clk);
      ce = 1'b0; din = '0; din_valid = 1'b0;
      // now lane 0 is on the output; check it and the next N-1 clocks
      for (int k = 0; k < N; k++) begin
        check("dout_valid", int'(dout_valid), int'(v));
        check($sformatf("word %0d lane %0d", m, k), int'(dout), v ? int'(word[k]) : 0);
        if (k < N - 1) @(negedge clk);
      end
      if (v) valid_words++; else gap_words++;
    end
    check("valid words seen", int'(valid_words > 0), 1);
    check("invalid words seen", int'(gap_words > 0), 1);
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
