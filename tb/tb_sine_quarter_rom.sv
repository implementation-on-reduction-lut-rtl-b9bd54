// tb_sine_quarter_rom: reads every entry of the quarter-wave table through
// both ports (port B in reverse order) and compares it with the rounded ideal
// sine magnitude. Also checks the one-clock read latency and that the data
// holds while en is low.
module tb_sine_quarter_rom;
  import pdds_tb_pkg::*;

  localparam int ADDR_W = 8;
  localparam int DATA_W = 9;
  localparam int DEPTH  = 2 ** ADDR_W;

  logic              clk = 1'b0;
  logic              en;
  logic [ADDR_W-1:0] addr_a, addr_b;
  logic [DATA_W-1:0] data_a, data_b;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sine_quarter_rom #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) dut (.*);

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    en = 1'b0; addr_a = '0; addr_b = '0;
    @(negedge clk);
    for (int i = 0; i < DEPTH; i++) begin
      en     = 1'b1;
      addr_a = ADDR_W'(i);
      addr_b = ADDR_W'(DEPTH - 1 - i);
      @(posedge clk); #1;
      check($sformatf("A[%0d]", i), int'(data_a), ref_amp(i, 1'b0));
      check($sformatf("B[%0d]", DEPTH - 1 - i), int'(data_b), ref_amp(DEPTH - 1 - i, 1'b0));
      @(negedge clk);
    end
    // peak and smallest entries
    check("first entry", int'(data_b), 2);   // 511*sin(pi/1024) = 1.57
    // hold while disabled
    en = 1'b0; addr_a = '0; addr_b = '0;
    @(posedge clk); #1;
    check("hold A", int'(data_a), ref_amp(DEPTH - 1, 1'b0));
    check("hold B", int'(data_b), ref_amp(0, 1'b0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
