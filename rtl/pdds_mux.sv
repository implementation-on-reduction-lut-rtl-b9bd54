// pdds_mux: the output multiplexer of the parallel DDS generator. On each
// lane clock enable (ce) it captures the N_DDS lane samples, taken at the same
// lane tick, into a holding register; during the following N_DDS output
// clocks it selects lane 0, 1, ..., N_DDS-1 in turn, which puts the samples
// back in time order at the full output rate.
//
// rect(t/T) window: while the captured word is not valid the output is forced
// to zero, so nothing leaves the generator outside the pulse.
//
// Timing: ce must come exactly every N_DDS clocks (asserted). A word present
// at the inputs on a ce cycle appears at dout, lane k in the k-th clock
// after that ce edge (k = 0 .. N_DDS-1), with dout_valid high.
module pdds_mux #(
  parameter int N_DDS = 4,
  parameter int W     = 20   // bits per lane sample (I and Q)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       ce,
  input  logic                       din_valid,
  input  logic [N_DDS-1:0][W-1:0]    din,
  output logic                       dout_valid,
  output logic [W-1:0]               dout
);

  localparam int SEL_W = (N_DDS > 1) ? $clog2(N_DDS) : 1;

  logic [N_DDS-1:0][W-1:0] hold;
  logic [SEL_W-1:0]        sel;

  always_ff @(posedge clk) begin
    if (ce) hold <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel        <= '0;
      dout_valid <= 1'b0;
    end else if (ce) begin
      sel        <= '0;
      dout_valid <= din_valid;
    end else begin
      sel        <= sel + 1'b1;
    end
  end

  assign dout = dout_valid ? hold[sel] : '0;

  // ce is the lane clock: it must come exactly once per N_DDS clocks.
  logic ce_seen;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ce_seen <= 1'b0;
    else if (ce) ce_seen <= 1'b1;
  end

  a_ce_period: assert property (@(posedge clk) disable iff (!rst_n)
                                ce && ce_seen |-> sel == SEL_W'(N_DDS - 1))
    else $error("pdds_mux: ce not %0d clocks after the previous one", N_DDS);

endmodule
