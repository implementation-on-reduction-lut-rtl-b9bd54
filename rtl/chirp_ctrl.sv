// chirp_ctrl: timing controller of the parallel DDS chirp generator.
//
// It divides the output sample clock by N_DDS to give the lanes their clock
// enable ce (one cycle in N_DDS), so that every DDS lane and the LUTs work at
// 1/N_DDS of the output rate while the output MUX works at the full rate.
// It also forms the pulse window rect(t/T): a start request is accepted
// (accept, one clock) when no pulse is pending or running, pulse_words is
// taken at that clock, and the request is held until
// the next ce, where load is raised for that one cycle so the lanes take
// sample 0; active then stays high for pulse_words lane words (pulse_words
// *N_DDS output samples). Requests made while a pulse is pending or running
// are ignored. A pulse_words of 0 is treated as 1.
//
// The reference design names the pulse width and the lower lane clock but gives no
// controller; this is the simplest one that supplies both, and the single
// clock with an enable (instead of a separate slow lane clock) is this
// design's choice.
//
// Timing: ce and load are combinational from registers, accept from start;
// active is registered and goes high on the ce edge where load was high, i.e. together with the
// lane's first phase word.
module chirp_ctrl #(
  parameter int N_DDS = 4,
  parameter int CNT_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [CNT_W-1:0] pulse_words,
  output logic             ce,
  output logic             load,
  output logic             active,
  output logic             busy,
  output logic             accept
);

  localparam int TICK_W = (N_DDS > 1) ? $clog2(N_DDS) : 1;

  logic [TICK_W-1:0] tick;
  logic              pending;
  logic [CNT_W-1:0]  remaining;

  assign ce   = (tick == TICK_W'(N_DDS - 1));
  assign load = ce && pending;
  assign busy   = pending || active;
  assign accept = start && !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tick <= '0;
    end else begin
      tick <= ce ? '0 : tick + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending   <= 1'b0;
      active    <= 1'b0;
      remaining <= '0;
    end else begin
      if (accept) begin
        pending   <= 1'b1;
        remaining <= (pulse_words == '0) ? '0 : pulse_words - 1'b1;
      end
      if (ce) begin
        if (pending) begin
          pending   <= 1'b0;
          active    <= 1'b1;
        end else if (active) begin
          if (remaining == '0) active <= 1'b0;
          else                 remaining <= remaining - 1'b1;
        end
      end
    end
  end

endmodule
