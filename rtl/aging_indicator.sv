// aging_indicator: decides from the Razor error rate that the multiplier has
// aged.
//
// Two counters run side by side. One counts the operations issued, the other
// the Razor errors seen. After OP_WINDOW operations both are cleared. If the
// error count at that point exceeds ERR_THRESHOLD, the output aged is set.
// aged stays set until reset. Transistor aging does not undo itself, and
// clearing aged would let the stricter criterion it selects fall back to the
// looser one, which would bring the errors back.
//
// Counting errors over a fixed number of operations, clearing at the end of
// the window and comparing with a threshold follow the aging indicator
// described for this design. The window length, the threshold, that aged is
// sticky, and that op and error are counted on the rising clock edge are this
// design's own choices.
//
// Interface: op pulses for one cycle per issued operation, error is the
// Razor error, sampled each rising edge. aged changes one cycle after the
// operation that closes a window.
module aging_indicator #(
  parameter int unsigned OP_WINDOW     = 1024,  // operations per window
  parameter int unsigned ERR_THRESHOLD = 32     // errors per window that mean "aged"
) (
  input  logic clk,
  input  logic rst_n,
  input  logic op,       // an operation was issued this cycle
  input  logic error,    // a Razor error was seen this cycle
  output logic aged      // 1: significant aging, use the stricter criterion
);

  localparam int unsigned OW = $clog2(OP_WINDOW + 1);
  localparam int unsigned EW = $clog2(OP_WINDOW + 2);

  logic [OW-1:0] op_cnt;
  logic [EW-1:0] err_cnt;
  logic [EW-1:0] err_next;
  logic          window_end;

  assign err_next   = err_cnt + EW'(error);
  assign window_end = op && (op_cnt == OW'(OP_WINDOW - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op_cnt  <= '0;
      err_cnt <= '0;
      aged    <= 1'b0;
    end else if (window_end) begin
      if (err_next > EW'(ERR_THRESHOLD)) aged <= 1'b1;
      op_cnt  <= '0;
      err_cnt <= '0;
    end else begin
      if (op) op_cnt <= op_cnt + 1'b1;
      err_cnt <= err_next;
    end
  end

endmodule
