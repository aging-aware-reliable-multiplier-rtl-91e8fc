// razor_ff: W-bit Razor register for the multiplier product.
//
// Each bit has a main flip-flop, a shadow latch, a comparator and a restore
// mux. The main flip-flop samples d on the rising edge of clk, as an
// ordinary pipeline register does. The shadow latch is transparent while the
// delayed clock clk_del is high, so it still follows d for a while after
// the main flip-flop has sampled, and holds the value d had when clk_del
// falls. If the data path was too slow, the two differ: the main flip-flop
// caught a stale or half-settled result, and the shadow latch caught the
// settled one. The comparator (XOR per bit, ORed over the word) then raises
// error. On the next clk edge the restore mux loads the shadow value into
// the main flip-flop, so q becomes correct one cycle late, and the
// surrounding logic re-executes the following operation.
//
// The comparison only means something in the cycle after the main flip-flop
// loaded d. A flag `cap` records that, and error is masked while it is 0:
// after a hold (en low) or a restore, the shadow latch is following the next,
// unfinished operation, which must not count as an error.
//
// Timing: clk_del must rise after clk and fall before the next rising edge
// of clk, so error is stable from the fall of clk_del until the next rising
// edge of clk, where it is meant to be sampled. Every path into d must be
// longer than the time from the clk edge to the fall of clk_del (the usual
// Razor short-path rule), or the shadow latch would already see the next
// operation's result.
//
// The main flip-flop, shadow latch, comparator and mux follow the Razor
// flip-flop described for this design. The `cap` qualifier, the enable en and
// the asynchronous active-low reset are this design's own. The shadow
// element is a latch by design; the latch warning this file raises is
// expected.
module razor_ff #(
  parameter int unsigned W = 64
) (
  input  logic         clk,      // main clock
  input  logic         clk_del,  // delayed clock for the shadow latch
  input  logic         rst_n,    // asynchronous reset, active low
  input  logic         en,       // load d into the main flip-flop this edge
  input  logic [W-1:0] d,        // data from the combinational logic
  output logic [W-1:0] q,        // registered data
  output logic         error     // main flip-flop and shadow latch disagree
);

  logic [W-1:0] shadow;
  logic         cap;

  // Shadow latch, transparent while the delayed clock is high.
  always_latch begin
    if (!rst_n) begin
      shadow = '0;
    end else if (clk_del) begin
      shadow = d;
    end
  end

  // Comparator.
  assign error = cap && (q != shadow);

  // Main flip-flop with the restore mux in front of it.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q   <= '0;
      cap <= 1'b0;
    end else if (error) begin
      q   <= shadow;
      cap <= 1'b0;
    end else if (en) begin
      q   <= d;
      cap <= 1'b1;
    end else begin
      cap <= 1'b0;
    end
  end

  // A restore clears the flag, so an error never lasts two cycles.
  a_error_one_cycle: assert property (@(posedge clk) disable iff (!rst_n) error |=> !error);

endmodule
