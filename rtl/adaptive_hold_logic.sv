// adaptive_hold_logic (AHL): decides whether the operation now in the input
// registers needs one clock cycle or two, and holds the clock for one cycle
// when it needs two.
//
// A bypassing multiplier is fast when the judged operand (the multiplicand
// for column bypassing, the multiplier for row bypassing) has many zeros,
// because each zero bit switches off a column or row of adders. Two judging
// blocks count the zeros of the operand. The first outputs 1 when the count
// is greater than N_SKIP, the second when it is greater than N_SKIP+1. A mux
// chooses the first while the aging indicator reads 0 and the second, the
// stricter one, once it reads 1. A 1 from the mux means "one cycle is
// enough".
//
// The mux output is ORed with !Q and stored in a D flip-flop clocked on the
// falling edge of clk. Its Q output is gating_n, the !(gating) signal that
// enables the input registers and the Razor register.
//   * one-cycle pattern: D = 1, gating_n stays 1;
//   * two-cycle pattern: gating_n was 1 when the operand was loaded, so
//     D = 0 and gating_n falls for one cycle. In that cycle !Q = 1, so D = 1
//     again and gating_n returns to 1 one cycle later.
// Because the flip-flop changes on the falling edge, gating_n is stable
// whenever clk is high, and ANDing it with clk yields a clean gated clock.
//
// The judging blocks, the mux, the OR gate, the falling-edge D flip-flop and
// the aging indicator follow the AHL described for this design. The value of
// N_SKIP and the reset value of the flip-flop (set, so the first operation is
// not held) are this design's own choices.
//
// Interface: opnd is the judged operand, taken from the input register. op
// and error go to the aging indicator (see aging_indicator). gating_n changes
// only on falling edges of clk.
module adaptive_hold_logic #(
  parameter int unsigned M             = 32,
  parameter int unsigned N_SKIP        = M / 2,  // zeros needed for one cycle: > N_SKIP
  parameter int unsigned OP_WINDOW     = 1024,
  parameter int unsigned ERR_THRESHOLD = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [M-1:0] opnd,      // judged operand (md or mr)
  input  logic         op,        // an operation was issued this cycle
  input  logic         error,     // Razor error
  output logic         gating_n,  // !(gating): 0 holds the clock for a cycle
  output logic         aged,      // aging indicator output
  output logic         one_cycle  // judging result for the current operand
);

  localparam int unsigned ZW = $clog2(M + 1);

  logic [ZW-1:0] zeros;
  logic          judge_n, judge_n1, d;

  // Zero counter shared by the two judging blocks.
  always_comb begin
    zeros = '0;
    for (int unsigned i = 0; i < M; i++) begin
      zeros = zeros + ZW'(!opnd[i]);
    end
  end

  // Judging blocks: #0s > n and #0s > n+1.
  assign judge_n  = (32'(zeros) > N_SKIP);
  assign judge_n1 = (32'(zeros) > N_SKIP + 1);

  aging_indicator #(
    .OP_WINDOW    (OP_WINDOW),
    .ERR_THRESHOLD(ERR_THRESHOLD)
  ) u_aging_indicator (
    .clk  (clk),
    .rst_n(rst_n),
    .op   (op),
    .error(error),
    .aged (aged)
  );

  // Mux selected by the aging indicator, then the OR with !Q.
  assign one_cycle = aged ? judge_n1 : judge_n;
  assign d         = one_cycle | ~gating_n;

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) gating_n <= 1'b1;
    else        gating_n <= d;
  end

  // The hold never lasts more than one cycle.
  a_hold_one_cycle: assert property (@(negedge clk) disable iff (!rst_n) !gating_n |=> gating_n);

endmodule
