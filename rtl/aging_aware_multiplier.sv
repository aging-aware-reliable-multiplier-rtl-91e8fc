// aging_aware_multiplier: variable-latency M x M unsigned multiplier that
// adapts to transistor aging.
//
// Most operand patterns switch off enough of a bypassing array multiplier to
// finish well inside a short clock period; only few patterns exercise the
// long paths. This unit therefore runs at a clock period shorter than the
// worst-case path and gives an operation two cycles only when its judged
// operand has few zeros. Aging makes the paths slower over time. A Razor
// register catches the one-cycle operations that no longer make it, and when
// that happens often enough the AHL moves to a stricter criterion, so that
// more patterns get two cycles.
//
// Datapath, as in the block diagram of the design:
//   md, mr -> input registers -> bypassing multiplier -> Razor register -> product
// The adaptive hold logic (AHL) watches the first input register: the
// multiplicand for BYPASS = BYPASS_COLUMN, the multiplier for BYPASS_ROW.
// Its !(gating) output holds the input registers and the Razor register
// for one cycle after a two-cycle pattern has been loaded. The Razor error
// is the re-execute signal and also feeds the AHL's aging indicator.
//
// Timing, with T the clock period:
//   * one-cycle operation: loaded at edge k, product in q after edge k+1;
//   * two-cycle operation: loaded at edge k, edge k+1 is held, product in q
//     after edge k+2;
//   * a one-cycle operation that was too slow: the wrong value is in q after
//     edge k+1 and error (re_execute) is high in the cycle that follows. At
//     edge k+2 the Razor register restores the correct value from its shadow
//     latch and the input registers hold, so the next operation, loaded at
//     edge k+1, gets two cycles.
// Every rising edge of clk at which the AHL does not hold and no Razor
// restore takes place is a step: the Razor register samples the multiplier
// output, and the input registers take md/mr if en is high (otherwise they
// keep the last operands, whose product is simply sampled again). ready
// shows that the coming edge is a step, so an operand pair on md/mr is taken
// when en and ready are both high.
//
// The block structure, the AHL input choice per multiplier type and the use
// of the Razor error follow the design. This design's own choices: the AND
// of clk with !(gating) is realised as a clock enable on clk (the same
// registers load on the same edges, and the Razor restore keeps working on
// held cycles); en qualifies new operands; ready tells the source when its
// operands are taken; a restore holds the input registers for one cycle.
module aging_aware_multiplier
  import aham_pkg::*;
#(
  parameter int unsigned M             = 32,
  parameter bypass_e     BYPASS        = BYPASS_COLUMN,
  parameter int unsigned N_SKIP        = M / 2,
  parameter int unsigned OP_WINDOW     = 1024,
  parameter int unsigned ERR_THRESHOLD = 32
) (
  input  logic           clk,
  input  logic           clk_del,     // delayed clock for the Razor shadow latches
  input  logic           rst_n,
  input  logic           en,          // md/mr hold a new operand pair
  input  logic [M-1:0]   md,          // multiplicand
  input  logic [M-1:0]   mr,          // multiplier
  output logic           ready,       // operands are taken at the next edge if en
  output logic [2*M-1:0] product,
  output logic           re_execute,  // Razor error: product is restored next edge
  output logic           gating_n,    // AHL !(gating)
  output logic           aged         // aging indicator output
);

  logic [M-1:0]   md_q, mr_q;
  logic [2*M-1:0] mult_p;
  logic           error, step, load;

  assign step       = gating_n & ~error;
  assign ready      = step;
  assign load       = en & step;
  assign re_execute = error;

  // Input registers, clocked through the AHL hold.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      md_q <= '0;
      mr_q <= '0;
    end else if (load) begin
      md_q <= md;
      mr_q <= mr;
    end
  end

  if (BYPASS == BYPASS_COLUMN) begin : g_column
    column_bypass_multiplier #(.M(M)) u_mult (.a(md_q), .b(mr_q), .p(mult_p));
  end else begin : g_row
    row_bypass_multiplier #(.M(M)) u_mult (.a(md_q), .b(mr_q), .p(mult_p));
  end

  razor_ff #(.W(2 * M)) u_razor (
    .clk    (clk),
    .clk_del(clk_del),
    .rst_n  (rst_n),
    .en     (step),
    .d      (mult_p),
    .q      (product),
    .error  (error)
  );

  adaptive_hold_logic #(
    .M            (M),
    .N_SKIP       (N_SKIP),
    .OP_WINDOW    (OP_WINDOW),
    .ERR_THRESHOLD(ERR_THRESHOLD)
  ) u_ahl (
    .clk      (clk),
    .rst_n    (rst_n),
    .opnd     ((BYPASS == BYPASS_COLUMN) ? md_q : mr_q),
    .op       (load),
    .error    (error),
    .gating_n (gating_n),
    .aged     (aged),
    .one_cycle()
  );

endmodule
