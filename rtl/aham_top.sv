// aham_top: the two aging-aware variable-latency multipliers side by side.
//
// One unit uses the column-bypassing array and judges the multiplicand; the
// other uses the row-bypassing array and judges the multiplier. They share
// clk, the delayed Razor clock clk_del and the reset, and have their own
// operand, handshake and status ports (prefix col_ and row_). See
// aging_aware_multiplier for the operation and its timing.
//
// Both units are the design's two proposed variants. Putting them in one top
// with shared clocks is this design's own arrangement.
module aham_top
  import aham_pkg::*;
#(
  parameter int unsigned M             = 32,
  parameter int unsigned N_SKIP        = M / 2,
  parameter int unsigned OP_WINDOW     = 1024,
  parameter int unsigned ERR_THRESHOLD = 32
) (
  input  logic           clk,
  input  logic           clk_del,
  input  logic           rst_n,
  // column-bypassing unit
  input  logic           col_en,
  input  logic [M-1:0]   col_md,
  input  logic [M-1:0]   col_mr,
  output logic           col_ready,
  output logic [2*M-1:0] col_product,
  output logic           col_re_execute,
  output logic           col_gating_n,
  output logic           col_aged,
  // row-bypassing unit
  input  logic           row_en,
  input  logic [M-1:0]   row_md,
  input  logic [M-1:0]   row_mr,
  output logic           row_ready,
  output logic [2*M-1:0] row_product,
  output logic           row_re_execute,
  output logic           row_gating_n,
  output logic           row_aged
);

  aging_aware_multiplier #(
    .M(M), .BYPASS(BYPASS_COLUMN), .N_SKIP(N_SKIP),
    .OP_WINDOW(OP_WINDOW), .ERR_THRESHOLD(ERR_THRESHOLD)
  ) u_col (
    .clk(clk), .clk_del(clk_del), .rst_n(rst_n),
    .en(col_en), .md(col_md), .mr(col_mr), .ready(col_ready),
    .product(col_product), .re_execute(col_re_execute),
    .gating_n(col_gating_n), .aged(col_aged)
  );

  aging_aware_multiplier #(
    .M(M), .BYPASS(BYPASS_ROW), .N_SKIP(N_SKIP),
    .OP_WINDOW(OP_WINDOW), .ERR_THRESHOLD(ERR_THRESHOLD)
  ) u_row (
    .clk(clk), .clk_del(clk_del), .rst_n(rst_n),
    .en(row_en), .md(row_md), .mr(row_mr), .ready(row_ready),
    .product(row_product), .re_execute(row_re_execute),
    .gating_n(row_gating_n), .aged(row_aged)
  );

endmodule
