// tb_aging_aware_multiplier: end-to-end test of aging_aware_multiplier in
// both variants (column bypassing, row bypassing), at the two evaluated
// sizes M = 32 and M = 16, with a short aging window (64 operations, more
// than 4 errors means aged) so that the aging indicator switches within
// 1000 operations.
//
// The clock period is 10 ns; clk_del is clk delayed by 2 ns. The Razor data
// input of each unit is forced to the delayed multiplier output produced by
// aam_harness (see there for the delay model and the checks). After 300
// operations the harness slows the paths of patterns with N_SKIP+1 zeros
// so that they miss one cycle; the Razor errors that follow must switch the
// aging indicator, after which those patterns get two cycles.
module tb_aging_aware_multiplier;
  import aham_pkg::*;
  localparam int unsigned M = 32;

  logic clk = 1'b0, clk_del = 1'b0, rst_n = 1'b0;

  initial begin
    #5;
    forever begin
      clk = 1'b1;
      #2 clk_del = 1'b1;
      #3 clk = 1'b0;
      #2 clk_del = 1'b0;
      #3;
    end
  end

  logic           c_en, c_ready, c_rex, c_gn, c_aged, c_done;
  logic [M-1:0]   c_md, c_mr;
  logic [2*M-1:0] c_prod, c_dseen;
  int unsigned    c_checks, c_fail;
  logic           r_en, r_ready, r_rex, r_gn, r_aged, r_done;
  logic [M-1:0]   r_md, r_mr;
  logic [2*M-1:0] r_prod, r_dseen;
  int unsigned    r_checks, r_fail;

  aging_aware_multiplier #(.M(M), .BYPASS(BYPASS_COLUMN), .OP_WINDOW(64), .ERR_THRESHOLD(4)) u_col (
    .clk, .clk_del, .rst_n, .en(c_en), .md(c_md), .mr(c_mr), .ready(c_ready),
    .product(c_prod), .re_execute(c_rex), .gating_n(c_gn), .aged(c_aged));
  aging_aware_multiplier #(.M(M), .BYPASS(BYPASS_ROW), .OP_WINDOW(64), .ERR_THRESHOLD(4)) u_row (
    .clk, .clk_del, .rst_n, .en(r_en), .md(r_md), .mr(r_mr), .ready(r_ready),
    .product(r_prod), .re_execute(r_rex), .gating_n(r_gn), .aged(r_aged));

  aam_harness #(.M(M), .BYPASS(BYPASS_COLUMN), .NUM_OPS(1000), .AGE_AFTER(300)) h_col (
    .clk, .rst_n, .en(c_en), .md(c_md), .mr(c_mr), .ready(c_ready), .product(c_prod),
    .re_execute(c_rex), .gating_n(c_gn), .aged(c_aged), .mult_p(u_col.mult_p),
    .d_seen(c_dseen), .done(c_done), .checks(c_checks), .failures(c_fail));
  aam_harness #(.M(M), .BYPASS(BYPASS_ROW), .NUM_OPS(1000), .AGE_AFTER(300)) h_row (
    .clk, .rst_n, .en(r_en), .md(r_md), .mr(r_mr), .ready(r_ready), .product(r_prod),
    .re_execute(r_rex), .gating_n(r_gn), .aged(r_aged), .mult_p(u_row.mult_p),
    .d_seen(r_dseen), .done(r_done), .checks(r_checks), .failures(r_fail));

  // The same pair at M = 16 (N_SKIP = 8).
  logic           c16_en, c16_ready, c16_rex, c16_gn, c16_aged, c16_done;
  logic [15:0]    c16_md, c16_mr;
  logic [31:0]    c16_prod, c16_dseen;
  int unsigned    c16_checks, c16_fail;
  logic           r16_en, r16_ready, r16_rex, r16_gn, r16_aged, r16_done;
  logic [15:0]    r16_md, r16_mr;
  logic [31:0]    r16_prod, r16_dseen;
  int unsigned    r16_checks, r16_fail;

  aging_aware_multiplier #(.M(16), .BYPASS(BYPASS_COLUMN), .OP_WINDOW(64), .ERR_THRESHOLD(4)) u_col16 (
    .clk, .clk_del, .rst_n, .en(c16_en), .md(c16_md), .mr(c16_mr), .ready(c16_ready),
    .product(c16_prod), .re_execute(c16_rex), .gating_n(c16_gn), .aged(c16_aged));
  aging_aware_multiplier #(.M(16), .BYPASS(BYPASS_ROW), .OP_WINDOW(64), .ERR_THRESHOLD(4)) u_row16 (
    .clk, .clk_del, .rst_n, .en(r16_en), .md(r16_md), .mr(r16_mr), .ready(r16_ready),
    .product(r16_prod), .re_execute(r16_rex), .gating_n(r16_gn), .aged(r16_aged));

  aam_harness #(.M(16), .BYPASS(BYPASS_COLUMN), .NUM_OPS(1000), .AGE_AFTER(300)) h_col16 (
    .clk, .rst_n, .en(c16_en), .md(c16_md), .mr(c16_mr), .ready(c16_ready), .product(c16_prod),
    .re_execute(c16_rex), .gating_n(c16_gn), .aged(c16_aged), .mult_p(u_col16.mult_p),
    .d_seen(c16_dseen), .done(c16_done), .checks(c16_checks), .failures(c16_fail));
  aam_harness #(.M(16), .BYPASS(BYPASS_ROW), .NUM_OPS(1000), .AGE_AFTER(300)) h_row16 (
    .clk, .rst_n, .en(r16_en), .md(r16_md), .mr(r16_mr), .ready(r16_ready), .product(r16_prod),
    .re_execute(r16_rex), .gating_n(r16_gn), .aged(r16_aged), .mult_p(u_row16.mult_p),
    .d_seen(r16_dseen), .done(r16_done), .checks(r16_checks), .failures(r16_fail));

  initial begin
    force u_col.u_razor.d   = c_dseen;
    force u_row.u_razor.d   = r_dseen;
    force u_col16.u_razor.d = c16_dseen;
    force u_row16.u_razor.d = r16_dseen;
  end

  initial begin
    #500us;
    $display("TB_RESULT checks=%0d failures=%0d", c_checks + r_checks + c16_checks + r16_checks,
             c_fail + r_fail + c16_fail + r16_fail + 1);
    $finish;
  end

  initial begin
    #23 rst_n = 1'b1;
    wait (c_done && r_done && c16_done && r16_done);
    $display("TB_RESULT checks=%0d failures=%0d", c_checks + r_checks + c16_checks + r16_checks,
             c_fail + r_fail + c16_fail + r16_fail);
    $finish;
  end
endmodule
