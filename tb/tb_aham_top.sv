// tb_aham_top: end-to-end test of aham_top with every parameter at its
// default (M = 32, N_SKIP = 16, aging window 1024 operations, more than 32
// errors per window means aged).
//
// Both units run 4000 operations each from aam_harness, with a 10 ns clock
// and clk_del = clk delayed by 2 ns. The Razor data input of each unit is
// forced to the harness's delayed copy of its multiplier output, which is
// how the path delays, and their growth with aging after operation 1500, are
// modelled. The harness checks every product, the latency of every
// operation, the hold signal, the Razor restore, and that one-cycle and
// two-cycle operations, idle cycles, Razor errors, the switch of the aging
// indicator and the stricter criterion afterwards all occur.
module tb_aham_top;
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

  aham_top dut (
    .clk, .clk_del, .rst_n,
    .col_en(c_en), .col_md(c_md), .col_mr(c_mr), .col_ready(c_ready),
    .col_product(c_prod), .col_re_execute(c_rex), .col_gating_n(c_gn), .col_aged(c_aged),
    .row_en(r_en), .row_md(r_md), .row_mr(r_mr), .row_ready(r_ready),
    .row_product(r_prod), .row_re_execute(r_rex), .row_gating_n(r_gn), .row_aged(r_aged));

  aam_harness #(.M(M), .BYPASS(aham_pkg::BYPASS_COLUMN), .NUM_OPS(4000), .AGE_AFTER(1500)) h_col (
    .clk, .rst_n, .en(c_en), .md(c_md), .mr(c_mr), .ready(c_ready), .product(c_prod),
    .re_execute(c_rex), .gating_n(c_gn), .aged(c_aged), .mult_p(dut.u_col.mult_p),
    .d_seen(c_dseen), .done(c_done), .checks(c_checks), .failures(c_fail));
  aam_harness #(.M(M), .BYPASS(aham_pkg::BYPASS_ROW), .NUM_OPS(4000), .AGE_AFTER(1500)) h_row (
    .clk, .rst_n, .en(r_en), .md(r_md), .mr(r_mr), .ready(r_ready), .product(r_prod),
    .re_execute(r_rex), .gating_n(r_gn), .aged(r_aged), .mult_p(dut.u_row.mult_p),
    .d_seen(r_dseen), .done(r_done), .checks(r_checks), .failures(r_fail));

  initial begin
    force dut.u_col.u_razor.d = c_dseen;
    force dut.u_row.u_razor.d = r_dseen;
  end

  initial begin
    #2ms;
    $display("TB_RESULT checks=%0d failures=%0d", c_checks + r_checks, c_fail + r_fail + 1);
    $finish;
  end

  initial begin
    #23 rst_n = 1'b1;
    wait (c_done && r_done);
    $display("TB_RESULT checks=%0d failures=%0d", c_checks + r_checks, c_fail + r_fail);
    $finish;
  end
endmodule
