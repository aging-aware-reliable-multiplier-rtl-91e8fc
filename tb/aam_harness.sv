// aam_harness: stimulus, path-delay model and scoreboard for one
// aging-aware multiplier unit. Used by tb_aging_aware_multiplier and
// tb_aham_top.
//
// Path-delay model. RTL has no delays, so on its own the Razor register
// would never see a late result. The harness produces d_seen, which the
// testbench forces onto the Razor register's data input in place of the
// multiplier output: d_seen keeps the previous result after each load edge
// and takes the multiplier's new output D ns later. With a 10 ns clock
// whose delayed copy for the shadow latches is high from 2 to 7 ns after
// each rising edge:
//   * more than N_SKIP+1 zeros in the judged operand: D = 8 ns (fits a cycle);
//   * exactly N_SKIP+1 zeros: D = 8 ns while fresh, 12 ns once the harness's
//     `aging_phys` input is high (a slowed path: late but still inside the
//     shadow window, so the Razor register catches it);
//   * N_SKIP zeros or fewer: D = 15 ns (needs the two cycles it gets).
// Every D exceeds 7 ns, the Razor short-path rule.
//
// Operands: the judged operand (md for the column unit, mr for the row
// unit) gets a number of zeros drawn from N_SKIP-3 .. N_SKIP+4, the other
// one is random; a few idle cycles are mixed in. The first three operand
// pairs are the ones of the published simulation waveforms.
//
// Checks: every product against md*mr computed here; gating_n against a
// model of the hold flip-flop; the number of cycles from load to capture
// (1 for one-cycle patterns, 2 for two-cycle ones, never more than 2);
// after a Razor error, the restored product. Events counted and required:
// one-cycle and two-cycle operations, idle cycles, Razor errors, the aging
// indicator switching, a N_SKIP+1-zero pattern held for two cycles after the
// switch, and no Razor error from operations issued after the switch.
module aam_harness
  import aham_pkg::*;
#(
  parameter int unsigned M         = 32,
  parameter bypass_e     BYPASS    = BYPASS_COLUMN,
  parameter int unsigned N_SKIP    = M / 2,
  parameter int unsigned NUM_OPS   = 1000,
  parameter int unsigned AGE_AFTER = 300
) (
  input  logic           clk,
  input  logic           rst_n,
  output logic           en,
  output logic [M-1:0]   md,
  output logic [M-1:0]   mr,
  input  logic           ready,
  input  logic [2*M-1:0] product,
  input  logic           re_execute,
  input  logic           gating_n,
  input  logic           aged,
  input  logic [2*M-1:0] mult_p,      // the multiplier's zero-delay output
  output logic [2*M-1:0] d_seen,      // the same, after the modelled path delay
  output logic           done,
  output int unsigned    checks,
  output int unsigned    failures
);

  typedef struct {
    logic [2*M-1:0] prod;
    int unsigned    load_cyc;
    logic           two;
  } op_t;

  int unsigned cyc = 0, issued = 0;
  logic        aging_phys = 1'b0, cap_m = 1'b0, ref_q = 1'b1;
  logic [M-1:0] jreg = '0;
  int unsigned aged_cyc = 0;
  int unsigned n_one = 0, n_two = 0, n_idle = 0, n_err = 0, n_err_late = 0,
               n_border_hold = 0, n_aged = 0;

  initial begin
    en = 1'b0; md = '0; mr = '0; d_seen = '0; done = 1'b0;
    checks = 0; failures = 0;
  end

  function automatic int unsigned zeros_of(input logic [M-1:0] v);
    int unsigned z = 0;
    for (int i = 0; i < int'(M); i++) if (!v[i]) z++;
    return z;
  endfunction

  function automatic logic one_cycle_ref(input logic [M-1:0] v, input logic a);
    return a ? (zeros_of(v) > N_SKIP + 1) : (zeros_of(v) > N_SKIP);
  endfunction

  function automatic logic [M-1:0] rnd();
    logic [M-1:0] v;
    for (int i = 0; i < int'(M); i++) v[i] = $urandom % 2;
    return v;
  endfunction

  function automatic logic [M-1:0] with_zeros(input int unsigned z);
    logic [M-1:0] v = '1;
    int unsigned k = 0;
    if (z > M) z = M;
    while (k < z) begin
      int unsigned b = $urandom % M;
      if (v[b]) begin v[b] = 1'b0; k++; end
    end
    return v;
  endfunction

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL [%s M=%0d] %s at %0t", BYPASS.name(), M, msg, $time);
  endtask

  // Hold flip-flop model (falling edge).
  always @(negedge clk) begin
    if (!rst_n) ref_q <= 1'b1;
    else        ref_q <= one_cycle_ref(jreg, aged) | ~ref_q;
  end

  // Scoreboard and path-delay model (rising edge). cur is the operation in
  // the input registers, cap_op the one the Razor register sampled last.
  op_t  cur, cap_op;
  logic cur_valid = 1'b0, cur_captured = 1'b0, cur_stalled = 1'b0;

  always @(posedge clk) begin
    if (rst_n) begin
      automatic logic           er   = re_execute;
      automatic logic           step = gating_n && !er;
      automatic logic           ld   = en && ready;
      automatic logic [2*M-1:0] pq   = product;
      cyc++;
      checks++;
      if (gating_n !== ref_q) fail($sformatf("gating_n %0b, model %0b", gating_n, ref_q));
      checks++;
      if (ready !== step) fail("ready differs from gating_n & !re_execute");
      if (!gating_n) begin
        n_two++;
        if (aged && zeros_of(jreg) == N_SKIP + 1 && cur_valid && !cur_captured) n_border_hold++;
      end
      // What the Razor register sampled at the previous edge.
      if (er) begin
        n_err++;
        if (aged_cyc != 0 && cap_op.load_cyc > aged_cyc + 1) n_err_late++;
        if (cur_valid && !cur_captured) cur_stalled = 1'b1;
      end else if (cap_m) begin
        checks++;
        if (pq !== cap_op.prod) fail($sformatf("product %h, want %h", pq, cap_op.prod));
      end
      // What it samples at this edge.
      cap_m = step && cur_valid;
      if (cap_m) begin
        cap_op = cur;
        if (!cur_captured) begin
          automatic int unsigned want = (cur.two || cur_stalled) ? 2 : 1;
          checks++;
          if (cyc - cur.load_cyc != want)
            fail($sformatf("latency %0d, want %0d", cyc - cur.load_cyc, want));
          cur_captured = 1'b1;
        end
      end
      // New operands.
      if (ld) begin
        automatic logic [M-1:0] j = (BYPASS == BYPASS_COLUMN) ? md : mr;
        automatic int unsigned  z = zeros_of(j);
        automatic int           dly;
        cur.prod     = (2*M)'(md) * (2*M)'(mr);
        cur.load_cyc = cyc;
        cur.two      = !one_cycle_ref(j, aged);
        cur_valid    = 1'b1;
        cur_captured = 1'b0;
        cur_stalled  = 1'b0;
        if (!cur.two) n_one++;
        jreg = j;
        if (z <= N_SKIP)          dly = 15;
        else if (z == N_SKIP + 1) dly = aging_phys ? 12 : 8;
        else                      dly = 8;
        fork
          begin
            automatic logic [2*M-1:0] v;
            #1 v = mult_p;
            #(dly - 1) d_seen = v;
          end
        join_none
      end
      if (aged && aged_cyc == 0) begin
        aged_cyc = cyc;
        n_aged++;
      end
      if (er) begin
        #1;
        checks++;
        if (product !== cap_op.prod) fail($sformatf("restored product %h, want %h", product, cap_op.prod));
      end
    end
  end

  // Driver.
  initial begin
    logic [M-1:0] a, b;
    logic         took;
    wait (rst_n);
    @(posedge clk);
    #1;
    while (issued < NUM_OPS) begin
      if (issued >= 3 && $urandom % 10 == 0) begin
        en = 1'b0;
        n_idle++;
        @(posedge clk);
        #1;
        continue;
      end
      if (issued < 3) begin
        // Operand pairs of the published waveforms.
        if (BYPASS == BYPASS_COLUMN) begin
          a = (issued == 0) ? M'(58) : (issued == 1) ? M'(26) : M'(33554458);
          b = (issued == 0) ? M'(122) : (issued == 1) ? M'(58) : M'(570);
        end else begin
          a = (issued == 0) ? M'(117) : (issued == 1) ? M'(3670133) : M'(31);
          b = (issued == 0) ? M'(491) : (issued == 1) ? M'(491) : M'(31);
        end
      end else begin
        automatic int lo = int'(N_SKIP) - 3;
        automatic int unsigned z = (lo < 0 ? 0 : lo) + $urandom % 8;
        if (BYPASS == BYPASS_COLUMN) begin a = with_zeros(z); b = rnd(); end
        else                         begin a = rnd(); b = with_zeros(z); end
      end
      md = a; mr = b; en = 1'b1;
      do begin
        @(posedge clk);
        took = ready;
        #1;
      end while (!took);
      en = 1'b0;
      issued++;
      if (issued == AGE_AFTER) aging_phys = 1'b1;
    end
    repeat (4) @(posedge clk);
    #1;
    checks++;
    if (!cur_captured) fail("last operation never completed");
    checks++;
    if (n_one == 0 || n_two == 0 || n_idle == 0 || n_err == 0 || n_aged == 0 ||
        n_border_hold == 0 || n_err_late != 0)
      fail("a mechanism did not occur as expected");
    $display("[%s M=%0d] ops=%0d one-cycle=%0d hold-edges=%0d idle=%0d razor-errors=%0d aged-at-cycle=%0d border-held-after-aging=%0d errors-after-aging=%0d",
             BYPASS.name(), M, issued, n_one, n_two, n_idle, n_err, aged_cyc, n_border_hold, n_err_late);
    done = 1'b1;
  end

endmodule
