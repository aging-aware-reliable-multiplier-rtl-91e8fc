// tb_razor_ff: self-checking test of razor_ff at its default width (64).
//
// Clock period 10 ns. clk rises at 0, clk_del rises at 2, clk falls at 5 and
// clk_del falls at 7, so the shadow latch keeps following d for 7 ns after
// each rising edge of clk. The testbench plays the role of a data path with
// a chosen delay:
//   * on time: d is settled before the edge; no error, q = d;
//   * late: d shows a wrong value at the edge and the right one 4 ns later,
//     then the next operation's value after the shadow latch has closed.
//     error must be 1 before the next edge, and after it q must hold the
//     right value (restored from the shadow latch, not taken from d);
//   * after a restore, and while en is low, error must stay 0 although d
//     moves on;
//   * later than the shadow window: not detectable, error stays 0;
//   * reset clears q and error.
// A random mix of on-time and late loads follows.
module tb_razor_ff;
  localparam int unsigned W = 64;
  int unsigned checks = 0, failures = 0;

  logic         clk = 1'b0, clk_del = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [W-1:0] d = '0, q;
  logic         error;

  razor_ff u_dut (.clk, .clk_del, .rst_n, .en, .d, .q, .error);

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

  initial begin
    #100us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input logic [W-1:0] got, input logic [W-1:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %h want %h at %0t", what, got, want, $time);
    end
  endtask

  function automatic logic [W-1:0] rnd();
    return {$urandom, $urandom};
  endfunction

  // Wait until 1 ns before the next rising edge of clk.
  task automatic before_edge();
    @(negedge clk);
    #4;
  endtask

  // Load `v` on time.
  task automatic load_on_time(input logic [W-1:0] v);
    before_edge();
    d = v; en = 1'b1;
    @(posedge clk);
    #1 en = 1'b0;
    before_edge();
    expect_eq("on-time error", W'(error), '0);
    expect_eq("on-time q", q, v);
  endtask

  // Load `v` late: `wrong` at the edge, `v` after `late` ns, `next` after 8 ns.
  task automatic load_late(input logic [W-1:0] wrong, input logic [W-1:0] v,
                           input logic [W-1:0] next, input int late);
    before_edge();
    d = wrong; en = 1'b1;
    @(posedge clk);
    #1 en = 1'b0;
    #(late - 1) d = v;
    #(8 - late) d = next;
    #1;
    expect_eq("late error", W'(error), W'(wrong != v));
    expect_eq("late q before restore", q, wrong);
    @(posedge clk);
    #1;
    expect_eq("late q after restore", q, v);
    #2 d = rnd();   // the next operation's data moves on
    before_edge();
    expect_eq("no error after restore", W'(error), '0);
  endtask

  logic [W-1:0] v, w, held;

  initial begin
    #12 rst_n = 1'b1;
    expect_eq("reset q", q, '0);
    expect_eq("reset error", W'(error), '0);

    load_on_time(64'h0123_4567_89ab_cdef);
    load_late(64'h1111_1111_1111_1111, 64'h0000_0000_0004_8c3a, 64'hdead_beef_0000_0001, 4);

    // Hold: en low, d changes, q and error unchanged.
    held = q;
    before_edge();
    d = rnd();
    @(posedge clk);
    #3 d = rnd();
    before_edge();
    expect_eq("hold q", q, held);
    expect_eq("hold error", W'(error), '0);

    // Later than the shadow window: the latch already closed, no error.
    before_edge();
    w = rnd(); v = ~w;
    d = w; en = 1'b1;
    @(posedge clk);
    #1 en = 1'b0;
    #7 d = v;
    #1;
    expect_eq("beyond window error", W'(error), '0);
    expect_eq("beyond window q", q, w);

    // Random mix.
    for (int i = 0; i < 300; i++) begin
      v = rnd();
      if ($urandom % 2) load_on_time(v);
      else load_late(rnd(), v, rnd(), 1 + int'($urandom % 6));
    end

    // Reset in the middle.
    rst_n = 1'b0;
    #1;
    expect_eq("reset again q", q, '0);
    expect_eq("reset again error", W'(error), '0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
