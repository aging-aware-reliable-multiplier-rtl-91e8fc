// tb_adaptive_hold_logic: self-checking test of adaptive_hold_logic.
//
// Instance: M = 8, N_SKIP = 3 (one cycle needs more than 3 zeros, or more
// than 4 once aged), aging window of 4 operations, threshold 1 error.
// The testbench acts as the input register: it changes opnd, op and error
// just after rising edges of clk. A reference model, written from the
// behaviour (two judging thresholds, aging mux, OR with !Q, D flip-flop on
// the falling edge, error counter over a window of operations) is compared
// with one_cycle, gating_n and aged just before every rising edge.
// Directed part: a two-cycle pattern makes gating_n low for exactly one
// cycle; a pattern with N_SKIP+1 zeros is one-cycle before aging and
// two-cycle after. Each of these events is counted and must occur.
module tb_adaptive_hold_logic;
  localparam int unsigned M = 8, N = 3;
  int unsigned checks = 0, failures = 0;
  int unsigned n_hold = 0, n_border_fresh = 0, n_border_aged = 0;

  logic         clk = 1'b0, rst_n = 1'b0, op = 1'b0, error = 1'b0;
  logic [M-1:0] opnd = '1;
  logic         gating_n, aged, one_cycle;

  adaptive_hold_logic #(.M(M), .N_SKIP(N), .OP_WINDOW(4), .ERR_THRESHOLD(1)) u_dut (
    .clk, .rst_n, .opnd, .op, .error, .gating_n, .aged, .one_cycle);

  always #5 clk = ~clk;

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic got, input logic want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %0b want %0b at %0t", what, got, want, $time);
    end
  endtask

  // Reference model.
  logic ref_q = 1'b1, ref_aged = 1'b0;
  int   ref_ops = 0, ref_errs = 0;

  function automatic int zeros_of(input logic [M-1:0] v);
    int z = 0;
    for (int i = 0; i < M; i++) if (!v[i]) z++;
    return z;
  endfunction

  function automatic logic ref_one_cycle();
    return ref_aged ? (zeros_of(opnd) > N + 1) : (zeros_of(opnd) > N);
  endfunction

  always @(negedge clk) begin
    if (rst_n) ref_q <= ref_one_cycle() | ~ref_q;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (op && ref_ops == 3) begin
        if (ref_errs + int'(error) > 1) ref_aged <= 1'b1;
        ref_ops  <= 0;
        ref_errs <= 0;
      end else begin
        ref_ops  <= ref_ops + int'(op);
        ref_errs <= ref_errs + int'(error);
      end
    end
  end

  // Compare just before each rising edge.
  always @(posedge clk) begin
    if (rst_n) begin
      check("one_cycle", one_cycle, ref_one_cycle());
      check("gating_n", gating_n, ref_q);
      check("aged", aged, ref_aged);
    end
  end

  // Word with exactly z zeros.
  function automatic logic [M-1:0] with_zeros(input int z);
    logic [M-1:0] v = '1;
    int k = 0;
    while (k < z) begin
      int b = int'($urandom % M);
      if (v[b]) begin v[b] = 1'b0; k++; end
    end
    return v;
  endfunction

  // Present an operand as the input register would: load it at an edge
  // where gating_n is 1, then keep it until the next such edge.
  task automatic issue(input logic [M-1:0] v, input logic err);
    int cycles = 0;
    @(posedge clk);
    while (!gating_n) @(posedge clk);
    #1 opnd = v; op = 1'b1; error = err;
    @(posedge clk);
    #1 op = 1'b0; error = 1'b0;
    cycles = 1;
    while (!gating_n) begin
      @(posedge clk);
      #1 cycles++;
    end
    if (cycles == 2) n_hold++;
    if (zeros_of(v) == N + 1) begin
      if (!ref_aged && cycles == 1) n_border_fresh++;
      if (ref_aged && cycles == 2) n_border_aged++;
    end
  endtask

  initial begin
    #12 rst_n = 1'b1;
    check("reset gating_n", gating_n, 1'b1);
    check("reset aged", aged, 1'b0);

    // Fresh: border pattern (N+1 zeros) is one cycle, few zeros is two.
    issue(with_zeros(N + 1), 1'b0);
    issue(with_zeros(N), 1'b0);
    issue(with_zeros(0), 1'b0);
    issue(with_zeros(M), 1'b0);
    // Random operands, no errors yet.
    for (int i = 0; i < 40; i++) issue(with_zeros(int'($urandom % (M + 1))), 1'b0);
    // Errors in one window: the aging indicator fires.
    while (!aged) issue(with_zeros(N + 1), 1'b1);
    // Aged: border pattern now needs two cycles.
    for (int i = 0; i < 40; i++) issue(with_zeros(int'($urandom % (M + 1))), 1'b0);
    issue(with_zeros(N + 1), 1'b0);
    issue(with_zeros(N + 2), 1'b0);

    checks++;
    if (n_hold == 0 || n_border_fresh == 0 || n_border_aged == 0) begin
      failures++;
      $display("FAIL events: holds=%0d border_fresh=%0d border_aged=%0d",
               n_hold, n_border_fresh, n_border_aged);
    end
    $display("holds=%0d border_fresh=%0d border_aged=%0d", n_hold, n_border_fresh, n_border_aged);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
