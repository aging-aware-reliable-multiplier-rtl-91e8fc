// tb_aging_indicator: self-checking test of aging_indicator.
//
// Instance u_small (OP_WINDOW = 8, ERR_THRESHOLD = 2):
//   * a window with exactly 2 errors must leave aged at 0 (the count has to
//     exceed the threshold);
//   * errors are cleared at the end of each window, so 2 + 2 errors spread
//     over two windows must still leave aged at 0;
//   * a window with 3 errors sets aged one cycle after its last operation;
//   * aged stays set through later windows without errors;
//   * reset clears it.
// A random phase then compares aged every cycle with a reference model.
// Instance u_full (the defaults, 1024 operations, threshold 32) gets one
// window with 32 errors (aged stays 0) and one with 33 (aged becomes 1).
module tb_aging_indicator;
  int unsigned checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b0, op = 1'b0, error = 1'b0;
  logic aged_small, aged_full;

  aging_indicator #(.OP_WINDOW(8), .ERR_THRESHOLD(2)) u_small (
    .clk, .rst_n, .op, .error, .aged(aged_small));
  aging_indicator u_full (.clk, .rst_n, .op, .error, .aged(aged_full));

  always #5 clk = ~clk;

  initial begin
    #2ms;
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

  // n operations, the first `errs` of them with an error.
  task automatic ops(input int n, input int errs);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      op = 1'b1;
      error = (i < errs);
    end
    @(negedge clk);
    op = 1'b0;
    error = 1'b0;
  endtask

  task automatic do_reset();
    @(negedge clk);
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
  endtask

  // Reference model of the small instance.
  int ref_ops, ref_errs;
  logic ref_aged;

  initial begin
    do_reset();
    check("reset small", aged_small, 1'b0);
    check("reset full", aged_full, 1'b0);

    ops(8, 2);
    check("exactly threshold", aged_small, 1'b0);
    ops(4, 0); ops(4, 2); ops(2, 2); ops(6, 0);
    check("errors split over windows", aged_small, 1'b0);
    ops(8, 3);
    check("threshold exceeded", aged_small, 1'b1);
    ops(16, 0);
    check("aged is sticky", aged_small, 1'b1);
    do_reset();
    check("reset clears aged", aged_small, 1'b0);

    // Errors also count on cycles without an operation.
    ops(5, 0);
    @(negedge clk); error = 1'b1;
    @(negedge clk); error = 1'b0;
    ops(3, 2);
    check("error without op counts", aged_small, 1'b1);

    // Random phase against the reference model.
    do_reset();
    ref_ops = 0; ref_errs = 0; ref_aged = 1'b0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      check("random", aged_small, ref_aged);
      if (i % 500 == 0) begin
        rst_n = 1'b0;
        @(negedge clk);
        rst_n = 1'b1;
        ref_ops = 0; ref_errs = 0; ref_aged = 1'b0;
      end
      op = ($urandom % 4) != 0;
      error = ($urandom % 16) < (i % 7);
      @(posedge clk);
      #1;
      if (op) begin
        if (ref_ops == 7) begin
          if (ref_errs + int'(error) > 2) ref_aged = 1'b1;
          ref_ops = 0; ref_errs = 0;
        end else begin
          ref_ops++;
          ref_errs += int'(error);
        end
      end else begin
        ref_errs += int'(error);
      end
    end

    // Default instance: 1024 operations per window, threshold 32.
    do_reset();
    ops(1024, 32);
    check("default: 32 errors", aged_full, 1'b0);
    ops(1024, 33);
    check("default: 33 errors", aged_full, 1'b1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
