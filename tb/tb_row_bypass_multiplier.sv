// tb_row_bypass_multiplier: self-checking test of row_bypass_multiplier.
//
// Three instances are checked against the built-in * operator:
//   * M = 4, all 256 operand pairs (the size of the 4 x 4 example array);
//   * M = 8, all 65536 operand pairs;
//   * M = 32 (the default), the six operand pairs of the published 32 x 32
//     simulation waveforms, corner cases (zero, all ones, single bits) and
//     random pairs, including pairs with few or many zero bits so that
//     bypassed and active rows both occur.
// The multiplier is combinational; each check waits 1 ns after new operands.
module tb_row_bypass_multiplier;
  int unsigned checks = 0, failures = 0;

  logic [3:0]  a4, b4;   logic [7:0]  p4;
  logic [7:0]  a8, b8;   logic [15:0] p8;
  logic [31:0] a32, b32; logic [63:0] p32;

  row_bypass_multiplier #(.M(4)) u_m4  (.a(a4),  .b(b4),  .p(p4));
  row_bypass_multiplier #(.M(8)) u_m8  (.a(a8),  .b(b8),  .p(p8));
  row_bypass_multiplier          u_m32 (.a(a32), .b(b32), .p(p32));

  task automatic check32(input logic [31:0] x, input logic [31:0] y);
    logic [63:0] want;
    a32 = x; b32 = y; #1;
    want = 64'(x) * 64'(y);
    checks++;
    if (p32 !== want) begin
      failures++;
      if (failures < 10) $display("FAIL M=32 %0d * %0d = %0d, want %0d", x, y, p32, want);
    end
  endtask

  // Random word with each bit set with probability ones/32.
  function automatic logic [31:0] biased(input int unsigned ones);
    logic [31:0] v;
    for (int i = 0; i < 32; i++) v[i] = (($urandom % 32) < ones);
    return v;
  endfunction

  initial begin
    // Watchdog.
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 16; x++) begin
      for (int y = 0; y < 16; y++) begin
        a4 = 4'(x); b4 = 4'(y); #1;
        checks++;
        if (p4 !== 8'(x * y)) begin
          failures++;
          if (failures < 10) $display("FAIL M=4 %0d * %0d = %0d", x, y, p4);
        end
      end
    end
    for (int x = 0; x < 256; x++) begin
      for (int y = 0; y < 256; y++) begin
        a8 = 8'(x); b8 = 8'(y); #1;
        checks++;
        if (p8 !== 16'(x * y)) begin
          failures++;
          if (failures < 10) $display("FAIL M=8 %0d * %0d = %0d", x, y, p8);
        end
      end
    end
    // Operand pairs of the published 32 x 32 waveforms.
    check32(32'd58, 32'd122);        // 7076
    check32(32'd26, 32'd58);         // 1508
    check32(32'd33554458, 32'd570);  // 19126041060
    check32(32'd117, 32'd491);       // 57447
    check32(32'd3670133, 32'd491);   // 1802035303
    check32(32'd31, 32'd31);         // 961
    check32('0, '0);
    check32('1, '1);
    check32('1, '0);
    check32('0, '1);
    for (int i = 0; i < 32; i++) begin
      check32(32'(1) << i, '1);
      check32('1, 32'(1) << i);
      check32(~(32'(1) << i), '1);
      check32('1, ~(32'(1) << i));
    end
    for (int i = 0; i < 20000; i++) begin
      check32(biased(1 + ($urandom % 31)), biased(1 + ($urandom % 31)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
