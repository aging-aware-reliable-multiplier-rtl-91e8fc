// row_bypass_multiplier: unsigned M x M array multiplier with row bypassing.
//
// The array is a carry-save (Braun) array. Row 0 is the partial product
// a_i*b_0. Each CSA row j = 1..M-1 adds the partial products a_i*b_j to the
// sums and carries of the row above. When multiplier bit b_j is 0, the whole
// row adds nothing:
//   * isolation gates controlled by b_j switch off the inputs of every adder
//     of the row, so the row does not toggle;
//   * a sum mux per adder passes the upper sum through, and a carry mux per
//     adder passes the upper carry through, moved one position to the right
//     so that it keeps its weight. In row 1 the upper carries are all 0, so
//     a bypassed row 1 passes a_i*b_0 as its sums and 0 as its carries.
// The carry that leaves the right end of a bypassed row has no adder left
// to go into. Its weight is j, the weight of product bit P_j. The correction
// circuit adds it there: a chain of full adders along P_2..P_{M-1}, each
// adding the dropped carry of its row, gated by !b_j, to the array's output
// bit. The chain's carry enters the final ripple-carry adder, which forms
// P_M..P_{2M-1}.
//
// Bypassing rows by b_j, the sum and carry muxes and the need for a
// correction circuit follow the row bypassing scheme described for this
// design. The exact shape of the correction circuit (a ripple chain along the
// low product bits feeding the final adder's carry-in) is this design's own
// reading of that scheme. Tri-state isolation is written as AND gates.
//
// Interface: a (multiplicand md), b (multiplier mr), p = a*b. Purely
// combinational. The longest path is set by the number of ones in b.
module row_bypass_multiplier #(
  parameter int unsigned M = 32
) (
  input  logic [M-1:0]   a,
  input  logic [M-1:0]   b,
  output logic [2*M-1:0] p
);

  // s[j][i]: sum of row j at position i, weight i+j.
  // c[j][i]: carry of row j at position i, weight i+j+1.
  logic [M-1:0] s [M];
  logic [M-1:0] c [M];
  logic [M:0]   kc;        // carries of the correction chain, kc[j] has weight j
  logic [M-1:0] rc;        // ripple carries of the final adder

  assign s[0] = a & {M{b[0]}};
  assign c[0] = '0;

  for (genvar j = 1; j < M; j++) begin : g_row
    for (genvar i = 0; i < M; i++) begin : g_col
      logic pp, y_up, z_up, fa_s, fa_c, y_raw, c_pass;
      assign pp = a[i] & b[j];
      if (i < M - 1) begin : g_up
        assign y_raw  = s[j-1][i+1];
        assign c_pass = c[j-1][i+1];
      end else begin : g_up_edge
        assign y_raw  = 1'b0;
        assign c_pass = 1'b0;
      end
      // Isolation gates controlled by b_j.
      assign y_up = y_raw & b[j];
      assign z_up = c[j-1][i] & b[j];
      full_adder u_fa (.x(pp), .y(y_up), .z(z_up), .s(fa_s), .co(fa_c));
      // Sum and carry bypass muxes.
      assign s[j][i] = b[j] ? fa_s : y_raw;
      assign c[j][i] = b[j] ? fa_c : c_pass;
    end
  end

  // Correction chain along the low product bits. Row 1 never drops a carry
  // (the carries of row 0 are 0), so the chain starts at P_2.
  assign p[0]  = s[0][0];
  assign p[1]  = s[1][0];
  assign kc[0] = 1'b0;
  assign kc[1] = 1'b0;
  assign kc[2] = 1'b0;
  for (genvar j = 2; j < M; j++) begin : g_fix
    logic dropped;
    assign dropped = c[j-1][0] & ~b[j];
    full_adder u_fa (.x(s[j][0]), .y(dropped), .z(kc[j]), .s(p[j]), .co(kc[j+1]));
  end

  // Final ripple-carry adder, carry-in from the correction chain.
  assign rc[0] = kc[M];
  for (genvar k = 0; k < M; k++) begin : g_final
    logic y_s;
    if (k < M - 1) begin : g_y
      assign y_s = s[M-1][k+1];
    end else begin : g_y_edge
      assign y_s = 1'b0;
    end
    if (k < M - 1) begin : g_fa
      full_adder u_fa (.x(y_s), .y(c[M-1][k]), .z(rc[k]), .s(p[M+k]), .co(rc[k+1]));
    end else begin : g_msb
      // The product fits in 2M bits, so the top stage needs no carry out.
      assign p[M+k] = y_s ^ c[M-1][k] ^ rc[k];
    end
  end

endmodule
