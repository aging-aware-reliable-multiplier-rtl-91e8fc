// column_bypass_multiplier: unsigned M x M array multiplier with column
// bypassing.
//
// The array is a carry-save (Braun) array. Row 0 is the partial product
// a_i*b_0. Each CSA row j = 1..M-1 has M full adders. The adder at position
// i of row j adds the partial product a_i*b_j, the sum of its upper-right
// neighbour (weight i+j) and the carry of the adder above it in row j-1.
// Every adder at position i lies on the diagonal of multiplicand bit a_i.
// When a_i is 0, its partial products are all 0, and so are the carries of
// that diagonal. The adder then has nothing to add:
//   * two isolation gates, controlled by a_i, switch off the sum and carry
//     inputs of the adder, so it does not toggle;
//   * a 2:1 mux, also controlled by a_i, passes the sum of the upper adder
//     straight through as this adder's sum.
// The carry of an isolated adder is 0, which is also its correct value.
// Product bits P_0..P_{M-1} leave the array at the right edge. A final
// ripple-carry row of M full adders forms P_M..P_{2M-1} from the last CSA
// row's sums and carries.
//
// The bypass scheme, the isolated inputs and the sum mux follow the column
// bypassing scheme described for this design. Two choices are this design's
// own. The tri-state isolation gates are written as AND gates, so the netlist
// has no high-impedance nodes. The final adder is a plain ripple-carry row.
//
// Interface: a (multiplicand md), b (multiplier mr), p = a*b. Purely
// combinational. The longest path is set by the number of ones in a.
module column_bypass_multiplier #(
  parameter int unsigned M = 32
) (
  input  logic [M-1:0]   a,
  input  logic [M-1:0]   b,
  output logic [2*M-1:0] p
);

  // s[j][i]: sum out of row j at position i, weight i+j.
  // c[j][i]: carry out of row j at position i, weight i+j+1.
  logic [M-1:0] s [M];
  logic [M-1:0] c [M];
  logic [M-1:0] rc;        // ripple carries of the final adder

  // Row 0: first partial product row, no adders.
  assign s[0] = a & {M{b[0]}};
  assign c[0] = '0;

  for (genvar j = 1; j < M; j++) begin : g_row
    for (genvar i = 0; i < M; i++) begin : g_col
      logic pp, y_up, z_up, fa_s, fa_c;
      assign pp   = a[i] & b[j];
      // Isolation gates: the adder inputs are cut off when a_i is 0.
      if (i < M - 1) begin : g_in
        assign y_up = s[j-1][i+1] & a[i];
      end else begin : g_in_edge
        assign y_up = 1'b0;
      end
      assign z_up = c[j-1][i] & a[i];
      full_adder u_fa (.x(pp), .y(y_up), .z(z_up), .s(fa_s), .co(fa_c));
      // Bypass mux: with a_i = 0 the sum from the upper adder passes through.
      if (i < M - 1) begin : g_mux
        assign s[j][i] = a[i] ? fa_s : s[j-1][i+1];
      end else begin : g_mux_edge
        assign s[j][i] = a[i] ? fa_s : 1'b0;
      end
      assign c[j][i] = fa_c;
    end
  end

  // Low half of the product leaves the array at the right edge.
  for (genvar j = 0; j < M; j++) begin : g_low
    assign p[j] = s[j][0];
  end

  // Final ripple-carry adder: sums s[M-1][k+1] and carries c[M-1][k],
  // both of weight M+k.
  assign rc[0] = 1'b0;
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
