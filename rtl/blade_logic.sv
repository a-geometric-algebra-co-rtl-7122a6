// blade_logic: basis-blade index and sign of the product of two basis blades.
//
// A basis blade is a bitmap over the N basis vectors (bit i = e_(i+1)). The
// product of blades a and b is, up to sign, the blade a XOR b: shared basis
// vectors cancel, the rest remain. The sign is the parity of the number of
// transpositions needed to bring the factors into canonical order: every pair
// of a basis vector e_i in a and e_j in b with i > j costs one swap. For each
// bit j of b the circuit ANDs b[j] with the XOR-parity of the bits of a above j
// and XORs those terms together, an XOR cascade for the swaps and AND gates for
// their count. Canceled pairs e_i e_i contribute the metric: with the default
// Euclidean metric e_i e_i = +1; bits set in NEG_METRIC make e_i e_i = -1.
//
// Purely combinational; no clock. The XOR for the index and the XOR/AND network
// for the swap sign follow the architecture; the metric input is this design's
// own generalisation.
module blade_logic #(
  parameter int unsigned N          = 3,
  parameter logic [N-1:0] NEG_METRIC = '0
) (
  input  logic [N-1:0] blade_a,
  input  logic [N-1:0] blade_b,
  output logic [N-1:0] blade_r,   // resulting blade index
  output logic         neg        // 1 when the product carries a minus sign
);

  logic swap_par;

  always_comb begin
    logic above;   // parity of the bits of a above position j
    blade_r  = blade_a ^ blade_b;
    swap_par = 1'b0;
    above    = 1'b0;
    for (int j = N - 1; j >= 0; j--) begin
      swap_par = swap_par ^ (blade_b[j] & above);
      above    = above ^ blade_a[j];
    end
    neg = swap_par ^ (^(blade_a & blade_b & NEG_METRIC));
  end

endmodule
