// csa_tree: multi-operand carry-save adder, sum = sum of N W-bit operands
// (modulo 2^W).
//
// The published design uses carry-save addition twice: to add the pair sums of the
// taps inside each Infomax filter, and as the two small adders that combine
// the filter outputs into u1 and u2. It notes that a carry-save adder accepts
// more than two inputs; how it is arranged is not given. Here the operands
// are folded one at a time into a redundant (sum, carry) pair by a row of
// full adders (3:2 compressors), so no carry propagates until the single
// carry-propagate addition at the end.
//
// Purely combinational. Signed callers sign-extend the operands to W bits,
// with W large enough for the result.
module csa_tree #(
  parameter int unsigned N = 3,
  parameter int unsigned W = 27
) (
  input  logic [W-1:0] op [N],
  output logic [W-1:0] sum
);

  logic [W-1:0] rs, rc;   // redundant sum and carry vectors

  always_comb begin
    rs = '0;
    rc = '0;
    for (int i = 0; i < int'(N); i++) begin
      logic [W-1:0] ns, nc;
      ns = rs ^ rc ^ op[i];
      nc = ((rs & rc) | (rs & op[i]) | (rc & op[i])) << 1;
      rs = ns;
      rc = nc;
    end
    sum = rs + rc;
  end

endmodule
