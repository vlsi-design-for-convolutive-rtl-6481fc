// cla_adder: W-bit carry-lookahead adder, s = a + b + cin (modulo 2^W).
//
// The Infomax filter adds the products of every two successive taps with a
// carry-lookahead adder before the carry-save stage; this is that adder.
// The published design names the adder type only; the organisation here is this
// design's choice: 4-bit groups whose internal carries are all computed in
// parallel from bit generate/propagate signals, and whose group carry is
// formed from group generate/propagate (G, P) so that carries pass from
// group to group in one G|P&c step each.
//
// Purely combinational. cout is the carry out of the top bit; callers that
// add signed numbers sign-extend the operands by one bit and ignore it.
module cla_adder #(
  parameter int unsigned W = 25
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  localparam int unsigned NG = (W + 3) / 4;   // number of 4-bit groups
  localparam int unsigned WP = NG * 4;        // width padded to whole groups

  logic [WP-1:0] g, p;       // bit generate / propagate
  logic [WP:0]   c;          // carry into each bit
  logic [NG-1:0] gg, gp;     // group generate / propagate

  always_comb begin
    g = WP'(a) & WP'(b);
    p = WP'(a) ^ WP'(b);
    c = '0;
    c[0] = cin;
    for (int k = 0; k < NG; k++) begin
      // group generate and propagate
      gg[k] = g[4*k+3] | (p[4*k+3] & g[4*k+2]) | (p[4*k+3] & p[4*k+2] & g[4*k+1])
            | (p[4*k+3] & p[4*k+2] & p[4*k+1] & g[4*k]);
      gp[k] = &p[4*k +: 4];
      // carries inside the group, each from the group's carry-in directly
      c[4*k+1] = g[4*k] | (p[4*k] & c[4*k]);
      c[4*k+2] = g[4*k+1] | (p[4*k+1] & g[4*k]) | (p[4*k+1] & p[4*k] & c[4*k]);
      c[4*k+3] = g[4*k+2] | (p[4*k+2] & g[4*k+1]) | (p[4*k+2] & p[4*k+1] & g[4*k])
               | (p[4*k+2] & p[4*k+1] & p[4*k] & c[4*k]);
      // carry into the next group
      c[4*k+4] = gg[k] | (gp[k] & c[4*k]);
    end
    s    = W'(p ^ c[WP-1:0]);
    cout = c[W];
  end

endmodule
