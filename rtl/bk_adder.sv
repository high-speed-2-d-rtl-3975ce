// bk_adder: Brent-Kung parallel-prefix adder.
//
// Adds two W-bit operands without carry-in and returns the W-bit sum and the
// carry-out. Bit generate g = a&b and propagate p = a^b feed a Brent-Kung
// prefix tree: an up-sweep forms group carries over spans of 2, 4, 8, ...
// bits at positions 2^(l+1)-1, 3*2^(l+1)-1, ..., and a down-sweep fills the
// remaining positions, so the tree has 2*log2(W)-1 levels and about 2W prefix
// cells. The sum is s[i] = p[i] ^ carry[i-1]. With W = 4 this is the network
// of AND / XOR / OR cells drawn for the 4-bit adder (outputs S0..S4); any
// width works, which is the point of choosing Brent-Kung here. The adder is
// purely combinational. The generic loop formulation and the lack of a carry
// input are this design's choices; a subtraction is done by the caller as
// a + ~b + 1 with a second adder, as the MDA sign row does.
module bk_adder #(
  parameter int W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] s,
  output logic         cout
);

  logic [W-1:0] g, p, gg, gp;

  always_comb begin
    g  = a & b;
    p  = a ^ b;
    gg = g;
    gp = p;
    // up-sweep: combine spans of width 2^l into spans of width 2^(l+1)
    for (int l = 0; (1 << l) < W; l++) begin
      for (int i = (2 << l) - 1; i < W; i += (2 << l)) begin
        gg[i] = gg[i] | (gp[i] & gg[i - (1 << l)]);
        gp[i] = gp[i] & gp[i - (1 << l)];
      end
    end
    // down-sweep: fill positions 3*2^l-1, 5*2^l-1, ... from the span below
    for (int l = $clog2(W) - 1; l >= 0; l--) begin
      for (int i = 3 * (1 << l) - 1; i < W; i += (2 << l)) begin
        gg[i] = gg[i] | (gp[i] & gg[i - (1 << l)]);
        gp[i] = gp[i] & gp[i - (1 << l)];
      end
    end
    // gg[i] is now the carry out of bit i
    s[0] = p[0];
    for (int i = 1; i < W; i++) s[i] = p[i] ^ gg[i-1];
    cout = gg[W-1];
  end

endmodule
