// rsd_adder: carry-free radix-2 signed-digit (RSD) adder.
//
// Each digit z_i is in {-1,0,1} and is held as a pair of bits (plus, minus)
// with z_i = plus_i - minus_i, so a WIDTH-digit number X has the value
// XP - XN. The sum Z = X + Y is formed by two rows of full adders and has
// no carry chain: its delay does not depend on WIDTH.
//
//   row 1: FA(xp_i, yp_i, ~xn_i) gives xp_i + yp_i - xn_i = 2*c1_i - ~s1_i
//   row 2: FA(~s1_i, yn_i, ~c1_{i-1}) gives ~s1_i + yn_i - c1_{i-1}
//          = 2*c2_i - ~s2_i
// so Z = sum 2^i * ~s2_i + 2^WIDTH * c1_{WIDTH-1} - sum 2^(i+1) * c2_i.
// The result has WIDTH+1 digits and equals X + Y exactly; zn[0] is always
// 0 (no carry enters digit 0).
//
// Purely combinational. Using signed digits throughout the arithmetic is
// the source design's choice; this particular adder cell arrangement is
// this implementation's own.
module rsd_adder #(
  parameter int unsigned WIDTH = 258
) (
  input  logic [WIDTH-1:0] xp,
  input  logic [WIDTH-1:0] xn,
  input  logic [WIDTH-1:0] yp,
  input  logic [WIDTH-1:0] yn,
  output logic [WIDTH:0]   zp,
  output logic [WIDTH:0]   zn
);

  logic [WIDTH-1:0] c1, ns1, c2, ns2;
  logic [WIDTH-1:0] c1_sh;

  always_comb begin
    for (int i = 0; i < WIDTH; i++) begin
      // row 1: inputs xp, yp, ~xn
      ns1[i] = ~(xp[i] ^ yp[i] ^ ~xn[i]);
      c1[i]  = (xp[i] & yp[i]) | (xp[i] & ~xn[i]) | (yp[i] & ~xn[i]);
    end
    c1_sh = {c1[WIDTH-2:0], 1'b0};
    for (int i = 0; i < WIDTH; i++) begin
      // row 2: inputs ~s1, yn, ~c1 shifted
      ns2[i] = ~(ns1[i] ^ yn[i] ^ ~c1_sh[i]);
      c2[i]  = (ns1[i] & yn[i]) | (ns1[i] & ~c1_sh[i]) | (yn[i] & ~c1_sh[i]);
    end
    zp = {c1[WIDTH-1], ns2};
    zn = {c2, 1'b0};
  end

endmodule
