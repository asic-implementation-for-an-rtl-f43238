// mod_addsub: modular adder/subtractor, y = (a +/- b) mod m, built on the
// carry-free signed-digit adder.
//
// a - b is already a signed-digit number (plus = a, minus = b), and a + b is
// one with a zero minus vector; one rsd_adder forms s = a +/- b, a second
// forms d = s -/+ m, both without carry propagation. Only then are s and d
// converted to binary, and the sign of the one that was corrected chooses
// the result:
//   add: y = (d >= 0) ? d : s      with d = s - m
//   sub: y = (s >= 0) ? s : d      with d = s + m
// Inputs must satisfy a, b < m (add also accepts a < 2m with b = 0, which
// is how a word is reduced modulo m). m is an odd WIDTH-bit modulus.
//
// Timing: operands are taken when start is high; y is registered and done
// is high for one cycle on the next clock edge (one-cycle latency).
// The signed-digit formulation follows the source design's number system;
// the latency and handshake are this implementation's own.
module mod_addsub #(
  parameter int unsigned WIDTH = 256
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             sub,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] m,
  output logic [WIDTH-1:0] y,
  output logic             done
);

  localparam int unsigned W1 = WIDTH;      // digits of the operands
  localparam int unsigned W2 = WIDTH + 1;  // digits of s

  logic [W1:0]   sp, sn;            // s = a +/- b
  logic [W2:0]   dp, dn;            // d = s -/+ m
  logic signed [W2:0]   s_bin;
  logic signed [W2+1:0] d_bin;
  logic [WIDTH-1:0] y_next;

  rsd_adder #(.WIDTH(W1)) u_sum (
    .xp(a), .xn('0),
    .yp(sub ? '0 : b), .yn(sub ? b : '0),
    .zp(sp), .zn(sn)
  );

  rsd_adder #(.WIDTH(W2)) u_corr (
    .xp(sp), .xn(sn),
    .yp(sub ? {1'b0, m} : '0), .yn(sub ? '0 : {1'b0, m}),
    .zp(dp), .zn(dn)
  );

  rsd_to_bin #(.WIDTH(W2))     u_cvt_s (.p(sp), .n(sn), .v(s_bin));
  rsd_to_bin #(.WIDTH(W2 + 1)) u_cvt_d (.p(dp), .n(dn), .v(d_bin));

  always_comb begin
    if (sub) y_next = s_bin[W2] ? d_bin[WIDTH-1:0] : s_bin[WIDTH-1:0];
    else     y_next = d_bin[W2+1] ? s_bin[WIDTH-1:0] : d_bin[WIDTH-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y    <= '0;
      done <= 1'b0;
    end else begin
      done <= start;
      if (start) y <= y_next;
    end
  end

endmodule
