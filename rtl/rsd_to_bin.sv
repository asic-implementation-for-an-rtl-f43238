// rsd_to_bin: converts a WIDTH-digit radix-2 signed-digit number, held as
// plus and minus bit vectors, to a (WIDTH+1)-bit two's complement value
// equal to plus - minus. This is the one place where a carry has to
// propagate; it is used only where a binary result is needed (a sign test
// or a stored word). Combinational.
module rsd_to_bin #(
  parameter int unsigned WIDTH = 258
) (
  input  logic [WIDTH-1:0]      p,
  input  logic [WIDTH-1:0]      n,
  output logic signed [WIDTH:0] v
);

  always_comb v = signed'({1'b0, p}) - signed'({1'b0, n});

endmodule
