// ecc_regfile: operand memory of the ECC processor.
//
// 32 words of 256 bits. Words 0..24 are storage (an array, standing in for
// the SRAM macro of the source design); words 25..31 read the constants of
// ecc_pkg (0, 1, R^2 mod p, R^2 mod n, 3R mod p, Gx, Gy) and ignore writes.
// Two read ports (a, b) feed the arithmetic units, a third (h) serves the
// host. The private key word RA_D reads as zero on the host port, so the
// key can be loaded but never read back.
//
// Timing: reads are synchronous like an SRAM macro (data one cycle after
// the address); a write takes effect at the clock edge where we is high.
// Storage is not reset. The port count and the constant mapping are this
// implementation's choices.
module ecc_regfile
  import ecc_pkg::*;
#(
  parameter int unsigned DEPTH = 32
) (
  input  logic      clk,
  input  reg_addr_t ra_addr,
  output word_t     ra_data,
  input  reg_addr_t rb_addr,
  output word_t     rb_data,
  input  reg_addr_t rh_addr,
  output word_t     rh_data,
  input  logic      we,
  input  reg_addr_t wa,
  input  word_t     wd
);

  word_t mem [int'(RA_FIRST_CONST)];

  function automatic word_t rd(input reg_addr_t addr, input word_t stored);
    unique case (addr)
      RA_ZERO: return '0;
      RA_ONE:  return word_t'(1);
      RA_R2P:  return MONT_R2P;
      RA_R2N:  return MONT_R2N;
      RA_C3R:  return MONT_C3R;
      RA_GX:   return P256_GX;
      RA_GY:   return P256_GY;
      default: return stored;
    endcase
  endfunction

  function automatic word_t fetch(input reg_addr_t addr);
    if (addr < RA_FIRST_CONST) return mem[addr];
    return '0;
  endfunction

  always_ff @(posedge clk) begin
    if (we && wa < RA_FIRST_CONST) mem[wa] <= wd;
    ra_data <= rd(ra_addr, fetch(ra_addr));
    rb_data <= rd(rb_addr, fetch(rb_addr));
    rh_data <= (rh_addr == RA_D) ? '0 : rd(rh_addr, fetch(rh_addr));
  end

  initial begin
    assert (DEPTH == 32) else $error("ecc_regfile: address map assumes DEPTH = 32");
  end

endmodule
