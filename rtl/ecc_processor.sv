// ecc_processor: NIST P-256 elliptic curve processor core.
//
// Performs scalar multiplication Q = kP, ECDH key generation and shared-key
// computation, ECDSA signature generation and ECDSA signature verification.
// Built from one operand memory (ecc_regfile), one modular adder/subtractor
// in signed-digit arithmetic (mod_addsub), one integrated Montgomery
// multiplier / modular divider (mod_muldiv) and the micro-programmed
// control unit (ecc_control). The control unit chooses the modulus, the
// field prime p or the group order n, per micro-op.
//
// Host interface (synchronous to clk):
//   host_we/host_addr/host_wdata  write a 256-bit word; ignored while busy
//                                 and for the constant words 25..31
//   host_raddr -> host_rdata      read a word, one cycle later; the private
//                                 key word reads as zero
//   cmd/cmd_start                 start a command when not busy
//   busy, done (one-cycle pulse), err, valid (ECDSA verify result)
// Words: K=9 D=10 H=11 R=12 S=13 QX=14 QY=15 INX=16 INY=17 OX=18 OY=19
// (see ecc_pkg). Commands: 1 KEYGEN (Q = D*G), 2 ECDH (O = D*IN),
// 3 PMUL (O = K*IN), 4 SIGN ((R,S) from H, D, K), 5 VERIFY.
//
// Latency: about 4 * 10^5 to 6 * 10^5 cycles per 256-bit scalar
// multiplication, depending on the scalar.
module ecc_processor
  import ecc_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      host_we,
  input  reg_addr_t host_addr,
  input  word_t     host_wdata,
  input  reg_addr_t host_raddr,
  output word_t     host_rdata,
  input  logic      cmd_start,
  input  cmd_t      cmd,
  output logic      busy,
  output logic      done,
  output logic      err,
  output logic      valid
);

  reg_addr_t ra_addr, rb_addr, c_wa, wa;
  word_t     ra_data, rb_data, c_wd, wd;
  logic      c_we, we;
  logic      modn;
  word_t     m;
  logic      as_start, as_sub, as_done;
  word_t     as_y;
  logic      md_start, md_div, md_done, md_err, md_busy;
  word_t     md_y;

  // host writes only while idle
  always_comb begin
    if (busy) begin
      we = c_we;  wa = c_wa;  wd = c_wd;
    end else begin
      we = host_we;  wa = host_addr;  wd = host_wdata;
    end
  end

  assign m = modn ? P256_N : P256_P;

  ecc_regfile u_regs (
    .clk     (clk),
    .ra_addr (ra_addr), .ra_data (ra_data),
    .rb_addr (rb_addr), .rb_data (rb_data),
    .rh_addr (host_raddr), .rh_data (host_rdata),
    .we      (we), .wa (wa), .wd (wd)
  );

  mod_addsub #(.WIDTH(WIDTH)) u_addsub (
    .clk   (clk), .rst_n (rst_n),
    .start (as_start), .sub (as_sub),
    .a     (ra_data), .b (rb_data), .m (m),
    .y     (as_y), .done (as_done)
  );

  mod_muldiv #(.WIDTH(WIDTH)) u_muldiv (
    .clk   (clk), .rst_n (rst_n),
    .start (md_start), .div (md_div),
    .a     (ra_data), .b (rb_data), .m (m),
    .y     (md_y), .err (md_err), .busy (md_busy), .done (md_done)
  );

  ecc_control u_ctrl (
    .clk      (clk), .rst_n (rst_n),
    .cmd_start(cmd_start), .cmd (cmd),
    .busy     (busy), .done (done), .err (err), .valid (valid),
    .ra_addr  (ra_addr), .rb_addr (rb_addr),
    .ra_data  (ra_data), .rb_data (rb_data),
    .we       (c_we), .wa (c_wa), .wd (c_wd),
    .modn     (modn),
    .as_start (as_start), .as_sub (as_sub), .as_y (as_y), .as_done (as_done),
    .md_start (md_start), .md_div (md_div), .md_y (md_y), .md_err (md_err),
    .md_done  (md_done)
  );

  // the multiplier/divider is never restarted while it works
  assert property (@(posedge clk) disable iff (!rst_n) md_start |-> !md_busy)
    else $error("ecc_processor: mod_muldiv started while busy");

endmodule
