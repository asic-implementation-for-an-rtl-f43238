// tb_ecdh_exchange: the ECDH key exchange workload on the processor core.
//
// Two parties with random private keys each generate a public key
// (KEYGEN) and then the shared secret from the other's public key (ECDH).
// Checked without any stored answer:
//   - both public keys and both shared points lie on P-256
//     (y^2 = x^3 - 3x + b mod p, evaluated with wide integers here)
//   - the two parties obtain the same shared point
//   - no error is raised
// Two exchanges are run (eight 256-bit scalar multiplications).
module tb_ecdh_exchange;
  import ecc_pkg::*;

  localparam word_t P256_B = 256'h5AC635D8AA3A93E7B3EBBD55769886BC651D06B0CC53B0F63BCE3C3E27D2604B;

  logic clk = 1'b0, rst_n = 1'b0;
  logic host_we = 1'b0;
  reg_addr_t host_addr = '0, host_raddr = '0;
  word_t host_wdata = '0, host_rdata;
  logic cmd_start = 1'b0;
  cmd_t cmd = CMD_NOP;
  logic busy, done, err, valid;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ecc_processor dut (.*);

  task automatic wr(input reg_addr_t a, input word_t d);
    @(negedge clk);
    host_we = 1'b1; host_addr = a; host_wdata = d;
    @(negedge clk);
    host_we = 1'b0;
  endtask

  task automatic rd(input reg_addr_t a, output word_t d);
    @(negedge clk);
    host_raddr = a;
    @(negedge clk);
    d = host_rdata;
  endtask

  task automatic run(input cmd_t c);
    @(negedge clk);
    cmd = c; cmd_start = 1'b1;
    @(negedge clk);
    cmd_start = 1'b0;
    while (!done) @(negedge clk);
  endtask

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic word_t rnd_key();
    logic [WIDTH+31:0] r;
    word_t k;
    for (int i = 0; i < WIDTH + 32; i += 32) r[i +: 32] = $urandom;
    k = word_t'(r % {32'b0, P256_N});
    return (k == '0) ? word_t'(1) : k;
  endfunction

  function automatic logic on_curve(input word_t x, input word_t y);
    logic [2*WIDTH+7:0] pp, xx, lhs, rhs;
    pp  = {{(WIDTH+8){1'b0}}, P256_P};
    xx  = {{(WIDTH+8){1'b0}}, x};
    lhs = (xx * xx) % pp;                            // x^2
    lhs = (lhs * xx) % pp;                           // x^3
    rhs = (lhs + 3 * pp - 3 * xx + {{(WIDTH+8){1'b0}}, P256_B}) % pp;
    lhs = ({{(WIDTH+8){1'b0}}, y} * {{(WIDTH+8){1'b0}}, y}) % pp;
    return (x < P256_P) && (y < P256_P) && (lhs == rhs);
  endfunction

  word_t da, db, qax, qay, qbx, qby, zax, zay, zbx, zby;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    chk(on_curve(P256_GX, P256_GY), "reference curve check accepts G");
    for (int t = 0; t < 2; t++) begin
      da = rnd_key(); db = rnd_key();
      wr(RA_D, da); run(CMD_KEYGEN); chk(!err, "keygen A");
      rd(RA_QX, qax); rd(RA_QY, qay);
      wr(RA_D, db); run(CMD_KEYGEN); chk(!err, "keygen B");
      rd(RA_QX, qbx); rd(RA_QY, qby);
      chk(on_curve(qax, qay), "public key A on curve");
      chk(on_curve(qbx, qby), "public key B on curve");
      // party A with B's public key
      wr(RA_D, da); wr(RA_INX, qbx); wr(RA_INY, qby);
      run(CMD_ECDH); chk(!err, "ECDH A");
      rd(RA_OX, zax); rd(RA_OY, zay);
      // party B with A's public key
      wr(RA_D, db); wr(RA_INX, qax); wr(RA_INY, qay);
      run(CMD_ECDH); chk(!err, "ECDH B");
      rd(RA_OX, zbx); rd(RA_OY, zby);
      chk(on_curve(zax, zay), "shared point on curve");
      chk(zax == zbx && zay == zby, "both parties agree");
      $display("exchange %0d: shared x %h", t, zax);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * 6_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
