// tb_ecdsa_roundtrip: the ECDSA signature workload on the processor core.
//
// With a random private key, the core generates the public key and then,
// for two random messages (random H and nonce k), signs and verifies.
// Checked without any stored answer:
//   - s * k = H + d * r (mod n), evaluated with wide integers here
//   - r and s are in [1, n-1]
//   - the signature verifies as valid
//   - the same signature with s + 1 verifies as not valid
module tb_ecdsa_roundtrip;
  import ecc_pkg::*;

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

  function automatic word_t rnd_below_n();
    logic [WIDTH+31:0] r;
    word_t k;
    for (int i = 0; i < WIDTH + 32; i += 32) r[i +: 32] = $urandom;
    k = word_t'(r % {32'b0, P256_N});
    return (k == '0) ? word_t'(1) : k;
  endfunction

  function automatic word_t rnd_word();
    word_t r;
    for (int i = 0; i < WIDTH; i += 32) r[i +: 32] = $urandom;
    return r;
  endfunction

  word_t d, h, k, r, s;
  logic [2*WIDTH-1:0] nn, lhs, rhs;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    nn = {{WIDTH{1'b0}}, P256_N};
    d = rnd_below_n();
    wr(RA_D, d);
    run(CMD_KEYGEN);
    chk(!err, "keygen");
    for (int t = 0; t < 2; t++) begin
      h = rnd_word(); k = rnd_below_n();
      wr(RA_H, h); wr(RA_K, k);
      run(CMD_SIGN);
      chk(!err, "sign");
      rd(RA_R, r); rd(RA_S, s);
      chk(r != '0 && r < P256_N && s != '0 && s < P256_N, "r, s in range");
      lhs = ({{WIDTH{1'b0}}, s} * {{WIDTH{1'b0}}, k}) % nn;
      rhs = ({{WIDTH{1'b0}}, h} % nn + ({{WIDTH{1'b0}}, d} * {{WIDTH{1'b0}}, r}) % nn) % nn;
      chk(lhs == rhs, "s * k = H + d * r mod n");
      run(CMD_VERIFY);
      chk(valid && !err, "signature verifies");
      wr(RA_S, (s == P256_N - 1) ? word_t'(1) : s + 1);
      run(CMD_VERIFY);
      chk(!valid, "altered signature rejected");
      $display("message %0d: r %h", t, r);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * 8_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
