// tb_ecc_control: checks the micro-programmed control unit on its own.
//
// The operand memory is a plain array in the testbench and the two
// arithmetic units are stand-ins that return dummy values after a random
// latency (so every micro-op must wait for its unit). For a scalar with bit
// length L and L1 one bits, double-and-add must run L-1 doublings and L1-1
// additions, which fixes how many operations of each kind are issued:
//   divisions       (L-1) + (L1-1)
//   multiplications 4 + 4(L-1) + 3(L1-1)
//   adds/subs       2 + 9(L-1) + 7(L1-1)
// The testbench counts them for several scalars (1, small, random 256-bit),
// checks that the results land in OX then OY, that a zero scalar sets err,
// that SIGN and VERIFY use the group order n for the expected number of
// operations, and that VERIFY reports valid only when the final comparison
// matches.
module tb_ecc_control;
  import ecc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic cmd_start = 1'b0;
  cmd_t cmd = CMD_NOP;
  logic busy, done, err, valid;
  reg_addr_t ra_addr, rb_addr, wa;
  word_t ra_data, rb_data, wd;
  logic we, modn, as_start, as_sub, as_done, md_start, md_div, md_err, md_done;
  word_t as_y, md_y;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ecc_control dut (.*);

  // operand memory stand-in: synchronous read
  word_t mem [32];
  logic force_eq = 1'b0;    // make every stored value equal (CMP matches)
  always_ff @(posedge clk) begin
    ra_data <= mem[ra_addr];
    rb_data <= mem[rb_addr];
    if (we) mem[wa] <= force_eq ? word_t'(7) : wd;
  end

  // unit stand-ins
  int as_cnt = 0, mul_cnt = 0, div_cnt = 0, n_cnt = 0;
  int md_wait = 0;
  logic md_run = 1'b0;
  always_ff @(posedge clk) begin
    as_done <= as_start;
    if (as_start) as_y <= ra_data ^ rb_data ^ word_t'(3);
    md_done <= 1'b0;
    if (md_start) begin
      md_run  <= 1'b1;
      md_wait <= 1 + ($urandom % 6);
      md_y    <= ra_data + rb_data + word_t'(1);
      md_err  <= md_div && (rb_data == '0);
    end else if (md_run) begin
      if (md_wait == 0) begin
        md_run  <= 1'b0;
        md_done <= 1'b1;
      end else md_wait <= md_wait - 1;
    end
  end
  always_ff @(posedge clk) begin
    if (as_start) as_cnt <= as_cnt + 1;
    if (md_start && !md_div) mul_cnt <= mul_cnt + 1;
    if (md_start && md_div) div_cnt <= div_cnt + 1;
    if ((as_start || md_start) && modn) n_cnt <= n_cnt + 1;
  end
  reg_addr_t last_wa [2];
  always_ff @(posedge clk) if (we) begin
    last_wa[1] <= last_wa[0];
    last_wa[0] <= wa;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run(input cmd_t c);
    as_cnt = 0; mul_cnt = 0; div_cnt = 0; n_cnt = 0;
    @(negedge clk);
    cmd = c; cmd_start = 1'b1;
    @(negedge clk);
    cmd_start = 1'b0;
    chk(busy, "busy after start");
    while (!done) @(negedge clk);
    @(negedge clk);
  endtask

  task automatic pmul(input word_t k);
    int L, L1;
    L = 0; L1 = 0;
    for (int i = 0; i < WIDTH; i++) if (k[i]) begin L = i + 1; L1++; end
    for (int i = 0; i < 32; i++) mem[i] = word_t'(i + 100);
    mem[RA_K] = k;
    run(CMD_PMUL);
    $display("k bits %0d ones %0d: div %0d mul %0d addsub %0d", L, L1, div_cnt, mul_cnt, as_cnt);
    chk(div_cnt == (L - 1) + (L1 - 1), "division count");
    chk(mul_cnt == 4 + 4 * (L - 1) + 3 * (L1 - 1), "multiplication count");
    chk(as_cnt == 2 + 9 * (L - 1) + 7 * (L1 - 1), "add/sub count");
    chk(last_wa[1] == RA_OX && last_wa[0] == RA_OY, "result words");
    chk(!err, "no error");
  endtask

  initial begin
    word_t k;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    pmul(word_t'(1));
    pmul(word_t'(11));
    pmul(word_t'(256'h8000_0001) << 100);
    for (int t = 0; t < 3; t++) begin
      for (int i = 0; i < WIDTH; i += 32) k[i +: 32] = $urandom;
      pmul(k);
    end
    // zero scalar
    for (int i = 0; i < 32; i++) mem[i] = word_t'(i + 100);
    mem[RA_K] = '0;
    run(CMD_PMUL);
    chk(err, "zero scalar error");
    // signature: six operations modulo n
    mem[RA_K] = word_t'(5);
    run(CMD_SIGN);
    chk(n_cnt == 6, "sign operations modulo n");
    chk(last_wa[0] == RA_S, "sign writes s last");
    // verification: four operations modulo n; compare fails on dummy data
    mem[RA_U1] = word_t'(6);
    run(CMD_VERIFY);
    chk(n_cnt == 4, "verify operations modulo n");
    // verification with all stored values equal: compare matches
    force_eq = 1'b1;
    for (int i = 0; i < 32; i++) mem[i] = word_t'(7);
    run(CMD_VERIFY);
    chk(valid, "verify valid when compare matches");
    force_eq = 1'b0;
    for (int i = 0; i < 32; i++) mem[i] = word_t'(i + 100);
    mem[RA_S] = '0;
    mem[RA_U1] = '0;
    run(CMD_VERIFY);
    chk(err && !valid, "verify with s = 0 is an error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
