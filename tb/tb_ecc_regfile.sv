// tb_ecc_regfile: checks the operand memory: written words read back on
// all three ports one cycle after the address, constant words return the
// P-256 constants and ignore writes, and the private key word reads as
// zero on the host port only.
module tb_ecc_regfile;
  import ecc_pkg::*;
  logic clk = 1'b0;
  reg_addr_t ra_addr = '0, rb_addr = '0, rh_addr = '0, wa = '0;
  word_t ra_data, rb_data, rh_data, wd = '0;
  logic we = 1'b0;
  int checks = 0, failures = 0;
  word_t model [25];

  always #5 clk = ~clk;

  ecc_regfile dut (.*);

  task automatic chk(input word_t got, input word_t exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  function automatic word_t rnd();
    word_t r;
    for (int i = 0; i < WIDTH; i += 32) r[i +: 32] = $urandom;
    return r;
  endfunction

  initial begin
    for (int i = 0; i < 25; i++) begin
      model[i] = rnd();
      @(negedge clk);
      we = 1'b1; wa = reg_addr_t'(i); wd = model[i];
    end
    // writes to the constants must be ignored
    for (int i = 25; i < 32; i++) begin
      @(negedge clk);
      we = 1'b1; wa = reg_addr_t'(i); wd = rnd();
    end
    @(negedge clk);
    we = 1'b0;
    for (int i = 0; i < 32; i++) begin
      word_t exp;
      @(negedge clk);
      ra_addr = reg_addr_t'(i); rb_addr = reg_addr_t'(31 - i); rh_addr = reg_addr_t'(i);
      @(negedge clk);
      case (i)
        25: exp = '0;
        26: exp = word_t'(1);
        27: exp = MONT_R2P;
        28: exp = MONT_R2N;
        29: exp = MONT_C3R;
        30: exp = P256_GX;
        31: exp = P256_GY;
        default: exp = model[i];
      endcase
      chk(ra_data, exp, "port a");
      chk(rh_data, (i == int'(RA_D)) ? '0 : exp, "host port");
      if (31 - i < 25) chk(rb_data, model[31 - i], "port b");
    end
    // read latency: data changes one edge after the address
    @(negedge clk);
    ra_addr = RA_K;
    @(posedge clk); #1;
    chk(ra_data, model[RA_K], "one-cycle read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
