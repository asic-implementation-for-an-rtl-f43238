// tb_rsd_to_bin: checks signed-digit to two's complement conversion at the
// default width: v must equal p - n for random and corner digit vectors.
module tb_rsd_to_bin;
  localparam int unsigned W = 258;
  logic [W-1:0] p, n;
  logic signed [W:0] v;
  int checks = 0, failures = 0;

  rsd_to_bin dut (.*);

  function automatic logic [W-1:0] rnd();
    logic [W-1:0] r;
    for (int i = 0; i < W; i += 32) r[i +: 32] = $urandom;
    return r;
  endfunction

  task automatic check();
    logic signed [W+1:0] exp;
    #1;
    exp = signed'({2'b0, p}) - signed'({2'b0, n});
    checks++;
    if ((W+2)'(v) !== exp) begin
      failures++;
      $display("FAIL: %h - %h got %h exp %h", p, n, v, exp);
    end
  endtask

  initial begin
    p = '1; n = '0; check();
    p = '0; n = '1; check();
    p = '0; n = '0; check();
    p = 1;  n = 2;  check();
    for (int t = 0; t < 2000; t++) begin
      p = rnd(); n = rnd(); check();
    end
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
