// tb_rsd_adder: checks the carry-free signed-digit adder at its default
// width against integer arithmetic: for random digit vectors X and Y
// (including all-ones and all-minus-ones corners) the value of Z = X + Y,
// zp - zn, must equal (xp - xn) + (yp - yn).
module tb_rsd_adder;
  localparam int unsigned W = 258;
  logic [W-1:0] xp, xn, yp, yn;
  logic [W:0]   zp, zn;
  int checks = 0, failures = 0;

  rsd_adder dut (.*);

  function automatic logic [W-1:0] rnd();
    logic [W-1:0] r;
    for (int i = 0; i < W; i += 32) r[i +: 32] = $urandom;
    return r;
  endfunction

  task automatic check();
    logic signed [W+2:0] exp, got;
    #1;
    exp = signed'({3'b0, xp}) - signed'({3'b0, xn}) + signed'({3'b0, yp}) - signed'({3'b0, yn});
    got = signed'({2'b0, zp}) - signed'({2'b0, zn});
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL: x=%h-%h y=%h-%h got %h exp %h", xp, xn, yp, yn, got, exp);
    end
  endtask

  initial begin
    xp = '1; xn = '0; yp = '1; yn = '0; check();
    xp = '0; xn = '1; yp = '0; yn = '1; check();
    xp = '1; xn = '1; yp = '0; yn = '1; check();
    xp = '0; xn = '0; yp = '0; yn = '0; check();
    for (int t = 0; t < 2000; t++) begin
      xp = rnd(); xn = rnd(); yp = rnd(); yn = rnd();
      if (t % 4 == 1) xn = '0;
      if (t % 4 == 2) yn = '0;
      check();
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
