// tb_mod_muldiv: checks the integrated Montgomery multiplier / modular
// divider for m = p and m = n of P-256.
//   MUL: y < m and y * 2^256 = a * b (mod m), in WIDTH + 3 cycles exactly
//   DIV: y < m and y * b = a (mod m), in at most 2 * WIDTH + 2 cycles
//   DIV by zero: err, at once
// Expected values come from wide-integer '%' in the testbench.
module tb_mod_muldiv;
  import ecc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, div = 1'b0;
  word_t a = '0, b = '0, m = P256_P, y;
  logic err, busy, done;
  int checks = 0, failures = 0;
  int maxdiv = 0;

  always #5 clk = ~clk;

  mod_muldiv dut (.*);

  function automatic word_t rnd_below(input word_t lim);
    logic [WIDTH+31:0] r;
    for (int i = 0; i < WIDTH + 32; i += 32) r[i +: 32] = $urandom;
    return word_t'(r % {32'b0, lim});
  endfunction

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: a=%h b=%h m=%h y=%h", what, a, b, m, y);
    end
  endtask

  task automatic op(input logic d, input word_t x, input word_t z);
    int cyc;
    logic [2*WIDTH-1:0] lhs, rhs;
    @(negedge clk);
    a = x; b = z; div = d; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done && cyc < 4 * WIDTH) begin
      @(negedge clk);
      cyc++;
    end
    chk(done, "done");
    chk(y < m, "range");
    if (!d) begin
      chk(cyc == WIDTH + 3, "multiply latency");
      lhs = ({{WIDTH{1'b0}}, y} << WIDTH) % {{WIDTH{1'b0}}, m};
      rhs = ({{WIDTH{1'b0}}, x} * {{WIDTH{1'b0}}, z}) % {{WIDTH{1'b0}}, m};
      chk(lhs == rhs, "montgomery product");
    end else begin
      if (cyc > maxdiv) maxdiv = cyc;
      chk(cyc <= 2 * WIDTH + 2, "divide latency");
      lhs = ({{WIDTH{1'b0}}, y} * {{WIDTH{1'b0}}, z}) % {{WIDTH{1'b0}}, m};
      rhs = {{WIDTH{1'b0}}, x};
      chk(lhs == rhs, "quotient");
      chk(!err, "no error");
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int mi = 0; mi < 2; mi++) begin
      m = mi ? P256_N : P256_P;
      op(0, m - 1, m - 1);
      op(0, '1, m - 1);
      op(0, '0, m - 1);
      op(1, m - 1, 1);
      op(1, 1, m - 1);
      op(1, 0, 5);
      for (int t = 0; t < 60; t++) begin
        op(0, rnd_below(m), rnd_below(m));
        op(1, rnd_below(m), rnd_below(m - 1) + 1);
      end
    end
    // division by zero
    @(negedge clk);
    a = 7; b = '0; div = 1'b1; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    chk(done && err && y == '0, "divide by zero");
    $display("longest division: %0d cycles", maxdiv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
