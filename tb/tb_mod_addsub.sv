// tb_mod_addsub: checks (a + b) mod m and (a - b) mod m for m = p and
// m = n of P-256 against wide integer arithmetic, on random and corner
// operands, plus the reduction use (a < 2m, b = 0). Also checks that done
// follows start by exactly one cycle.
module tb_mod_addsub;
  import ecc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, sub = 1'b0;
  word_t a = '0, b = '0, m = P256_P, y;
  logic done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mod_addsub dut (.*);

  function automatic word_t rnd_below(input word_t lim);
    logic [WIDTH+31:0] r;
    for (int i = 0; i < WIDTH + 32; i += 32) r[i +: 32] = $urandom;
    return word_t'(r % {32'b0, lim});
  endfunction

  task automatic op(input logic s, input word_t x, input word_t z);
    logic [WIDTH+1:0] exp;
    @(negedge clk);
    a = x; b = z; sub = s; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    checks++;
    if (!done) begin
      failures++;
      $display("FAIL: done not one cycle after start");
    end
    if (s) exp = ({2'b0, x} + {2'b0, m} - {2'b0, z}) % {2'b0, m};
    else   exp = ({2'b0, x} + {2'b0, z}) % {2'b0, m};
    checks++;
    if ({2'b0, y} !== exp) begin
      failures++;
      $display("FAIL: %h %s %h mod %h got %h exp %h", x, s ? "-" : "+", z, m, y, exp);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int mi = 0; mi < 2; mi++) begin
      m = mi ? P256_N : P256_P;
      op(0, m - 1, m - 1);
      op(1, '0, m - 1);
      op(1, m - 1, m - 1);
      op(0, '0, '0);
      op(0, '1, '0);               // reduction of a word below 2m
      for (int t = 0; t < 300; t++) begin
        op(0, rnd_below(m), rnd_below(m));
        op(1, rnd_below(m), rnd_below(m));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
