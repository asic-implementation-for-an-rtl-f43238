// tb_ecc_processor: end-to-end test of the P-256 processor core.
//
// Runs every command once on NIST P-256 vectors whose results were worked
// out independently of the design:
//   PMUL   k * G                -> public key of an ECDH test vector
//   PMUL   k * (peer point)     -> shared secret of that vector
//   KEYGEN d * G                -> ECDSA public key
//   SIGN   (H, d, k)            -> (r, s)
//   VERIFY the signature        -> valid
//   VERIFY with a corrupted H   -> not valid
//   PMUL   with k = 0           -> err
// Also checks that the private key word reads back as zero, that host
// writes are ignored while busy, and that one 256-bit scalar
// multiplication stays within 3.5 * 10^5 .. 7 * 10^5 cycles.
module tb_ecc_processor;
  import ecc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic host_we = 1'b0;
  reg_addr_t host_addr = '0, host_raddr = '0;
  word_t host_wdata = '0, host_rdata;
  logic cmd_start = 1'b0;
  cmd_t cmd = CMD_NOP;
  logic busy, done, err, valid;
  int checks = 0, failures = 0;
  longint cyc = 0;

  always #5 clk = ~clk;
  always_ff @(posedge clk) cyc <= cyc + 1;

  ecc_processor dut (.*);

  localparam word_t K1  = 256'h38F65D6DCE47676044D58CE5139582D568F64BB16098D179DBAB07741DD5CAF5;
  localparam word_t Q1X = 256'h119F2F047902782AB0C9E27A54AFF5EB9B964829CA99C06B02DDBA95B0A3F6D0;
  localparam word_t Q1Y = 256'h8F52B726664CAC366FC98AC7A012B2682CBD962E5ACB544671D41B9445704D1D;
  localparam word_t P2X = 256'h809F04289C64348C01515EB03D5CE7AC1A8CB9498F5CAA50197E58D43A86A7AE;
  localparam word_t P2Y = 256'hB29D84E811197F25EBA8F5194092CB6FF440E26D4421011372461F579271CDA3;
  localparam word_t ZX  = 256'h057D636096CB80B67A8C038C890E887D1ADFA4195E9B3CE241C8A778C59CDA67;
  localparam word_t ZY  = 256'hA6A5B3E335E3922157EFF9F7C2E2B41EFB86A3A99D006388751DB537A8554EA9;
  localparam word_t DKEY = 256'hC477F9F65C22CCE20657FAA5B2D1D8122336F851A508A1ED04E479C34985BF96;
  localparam word_t KNON = 256'h7A1A7E52797FC8CAAA435D2A4DACE39158504BF204FBE19F14DBB427FAEE50AE;
  localparam word_t HASH = 256'hA41A41A12A799548211C410C65D8133AFDE34D28BDD542E4B680CF2899C8A8C4;
  localparam word_t SIGR = 256'h2B42F576D07F4165FF65D1F3B1500F81E44C316F1F0B3EF57325B69ACA46104F;
  localparam word_t SIGS = 256'hDC42C2122D6392CD3E3A993A89502A8198C1886FE69D262C4B329BDB6B63FAF1;
  localparam word_t PUBX = 256'hB7E08AFDFE94BAD3F1DC8C734798BA1C62B3A0AD1E9EA2A38201CD0889BC7A19;
  localparam word_t PUBY = 256'h3603F747959DBF7A4BB226E41928729063ADC7AE43529E61B563BBC606CC5E09;

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

  task automatic check(input string what, input word_t got, input word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic flag(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  task automatic run(input cmd_t c, output longint cycles);
    longint t0;
    @(negedge clk);
    cmd = c; cmd_start = 1'b1;
    t0 = cyc;
    @(negedge clk);
    cmd_start = 1'b0;
    while (!done) @(negedge clk);
    cycles = cyc - t0;
  endtask

  word_t v;
  longint n;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // --- scalar multiplication, ECDH vector: public key k*G
    wr(RA_K, K1); wr(RA_INX, P256_GX); wr(RA_INY, P256_GY);
    run(CMD_PMUL, n);
    $display("PMUL k*G: %0d cycles", n);
    checks++;
    if (n < 350000 || n > 700000) begin
      failures++;
      $display("FAIL cycle count %0d out of range", n);
    end
    rd(RA_OX, v); check("kG x", v, Q1X);
    rd(RA_OY, v); check("kG y", v, Q1Y);
    flag("kG err", err, 1'b0);

    // --- shared secret k * peer point
    wr(RA_INX, P2X); wr(RA_INY, P2Y);
    fork
      run(CMD_PMUL, n);
      begin
        // a host write during the command must not land
        repeat (20) @(negedge clk);
        host_we = 1'b1; host_addr = RA_INX; host_wdata = '0;
        @(negedge clk);
        host_we = 1'b0;
      end
    join
    $display("PMUL k*P2: %0d cycles", n);
    rd(RA_OX, v); check("ECDH shared x", v, ZX);
    rd(RA_OY, v); check("ECDH shared y", v, ZY);
    rd(RA_INX, v); check("write while busy ignored", v, P2X);

    // --- ECDH with the private key register: same result
    wr(RA_D, K1);
    run(CMD_ECDH, n);
    rd(RA_OX, v); check("ECDH cmd x", v, ZX);
    rd(RA_D, v);  check("private key unreadable", v, '0);

    // --- key generation
    wr(RA_D, DKEY);
    run(CMD_KEYGEN, n);
    rd(RA_QX, v); check("keygen x", v, PUBX);
    rd(RA_QY, v); check("keygen y", v, PUBY);

    // --- ECDSA signature
    wr(RA_K, KNON); wr(RA_H, HASH);
    run(CMD_SIGN, n);
    $display("SIGN: %0d cycles", n);
    rd(RA_R, v); check("sign r", v, SIGR);
    rd(RA_S, v); check("sign s", v, SIGS);
    flag("sign err", err, 1'b0);

    // --- ECDSA verification (public key from KEYGEN still in QX, QY)
    run(CMD_VERIFY, n);
    $display("VERIFY: %0d cycles", n);
    flag("verify valid", valid, 1'b1);
    flag("verify err", err, 1'b0);

    wr(RA_H, HASH ^ 256'h1);
    run(CMD_VERIFY, n);
    flag("verify bad hash", valid, 1'b0);

    // --- zero scalar gives the point at infinity: error
    wr(RA_K, '0);
    run(CMD_PMUL, n);
    flag("zero scalar err", err, 1'b1);

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
