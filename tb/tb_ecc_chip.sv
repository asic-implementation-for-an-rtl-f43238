// tb_ecc_chip: end-to-end test of the whole chip at its default parameters,
// driven only through the FT245 USB FIFO pins (behavioural FIFO model), at
// a 200 MHz clock.
//
// Sequence, with NIST P-256 vectors whose results were computed
// independently of the design:
//   PMUL   k * G, then k * (peer point): the two halves of an ECDH exchange
//   ECDH   with the private key register, and a check that the key word
//          reads back as zero
//   KEYGEN d * G
//   SIGN   (H, d, k) -> (r, s)
//   VERIFY the signature (valid) and a corrupted hash (not valid)
//   PMUL   with a zero scalar (err)
// The host polls the status byte until the done bit is set. Every
// mechanism of the design must be seen at least once: point doubling,
// point addition, leading-zero skipping of the scalar, arithmetic modulo n,
// the error path, a host write refused while busy, and a stall of the
// FT245 transmit FIFO. The core's busy time of one 256-bit scalar
// multiplication must lie in 3.5 * 10^5 .. 7 * 10^5 cycles.
module tb_ecc_chip;
  import ecc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic ft_rxf_n, ft_rd_n, ft_txe_n, ft_wr, ft_doe;
  logic [7:0] ft_din, ft_dout;
  int checks = 0, failures = 0;

  always #2.5 clk = ~clk;   // 200 MHz

  ecc_chip dut (.*);
  ft245_model ft (.rxf_n(ft_rxf_n), .rd_n(ft_rd_n), .dout(ft_din),
                  .txe_n(ft_txe_n), .wr(ft_wr), .din(ft_dout), .doe(ft_doe));

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

  // ---- mechanism counters, observed inside the design
  int n_dbl = 0, n_add = 0, n_skip = 0, n_modn = 0, n_err = 0, n_refused = 0;
  longint busy_cycles = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_core.u_ctrl.state == dut.u_core.u_ctrl.S_READ) begin
      if (dut.u_core.u_ctrl.pc == 7'd2)  n_dbl++;      // doubling routine entered
      if (dut.u_core.u_ctrl.pc == 7'd16) n_add++;      // addition routine entered
    end
    if (dut.u_core.u_ctrl.state == dut.u_core.u_ctrl.S_NORM && !dut.u_core.u_ctrl.sk[WIDTH-1])
      n_skip++;
    if (dut.u_core.u_addsub.start && dut.u_core.modn) n_modn++;
    if (dut.u_core.u_muldiv.start && dut.u_core.modn) n_modn++;
    if (dut.u_core.done && dut.u_core.err) n_err++;
    if (dut.u_core.busy && dut.u_core.host_we) n_refused++;
    if (dut.u_core.busy) busy_cycles++;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic write_word(input reg_addr_t a, input word_t w);
    ft.put({3'b001, a});
    for (int i = WIDTH / 8 - 1; i >= 0; i--) ft.put(w[8*i +: 8]);
  endtask

  task automatic read_word(input reg_addr_t a, output word_t w);
    logic [7:0] b;
    ft.put({3'b010, a});
    for (int i = WIDTH / 8 - 1; i >= 0; i--) begin
      ft.get(b);
      w[8*i +: 8] = b;
    end
  endtask

  task automatic status(output logic [7:0] s);
    ft.put(8'h60);
    ft.get(s);
  endtask

  // start a command and poll until done; returns the final status byte
  task automatic run(input cmd_t c, output logic [7:0] s, output longint cyc);
    longint b0;
    b0 = busy_cycles;
    ft.put({5'b10000, 3'(c)});
    do begin
      #20000;
      status(s);
    end while (!s[3] || s[0]);
    cyc = busy_cycles - b0;
  endtask

  word_t v;
  logic [7:0] s;
  longint cyc;

  initial begin
    #20 rst_n = 1'b1;
    #100 ft.c2h.delete();      // forget strobe edges seen before reset
    ft.proto_err = 0;

    // ECDH, first party's view: public key k*G
    write_word(RA_K, K1);
    write_word(RA_INX, P256_GX);
    write_word(RA_INY, P256_GY);
    run(CMD_PMUL, s, cyc);
    $display("scalar multiplication k*G: %0d cycles (%0.2f ms at 200 MHz)", cyc, real'(cyc) * 5.0e-6);
    chk(cyc >= 350000 && cyc <= 700000, "scalar multiplication cycle count");
    chk(s[2:1] == 2'b00, "kG status");
    read_word(RA_OX, v); chk(v == Q1X, "kG x");
    read_word(RA_OY, v); chk(v == Q1Y, "kG y");

    // shared secret with the peer's point; a write during the run is refused
    write_word(RA_INX, P2X);
    write_word(RA_INY, P2Y);
    ft.put({5'b10000, 3'(CMD_PMUL)});
    write_word(RA_INX, '0);
    do begin
      #20000;
      status(s);
    end while (!s[3] || s[0]);
    read_word(RA_OX, v); chk(v == ZX, "shared x");
    read_word(RA_OY, v); chk(v == ZY, "shared y");
    read_word(RA_INX, v); chk(v == P2X, "write while busy refused");

    // the same with the on-chip private key
    write_word(RA_D, K1);
    run(CMD_ECDH, s, cyc);
    read_word(RA_OX, v); chk(v == ZX, "ECDH command x");
    read_word(RA_D, v);  chk(v == '0, "private key not readable");

    // key generation
    write_word(RA_D, DKEY);
    run(CMD_KEYGEN, s, cyc);
    read_word(RA_QX, v); chk(v == PUBX, "public key x");
    read_word(RA_QY, v); chk(v == PUBY, "public key y");

    // ECDSA signature
    write_word(RA_K, KNON);
    write_word(RA_H, HASH);
    run(CMD_SIGN, s, cyc);
    $display("signature: %0d cycles", cyc);
    read_word(RA_R, v); chk(v == SIGR, "signature r");
    read_word(RA_S, v); chk(v == SIGS, "signature s");

    // ECDSA verification
    run(CMD_VERIFY, s, cyc);
    $display("verification: %0d cycles", cyc);
    chk(s[2:1] == 2'b01, "good signature valid");
    write_word(RA_H, HASH ^ 256'h100);
    run(CMD_VERIFY, s, cyc);
    chk(s[2:1] == 2'b00, "bad hash not valid");

    // zero scalar
    write_word(RA_K, '0);
    run(CMD_PMUL, s, cyc);
    chk(s[2] == 1'b1, "zero scalar error");

    $display("doublings %0d additions %0d skipped-zero-bits %0d mod-n ops %0d errors %0d refused writes %0d fifo stalls %0d",
             n_dbl, n_add, n_skip, n_modn, n_err, n_refused, ft.tx_long_holds);
    chk(n_dbl > 0, "point doubling happened");
    chk(n_add > 0, "point addition happened");
    chk(n_skip > 0, "leading zero bits skipped");
    chk(n_modn > 0, "arithmetic modulo n happened");
    chk(n_err > 0, "error path happened");
    chk(n_refused > 0, "host write refused while busy");
    chk(ft.tx_long_holds > 0, "FT245 transmit stall happened");
    chk(ft.proto_err == 0, "FT245 protocol respected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (8_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
