// tb_ft245_if: checks the FT245 link against a behavioural FT245 model and
// a stand-in for the processor's host port (a word array with a one-cycle
// read, and status inputs driven by the testbench).
// Checked: a 33-byte word write arrives as one host write with the right
// address and data; a word read returns the 32 bytes MSB first; the status
// byte carries busy/valid/err and the sticky done bit (cleared by a start);
// a start byte pulses cmd_start with the command code; the link respects
// the FIFO's flow control (no protocol errors while the model stalls).
module tb_ft245_if;
  import ecc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic ft_rxf_n, ft_rd_n, ft_txe_n, ft_wr, ft_doe;
  logic [7:0] ft_din, ft_dout;
  logic host_we, cmd_start;
  reg_addr_t host_addr, host_raddr;
  word_t host_wdata, host_rdata;
  cmd_t cmd;
  logic busy = 1'b0, done = 1'b0, err = 1'b0, valid = 1'b0;
  int checks = 0, failures = 0;
  int writes = 0, starts = 0;
  cmd_t last_cmd = CMD_NOP;

  always #2.5 clk = ~clk;   // 200 MHz

  ft245_if dut (.*);
  ft245_model ft (.rxf_n(ft_rxf_n), .rd_n(ft_rd_n), .dout(ft_din),
                  .txe_n(ft_txe_n), .wr(ft_wr), .din(ft_dout), .doe(ft_doe));

  word_t mem [32];
  always_ff @(posedge clk) begin
    host_rdata <= mem[host_raddr];
    if (host_we && rst_n) begin
      mem[host_addr] <= host_wdata;
      writes <= writes + 1;
    end
    if (cmd_start && rst_n) begin
      starts   <= starts + 1;
      last_cmd <= cmd;
    end
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic word_t rnd();
    word_t r;
    for (int i = 0; i < WIDTH; i += 32) r[i +: 32] = $urandom;
    return r;
  endfunction

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

  word_t w1, w2, r;
  logic [7:0] s;

  initial begin
    for (int i = 0; i < 32; i++) mem[i] = '0;
    #20 rst_n = 1'b1;
    // forget strobe edges seen before reset settled the outputs
    #100 ft.c2h.delete();
    ft.proto_err = 0;
    w1 = rnd(); w2 = rnd();
    write_word(RA_K, w1);
    write_word(RA_H, w2);
    wait (writes == 2);
    #100;
    chk(mem[RA_K] == w1, "word write K");
    chk(mem[RA_H] == w2, "word write H");
    read_word(RA_H, r);
    chk(r == w2, "word read H");
    if (r != w2) $display("got %h\nexp %h", r, w2);
    read_word(RA_K, r);
    chk(r == w1, "word read K");
    // status bits
    busy = 1'b1; err = 1'b0; valid = 1'b1;
    status(s);
    chk(s == 8'b0000_0011, "status busy+valid");
    // command start clears done; a done pulse sets it
    ft.put({5'b10000, 3'(CMD_SIGN)});
    wait (starts == 1);
    chk(last_cmd == CMD_SIGN, "command code");
    @(negedge clk) done = 1'b1;
    @(negedge clk) done = 1'b0;
    busy = 1'b0; err = 1'b1; valid = 1'b0;
    status(s);
    chk(s == 8'b0000_1100, "status done+err");
    ft.put({5'b10000, 3'(CMD_PMUL)});
    wait (starts == 2);
    status(s);
    chk(s == 8'b0000_0100, "done cleared by start");
    chk(last_cmd == CMD_PMUL, "second command code");
    chk(ft.proto_err == 0, "FT245 protocol respected");
    chk(ft.tx_long_holds > 0, "flow-control stall exercised");
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
