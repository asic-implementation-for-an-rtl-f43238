// ecc_chip: the ECC processor chip: the P-256 processor core behind an
// FT245 USB FIFO link.
//
// The host sends operand words and commands as bytes through the FT245 and
// reads results and status back (protocol in ft245_if). The bidirectional
// FT245 data bus is brought out as separate input, output and output-enable
// signals; the pad ring joins them.
//
// Interface: clk, active-low asynchronous rst_n, and the FT245 pins.
// Timing: a byte transfer takes 2*PULSE clock cycles plus synchroniser
// delay; a scalar multiplication about 5 * 10^5 cycles.
module ecc_chip #(
  parameter int unsigned PULSE = 10
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ft_rxf_n,
  output logic       ft_rd_n,
  input  logic [7:0] ft_din,
  input  logic       ft_txe_n,
  output logic       ft_wr,
  output logic [7:0] ft_dout,
  output logic       ft_doe
);
  import ecc_pkg::*;

  logic      host_we, cmd_start, busy, done, err, valid;
  reg_addr_t host_addr, host_raddr;
  word_t     host_wdata, host_rdata;
  cmd_t      cmd;

  ft245_if #(.PULSE(PULSE)) u_link (
    .clk, .rst_n,
    .ft_rxf_n, .ft_rd_n, .ft_din, .ft_txe_n, .ft_wr, .ft_dout, .ft_doe,
    .host_we, .host_addr, .host_wdata, .host_raddr, .host_rdata,
    .cmd_start, .cmd, .busy, .done, .err, .valid
  );

  ecc_processor u_core (
    .clk, .rst_n,
    .host_we, .host_addr, .host_wdata, .host_raddr, .host_rdata,
    .cmd_start, .cmd, .busy, .done, .err, .valid
  );

endmodule
