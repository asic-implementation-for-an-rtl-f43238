// ft245_if: host link of the ECC chip over an FT245-style USB FIFO.
//
// The FT245 presents a byte-wide asynchronous FIFO: rxf_n low means a byte
// from the USB host is waiting, and a low pulse on rd_n puts it on the data
// bus; txe_n low means there is room for a byte to the host, which is
// latched when wr falls. This block runs that handshake from the chip clock
// (rxf_n and txe_n pass through two-flop synchronisers; rd_n and wr pulses
// last PULSE cycles with a PULSE-cycle gap after each) and turns the byte
// stream into accesses to the processor's host port.
//
// Byte protocol (host to chip), this implementation's own:
//   001aaaaa  + 32 bytes  write word a, most significant byte first
//   010aaaaa              read word a: the chip returns 32 bytes, MSB first
//   011xxxxx              status: the chip returns
//                         {4'b0, done, err, valid, busy}; done is set
//                         when a command ends and cleared by the next start
//   10000ccc              start command ccc
// Other bytes are ignored. The processor side is ecc_processor's host
// interface: a 256-bit word write, a word read with one cycle of latency,
// and a command start.
//
// The FT245 as the chip's host interface is from the source design; the
// byte protocol, the pulse lengths (PULSE = 10 gives 50 ns at 200 MHz) and
// the synchronisers are this implementation's choices.
module ft245_if
  import ecc_pkg::*;
#(
  parameter int unsigned PULSE = 10
) (
  input  logic       clk,
  input  logic       rst_n,
  // FT245 side
  input  logic       ft_rxf_n,
  output logic       ft_rd_n,
  input  logic [7:0] ft_din,
  input  logic       ft_txe_n,
  output logic       ft_wr,
  output logic [7:0] ft_dout,
  output logic       ft_doe,
  // processor side
  output logic       host_we,
  output reg_addr_t  host_addr,
  output word_t      host_wdata,
  output reg_addr_t  host_raddr,
  input  word_t      host_rdata,
  output logic       cmd_start,
  output cmd_t       cmd,
  input  logic       busy,
  input  logic       done,
  input  logic       err,
  input  logic       valid
);

  typedef enum logic [3:0] {
    S_RXWAIT, S_RDLOW, S_RDGAP, S_DECODE, S_RDADDR, S_RDWORD, S_TXWAIT, S_WRHIGH, S_WRGAP
  } state_t;

  localparam int unsigned BYTES = WIDTH / 8;
  typedef logic [$clog2(PULSE+1)-1:0] tcnt_t;

  state_t     state;
  logic [1:0] rxf_sync, txe_sync;
  tcnt_t      tcnt;
  logic [7:0] rx_byte;
  logic [5:0] nbytes;        // bytes still to receive (write) or send
  logic       in_write;      // collecting the data bytes of a word write
  word_t      shreg;         // word being received or sent, MSB first
  logic       done_flag;     // a command has ended since the last start

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rxf_sync <= 2'b11;
      txe_sync <= 2'b11;
    end else begin
      rxf_sync <= {rxf_sync[0], ft_rxf_n};
      txe_sync <= {txe_sync[0], ft_txe_n};
    end
  end

  assign host_wdata = shreg;
  assign ft_dout    = shreg[WIDTH-1 -: 8];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_RXWAIT;
      tcnt       <= '0;
      rx_byte    <= '0;
      nbytes     <= '0;
      in_write   <= 1'b0;
      shreg      <= '0;
      host_addr  <= '0;
      host_raddr <= '0;
      host_we    <= 1'b0;
      cmd_start  <= 1'b0;
      cmd        <= CMD_NOP;
      ft_rd_n    <= 1'b1;
      ft_wr      <= 1'b0;
      ft_doe     <= 1'b0;
      done_flag  <= 1'b0;
    end else begin
      host_we   <= 1'b0;
      cmd_start <= 1'b0;
      if (done) done_flag <= 1'b1;
      unique case (state)
        // ---- receive one byte
        S_RXWAIT: begin
          if (!rxf_sync[1]) begin
            ft_rd_n <= 1'b0;
            tcnt    <= '0;
            state   <= S_RDLOW;
          end
        end
        S_RDLOW: begin
          tcnt <= tcnt + 1'b1;
          if (tcnt == tcnt_t'(PULSE - 1)) begin
            rx_byte <= ft_din;
            ft_rd_n <= 1'b1;
            tcnt    <= '0;
            state   <= S_RDGAP;
          end
        end
        S_RDGAP: begin
          tcnt <= tcnt + 1'b1;
          if (tcnt == tcnt_t'(PULSE - 1)) state <= S_DECODE;
        end
        // ---- act on the byte
        S_DECODE: begin
          state <= S_RXWAIT;
          if (in_write) begin
            shreg  <= {shreg[WIDTH-9:0], rx_byte};
            nbytes <= nbytes - 1'b1;
            if (nbytes == 6'd1) begin
              in_write <= 1'b0;
              host_we  <= 1'b1;
            end
          end else begin
            unique case (rx_byte[7:5])
              3'b001: begin
                host_addr <= rx_byte[4:0];
                nbytes    <= 6'(BYTES);
                in_write  <= 1'b1;
              end
              3'b010: begin
                host_raddr <= rx_byte[4:0];
                state      <= S_RDADDR;
              end
              3'b011: begin
                shreg  <= {4'b0, done_flag, err, valid, busy, {(WIDTH-8){1'b0}}};
                nbytes <= 6'd1;
                state  <= S_TXWAIT;
              end
              3'b100: begin
                cmd       <= cmd_t'(rx_byte[2:0]);
                cmd_start <= 1'b1;
                done_flag <= 1'b0;
              end
              default: ;
            endcase
          end
        end
        S_RDADDR: state <= S_RDWORD;       // memory samples host_raddr
        S_RDWORD: begin
          // read data is valid one cycle after the memory sampled the address
          shreg  <= host_rdata;
          nbytes <= 6'(BYTES);
          state  <= S_TXWAIT;
        end
        // ---- send nbytes bytes from the top of shreg
        S_TXWAIT: begin
          if (!txe_sync[1]) begin
            ft_doe <= 1'b1;
            ft_wr  <= 1'b1;
            tcnt   <= '0;
            state  <= S_WRHIGH;
          end
        end
        S_WRHIGH: begin
          tcnt <= tcnt + 1'b1;
          if (tcnt == tcnt_t'(PULSE - 1)) begin
            ft_wr <= 1'b0;             // FT245 latches the byte here
            tcnt  <= '0;
            state <= S_WRGAP;
          end
        end
        S_WRGAP: begin
          tcnt <= tcnt + 1'b1;
          if (tcnt == tcnt_t'(PULSE - 1)) begin
            ft_doe <= 1'b0;
            shreg  <= shreg << 8;
            nbytes <= nbytes - 1'b1;
            state  <= (nbytes == 6'd1) ? S_RXWAIT : S_TXWAIT;
          end
        end
        default: state <= S_RXWAIT;
      endcase
    end
  end

  initial begin
    assert (PULSE >= 3) else $error("ft245_if: PULSE must cover the synchroniser delay");
  end

endmodule
