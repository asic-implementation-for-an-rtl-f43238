// ft245_model: behavioural model of an FT245-style USB FIFO chip, as seen
// from the ECC chip, for simulation only (kind: behavioural model).
//
// Two byte queues stand for the USB host: put() queues a byte for the chip,
// get() waits for a byte from the chip. Chip side: rxf_n is low while a
// byte is waiting; data appears 20 ns after rd_n falls and the byte is
// consumed when rd_n rises, after which rxf_n stays high for 60 ns. txe_n
// is low when the model can take a byte; the byte on din is taken when wr
// falls, and txe_n then stays high for a random 40 to 400 ns (longer every
// few bytes, counted in tx_long_holds), which exercises the chip's flow
// control. A read of an empty FIFO, or a write strobe while the FIFO is not
// ready or the chip is not driving the bus, counts in proto_err.
module ft245_model (
  output logic       rxf_n,
  input  logic       rd_n,
  output logic [7:0] dout,
  output logic       txe_n,
  input  logic       wr,
  input  logic [7:0] din,
  input  logic       doe
);
  logic [7:0] h2c [$];
  logic [7:0] c2h [$];
  logic rx_hold = 1'b0, tx_hold = 1'b0;
  int   tx_count = 0;
  int   tx_long_holds = 0;
  int   proto_err = 0;

  // flags re-evaluated every nanosecond (queue contents change in tasks)
  initial begin
    rxf_n = 1'b1;
    txe_n = 1'b1;
    forever begin
      #1;
      rxf_n = (h2c.size() == 0) || rx_hold;
      txe_n = tx_hold;
    end
  end

  initial dout = '0;

  always @(negedge rd_n) begin
    if (h2c.size() == 0) proto_err++;
    #20 dout = (h2c.size() != 0) ? h2c[0] : 8'h00;
  end

  always @(posedge rd_n) begin
    if (h2c.size() != 0) void'(h2c.pop_front());
    rx_hold = 1'b1;
    #60 rx_hold = 1'b0;
  end

  always @(negedge wr) begin
    if (tx_hold || !doe) proto_err++;
    c2h.push_back(din);
    tx_count++;
    tx_hold = 1'b1;
    if (tx_count % 7 == 0) begin
      tx_long_holds++;
      #400 tx_hold = 1'b0;
    end else begin
      #(40 + ($urandom % 100)) tx_hold = 1'b0;
    end
  end

  task automatic put(input logic [7:0] b);
    h2c.push_back(b);
  endtask

  task automatic get(output logic [7:0] b);
    while (c2h.size() == 0) #10;
    b = c2h.pop_front();
  endtask
endmodule
