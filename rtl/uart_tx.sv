// uart_tx: RS232 serial transmitter, 8 data bits, no parity, one stop bit,
// least significant bit first, idle high.
//
// A byte is accepted when tx_valid and tx_ready are both high; tx_ready is
// high only while the line is idle. Each bit then lasts CLKS_PER_BIT clocks
// (573 clocks = 115200 baud at 66 MHz), so one byte occupies the line for
// 10*CLKS_PER_BIT clocks. The published design uses an RS232 link without
// giving its settings; the frame format and the baud rate are this design's
// choice.
module uart_tx #(
  parameter int CLKS_PER_BIT = 573
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] tx_data,
  input  logic       tx_valid,
  output logic       tx_ready,
  output logic       txd
);

  localparam int CW = (CLKS_PER_BIT > 1) ? $clog2(CLKS_PER_BIT) : 1;

  logic [8:0]    frame;     // start bit + 8 data bits still to send
  logic [3:0]    bits_left; // bits still to send, including the stop bit
  logic [CW-1:0] tick;

  assign tx_ready = (bits_left == 4'd0);

  always_ff @(posedge clk) begin
    if (rst) begin
      frame     <= '1;
      bits_left <= '0;
      tick      <= '0;
      txd       <= 1'b1;
    end else if (tx_ready) begin
      txd <= 1'b1;
      if (tx_valid) begin
        txd       <= 1'b0;                 // start bit
        frame     <= {1'b1, tx_data};      // data bits, then stop bit
        bits_left <= 4'd10;
        tick      <= '0;
      end
    end else if (int'(tick) == CLKS_PER_BIT-1) begin
      tick      <= '0;
      bits_left <= bits_left - 4'd1;
      txd       <= (bits_left == 4'd1) ? 1'b1 : frame[0];
      frame     <= {1'b1, frame[8:1]};
    end else begin
      tick <= tick + CW'(1);
    end
  end

  // a byte on offer must be held until it is taken
  property p_hold;
    @(posedge clk) disable iff (rst)
      (tx_valid && !tx_ready) |=> (tx_valid && $stable(tx_data));
  endproperty
  a_hold: assert property (p_hold);

endmodule
