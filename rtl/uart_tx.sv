// uart_tx: asynchronous serial transmitter, 8 data bits, no parity, 1 stop
// bit, least significant bit first.
//
// When ready is high a one-cycle pulse on send takes the byte on data; the
// line then carries the start bit, the eight data bits and the stop bit, each
// CLKS_PER_BIT clocks long, and ready returns high once the stop bit has been
// sent. The line idles high. Framing and baud rate are this design's choice.
module uart_tx #(
  parameter int CLKS_PER_BIT = 868
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       send,
  input  logic [7:0] data,
  output logic       ready,
  output logic       txd
);

  localparam int CW = $clog2(CLKS_PER_BIT + 1);

  logic          active;
  logic [CW-1:0] cnt;
  logic [3:0]    bitn;     // 0 = start, 1..8 = data, 9 = stop
  logic [9:0]    frame;

  assign ready = !active;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      cnt    <= '0;
      bitn   <= '0;
      frame  <= '1;
      txd    <= 1'b1;
    end else if (!active) begin
      txd <= 1'b1;
      if (send) begin
        frame  <= {1'b1, data, 1'b0};
        active <= 1'b1;
        cnt    <= '0;
        bitn   <= '0;
        txd    <= 1'b0;
      end
    end else begin
      if (int'(cnt) == CLKS_PER_BIT - 1) begin
        cnt <= '0;
        if (bitn == 4'd9) begin
          active <= 1'b0;
          txd    <= 1'b1;
        end else begin
          bitn <= bitn + 1'b1;
          txd  <= frame[bitn + 1'b1];
        end
      end else cnt <= cnt + 1'b1;
    end
  end

endmodule
