// uart_rx: asynchronous serial receiver, 8 data bits, no parity, 1 stop bit,
// least significant bit first (the usual RS-232 framing at logic level).
//
// The line is brought into the clock domain through two flip-flops. A falling
// edge starts a frame; the start bit is re-checked half a bit later, then each
// data bit and the stop bit are sampled in the middle of their bit time,
// CLKS_PER_BIT clocks apart. A frame whose stop bit is 1 gives a one-cycle
// pulse on valid with the byte on data; a frame with a bad stop bit is
// dropped. Framing and the 115200 baud default (at 100 MHz) are this design's
// choice.
module uart_rx #(
  parameter int CLKS_PER_BIT = 868
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxd,
  output logic [7:0] data,
  output logic       valid
);

  typedef enum logic [1:0] {R_IDLE, R_START, R_DATA, R_STOP} rx_state_e;

  localparam int CW = $clog2(CLKS_PER_BIT + 1);

  rx_state_e     state;
  logic [1:0]    sync;
  logic [CW-1:0] cnt;
  logic [2:0]    bitn;
  logic [7:0]    shreg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync  <= 2'b11;
      state <= R_IDLE;
      cnt   <= '0;
      bitn  <= '0;
      shreg <= '0;
      data  <= '0;
      valid <= 1'b0;
    end else begin
      sync  <= {sync[0], rxd};
      valid <= 1'b0;
      unique case (state)
        R_IDLE: begin
          cnt <= '0;
          if (!sync[1]) state <= R_START;
        end
        R_START: begin
          if (int'(cnt) == CLKS_PER_BIT / 2 - 1) begin
            cnt   <= '0;
            bitn  <= '0;
            state <= sync[1] ? R_IDLE : R_DATA;
          end else cnt <= cnt + 1'b1;
        end
        R_DATA: begin
          if (int'(cnt) == CLKS_PER_BIT - 1) begin
            cnt   <= '0;
            shreg <= {sync[1], shreg[7:1]};
            bitn  <= bitn + 1'b1;
            if (bitn == 3'd7) state <= R_STOP;
          end else cnt <= cnt + 1'b1;
        end
        R_STOP: begin
          if (int'(cnt) == CLKS_PER_BIT - 1) begin
            cnt   <= '0;
            state <= R_IDLE;
            if (sync[1]) begin
              data  <= shreg;
              valid <= 1'b1;
            end
          end else cnt <= cnt + 1'b1;
        end
        default: state <= R_IDLE;
      endcase
    end
  end

endmodule
