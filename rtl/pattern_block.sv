// pattern_block: the link between the PC and the network.
//
// It receives bytes over an RS-232 serial line (uart_rx), stores training and
// validation patterns, starts training, and answers queries (uart_tx).
// Every command is two bytes, a header and a data byte:
//   header = {op[1:0], set, index[4:0]}
//   op 0  write pattern: data = {target bits, input bits}, stored in set
//         (0 training, 1 validation) at index (ignored if index >= N_PAT)
//   op 1  start training: data = {n_valid-1, n_train-1} (4 bits each);
//         pulses data_setting
//   op 2  recall: data = input bits; once the network has answered, one byte
//         per output is sent back: {hard-limited output, 7 fraction bits of
//         the sigmoid output} (7'h7F when the output is 1.0)
//   op 3  status: three bytes are sent back:
//         {done, converged, training, validation, 4'b0}, epoch[15:8], epoch[7:0]
// A recall or status command that arrives while an answer is still pending is
// ignored.
//
// Towards the network the block is a pattern memory: while the control block
// raises training (validation) it returns, combinationally, the input bits x
// and target bits t of training (validation) pattern pat_idx; otherwise x is
// the input of the pending recall. query_req is held from the recall command
// until query_done.
// Data exchange with a PC over RS-232 is the source's; the memory size, byte
// protocol and baud rate are this design's choice.
module pattern_block #(
  parameter int N_IN         = bp_pkg::NET_N_IN,
  parameter int N_OUT        = bp_pkg::NET_N_OUT,
  parameter int W            = bp_pkg::NET_W,
  parameter int F            = bp_pkg::NET_F,
  parameter int N_PAT        = 16,
  parameter int CLKS_PER_BIT = 868,
  localparam int PI          = $clog2(N_PAT),
  localparam int PC          = $clog2(N_PAT + 1),
  localparam int PW          = N_IN + N_OUT
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     rxd,
  output logic                     txd,
  // towards the control and architecture blocks
  input  logic                     training,
  input  logic                     validation,
  input  logic [PI-1:0]            pat_idx,
  output logic [N_IN-1:0]          x,
  output logic [N_OUT-1:0]         t,
  output logic                     data_setting,
  output logic [PC-1:0]            n_train,
  output logic [PC-1:0]            n_valid,
  output logic                     query_req,
  input  logic                     query_done,
  input  logic [N_OUT-1:0][W-1:0]  query_y,
  input  logic [N_OUT-1:0]         query_ybit,
  // status reported to the PC
  input  logic                     done,
  input  logic                     converged,
  input  logic [15:0]              epoch
);
  import bp_pkg::*;

  localparam int RB = (N_OUT > 3) ? N_OUT : 3;    // answer buffer, bytes
  localparam int RW = $clog2(RB + 1);
  localparam logic signed [W-1:0] ONE = W'(1) <<< F;

  // ---- serial line ---------------------------------------------------------
  logic [7:0] rx_data, tx_data;
  logic       rx_valid, tx_send, tx_ready;

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk, .rst_n, .rxd, .data(rx_data), .valid(rx_valid)
  );
  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk, .rst_n, .send(tx_send), .data(tx_data), .ready(tx_ready), .txd
  );

  // ---- pattern memory ------------------------------------------------------
  logic [PW-1:0]   tmem [N_PAT];
  logic [PW-1:0]   vmem [N_PAT];
  logic [N_IN-1:0] query_x;
  logic [PW-1:0]   sel;

  always_comb begin
    if (training)        sel = tmem[pat_idx];
    else if (validation) sel = vmem[pat_idx];
    else                 sel = {{N_OUT{1'b0}}, query_x};
    x = sel[N_IN-1:0];
    t = sel[PW-1:N_IN];
  end

  // ---- command decoding and answers -----------------------------------------
  logic       have_hdr;
  logic [7:0] hdr;
  logic [7:0] rbuf [RB];
  logic [RW-1:0] rcnt, rptr;
  op_e        op;
  logic [4:0] idx;

  assign op  = op_e'(hdr[7:6]);
  assign idx = hdr[4:0];

  function automatic logic [PC-1:0] clamp_count(input logic [3:0] c);
    return (int'(c) + 1 > N_PAT) ? PC'(N_PAT) : PC'(int'(c) + 1);
  endfunction

  function automatic logic [6:0] frac7(input logic signed [W-1:0] v);
    if (v >= ONE)  return 7'h7F;
    else if (v < 0) return 7'h00;
    else           return v[F-1 -: 7];
  endfunction

  assign tx_data = rbuf[rptr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_hdr     <= 1'b0;
      hdr          <= '0;
      data_setting <= 1'b0;
      n_train      <= PC'(1);
      n_valid      <= PC'(1);
      query_req    <= 1'b0;
      query_x      <= '0;
      rcnt         <= '0;
      rptr         <= '0;
      tx_send      <= 1'b0;
      for (int n = 0; n < N_PAT; n++) begin
        tmem[n] <= '0;
        vmem[n] <= '0;
      end
      for (int n = 0; n < RB; n++) rbuf[n] <= '0;
    end else begin
      data_setting <= 1'b0;
      tx_send      <= 1'b0;

      // command bytes
      if (rx_valid) begin
        if (!have_hdr) begin
          hdr      <= rx_data;
          have_hdr <= 1'b1;
        end else begin
          have_hdr <= 1'b0;
          unique case (op)
            OP_WRITE_PAT: begin
              if (int'(idx) < N_PAT) begin
                if (hdr[5]) vmem[PI'(idx)] <= rx_data[PW-1:0];
                else        tmem[PI'(idx)] <= rx_data[PW-1:0];
              end
            end
            OP_START: begin
              n_train      <= clamp_count(rx_data[3:0]);
              n_valid      <= clamp_count(rx_data[7:4]);
              data_setting <= 1'b1;
            end
            OP_QUERY: begin
              if (!query_req && rcnt == '0) begin
                query_x   <= rx_data[N_IN-1:0];
                query_req <= 1'b1;
              end
            end
            OP_STATUS: begin
              if (!query_req && rcnt == '0) begin
                rbuf[0] <= {done, converged, training, validation, 4'b0};
                rbuf[1] <= epoch[15:8];
                rbuf[2] <= epoch[7:0];
                rptr    <= '0;
                rcnt    <= RW'(3);
              end
            end
            default: ;
          endcase
        end
      end

      // network answer to a recall
      if (query_done && query_req) begin
        query_req <= 1'b0;
        for (int k = 0; k < N_OUT; k++)
          rbuf[k] <= {query_ybit[k], frac7(signed'(query_y[k]))};
        rptr <= '0;
        rcnt <= RW'(N_OUT);
      end

      // send pending answer bytes, one at a time
      if (rcnt != '0 && tx_ready && !tx_send) begin
        tx_send <= 1'b1;
      end
      if (tx_send) begin
        rptr <= rptr + 1'b1;
        rcnt <= rcnt - 1'b1;
      end
    end
  end

  // The network only answers a recall that is pending, and a pending recall
  // is held until it is answered.
  a_answer: assert property (@(posedge clk) disable iff (!rst_n) query_done |-> query_req);
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           query_req && !query_done |=> query_req);

endmodule
