// bp_fpga_top: a back-propagation trainer for a small neural network, built
// from three blocks.
//
//   pattern block      RS-232 link to a PC and the pattern memory
//   control block      weight initialisation from an LFSR, training epochs,
//                      validation after every epoch, recall queries
//   architecture block the N_IN-N_HID-N_OUT network (2-2-1 by default, sized
//                      for the XOR function) with on-chip learning
//
// The control block drives training / validation / pat_idx into the pattern
// block, which returns the selected pattern (input bits x, target bits t) to
// the architecture block; the pattern block reports data_setting to the
// control block; the architecture block returns s_train, s_error and error to
// the control block. The PC talks to the design over uart_rxd / uart_txd
// (8N1, CLKS_PER_BIT clocks per bit; 115200 baud at 100 MHz by default).
// The status outputs mirror the control block; val_err is the summed squared
// error of the last validation pass (F fraction bits).
// The three-block split and the signal names between blocks follow the
// source; the byte protocol, number format and stopping rule are this
// design's choice (see the blocks).
module bp_fpga_top #(
  parameter int N_IN         = bp_pkg::NET_N_IN,
  parameter int N_HID        = bp_pkg::NET_N_HID,
  parameter int N_OUT        = bp_pkg::NET_N_OUT,
  parameter int W            = bp_pkg::NET_W,
  parameter int F            = bp_pkg::NET_F,
  parameter int ALPHA_SHIFT  = bp_pkg::NET_ALPHA_SHIFT,
  parameter int N_PAT        = 16,
  parameter int CLKS_PER_BIT = 868,
  parameter int MAX_EPOCHS   = 20000,
  parameter int ERR_GOAL     = 205,
  parameter logic [15:0] SEED = 16'hACE1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        uart_rxd,
  output logic        uart_txd,
  output logic        training,
  output logic        validation,
  output logic        done,
  output logic        converged,
  output logic [15:0] epoch,
  output logic [23:0] val_err
);

  localparam int NW = N_HID * (N_IN + 1) + N_OUT * (N_HID + 1);
  localparam int IW = $clog2(NW);
  localparam int PI = $clog2(N_PAT);
  localparam int PC = $clog2(N_PAT + 1);

  logic [PI-1:0]            pat_idx;
  logic [N_IN-1:0]          x;
  logic [N_OUT-1:0]         t;
  logic                     data_setting;
  logic [PC-1:0]            n_train, n_valid;
  logic                     query_req, query_done;
  logic [N_OUT-1:0][W-1:0]  query_y, y;
  logic [N_OUT-1:0]         query_ybit, y_bit;
  logic                     arch_start, arch_train;
  logic                     s_train, s_error;
  logic signed [W-1:0]      error;
  logic                     w_init_we;
  logic [IW-1:0]            w_init_idx;
  logic signed [W-1:0]      w_init_val;

  pattern_block #(
    .N_IN(N_IN), .N_OUT(N_OUT), .W(W), .F(F), .N_PAT(N_PAT), .CLKS_PER_BIT(CLKS_PER_BIT)
  ) u_pattern (
    .clk, .rst_n, .rxd(uart_rxd), .txd(uart_txd),
    .training, .validation, .pat_idx, .x, .t,
    .data_setting, .n_train, .n_valid,
    .query_req, .query_done, .query_y, .query_ybit,
    .done, .converged, .epoch
  );

  control_block #(
    .N_IN(N_IN), .N_HID(N_HID), .N_OUT(N_OUT), .W(W), .F(F), .N_PAT(N_PAT),
    .MAX_EPOCHS(MAX_EPOCHS), .ERR_GOAL(ERR_GOAL), .SEED(SEED)
  ) u_control (
    .clk, .rst_n,
    .data_setting, .n_train, .n_valid,
    .training, .validation, .pat_idx,
    .query_req, .query_done, .query_y, .query_ybit,
    .arch_start, .arch_train, .s_train, .s_error, .error, .y, .y_bit,
    .w_init_we, .w_init_idx, .w_init_val,
    .done, .converged, .epoch, .val_err
  );

  architecture_block #(
    .N_IN(N_IN), .N_HID(N_HID), .N_OUT(N_OUT), .W(W), .F(F), .ALPHA_SHIFT(ALPHA_SHIFT)
  ) u_arch (
    .clk, .rst_n,
    .w_init_we, .w_init_idx, .w_init_val,
    .start(arch_start), .train(arch_train), .x, .t,
    .busy(), .s_train, .s_error, .error, .y, .y_bit, .wts()
  );

endmodule
