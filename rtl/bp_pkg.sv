// bp_pkg: constants and types shared by the back-propagation trainer.
//
// The network works in signed two's-complement fixed point: NET_W bits in
// total, NET_F of them after the binary point (18/12 here, so values run from
// -32 to +32 in steps of 1/4096). 18 bits was chosen because it is one operand
// width of the FPGA multiplier slices; the format itself is this design's
// choice. The package also holds the serial command opcodes and the state
// encoding of the control block.
package bp_pkg;

  localparam int NET_W = 18;   // fixed-point word width
  localparam int NET_F = 12;   // fraction bits

  // Default network shape: 2 inputs, 2 hidden neurons, 1 output (XOR).
  localparam int NET_N_IN  = 2;
  localparam int NET_N_HID = 2;
  localparam int NET_N_OUT = 1;

  // Learning rate alpha = 2**-ALPHA_SHIFT (0.5).
  localparam int NET_ALPHA_SHIFT = 1;

  // Serial command opcodes (bits [7:6] of a command header byte).
  typedef enum logic [1:0] {
    OP_WRITE_PAT = 2'd0,   // data byte = {target, input}, header[5] = set, header[4:0] = index
    OP_START     = 2'd1,   // data byte = {n_valid-1, n_train-1}
    OP_QUERY     = 2'd2,   // data byte = input bits; answer one byte per output
    OP_STATUS    = 2'd3    // answer {flags}, epoch[15:8], epoch[7:0]
  } op_e;

  // Control block states.
  typedef enum logic [3:0] {
    C_IDLE,        // waiting for patterns / serving queries
    C_INIT,        // loading random initial weights
    C_TRAIN,       // start a training step on pattern pat_idx
    C_TRAIN_WAIT,  // wait for s_train
    C_VALID,       // start a feed-forward pass on validation pattern pat_idx
    C_VALID_WAIT,  // wait for s_error
    C_EVAL,        // ask the validation unit for its verdict
    C_EVAL_WAIT,   // wait for the verdict
    C_QUERY_WAIT   // recall pass for a PC query
  } ctrl_state_e;

  // Architecture block states.
  typedef enum logic [2:0] {
    A_IDLE,
    A_HIDDEN,   // hidden-layer net inputs and activations
    A_OUTPUT,   // output-layer net inputs, activations and error
    A_DELTA,    // output and hidden deltas
    A_UPDATE    // weight and bias update
  } arch_state_e;

endpackage
