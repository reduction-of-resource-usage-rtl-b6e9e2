// architecture_block: the neural network itself, a fully connected
// N_IN - N_HID - N_OUT perceptron trained on line by back-propagation.
//
// The block holds every weight and bias in registers. A pass is started with
// a one-cycle start pulse; x (binary inputs) and t (binary targets) are
// captured at that edge. It then steps through one state per layer, every
// neuron of a layer working in parallel:
//   A_HIDDEN : zin_j = v0j + sum_i x_i*vij,  z_j = f(zin_j)
//   A_OUTPUT : yin_k = w0k + sum_j z_j*wjk,  y_k = f(yin_k),
//              error = sum_k (t_k - y_k)^2
//   A_DELTA  : d_k = (t_k - y_k) f'(yin_k),  d_j = f'(zin_j) sum_k d_k wjk
//   A_UPDATE : wjk += alpha d_k z_j,  w0k += alpha d_k,
//              vij += alpha d_j x_i,  v0j += alpha d_j
// With train = 0 only the two forward states run (the recall and
// validation pass). f is sigmoid_unit and f' = f(1-f).
//
// Timing, counting the clock edge that samples start as edge 0: y, y_bit and
// error are updated and s_error pulses at edge 2; for a training pass the
// weights are updated and s_train pulses at edge 4. busy is high from edge 0
// until the pass ends; start is ignored while busy.
//
// Number format: signed fixed point, W bits with F fraction bits. Products
// are rounded to nearest; sums and products saturate. Because the inputs are
// binary, x_i*vij is a selection, not a multiplication. alpha = 2**-ALPHA_SHIFT
// (0.5 by default, as in the source), applied as a rounding shift.
//
// Weights are loaded one at a time through w_init_*: index j*(N_IN+1)+i holds
// vij (i = 0 is the bias v0j), and index N_HID*(N_IN+1) + k*(N_HID+1) + j
// holds wjk (j = 0 is the bias w0k). wts shows every weight in that order.
//
// The layer equations, biases on every hidden and output neuron and alpha
// follow the source; the delta rule is the standard gradient-descent one, and
// the per-layer sequencing, number format and rounding are this design's.
module architecture_block #(
  parameter int N_IN        = bp_pkg::NET_N_IN,
  parameter int N_HID       = bp_pkg::NET_N_HID,
  parameter int N_OUT       = bp_pkg::NET_N_OUT,
  parameter int W           = bp_pkg::NET_W,
  parameter int F           = bp_pkg::NET_F,
  parameter int ALPHA_SHIFT = bp_pkg::NET_ALPHA_SHIFT,
  localparam int NW         = N_HID * (N_IN + 1) + N_OUT * (N_HID + 1),
  localparam int IW         = $clog2(NW)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // weight initialisation
  input  logic                       w_init_we,
  input  logic [IW-1:0]              w_init_idx,
  input  logic signed [W-1:0]        w_init_val,
  // pass control
  input  logic                       start,
  input  logic                       train,
  input  logic [N_IN-1:0]            x,
  input  logic [N_OUT-1:0]           t,
  output logic                       busy,
  output logic                       s_train,
  output logic                       s_error,
  output logic signed [W-1:0]        error,
  output logic [N_OUT-1:0][W-1:0]    y,
  output logic [N_OUT-1:0]           y_bit,
  output logic [NW-1:0][W-1:0]       wts
);
  import bp_pkg::*;

  localparam logic signed [W-1:0] ONE  = W'(1) <<< F;
  localparam logic signed [W-1:0] HALF = W'(1) <<< (F - 1);
  localparam logic signed [W-1:0] MAXV = {1'b0, {(W-1){1'b1}}};
  localparam logic signed [W-1:0] MINV = {1'b1, {(W-1){1'b0}}};
  localparam int VBASE = 0;
  localparam int WBASE = N_HID * (N_IN + 1);

  // ---- fixed-point helpers -------------------------------------------------
  function automatic logic signed [W-1:0] sat(input logic signed [2*W+1:0] a);
    if (a > (2*W+2)'(MAXV))      return MAXV;
    else if (a < (2*W+2)'(MINV)) return MINV;
    else                         return W'(a);
  endfunction

  function automatic logic signed [W-1:0] fx_add(input logic signed [W-1:0] a,
                                                 input logic signed [W-1:0] b);
    return sat((2*W+2)'(a) + (2*W+2)'(b));
  endfunction

  function automatic logic signed [W-1:0] fx_mul(input logic signed [W-1:0] a,
                                                 input logic signed [W-1:0] b);
    logic signed [2*W+1:0] p;
    p = (2*W+2)'(a) * (2*W+2)'(b);
    return sat((p + ((2*W+2)'(1) <<< (F - 1))) >>> F);
  endfunction

  function automatic logic signed [W-1:0] fx_alpha(input logic signed [W-1:0] a);
    if (ALPHA_SHIFT == 0) return a;
    return W'(((W+1)'(a) + ((W+1)'(1) <<< (ALPHA_SHIFT - 1))) >>> ALPHA_SHIFT);
  endfunction

  // ---- state ---------------------------------------------------------------
  arch_state_e state;
  logic                    train_q;
  logic [N_IN-1:0]         x_q;
  logic [N_OUT-1:0]        t_q;
  logic signed [W-1:0]     wreg  [NW];
  logic signed [W-1:0]     z_q   [N_HID];
  logic signed [W-1:0]     dz_q  [N_HID];
  logic signed [W-1:0]     y_q   [N_OUT];
  logic signed [W-1:0]     dy_q  [N_OUT];
  logic signed [W-1:0]     dk_q  [N_OUT];
  logic signed [W-1:0]     dj_q  [N_HID];

  // ---- hidden layer --------------------------------------------------------
  logic signed [W-1:0] zin [N_HID];
  logic signed [W-1:0] z_c [N_HID];
  logic signed [W-1:0] dz_c [N_HID];

  always_comb begin
    for (int j = 0; j < N_HID; j++) begin
      zin[j] = wreg[VBASE + j*(N_IN+1)];
      for (int i = 0; i < N_IN; i++)
        if (x_q[i]) zin[j] = fx_add(zin[j], wreg[VBASE + j*(N_IN+1) + i + 1]);
    end
  end

  for (genvar j = 0; j < N_HID; j++) begin : g_hid
    sigmoid_unit #(.W(W), .F(F)) u_f (.x(zin[j]), .y(z_c[j]), .dy(dz_c[j]));
  end

  // ---- output layer --------------------------------------------------------
  logic signed [W-1:0] yin  [N_OUT];
  logic signed [W-1:0] y_c  [N_OUT];
  logic signed [W-1:0] dy_c [N_OUT];
  logic signed [W-1:0] err_c;

  always_comb begin
    for (int k = 0; k < N_OUT; k++) begin
      yin[k] = wreg[WBASE + k*(N_HID+1)];
      for (int j = 0; j < N_HID; j++)
        yin[k] = fx_add(yin[k], fx_mul(z_q[j], wreg[WBASE + k*(N_HID+1) + j + 1]));
    end
  end

  for (genvar k = 0; k < N_OUT; k++) begin : g_out
    sigmoid_unit #(.W(W), .F(F)) u_f (.x(yin[k]), .y(y_c[k]), .dy(dy_c[k]));
  end

  always_comb begin
    logic signed [W-1:0] e;
    err_c = '0;
    for (int k = 0; k < N_OUT; k++) begin
      e     = (t_q[k] ? ONE : W'(0)) - y_c[k];
      err_c = fx_add(err_c, fx_mul(e, e));
    end
  end

  // ---- deltas --------------------------------------------------------------
  logic signed [W-1:0] dk_c [N_OUT];
  logic signed [W-1:0] dj_c [N_HID];

  always_comb begin
    logic signed [W-1:0] din;
    for (int k = 0; k < N_OUT; k++)
      dk_c[k] = fx_mul((t_q[k] ? ONE : W'(0)) - y_q[k], dy_q[k]);
    for (int j = 0; j < N_HID; j++) begin
      din = '0;
      for (int k = 0; k < N_OUT; k++)
        din = fx_add(din, fx_mul(dk_c[k], wreg[WBASE + k*(N_HID+1) + j + 1]));
      dj_c[j] = fx_mul(din, dz_q[j]);
    end
  end

  // ---- sequencing and registers --------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= A_IDLE;
      train_q <= 1'b0;
      x_q     <= '0;
      t_q     <= '0;
      s_train <= 1'b0;
      s_error <= 1'b0;
      error   <= '0;
      for (int n = 0; n < NW; n++)    wreg[n] <= '0;
      for (int j = 0; j < N_HID; j++) begin
        z_q[j] <= '0; dz_q[j] <= '0; dj_q[j] <= '0;
      end
      for (int k = 0; k < N_OUT; k++) begin
        y_q[k] <= '0; dy_q[k] <= '0; dk_q[k] <= '0;
      end
    end else begin
      s_train <= 1'b0;
      s_error <= 1'b0;
      unique case (state)
        A_IDLE: begin
          if (w_init_we && int'(w_init_idx) < NW) wreg[w_init_idx] <= w_init_val;
          if (start) begin
            x_q     <= x;
            t_q     <= t;
            train_q <= train;
            state   <= A_HIDDEN;
          end
        end
        A_HIDDEN: begin
          for (int j = 0; j < N_HID; j++) begin
            z_q[j]  <= z_c[j];
            dz_q[j] <= dz_c[j];
          end
          state <= A_OUTPUT;
        end
        A_OUTPUT: begin
          for (int k = 0; k < N_OUT; k++) begin
            y_q[k]  <= y_c[k];
            dy_q[k] <= dy_c[k];
          end
          error   <= err_c;
          s_error <= 1'b1;
          state   <= train_q ? A_DELTA : A_IDLE;
        end
        A_DELTA: begin
          for (int k = 0; k < N_OUT; k++) dk_q[k] <= dk_c[k];
          for (int j = 0; j < N_HID; j++) dj_q[j] <= dj_c[j];
          state <= A_UPDATE;
        end
        A_UPDATE: begin
          for (int k = 0; k < N_OUT; k++) begin
            wreg[WBASE + k*(N_HID+1)] <= fx_add(wreg[WBASE + k*(N_HID+1)], fx_alpha(dk_q[k]));
            for (int j = 0; j < N_HID; j++)
              wreg[WBASE + k*(N_HID+1) + j + 1] <=
                fx_add(wreg[WBASE + k*(N_HID+1) + j + 1], fx_alpha(fx_mul(dk_q[k], z_q[j])));
          end
          for (int j = 0; j < N_HID; j++) begin
            wreg[VBASE + j*(N_IN+1)] <= fx_add(wreg[VBASE + j*(N_IN+1)], fx_alpha(dj_q[j]));
            for (int i = 0; i < N_IN; i++)
              if (x_q[i])
                wreg[VBASE + j*(N_IN+1) + i + 1] <=
                  fx_add(wreg[VBASE + j*(N_IN+1) + i + 1], fx_alpha(dj_q[j]));
          end
          s_train <= 1'b1;
          state   <= A_IDLE;
        end
        default: state <= A_IDLE;
      endcase
    end
  end

  assign busy = (state != A_IDLE);

  always_comb begin
    for (int k = 0; k < N_OUT; k++) begin
      y[k]     = y_q[k];
      y_bit[k] = (y_q[k] >= HALF);
    end
    for (int n = 0; n < NW; n++) wts[n] = wreg[n];
  end

  // A forward result and a finished update are never reported together, and
  // weights are only loaded while no pass is running.
  a_pulses: assert property (@(posedge clk) disable iff (!rst_n) !(s_train && s_error));
  a_init_idle: assert property (@(posedge clk) disable iff (!rst_n) w_init_we |-> !busy);

endmodule
