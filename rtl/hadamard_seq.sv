// Hadamard-seq: sequential 4x4 Hadamard transform, one actor with 17 actions.
//
// Same ports and same result as Hadamard-pip: 16 input ports carrying the
// block X in row-major order, 16 output ports carrying
// Y = floor(S*X*S / 4) (see hadamard_pkg).  A finite state machine lets
// exactly one action be eligible in each state:
//   READ       : fires when all 16 input ports hold a token; stores them.
//   OUT_k      : k = 0..15, computes output k as a signed sum of the 16
//                stored samples, Y[r][c] = (sum_ij S[r][i] S[j][c] X[i][j]) >>> 2
//                with k = 4r+c, and sends it on output port k.
// The state register is {phase, k}; the 17 states are READ and OUT_0..OUT_15.
//
// The outputs share one result register: output port k is valid while the
// register holds the token of action k.  An action fires when the register
// is empty or its token is taken in the same clock, so with ready outputs
// a block takes 17 clocks: one to read, one per output.  READ may fire while
// the last output of the previous block is still waiting.  Reset is
// synchronous and active low.
//
// One actor, 17 actions, a state machine and one output per computing
// action follow the sequential architecture this design implements; the
// shared result register, the handshake and the integer scaling are this
// design's choices.
module hadamard_seq
  import hadamard_pkg::*;
#(
  parameter int unsigned IN_W  = 8,
  parameter int unsigned OUT_W = IN_W + 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid [HAD_PORTS],
  output logic                    in_ready [HAD_PORTS],
  input  logic signed [IN_W-1:0]  in_data  [HAD_PORTS],
  output logic                    out_valid[HAD_PORTS],
  input  logic                    out_ready[HAD_PORTS],
  output logic signed [OUT_W-1:0] out_data [HAD_PORTS],
  output logic                    busy
);

  localparam int unsigned SUM_W = IN_W + 4;   // sum of 16 samples
  localparam int unsigned IDX_W = $clog2(HAD_PORTS);

  typedef enum logic { PH_READ = 1'b0, PH_OUT = 1'b1 } phase_e;

  phase_e                  phase_q;
  logic [IDX_W-1:0]        idx_q;       // action k while in PH_OUT
  logic signed [IN_W-1:0]  x_q [HAD_PORTS];
  logic                    res_valid_q;
  logic [IDX_W-1:0]        res_idx_q;   // output port of the held token
  logic signed [OUT_W-1:0] res_q;

  logic                    all_in;
  logic                    slot_free;
  logic                    fire_read;
  logic                    fire_out;
  logic signed [SUM_W-1:0] sum;

  always_comb begin
    all_in = 1'b1;
    for (int p = 0; p < HAD_PORTS; p++) all_in &= in_valid[p];
    slot_free = !res_valid_q || out_ready[res_idx_q];
    fire_read = (phase_q == PH_READ) && all_in;
    fire_out  = (phase_q == PH_OUT) && slot_free;
    for (int p = 0; p < HAD_PORTS; p++) in_ready[p] = fire_read;
  end

  // Computing action k: signed sum of all stored samples.
  always_comb begin
    logic [HAD_M-1:0] r, c;
    r   = idx_q[IDX_W-1:HAD_M];
    c   = idx_q[HAD_M-1:0];
    sum = '0;
    for (int i = 0; i < HAD_N; i++) begin
      for (int j = 0; j < HAD_N; j++) begin
        if (had_neg(r, HAD_M'(i)) ^ had_neg(HAD_M'(j), c))
          sum = sum - SUM_W'(x_q[HAD_N*i+j]);
        else
          sum = sum + SUM_W'(x_q[HAD_N*i+j]);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase_q     <= PH_READ;
      idx_q       <= '0;
      res_valid_q <= 1'b0;
      res_idx_q   <= '0;
      res_q       <= '0;
      for (int p = 0; p < HAD_PORTS; p++) x_q[p] <= '0;
    end else begin
      if (fire_read) begin
        for (int p = 0; p < HAD_PORTS; p++) x_q[p] <= in_data[p];
        phase_q <= PH_OUT;
        idx_q   <= '0;
      end
      if (fire_out) begin
        res_valid_q <= 1'b1;
        res_idx_q   <= idx_q;
        res_q       <= OUT_W'(sum >>> 2);
        idx_q       <= idx_q + 1'b1;
        if (idx_q == IDX_W'(HAD_PORTS - 1)) phase_q <= PH_READ;
      end else if (slot_free) begin
        res_valid_q <= 1'b0;
      end
    end
  end

  always_comb begin
    for (int p = 0; p < HAD_PORTS; p++) begin
      out_valid[p] = res_valid_q && (res_idx_q == IDX_W'(p));
      out_data[p]  = res_q;
    end
  end

  assign busy = (phase_q == PH_OUT) || res_valid_q;

  // Exactly one action may fire in a clock, and an offered token is held.
  a_one_action : assert property (@(posedge clk) disable iff (!rst_n)
    !(fire_read && fire_out));
  a_hold : assert property (@(posedge clk) disable iff (!rst_n)
    res_valid_q && !out_ready[res_idx_q] |=> res_valid_q && $stable(res_q) && $stable(res_idx_q));

endmodule
