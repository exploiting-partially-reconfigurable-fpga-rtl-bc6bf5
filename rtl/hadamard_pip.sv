// Hadamard-pip: pipelined 4x4 Hadamard transform built from 12 actors.
//
// The 16 input ports carry the block X in row-major order and the 16 output
// ports carry Y = floor(S*X*S / 4) in the same order (see hadamard_pkg).
// Three ranks of four actors work in parallel:
//   rank 1, actor i : row transform of row i      T[i][c] = sum_j X[i][j] S[j][c]
//   rank 2, actor c : column transform of column c U[r][c] = sum_i S[r][i] T[i][c]
//   rank 3, actor r : scaling of row r            Y[r][c] = U[r][c] >>> 2
// Output port c of rank-1 actor i feeds input port i of rank-2 actor c, and
// output port r of rank-2 actor c feeds input port c of rank-3 actor r, so
// every channel between ranks is a single one-token link.
//
// Timing: each rank registers its results, so a block entering on cycle t
// leaves on cycle t+3, and with the outputs always ready one block is taken
// per clock.  Backpressure on any output port stalls the ranks behind it.
// Widths grow by two bits per butterfly rank (IN_W -> IN_W+2 -> IN_W+4) and
// the scaling rank brings them back to IN_W+2.
//
// Twelve actors in three ranks of four follow the pipelined architecture
// this design implements; the assignment of rows, columns and scaling to
// the ranks is this design's choice.
module hadamard_pip
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

  localparam int unsigned W1 = IN_W + 2;   // after the row transform
  localparam int unsigned W2 = IN_W + 4;   // after the column transform

  // Channels, indexed [actor][port] from the consumer's side.
  logic                 c1_valid [HAD_N][HAD_N];  // rank 1 -> rank 2
  logic                 c1_ready [HAD_N][HAD_N];
  logic signed [W1-1:0] c1_data  [HAD_N][HAD_N];
  logic                 c2_valid [HAD_N][HAD_N];  // rank 2 -> rank 3
  logic                 c2_ready [HAD_N][HAD_N];
  logic signed [W2-1:0] c2_data  [HAD_N][HAD_N];

  // Producer-side views of the same channels.
  logic                 r1_ov [HAD_N][HAD_N];
  logic                 r1_or [HAD_N][HAD_N];
  logic signed [W1-1:0] r1_od [HAD_N][HAD_N];
  logic                 r2_ov [HAD_N][HAD_N];
  logic                 r2_or [HAD_N][HAD_N];
  logic signed [W2-1:0] r2_od [HAD_N][HAD_N];

  logic                    r0_iv [HAD_N][HAD_N];
  logic                    r0_ir [HAD_N][HAD_N];
  logic signed [IN_W-1:0]  r0_id [HAD_N][HAD_N];
  logic                    r3_ov [HAD_N][HAD_N];
  logic                    r3_or [HAD_N][HAD_N];
  logic signed [OUT_W-1:0] r3_od [HAD_N][HAD_N];

  for (genvar a = 0; a < HAD_N; a++) begin : g_wire
    for (genvar p = 0; p < HAD_N; p++) begin : g_port
      // Block inputs: port 4*a+p is X[a][p], for rank-1 actor a.
      assign r0_iv[a][p]            = in_valid[HAD_N*a+p];
      assign r0_id[a][p]            = in_data[HAD_N*a+p];
      assign in_ready[HAD_N*a+p]    = r0_ir[a][p];
      // Rank-1 actor a, port p  ->  rank-2 actor p, port a.
      assign c1_valid[p][a] = r1_ov[a][p];
      assign c1_data[p][a]  = r1_od[a][p];
      assign r1_or[a][p]    = c1_ready[p][a];
      // Rank-2 actor a, port p  ->  rank-3 actor p, port a.
      assign c2_valid[p][a] = r2_ov[a][p];
      assign c2_data[p][a]  = r2_od[a][p];
      assign r2_or[a][p]    = c2_ready[p][a];
      // Rank-3 actor a, port p is Y[a][p].
      assign out_valid[HAD_N*a+p] = r3_ov[a][p];
      assign out_data[HAD_N*a+p]  = r3_od[a][p];
      assign r3_or[a][p]          = out_ready[HAD_N*a+p];
    end

    hadamard_actor #(.OP(OP_WHT4), .IW(IN_W), .OW(W1)) u_row (
      .clk, .rst_n,
      .in_valid (r0_iv[a]), .in_ready (r0_ir[a]), .in_data (r0_id[a]),
      .out_valid(r1_ov[a]), .out_ready(r1_or[a]), .out_data(r1_od[a])
    );

    hadamard_actor #(.OP(OP_WHT4), .IW(W1), .OW(W2)) u_col (
      .clk, .rst_n,
      .in_valid (c1_valid[a]), .in_ready (c1_ready[a]), .in_data (c1_data[a]),
      .out_valid(r2_ov[a]),    .out_ready(r2_or[a]),    .out_data(r2_od[a])
    );

    hadamard_actor #(.OP(OP_SCALE), .IW(W2), .OW(OUT_W)) u_scale (
      .clk, .rst_n,
      .in_valid (c2_valid[a]), .in_ready (c2_ready[a]), .in_data (c2_data[a]),
      .out_valid(r3_ov[a]),    .out_ready(r3_or[a]),    .out_data(r3_od[a])
    );
  end

  // Busy while any token is inside the module.
  always_comb begin
    busy = 1'b0;
    for (int a = 0; a < HAD_N; a++)
      for (int p = 0; p < HAD_N; p++)
        busy |= r1_ov[a][p] | r2_ov[a][p] | r3_ov[a][p];
  end

endmodule
