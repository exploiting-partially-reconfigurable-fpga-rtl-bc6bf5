// One actor of the pipelined Hadamard module (Hadamard-pip).
//
// The actor has four input ports and four output ports, each a one-token
// dataflow channel with valid/ready.  It fires when every input port holds a
// token and every output port can take one (its slot is empty or is being
// read in the same clock); a firing consumes the four input tokens and puts
// one result token on each output port.  Each output port owns a one-token
// register (synchronous, active-low reset), so results appear one clock after the firing and a full
// pipeline of actors moves one token set per clock.
//
// OP_WHT4 computes the 4-point Hadamard butterfly in Sylvester order,
//   y0 = a+b+c+d, y1 = a-b+c-d, y2 = a+b-c-d, y3 = a-b-c+d,
// using two levels of add/subtract; the outputs grow by two bits.
// OP_SCALE divides each input by 4 with an arithmetic shift (floor); the
// outputs shrink by two bits.
//
// Three ranks of four actors running in parallel, with intermediate
// results passed from rank to rank, is the structure of the pipelined
// module; the split of work between the ranks (rows, columns, scaling), the
// one-token channels and the integer scaling are this design's choices.
module hadamard_actor
  import hadamard_pkg::*;
#(
  parameter actor_op_e   OP = OP_WHT4,
  parameter int unsigned IW = 8,
  parameter int unsigned OW = (OP == OP_WHT4) ? IW + 2 : IW - 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid [HAD_N],
  output logic                 in_ready [HAD_N],
  input  logic signed [IW-1:0] in_data  [HAD_N],
  output logic                 out_valid[HAD_N],
  input  logic                 out_ready[HAD_N],
  output logic signed [OW-1:0] out_data [HAD_N]
);

  logic                 all_in;
  logic                 all_out_free;
  logic                 fire;
  logic signed [OW-1:0] result [HAD_N];

  always_comb begin
    all_in       = 1'b1;
    all_out_free = 1'b1;
    for (int p = 0; p < HAD_N; p++) begin
      all_in       &= in_valid[p];
      all_out_free &= (!out_valid[p] || out_ready[p]);
    end
    fire = all_in && all_out_free;
    for (int p = 0; p < HAD_N; p++) in_ready[p] = fire;
  end

  // Datapath: butterfly or scaling.
  always_comb begin
    logic signed [IW+1:0] s0, d0, s1, d1;
    s0 = '0; d0 = '0; s1 = '0; d1 = '0;
    for (int p = 0; p < HAD_N; p++) result[p] = '0;
    if (OP == OP_WHT4) begin
      s0 = (IW+2)'(in_data[0]) + (IW+2)'(in_data[1]);
      d0 = (IW+2)'(in_data[0]) - (IW+2)'(in_data[1]);
      s1 = (IW+2)'(in_data[2]) + (IW+2)'(in_data[3]);
      d1 = (IW+2)'(in_data[2]) - (IW+2)'(in_data[3]);
      result[0] = OW'(s0 + s1);
      result[1] = OW'(d0 + d1);
      result[2] = OW'(s0 - s1);
      result[3] = OW'(d0 - d1);
    end else begin
      for (int p = 0; p < HAD_N; p++) result[p] = OW'(in_data[p] >>> 2);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int p = 0; p < HAD_N; p++) begin
        out_valid[p] <= 1'b0;
        out_data[p]  <= '0;
      end
    end else begin
      for (int p = 0; p < HAD_N; p++) begin
        if (fire) begin
          out_valid[p] <= 1'b1;
          out_data[p]  <= result[p];
        end else if (out_ready[p]) begin
          out_valid[p] <= 1'b0;
        end
      end
    end
  end

  // A token offered on an output port stays, unchanged, until it is taken.
  for (genvar p = 0; p < HAD_N; p++) begin : g_chk
    a_hold : assert property (@(posedge clk) disable iff (!rst_n)
      out_valid[p] && !out_ready[p] |=> out_valid[p] && $stable(out_data[p]));
  end

endmodule
