// Reconfigurable partition holding one 4x4 Hadamard transform module.
//
// The partition is the region of the device that dynamic partial
// reconfiguration rewrites.  It holds either Hadamard-seq (low power) or
// Hadamard-pip (high speed), both with the same 16-in/16-out dataflow ports.
// In simulation both modules are instantiated; `active_rm` says which one
// the configuration memory currently holds, and the other is kept in reset
// with its inputs closed, so it neither takes nor produces tokens.
//
// While `decouple` is high (a partial bitstream is being written) the
// partition is isolated: no input is accepted, no output is offered and both
// modules are held in reset, so the newly loaded module starts from its
// reset state.  A reconfiguration discards any block still inside the
// partition; `busy` tells the controlling processor when the partition is
// empty and a switch loses nothing.
//
// Swapping two architectures of one algorithm in one partition follows the
// reconfiguration scheme this design implements; the isolation during the
// load, the reset of the new module and the `busy` status are this design's
// choices.  Everything here is combinational around the two modules, so the
// latencies are theirs: 3 clocks for Hadamard-pip, 17 clocks per block for
// Hadamard-seq.
module hadamard_rp
  import hadamard_pkg::*;
#(
  parameter int unsigned IN_W  = 8,
  parameter int unsigned OUT_W = IN_W + 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  rm_e                     active_rm,
  input  logic                    decouple,
  input  logic                    in_valid [HAD_PORTS],
  output logic                    in_ready [HAD_PORTS],
  input  logic signed [IN_W-1:0]  in_data  [HAD_PORTS],
  output logic                    out_valid[HAD_PORTS],
  input  logic                    out_ready[HAD_PORTS],
  output logic signed [OUT_W-1:0] out_data [HAD_PORTS],
  output logic                    busy
);

  logic seq_rst_n, pip_rst_n;
  logic seq_on, pip_on;

  logic                    seq_iv [HAD_PORTS], pip_iv [HAD_PORTS];
  logic                    seq_ir [HAD_PORTS], pip_ir [HAD_PORTS];
  logic                    seq_ov [HAD_PORTS], pip_ov [HAD_PORTS];
  logic                    seq_or [HAD_PORTS], pip_or [HAD_PORTS];
  logic signed [OUT_W-1:0] seq_od [HAD_PORTS], pip_od [HAD_PORTS];
  logic                    seq_busy, pip_busy;

  assign seq_on    = !decouple && (active_rm == RM_SEQ);
  assign pip_on    = !decouple && (active_rm == RM_PIP);
  assign seq_rst_n = rst_n && seq_on;
  assign pip_rst_n = rst_n && pip_on;

  always_comb begin
    for (int p = 0; p < HAD_PORTS; p++) begin
      seq_iv[p]    = in_valid[p] && seq_on;
      pip_iv[p]    = in_valid[p] && pip_on;
      seq_or[p]    = out_ready[p] && seq_on;
      pip_or[p]    = out_ready[p] && pip_on;
      in_ready[p]  = (seq_on && seq_ir[p]) || (pip_on && pip_ir[p]);
      out_valid[p] = (seq_on && seq_ov[p]) || (pip_on && pip_ov[p]);
      out_data[p]  = pip_on ? pip_od[p] : seq_od[p];
    end
    busy = (seq_on && seq_busy) || (pip_on && pip_busy);
  end

  hadamard_seq #(.IN_W(IN_W), .OUT_W(OUT_W)) u_seq (
    .clk, .rst_n(seq_rst_n),
    .in_valid(seq_iv), .in_ready(seq_ir), .in_data,
    .out_valid(seq_ov), .out_ready(seq_or), .out_data(seq_od),
    .busy(seq_busy)
  );

  hadamard_pip #(.IN_W(IN_W), .OUT_W(OUT_W)) u_pip (
    .clk, .rst_n(pip_rst_n),
    .in_valid(pip_iv), .in_ready(pip_ir), .in_data,
    .out_valid(pip_ov), .out_ready(pip_or), .out_data(pip_od),
    .busy(pip_busy)
  );

endmodule
