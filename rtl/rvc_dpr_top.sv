// Dynamically reconfigurable 4x4 Hadamard transform.
//
// One reconfigurable partition holds either the sequential (Hadamard-seq)
// or the pipelined (Hadamard-pip) architecture of the same transform, and
// the system switches between them at run time by writing a partial
// bitstream through the configuration port: the sequential module when
// power matters, the pipelined one when speed does.
//
// Parts:
//   u_icap : model of the configuration port and of the partition's
//            configuration memory (icap_config_model).  Its ports, icap_*,
//            are driven by the bitstream mover (a HWICAP peripheral on the
//            processor bus in the reference system, outside this RTL).
//   u_rp   : the partition (hadamard_rp), decoupled while a bitstream loads.
// The processor, the bus, the flash holding the bitstreams, the UART and the
// timer of the reference system are outside this RTL; the signals they would
// use are the top's ports.
//
// Data ports: 16 input and 16 output dataflow channels (valid/ready), block
// X in row-major order in, Y = floor(S*X*S/4) out (see hadamard_pkg).
// Reconfiguration: a partial bitstream of BITSTREAM_BYTES bytes written one
// 32-bit word per clock takes BITSTREAM_BYTES/4 clocks (48128 clocks,
// 481.28 us at 100 MHz, for 192512 bytes); `reconfiguring` is high for that
// time and `reconfig_done` pulses when the new module takes over.  Issue a
// reconfiguration only while `rp_busy` is low, or the block in flight is lost.
module rvc_dpr_top
  import hadamard_pkg::*;
#(
  parameter int unsigned IN_W            = 8,
  parameter int unsigned OUT_W           = IN_W + 2,
  parameter int unsigned BITSTREAM_BYTES_P = BITSTREAM_BYTES,
  parameter rm_e         INIT_RM         = RM_SEQ
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // Transform data
  input  logic                    in_valid [HAD_PORTS],
  output logic                    in_ready [HAD_PORTS],
  input  logic signed [IN_W-1:0]  in_data  [HAD_PORTS],
  output logic                    out_valid[HAD_PORTS],
  input  logic                    out_ready[HAD_PORTS],
  output logic signed [OUT_W-1:0] out_data [HAD_PORTS],
  // Configuration port (from the bitstream mover)
  input  logic                    icap_ce_n,
  input  logic                    icap_write_n,
  input  logic [ICAP_W-1:0]       icap_i,
  output logic [ICAP_W-1:0]       icap_o,
  output logic                    icap_busy,
  // Status (to the processor)
  output rm_e                     active_rm,
  output logic                    reconfiguring,
  output logic                    reconfig_done,
  output logic                    rp_busy
);

  icap_config_model #(.BYTES(BITSTREAM_BYTES_P), .INIT_RM(INIT_RM)) u_icap (
    .CLK(clk), .CE(icap_ce_n), .WRITE(icap_write_n), .I(icap_i), .O(icap_o),
    .BUSY(icap_busy),
    .rst_n, .loaded_rm(active_rm), .loading(reconfiguring),
    .load_done(reconfig_done)
  );

  hadamard_rp #(.IN_W(IN_W), .OUT_W(OUT_W)) u_rp (
    .clk, .rst_n,
    .active_rm, .decouple(reconfiguring),
    .in_valid, .in_ready, .in_data,
    .out_valid, .out_ready, .out_data,
    .busy(rp_busy)
  );

endmodule
