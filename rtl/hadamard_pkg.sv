// Shared types and constants for the reconfigurable 4x4 Hadamard transform.
//
// The transform works on a 4x4 block X of signed samples, carried on 16
// ports in row-major order (port 4*i+j holds X[i][j]).  Both reconfigurable
// modules compute Y = H2 * X * H2, with H2 the 4x4 Sylvester Hadamard matrix
// built by the recursion H_m = 1/sqrt(2) [H_{m-1} H_{m-1}; H_{m-1} -H_{m-1}].
// Written with the +/-1 matrix S (H2 = S/2), Y = (S * X * S) / 4; the design
// divides by 4 with an arithmetic shift (floor), so every output fits in
// IN_W+2 bits.  Entry (r,c) of S is +1 when popcount(r & c) is even, -1
// otherwise.
//
// The configuration side follows a 32-bit configuration port clocked at
// 100 MHz that takes one word per clock, so a partial bitstream of B bytes
// takes B/4 clocks (B*8/(32*100) microseconds).  Both partial bitstreams
// are 192512 bytes long.  The integer scaling, the port order and the
// module encoding below are this design's own choices.
package hadamard_pkg;

  // Block size: 2^m x 2^m with m = 2.
  localparam int unsigned HAD_M    = 2;
  localparam int unsigned HAD_N    = 1 << HAD_M;      // 4
  localparam int unsigned HAD_PORTS = HAD_N * HAD_N;  // 16 inputs, 16 outputs

  // Configuration port.
  localparam int unsigned ICAP_W          = 32;
  localparam int unsigned ICAP_MHZ        = 100;
  localparam int unsigned BITSTREAM_BYTES = 192512;

  // Which reconfigurable module occupies the partition.
  typedef enum logic {
    RM_SEQ = 1'b0,   // Hadamard-seq: one actor, 17 actions, low power
    RM_PIP = 1'b1    // Hadamard-pip: 12 actors, high throughput
  } rm_e;

  // Operation of one actor of the pipelined module.
  typedef enum logic {
    OP_WHT4  = 1'b0, // 4-point Hadamard butterfly (additions, subtractions)
    OP_SCALE = 1'b1  // divide by 4 (the two 1/sqrt(2) factors of each axis)
  } actor_op_e;

  // Model convention for a partial bitstream: word 0 is the sync word,
  // word 1 carries the module id in bit 0, the rest is frame data.
  localparam logic [ICAP_W-1:0] SYNC_WORD = 32'hAA99_5566;

  // Sign of S[r][c]: 1 means -1.
  function automatic logic had_neg(input logic [HAD_M-1:0] r,
                                   input logic [HAD_M-1:0] c);
    return ^(r & c);
  endfunction

endpackage
