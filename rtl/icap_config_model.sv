// Behavioural model of the internal configuration access port (ICAP) and of
// the configuration memory of one reconfigurable partition.
//
// This is a model, not logic that would be built: on the FPGA, writing a
// partial bitstream through the ICAP rewrites the configuration frames of
// the partition, and which module then exists there is a property of the
// silicon.  The model keeps that fact in a register (loaded_rm) so that the
// rest of the design can be simulated across a reconfiguration.
//
// Port side: the ports of the Virtex-5 ICAP primitive, CLK, active-low CE
// and WRITE, 32-bit data in I and out O, and BUSY.  One word is written on
// every rising CLK edge with CE and WRITE low; BUSY stays low, so the port
// takes 32 bits per clock, which at 100 MHz is the configuration rate the
// reconfiguration time is computed from.
//
// Model side: a partial bitstream is BITSTREAM_BYTES/4 words.  Words before
// the sync word are ignored.  The sync word (word 0) starts a load; word 1
// names the module in bit 0 (a convention of this model, as real frame data
// is not modelled); the load ends with the last word.  While a load runs,
// `loading` is high; on the clock after the last word, loaded_rm takes the
// new module and load_done pulses for one clock.  Reading (CE low, WRITE
// high) returns {30'b0, loading, loaded_rm} on O on the next clock.
// After reset the partition holds INIT_RM, the module of the initial full
// configuration.
module icap_config_model
  import hadamard_pkg::*;
#(
  parameter int unsigned BYTES   = BITSTREAM_BYTES,
  parameter rm_e         INIT_RM = RM_SEQ
) (
  input  logic              CLK,
  input  logic              CE,       // active low
  input  logic              WRITE,    // active low
  input  logic [ICAP_W-1:0] I,
  output logic [ICAP_W-1:0] O,
  output logic              BUSY,
  // Model side
  input  logic              rst_n,
  output rm_e               loaded_rm,
  output logic              loading,
  output logic              load_done
);

  localparam int unsigned WORDS = BYTES / (ICAP_W / 8);
  localparam int unsigned CNT_W = $clog2(WORDS + 1);

  logic [CNT_W-1:0] count_q;     // words of the current load seen so far
  rm_e              next_rm_q;
  logic             wr;

  assign wr   = !CE && !WRITE;
  assign BUSY = 1'b0;

  always_ff @(posedge CLK) begin
    if (!rst_n) begin
      count_q   <= '0;
      next_rm_q <= INIT_RM;
      loaded_rm <= INIT_RM;
      loading   <= 1'b0;
      load_done <= 1'b0;
      O         <= '0;
    end else begin
      load_done <= 1'b0;
      if (wr) begin
        if (!loading) begin
          if (I == SYNC_WORD) begin
            loading <= 1'b1;
            count_q <= CNT_W'(1);
          end
        end else begin
          if (count_q == CNT_W'(1)) next_rm_q <= rm_e'(I[0]);
          if (count_q == CNT_W'(WORDS - 1)) begin
            loading   <= 1'b0;
            count_q   <= '0;
            load_done <= 1'b1;
            loaded_rm <= (count_q == CNT_W'(1)) ? rm_e'(I[0]) : next_rm_q;
          end else begin
            count_q <= count_q + 1'b1;
          end
        end
      end else if (!CE) begin
        O <= {{(ICAP_W-2){1'b0}}, loading, loaded_rm};
      end
    end
  end

endmodule
