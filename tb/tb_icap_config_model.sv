// Self-checking testbench for icap_config_model at its default bitstream
// size (192512 bytes, 48128 words).  It writes words before a sync word
// (which must be ignored), then a partial bitstream naming Hadamard-pip
// written one word per clock, and checks that the load takes exactly 48128
// clocks, the 481.28 us of a 32-bit port at 100 MHz, that `loading` covers
// it, that the module changes only at the end and that `load_done` pulses
// once.  A second bitstream, back to Hadamard-seq, is written with random
// pauses (CE high, or reads) and must still complete after exactly 48128
// written words.  The status read-back on O is checked during and after a
// load.
module tb_icap_config_model;
  import hadamard_pkg::*;

  localparam int WORDS = BITSTREAM_BYTES / 4;

  logic        clk = 1'b0;
  logic        rst_n;
  logic        ce_n, write_n;
  logic [31:0] din, dout;
  logic        busy;
  rm_e         loaded_rm;
  logic        loading, load_done;
  int          checks = 0, failures = 0;
  int          done_pulses = 0;

  always #5 clk = ~clk;

  icap_config_model u_icap (
    .CLK(clk), .CE(ce_n), .WRITE(write_n), .I(din), .O(dout), .BUSY(busy),
    .rst_n, .loaded_rm, .loading, .load_done);

  always @(posedge clk) if (load_done) done_pulses++;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("MISMATCH %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic write_word(input logic [31:0] w);
    ce_n <= 1'b0; write_n <= 1'b0; din <= w;
    @(posedge clk);
    ce_n <= 1'b1; write_n <= 1'b1;
  endtask

  // Writes a bitstream for module `rm`; with `gaps`, idles or reads at
  // random between words.  Returns the clocks from the first word to the
  // clock on which the new module is in place.
  task automatic load(input rm_e rm, input bit gaps, output int clocks,
                      output int words);
    int t0;
    words = 0;
    t0 = 0;
    for (int w = 0; w < WORDS; w++) begin
      if (gaps) begin
        while (($urandom % 4) == 0) begin
          ce_n <= 1'($urandom % 2); write_n <= 1'b1;
          @(posedge clk); t0++;
        end
      end
      if (w == WORDS - 1) begin
        #1;
        check("still loading before the last word", int'(loading), 1);
        check("no switch before the last word", int'(loaded_rm), int'(rm) ^ 1);
      end
      ce_n <= 1'b0; write_n <= 1'b0;
      din  <= (w == 0) ? SYNC_WORD : (w == 1) ? {31'h0, rm} : $urandom;
      @(posedge clk); t0++; words++;
      if (w == 1) begin
        #1;
        check("loading during load", int'(loading), 1);
        check("old module kept during load", int'(loaded_rm), int'(rm) ^ 1);
      end
    end
    ce_n <= 1'b1; write_n <= 1'b1;
    #1;
    clocks = t0;
    @(posedge clk);   // let the one-clock load_done pulse be counted
    #1;
  endtask

  initial begin
    int clocks, words;
    rst_n = 1'b0; ce_n = 1'b1; write_n = 1'b1; din = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    check("initial module", int'(loaded_rm), int'(RM_SEQ));
    check("busy low", int'(busy), 0);
    // Junk before the sync word is ignored.
    repeat (5) write_word(32'hFFFF_FFFF);
    #1 check("no load before sync", int'(loading), 0);
    // Back-to-back load of Hadamard-pip.
    load(RM_PIP, 0, clocks, words);
    check("load clocks (481.28 us at 100 MHz)", clocks, 48128);
    check("module after load", int'(loaded_rm), int'(RM_PIP));
    check("loading cleared", int'(loading), 0);
    check("done pulses", done_pulses, 1);
    $display("reconfiguration: %0d clocks = %0d.%02d us at %0d MHz",
             clocks, clocks / ICAP_MHZ, clocks % ICAP_MHZ, ICAP_MHZ);
    // Read-back of the status.
    ce_n <= 1'b0; write_n <= 1'b1;
    @(posedge clk); #1;
    check("status read", int'(dout), 32'h1);
    ce_n <= 1'b1;
    @(posedge clk);
    // Load of Hadamard-seq with pauses.
    load(RM_SEQ, 1, clocks, words);
    check("words in paused load", words, 48128);
    check("paused load took longer", int'(clocks > 48128), 1);
    check("module after second load", int'(loaded_rm), int'(RM_SEQ));
    check("done pulses", done_pulses, 2);
    ce_n <= 1'b0; write_n <= 1'b1;
    @(posedge clk); #1;
    check("status read", int'(dout), 32'h0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("WATCHDOG: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
