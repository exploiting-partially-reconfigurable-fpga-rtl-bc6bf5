// End-to-end testbench for rvc_dpr_top with every parameter at its default
// (8-bit samples, 192512-byte partial bitstreams).  It runs the whole
// performance-adjustment cycle:
//   1. blocks through the initial sequential module, one per 17 clocks;
//   2. a partial bitstream for the pipelined module written one word per
//      clock through the configuration port, with blocks already waiting:
//      the reconfiguration must take 48128 clocks (481.28 us at 100 MHz)
//      and the partition must accept nothing while it runs;
//   3. the waiting and further blocks through the pipelined module, one per
//      clock with a 3-clock latency;
//   4. a bitstream back to the sequential module written with pauses, then
//      blocks under random backpressure;
//   5. the status read back through the configuration port.
// Every output is compared with a matrix-product model, and each mechanism
// (sequential run, pipelined run, reconfiguration, isolation stall,
// backpressure stall) is counted and must occur.
module tb_rvc_dpr_top;
  import hadamard_pkg::*;
  import tb_had_ref_pkg::*;

  localparam int IN_W  = 8;
  localparam int OUT_W = IN_W + 2;
  localparam int WORDS = BITSTREAM_BYTES / 4;
  localparam int NBMAX = 128;

  logic                    clk = 1'b0;
  logic                    rst_n;
  logic                    in_valid [16];
  logic                    in_ready [16];
  logic signed [IN_W-1:0]  in_data  [16];
  logic                    out_valid[16];
  logic                    out_ready[16];
  logic signed [OUT_W-1:0] out_data [16];
  logic                    icap_ce_n, icap_write_n;
  logic [31:0]             icap_i, icap_o;
  logic                    icap_busy;
  rm_e                     active_rm;
  logic                    reconfiguring, reconfig_done, rp_busy;

  rvc_dpr_top dut (.*);

  always #5 clk = ~clk;

  blk_t x [NBMAX];
  blk_t y [NBMAX];
  rm_e  blk_rm [NBMAX];
  int   total = 0;
  int   in_ptr [16];
  int   out_ptr[16];
  int   t_in   [NBMAX];
  int   t_out  [NBMAX];
  int   cycle = 0;
  int   checks = 0, failures = 0;
  int   rprob = 100;
  int   n_seq_blocks = 0, n_pip_blocks = 0, n_reconfig = 0;
  int   n_isolation_stalls = 0, n_backpressure = 0, leaks = 0;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      if (reconfig_done) n_reconfig++;
      if (reconfiguring) begin
        if (in_valid[0]) n_isolation_stalls++;
        for (int p = 0; p < 16; p++) if (in_ready[p] || out_valid[p]) leaks++;
      end
      for (int p = 0; p < 16; p++) begin
        if (in_valid[p] && in_ready[p]) begin
          if (p == 0) begin
            t_in[in_ptr[p]]   = cycle;
            blk_rm[in_ptr[p]] = active_rm;
            if (active_rm == RM_SEQ) n_seq_blocks++; else n_pip_blocks++;
          end
          in_ptr[p]++;
        end
        if (!(in_valid[p] && !in_ready[p])) begin
          in_valid[p] <= in_ptr[p] < total;
          if (in_ptr[p] < total) in_data[p] <= IN_W'(x[in_ptr[p]][p]);
        end
        if (out_valid[p] && !out_ready[p]) n_backpressure++;
        if (out_valid[p] && out_ready[p]) begin
          checks++;
          if (int'(out_data[p]) != y[out_ptr[p]][p]) begin
            failures++;
            $display("MISMATCH block %0d port %0d: got %0d expected %0d",
                     out_ptr[p], p, out_data[p], y[out_ptr[p]][p]);
          end
          if (p == 15) t_out[out_ptr[p]] = cycle;
          out_ptr[p]++;
        end
        out_ready[p] <= rprob > int'($urandom % 100);
      end
    end
  end

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("MISMATCH %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic enqueue(input int n);
    for (int b = total; b < total + n; b++) begin
      for (int p = 0; p < 16; p++) x[b][p] = rand_sample(IN_W, b);
      y[b] = hadamard_ref(x[b]);
    end
    total += n;
  endtask

  task automatic drain();
    bit done;
    do begin
      @(posedge clk);
      done = 1;
      for (int p = 0; p < 16; p++) if (out_ptr[p] < total) done = 0;
    end while (!done);
    @(posedge clk);
  endtask

  // Plays the bitstream mover: a few idle words, then the sync word, the
  // module id and frame data.  Returns the clocks from the sync word to the
  // clock on which the new module is in place.
  task automatic reconfigure(input rm_e rm, input bit gaps, output int clocks);
    int t0;
    while (rp_busy) @(posedge clk);
    for (int w = 0; w < 4; w++) begin
      icap_ce_n <= 1'b0; icap_write_n <= 1'b0; icap_i <= 32'hFFFF_FFFF;
      @(posedge clk);
    end
    #1 t0 = cycle;
    for (int w = 0; w < WORDS; w++) begin
      while (gaps && ($urandom % 8) == 0) begin
        icap_ce_n <= 1'b1; icap_write_n <= 1'b1;
        @(posedge clk);
      end
      icap_ce_n <= 1'b0; icap_write_n <= 1'b0;
      icap_i <= (w == 0) ? SYNC_WORD : (w == 1) ? {31'h0, rm} : $urandom;
      @(posedge clk);
    end
    icap_ce_n <= 1'b1; icap_write_n <= 1'b1;
    #1;
    clocks = cycle - t0;
    check("module after reconfiguration", int'(active_rm), int'(rm));
    check("isolation released", int'(reconfiguring), 0);
  endtask

  initial begin
    int first, clocks, seen;
    rst_n = 1'b0;
    icap_ce_n = 1'b1; icap_write_n = 1'b1; icap_i = '0;
    for (int p = 0; p < 16; p++) begin
      in_valid[p] = 1'b0; in_data[p] = '0; out_ready[p] = 1'b1;
      in_ptr[p] = 0; out_ptr[p] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    check("initial module", int'(active_rm), int'(RM_SEQ));

    // 1. Sequential module.
    first = total;
    enqueue(6);
    drain();
    for (int b = first + 1; b < total; b++) check("seq period", t_in[b] - t_in[b-1], 17);
    for (int b = first; b < total; b++) check("seq block time", t_out[b] - t_in[b], 17);

    // 2. Switch to the pipelined module with blocks waiting.
    first = total;
    fork
      reconfigure(RM_PIP, 0, clocks);
      begin
        repeat (100) @(posedge clk);
        enqueue(16);
      end
    join
    check("reconfiguration clocks (481.28 us at 100 MHz)", clocks, WORDS);
    $display("reconfiguration to Hadamard-pip: %0d clocks = %0d.%02d us at %0d MHz",
             clocks, clocks / ICAP_MHZ, clocks % ICAP_MHZ, ICAP_MHZ);
    check("no block entered during reconfiguration", in_ptr[0], first);

    // 3. Pipelined module.
    drain();
    for (int b = first + 1; b < total; b++) check("pip period", t_in[b] - t_in[b-1], 1);
    for (int b = first; b < total; b++) check("pip latency", t_out[b] - t_in[b], 3);
    for (int b = first; b < total; b++) check("block ran on pip", int'(blk_rm[b]), int'(RM_PIP));

    // 4. Back to the sequential module, with pauses, then backpressure.
    reconfigure(RM_SEQ, 1, clocks);
    check("paused reconfiguration is longer", int'(clocks > WORDS), 1);
    rprob = 50;
    first = total;
    enqueue(10);
    drain();
    for (int b = first; b < total; b++) check("block ran on seq", int'(blk_rm[b]), int'(RM_SEQ));

    // 5. Status read-back.
    icap_ce_n <= 1'b0; icap_write_n <= 1'b1;
    @(posedge clk);
    icap_ce_n <= 1'b1;
    #1 check("status word", int'(icap_o), 0);

    // Mechanisms.
    check("leaks while isolated", leaks, 0);
    check("reconfigurations", n_reconfig, 2);
    seen = int'(n_seq_blocks > 0) + int'(n_pip_blocks > 0) + int'(n_isolation_stalls > 0)
         + int'(n_backpressure > 0);
    check("mechanisms seen", seen, 4);
    $display("seq_blocks=%0d pip_blocks=%0d reconfigurations=%0d isolation_stall_cycles=%0d backpressure_cycles=%0d",
             n_seq_blocks, n_pip_blocks, n_reconfig, n_isolation_stalls, n_backpressure);
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
