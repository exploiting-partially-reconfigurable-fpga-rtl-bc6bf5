// Self-checking testbench for hadamard_seq, the sequential 4x4 Hadamard
// transform.  Phase 1 streams blocks with every output ready and checks the
// timing: output k of a block is taken 2+k clocks after the block is read,
// and a new block is read every 17 clocks.  Phase 2 drives each of the 16
// input ports and 16 output ports with independent random valid and ready
// patterns, so the read action must wait for the last input token and the
// computing actions must stall on backpressure.  Every output is compared
// with a matrix-product reference model.
module tb_hadamard_seq;
  import tb_had_ref_pkg::*;

  localparam int IN_W   = 8;
  localparam int OUT_W  = IN_W + 2;
  localparam int NB1    = 8;           // blocks in the timing phase
  localparam int NB     = 60;          // blocks in total
  localparam int PERIOD = 17;

  logic                    clk = 1'b0;
  logic                    rst_n;
  logic                    in_valid [16];
  logic                    in_ready [16];
  logic signed [IN_W-1:0]  in_data  [16];
  logic                    out_valid[16];
  logic                    out_ready[16];
  logic signed [OUT_W-1:0] out_data [16];
  logic                    busy;

  hadamard_seq #(.IN_W(IN_W)) dut (.*);

  always #5 clk = ~clk;

  blk_t x [NB];
  blk_t y [NB];
  int   in_ptr [16];
  int   out_ptr[16];
  int   t_in   [NB];
  int   t_out  [NB][16];
  int   cycle = 0;
  int   checks = 0, failures = 0;
  int   vprob = 100, rprob = 100;
  int   stalls = 0;
  bit   running = 0;

  function automatic int lat(input int k);
    return 2 + k;
  endfunction

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (running) begin
      for (int p = 0; p < 16; p++) begin
        if (in_valid[p] && in_ready[p]) begin
          if (p == 0) t_in[in_ptr[p]] = cycle;
          in_ptr[p]++;
        end
        if (!(in_valid[p] && !in_ready[p])) begin
          if (in_ptr[p] < NB && (in_ptr[p] < NB1 ? 100 : vprob) > int'($urandom % 100)) begin
            in_valid[p] <= 1'b1;
            in_data[p]  <= IN_W'(x[in_ptr[p]][p]);
          end else begin
            in_valid[p] <= 1'b0;
          end
        end
        if (out_valid[p] && !out_ready[p]) stalls++;
        if (out_valid[p] && out_ready[p]) begin
          checks++;
          if (int'(out_data[p]) != y[out_ptr[p]][p]) begin
            failures++;
            $display("MISMATCH block %0d port %0d: got %0d expected %0d",
                     out_ptr[p], p, out_data[p], y[out_ptr[p]][p]);
          end
          t_out[out_ptr[p]][p] = cycle;
          out_ptr[p]++;
        end
        out_ready[p] <= (out_ptr[p] < NB1) || (rprob > int'($urandom % 100));
      end
    end
  end

  initial begin
    bit all_done;
    rst_n = 1'b0;
    for (int p = 0; p < 16; p++) begin
      in_valid[p] = 1'b0; in_data[p] = '0; out_ready[p] = 1'b1;
      in_ptr[p] = 0; out_ptr[p] = 0;
    end
    for (int b = 0; b < NB; b++) begin
      for (int p = 0; p < 16; p++) x[b][p] = rand_sample(IN_W, b);
      y[b] = hadamard_ref(x[b]);
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    vprob = 60; rprob = 60;
    running = 1;
    do begin
      @(posedge clk);
      all_done = 1;
      for (int p = 0; p < 16; p++) if (out_ptr[p] < NB) all_done = 0;
    end while (!all_done);
    // Timing of the streamed blocks.
    for (int b = 0; b < NB1; b++) begin
      for (int k = 0; k < 16; k++) begin
        checks++;
        if (t_out[b][k] - t_in[b] != lat(k)) begin
          failures++;
          $display("LATENCY block %0d output %0d: %0d clocks, expected %0d",
                   b, k, t_out[b][k] - t_in[b], lat(k));
        end
      end
      if (b > 0) begin
        checks++;
        if (t_in[b] - t_in[b-1] != PERIOD) begin
          failures++;
          $display("PERIOD block %0d: %0d clocks, expected %0d", b, t_in[b] - t_in[b-1], PERIOD);
        end
      end
    end
    checks++;
    if (stalls == 0) begin
      failures++;
      $display("backpressure never happened");
    end
    $display("blocks=%0d backpressure_cycles=%0d", NB, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("WATCHDOG: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
