// Self-checking testbench for hadamard_rp, the reconfigurable partition.
// The module selection and the decoupling are driven directly.  It checks
// that with Hadamard-seq selected blocks come out correct at one block per
// 17 clocks, that while decoupled the partition takes no input and offers
// no output even with tokens waiting, that after switching to Hadamard-pip
// the waiting blocks pass at one block per clock with a 3-clock latency,
// and that after switching back, under random backpressure, results are
// still correct.  Every output is compared with a matrix-product model.
module tb_hadamard_rp;
  import hadamard_pkg::*;
  import tb_had_ref_pkg::*;

  localparam int IN_W  = 8;
  localparam int OUT_W = IN_W + 2;
  localparam int NBMAX = 64;

  logic                    clk = 1'b0;
  logic                    rst_n;
  rm_e                     active_rm;
  logic                    decouple;
  logic                    in_valid [16];
  logic                    in_ready [16];
  logic signed [IN_W-1:0]  in_data  [16];
  logic                    out_valid[16];
  logic                    out_ready[16];
  logic signed [OUT_W-1:0] out_data [16];
  logic                    busy;

  hadamard_rp #(.IN_W(IN_W)) dut (.*);

  always #5 clk = ~clk;

  blk_t x [NBMAX];
  blk_t y [NBMAX];
  int   total = 0;
  int   in_ptr [16];
  int   out_ptr[16];
  int   t_in   [NBMAX];
  int   t_out  [NBMAX];
  int   cycle = 0;
  int   checks = 0, failures = 0;
  int   rprob = 100;
  int   decoupled_cycles = 0, leaks = 0, stalls = 0;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (decouple) begin
      decoupled_cycles++;
      for (int p = 0; p < 16; p++) if (in_ready[p] || out_valid[p]) leaks++;
    end
    for (int p = 0; p < 16 && rst_n; p++) begin
      if (in_valid[p] && in_ready[p]) begin
        if (p == 0) t_in[in_ptr[p]] = cycle;
        in_ptr[p]++;
      end
      if (!(in_valid[p] && !in_ready[p])) begin
        in_valid[p] <= in_ptr[p] < total;
        if (in_ptr[p] < total) in_data[p] <= IN_W'(x[in_ptr[p]][p]);
      end
      if (out_valid[p] && !out_ready[p]) stalls++;
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

  initial begin
    int first;
    rst_n = 1'b0; active_rm = RM_SEQ; decouple = 1'b0;
    for (int p = 0; p < 16; p++) begin
      in_valid[p] = 1'b0; in_data[p] = '0; out_ready[p] = 1'b1;
      in_ptr[p] = 0; out_ptr[p] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // Sequential module.
    first = total;
    enqueue(4);
    drain();
    for (int b = first + 1; b < total; b++) check("seq period", t_in[b] - t_in[b-1], 17);
    check("seq last output", t_out[first] - t_in[first], 17);
    check("idle after drain", int'(busy), 0);
    // Decouple with blocks waiting, then switch to the pipelined module.
    decouple <= 1'b1;
    first = total;
    enqueue(6);
    repeat (20) @(posedge clk);
    check("nothing passes while decoupled", in_ptr[0], first);
    active_rm <= RM_PIP;
    repeat (2) @(posedge clk);
    decouple <= 1'b0;
    drain();
    for (int b = first + 1; b < total; b++) check("pip period", t_in[b] - t_in[b-1], 1);
    for (int b = first; b < total; b++) check("pip latency", t_out[b] - t_in[b], 3);
    // Back to the sequential module, random backpressure.
    decouple <= 1'b1;
    repeat (5) @(posedge clk);
    active_rm <= RM_SEQ;
    @(posedge clk);
    decouple <= 1'b0;
    rprob = 50;
    enqueue(8);
    drain();
    check("decoupled cycles seen", int'(decoupled_cycles > 0), 1);
    check("no handshake while decoupled", leaks, 0);
    check("backpressure seen", int'(stalls > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("WATCHDOG: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
