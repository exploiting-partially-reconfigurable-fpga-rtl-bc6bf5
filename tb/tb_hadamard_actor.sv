// Self-checking testbench for hadamard_actor.  Two instances are tested
// side by side: a butterfly actor (OP_WHT4, 8-bit inputs) and a scaling
// actor (OP_SCALE, 12-bit inputs).  Each input port gets its own random
// valid pattern and each output port its own random ready pattern, so an
// actor must wait for the last of its four input tokens and for every
// output slot.  Results are checked against the 4-point transform written
// as a +/-1 matrix product, and against a division by 4 rounded down; with
// all ports always active, a result must follow its inputs by one clock
// and a set of tokens must pass every clock.
module tb_hadamard_actor;
  import hadamard_pkg::*;

  localparam int NT  = 300;   // token sets per actor
  localparam int NT1 = 10;    // token sets in the timing phase

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  // Butterfly actor
  logic              b_iv[4], b_ir[4], b_ov[4], b_or[4];
  logic signed [7:0] b_id[4];
  logic signed [9:0] b_od[4];
  hadamard_actor #(.OP(OP_WHT4), .IW(8), .OW(10)) u_b (
    .clk, .rst_n, .in_valid(b_iv), .in_ready(b_ir), .in_data(b_id),
    .out_valid(b_ov), .out_ready(b_or), .out_data(b_od));

  // Scaling actor
  logic               s_iv[4], s_ir[4], s_ov[4], s_or[4];
  logic signed [11:0] s_id[4];
  logic signed [9:0]  s_od[4];
  hadamard_actor #(.OP(OP_SCALE), .IW(12), .OW(10)) u_s (
    .clk, .rst_n, .in_valid(s_iv), .in_ready(s_ir), .in_data(s_id),
    .out_valid(s_ov), .out_ready(s_or), .out_data(s_od));

  int bx[NT][4], by[NT][4], sx[NT][4], sy[NT][4];
  int b_ip[4], b_op[4], s_ip[4], s_op[4];
  int b_tin[NT], b_tout[NT];
  int cycle = 0, checks = 0, failures = 0, stalls = 0;
  bit running = 0;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("MISMATCH %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (running) begin
      for (int p = 0; p < 4; p++) begin
        // butterfly actor inputs / outputs
        if (b_iv[p] && b_ir[p]) begin
          if (p == 0) b_tin[b_ip[p]] = cycle;
          b_ip[p]++;
        end
        if (!(b_iv[p] && !b_ir[p])) begin
          b_iv[p] <= (b_ip[p] < NT) && (b_ip[p] < NT1 || ($urandom % 3) != 0);
          if (b_ip[p] < NT) b_id[p] <= 8'(bx[b_ip[p]][p]);
        end
        if (b_ov[p] && !b_or[p]) stalls++;
        if (b_ov[p] && b_or[p]) begin
          check("butterfly", int'(b_od[p]), by[b_op[p]][p]);
          if (p == 0) b_tout[b_op[p]] = cycle;
          b_op[p]++;
        end
        b_or[p] <= (b_op[p] < NT1) || ($urandom % 3) != 0;
        // scaling actor inputs / outputs
        if (s_iv[p] && s_ir[p]) s_ip[p]++;
        if (!(s_iv[p] && !s_ir[p])) begin
          s_iv[p] <= (s_ip[p] < NT) && ($urandom % 3) != 0;
          if (s_ip[p] < NT) s_id[p] <= 12'(sx[s_ip[p]][p]);
        end
        if (s_ov[p] && s_or[p]) begin
          check("scale", int'(s_od[p]), sy[s_op[p]][p]);
          s_op[p]++;
        end
        s_or[p] <= ($urandom % 3) != 0;
      end
    end
  end

  initial begin
    int sgn [4][4];
    bit done;
    // +/-1 matrix of the 4-point transform, Sylvester order.
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        sgn[r][c] = (($countones(r & c) % 2) != 0) ? -1 : 1;
    for (int t = 0; t < NT; t++) begin
      for (int p = 0; p < 4; p++) begin
        bx[t][p] = int'($urandom % 256) - 128;
        sx[t][p] = int'($urandom % 4096) - 2048;
        sy[t][p] = (sx[t][p] - ((sx[t][p] % 4 + 4) % 4)) / 4;
      end
      for (int r = 0; r < 4; r++) begin
        by[t][r] = 0;
        for (int c = 0; c < 4; c++) by[t][r] += sgn[r][c] * bx[t][c];
      end
    end
    rst_n = 1'b0;
    for (int p = 0; p < 4; p++) begin
      b_iv[p] = 0; b_or[p] = 1; b_id[p] = '0; s_iv[p] = 0; s_or[p] = 1; s_id[p] = '0;
      b_ip[p] = 0; b_op[p] = 0; s_ip[p] = 0; s_op[p] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    running = 1;
    do begin
      @(posedge clk);
      done = 1;
      for (int p = 0; p < 4; p++) if (b_op[p] < NT || s_op[p] < NT) done = 0;
    end while (!done);
    for (int t = 0; t < NT1 - 1; t++) begin
      check("latency", b_tout[t] - b_tin[t], 1);
      if (t > 0) check("rate", b_tin[t] - b_tin[t-1], 1);
    end
    checks++;
    if (stalls == 0) begin failures++; $display("backpressure never happened"); end
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
