// tb_mixed_radix_wide: the mixed-radix DFT at the evaluated sizes with a
// streaming width above two and more than four points in the power-of-two
// factor: N = 88 (8 x 11) with four samples per cycle, N = 96 (32 x 3) and
// N = 192 (64 x 3) with eight. These builds use SW/2 butterflies per radix-2
// stage and SW/2 prime kernels side by side. Each size has its own instance
// and checker (mixed_radix_check): random frames against a floating-point DFT,
// the sender stalled by the input pacing and later frames sent with idle
// cycles, contiguous output frames spaced by R*(P+1)/SW cycles under saturated
// input, the latency of an isolated frame, R prime frames and R zero pads per
// transform, no overflow.
module tb_mixed_radix_wide;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int NS = 3, FRAMES = 8;
  int   c [NS], f [NS], st [NS], gp [NS], pf [NS], pd [NS];
  logic d [NS];
  int   checks = 0, failures = 0;

  mixed_radix_check #(.P(11), .K(3), .SW(4), .FRAMES(FRAMES), .TOL(12), .LAT(125)) u88 (.clk, .rst_n,
    .checks(c[0]), .failures(f[0]), .n_stall(st[0]), .n_gap_frames(gp[0]),
    .n_prime_frames(pf[0]), .n_pad_slots(pd[0]), .done(d[0]));
  mixed_radix_check #(.P(3),  .K(5), .SW(8), .FRAMES(FRAMES), .TOL(12), .LAT(105)) u96 (.clk, .rst_n,
    .checks(c[1]), .failures(f[1]), .n_stall(st[1]), .n_gap_frames(gp[1]),
    .n_prime_frames(pf[1]), .n_pad_slots(pd[1]), .done(d[1]));
  mixed_radix_check #(.P(3),  .K(6), .SW(8), .FRAMES(FRAMES), .TOL(24), .LAT(208)) u192 (.clk, .rst_n,
    .checks(c[2]), .failures(f[2]), .n_stall(st[2]), .n_gap_frames(gp[2]),
    .n_prime_frames(pf[2]), .n_pad_slots(pd[2]), .done(d[2]));

  localparam int R [NS] = '{8, 32, 64};

  task automatic report();
    checks = 0; failures = 0;
    for (int i = 0; i < NS; i++) begin
      checks += c[i] + 3; failures += f[i];
      if (st[i] == 0) begin failures++; $display("size %0d: sender never stalled", i); end
      if (pf[i] != R[i] * FRAMES) begin
        failures++; $display("size %0d: %0d prime frames, expected %0d", i, pf[i], R[i] * FRAMES);
      end
      if (pd[i] != R[i] * FRAMES) begin
        failures++; $display("size %0d: %0d zero pads, expected %0d", i, pd[i], R[i] * FRAMES);
      end
    end
  endtask

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
  end

  initial begin
    repeat (40000) @(posedge clk);
    report();
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge rst_n);
    wait (d[0] && d[1] && d[2]);
    repeat (2) @(posedge clk);
    report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
