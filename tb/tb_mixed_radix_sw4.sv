// tb_mixed_radix_sw4: the wider variant of the mixed-radix DFT, four samples
// per cycle (parallel DFT_4, two prime kernels side by side), at the evaluated
// sizes N = 20 (4 x 5) and N = 28 (4 x 7). Random frames against a
// floating-point DFT; the sender is stalled by the input pacing, later frames
// arrive with idle cycles; output frames are contiguous and spaced by P + 1
// cycles under saturated input; R zero pads and R prime frames per transform.
module tb_mixed_radix_sw4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int NS = 2, FRAMES = 12;
  int   c [NS], f [NS], st [NS], gp [NS], pf [NS], pd [NS];
  logic d [NS];
  int   checks = 0, failures = 0;

  mixed_radix_check #(.P(5), .K(2), .SW(4), .FRAMES(FRAMES), .TOL(4)) u20 (.clk, .rst_n,
    .checks(c[0]), .failures(f[0]), .n_stall(st[0]), .n_gap_frames(gp[0]),
    .n_prime_frames(pf[0]), .n_pad_slots(pd[0]), .done(d[0]));
  mixed_radix_check #(.P(7), .K(2), .SW(4), .FRAMES(FRAMES), .TOL(5)) u28 (.clk, .rst_n,
    .checks(c[1]), .failures(f[1]), .n_stall(st[1]), .n_gap_frames(gp[1]),
    .n_prime_frames(pf[1]), .n_pad_slots(pd[1]), .done(d[1]));

  task automatic report();
    checks = 0; failures = 0;
    for (int i = 0; i < NS; i++) begin
      checks += c[i] + 3; failures += f[i];
      if (st[i] == 0) begin failures++; $display("size %0d: sender never stalled", i); end
      if (pf[i] != 4 * FRAMES) begin
        failures++; $display("size %0d: %0d prime frames, expected %0d", i, pf[i], 4 * FRAMES);
      end
      if (pd[i] != 4 * FRAMES) begin
        failures++; $display("size %0d: %0d zero pads, expected %0d", i, pd[i], 4 * FRAMES);
      end
    end
  endtask

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
  end

  initial begin
    repeat (20000) @(posedge clk);
    report();
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge rst_n);
    wait (d[0] && d[1]);
    repeat (2) @(posedge clk);
    report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
