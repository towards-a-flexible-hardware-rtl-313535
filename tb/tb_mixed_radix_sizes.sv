// tb_mixed_radix_sizes: the mixed-radix DFT at the other evaluated sizes,
// N = 28 (4 x 7), 88 (8 x 11), 96 (32 x 3) and 192 (64 x 3), all with a
// streaming width of two. Each size has its own instance and checker
// (mixed_radix_check): random frames against a floating-point DFT, contiguous
// output frames spaced by R*(P+1)/2 cycles under saturated input, no overflow.
module tb_mixed_radix_sizes;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int NS = 4;
  int   c [NS], f [NS], st [NS], gp [NS], pf [NS], pd [NS];
  logic d [NS];
  int   checks = 0, failures = 0;

  mixed_radix_check #(.P(7),  .K(2), .FRAMES(8), .TOL(5)) u28 (.clk, .rst_n,
    .checks(c[0]), .failures(f[0]), .n_stall(st[0]), .n_gap_frames(gp[0]),
    .n_prime_frames(pf[0]), .n_pad_slots(pd[0]), .done(d[0]));
  mixed_radix_check #(.P(11), .K(3), .FRAMES(8), .TOL(12)) u88 (.clk, .rst_n,
    .checks(c[1]), .failures(f[1]), .n_stall(st[1]), .n_gap_frames(gp[1]),
    .n_prime_frames(pf[1]), .n_pad_slots(pd[1]), .done(d[1]));
  mixed_radix_check #(.P(3),  .K(5), .FRAMES(8), .TOL(12)) u96 (.clk, .rst_n,
    .checks(c[2]), .failures(f[2]), .n_stall(st[2]), .n_gap_frames(gp[2]),
    .n_prime_frames(pf[2]), .n_pad_slots(pd[2]), .done(d[2]));
  mixed_radix_check #(.P(3),  .K(6), .FRAMES(8), .TOL(24)) u192 (.clk, .rst_n,
    .checks(c[3]), .failures(f[3]), .n_stall(st[3]), .n_gap_frames(gp[3]),
    .n_prime_frames(pf[3]), .n_pad_slots(pd[3]), .done(d[3]));

  localparam int R [NS] = '{4, 8, 32, 64};

  task automatic report();
    checks = 0; failures = 0;
    for (int i = 0; i < NS; i++) begin
      checks += c[i] + 1; failures += f[i];
      if (pf[i] != R[i] * 8) begin
        failures++;
        $display("size %0d: %0d prime frames, expected %0d", i, pf[i], R[i] * 8);
      end
    end
  endtask

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
  end

  initial begin
    repeat (60000) @(posedge clk);
    report();
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge rst_n);
    wait (d[0] && d[1] && d[2] && d[3]);
    repeat (2) @(posedge clk);
    report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
