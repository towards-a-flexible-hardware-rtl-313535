// tb_mixed_radix_dft: end-to-end test of the streaming mixed-radix DFT at its
// default size, N = 20 (DFT_4 x DFT_5, two samples per cycle), with no
// parameter overridden. Random frames are compared with a floating-point DFT.
// The test makes each mechanism of the design happen and counts it: stalls of
// the sender by the input pacing, frames arriving with idle cycles, zero pads
// inserted in front of the prime kernel, prime frames (R per transform).
module tb_mixed_radix_dft;
  import fft_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int FRAMES = 16;
  localparam int R = 4;

  int    checks = 0, failures = 0;
  int    c, f, n_stall, n_gap, n_prime, n_pad;
  logic  d;

  mixed_radix_check #(.P(5), .K(2), .FRAMES(FRAMES), .TOL(4), .LAT(55)) u_chk (
    .clk, .rst_n, .checks(c), .failures(f), .n_stall, .n_gap_frames(n_gap),
    .n_prime_frames(n_prime), .n_pad_slots(n_pad), .done(d)
  );

  task automatic finish();
    checks = c; failures = f;
    checks++;
    if (n_stall == 0) begin failures++; $display("input pacing never stalled the sender"); end
    checks++;
    if (n_gap == 0) begin failures++; $display("no frame with idle cycles"); end
    checks++;
    if (n_prime != R * FRAMES) begin
      failures++; $display("prime frames %0d, expected %0d", n_prime, R * FRAMES);
    end
    checks++;
    if (n_pad != R * FRAMES) begin
      failures++; $display("zero pads %0d, expected %0d", n_pad, R * FRAMES);
    end
    $display("stalls=%0d gapped_frames=%0d prime_frames=%0d zero_pads=%0d",
             n_stall, n_gap, n_prime, n_pad);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    checks = c; failures = f + 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge rst_n);
    wait (d);
    repeat (2) @(posedge clk);
    finish();
  end
endmodule
