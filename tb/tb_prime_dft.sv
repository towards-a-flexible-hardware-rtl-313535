// tb_prime_dft: end-to-end test of the prime-sized DFT kernel for every size the
// evaluation covers (P = 3, 5, 7, 11, 13). Each size gets its own kernel and
// checker (prime_dft_check): random frames against a floating-point DFT, fixed
// latency, and one frame per (P+1)/2 cycles.
module tb_prime_dft;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int NS = 5;
  int   c [NS], f [NS];
  logic d [NS];
  int   checks = 0, failures = 0;

  prime_dft_check #(.P(3))  u3  (.clk, .rst_n, .checks(c[0]), .failures(f[0]), .done(d[0]));
  prime_dft_check #(.P(5))  u5  (.clk, .rst_n, .checks(c[1]), .failures(f[1]), .done(d[1]));
  prime_dft_check #(.P(7))  u7  (.clk, .rst_n, .checks(c[2]), .failures(f[2]), .done(d[2]));
  prime_dft_check #(.P(11)) u11 (.clk, .rst_n, .checks(c[3]), .failures(f[3]), .done(d[3]));
  prime_dft_check #(.P(13)) u13 (.clk, .rst_n, .checks(c[4]), .failures(f[4]), .done(d[4]));

  task automatic report();
    checks = 0; failures = 0;
    for (int i = 0; i < NS; i++) begin checks += c[i]; failures += f[i]; end
  endtask

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
  end

  initial begin
    repeat (5000) @(posedge clk);
    report();
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge rst_n);
    wait (d[0] && d[1] && d[2] && d[3] && d[4]);
    repeat (2) @(posedge clk);
    report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
