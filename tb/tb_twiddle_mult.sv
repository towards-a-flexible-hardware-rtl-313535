// tb_twiddle_mult: self-checking test of the twiddle multiplier for N = 20
// (P = 5, R = 4), both uses:
//   stage 0 (S = 0): slot 4r+3 of each row is multiplied by -j, all others by 1;
//   last stage (S = 1): slot 4r+u is multiplied by w20^(r*k1), k1 = 0,2,1,3
//   for u = 0..3 (the bit-reversed DFT_4 outputs).
// Random frames, idle cycles between frames, a one-cycle latency; each product
// is compared with a floating-point value (tolerance 1 LSB).
module tb_twiddle_mult;
  import fft_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic  iv, is, ov0, os0, ov1, os1;
  cplx_t id [2], od0 [2], od1 [2];

  twiddle_mult #(.P(5), .K(2), .S(0)) dut0 (.clk, .rst_n, .in_valid(iv), .in_sop(is), .in_data(id),
    .out_valid(ov0), .out_sop(os0), .out_data(od0));
  twiddle_mult #(.P(5), .K(2), .S(1)) dut1 (.clk, .rst_n, .in_valid(iv), .in_sop(is), .in_data(id),
    .out_valid(ov1), .out_sop(os1), .out_data(od1));

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  task automatic cmp(string nm, cplx_t got, int xr, int xi, real ang);
    real er, ei;
    er = real'(xr) * $cos(ang) - real'(xi) * $sin(ang);
    ei = real'(xr) * $sin(ang) + real'(xi) * $cos(ang);
    checks++;
    if (rabs(real'(got.re) - er) > 1.0 || rabs(real'(got.im) - ei) > 1.0) begin
      failures++;
      $display("%s: got (%0d,%0d) want (%f,%f)", nm, got.re, got.im, er, ei);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k1 [4] = '{0, 2, 1, 3};
    iv = 0; is = 0; id = '{default: '0};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 20; f++) begin
      for (int c = 0; c < 10; c++) begin
        int xr [2], xi [2];
        @(negedge clk);
        for (int i = 0; i < 2; i++) begin
          xr[i] = $signed($urandom_range(0, 30000)) - 15000;
          xi[i] = $signed($urandom_range(0, 30000)) - 15000;
          id[i].re = DW'(xr[i]);
          id[i].im = DW'(xi[i]);
        end
        iv = 1; is = (c == 0);
        @(negedge clk);
        iv = 0; is = 0;
        checks++;
        if (!ov0 || !ov1 || os0 != (c == 0) || os1 != (c == 0)) begin
          failures++;
          $display("flags wrong in frame %0d cycle %0d", f, c);
        end
        for (int i = 0; i < 2; i++) begin
          int t, r, u;
          t = 2 * c + i; r = t / 4; u = t % 4;
          cmp("stage 0", od0[i], xr[i], xi[i], (u == 3) ? -PI / 2.0 : 0.0);
          cmp("last stage", od1[i], xr[i], xi[i], -2.0 * PI * real'(r * k1[u]) / 20.0);
        end
      end
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
