// tb_prime_mac_array: self-checking test of the MAC array for P = 5 and P = 7.
// Frames of (P+1)/2 random (sum, difference) pairs are fed back to back, then
// with idle cycles between frames. For each frame the array must emit, in
// consecutive cycles, group g = 0..(P-1)/2:
//   tr_g = sum_m cos(2*pi*g*m/P) * sum_m,  ti_g = sum_m sin(2*pi*g*m/P) * diff_m,
// evaluated here in floating point (tolerance 1 LSB), with out_sop on group 0,
// and group 0 two cycles after the last pair of its frame.
module tb_prime_mac_array;
  import fft_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic done5 = 0, done7 = 0;

  logic  iv5, is5, ov5, os5, iv7, is7, ov7, os7;
  cplx_t id5 [2], od5 [2], id7 [2], od7 [2];

  prime_mac_array #(.P(5)) dut5 (.clk, .rst_n, .in_valid(iv5), .in_sop(is5), .in_data(id5),
    .out_valid(ov5), .out_sop(os5), .out_data(od5));
  prime_mac_array #(.P(7)) dut7 (.clk, .rst_n, .in_valid(iv7), .in_sop(is7), .in_data(id7),
    .out_valid(ov7), .out_sop(os7), .out_data(od7));

  localparam int FRAMES = 16;

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // expected results per size, frame and group: [0]=tr.re [1]=tr.im [2]=ti.re [3]=ti.im
  real ex5 [FRAMES][3][4], ex7 [FRAMES][4][4];
  int  last5 [FRAMES], last7 [FRAMES];
  int  cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic drive(input int P, ref logic iv, ref logic is, ref cplx_t id [2]);
    int G = (P + 1) / 2;
    for (int f = 0; f < FRAMES; f++) begin
      int sr [4], si [4], dr [4], di [4];
      for (int m = 0; m < G; m++) begin
        sr[m] = $signed($urandom_range(0, 8000)) - 4000;
        si[m] = $signed($urandom_range(0, 8000)) - 4000;
        dr[m] = $signed($urandom_range(0, 8000)) - 4000;
        di[m] = $signed($urandom_range(0, 8000)) - 4000;
      end
      for (int g = 0; g < G; g++) begin
        real a [4];
        a = '{0.0, 0.0, 0.0, 0.0};
        for (int m = 0; m < G; m++) begin
          real c, s;
          c = $cos(2.0 * PI * real'(g * m) / real'(P));
          s = $sin(2.0 * PI * real'(g * m) / real'(P));
          a[0] += c * sr[m]; a[1] += c * si[m]; a[2] += s * dr[m]; a[3] += s * di[m];
        end
        for (int q = 0; q < 4; q++)
          if (P == 5) ex5[f][g][q] = a[q]; else ex7[f][g][q] = a[q];
      end
      for (int m = 0; m < G; m++) begin
        @(negedge clk);
        iv = 1; is = (m == 0);
        id[0].re = DW'(sr[m]); id[0].im = DW'(si[m]);
        id[1].re = DW'(dr[m]); id[1].im = DW'(di[m]);
        if (m == G - 1) begin
          if (P == 5) last5[f] = cyc; else last7[f] = cyc;
        end
      end
      if (f >= FRAMES / 2) begin
        @(negedge clk);
        iv = 0; is = 0;
        repeat ($urandom_range(0, 3)) @(negedge clk);
      end
    end
    @(negedge clk);
    iv = 0; is = 0;
  endtask

  task automatic check_out(input int P, input int f, input int g, input cplx_t od [2],
                           input logic os, input int t_last);
    real e [4];
    for (int q = 0; q < 4; q++) e[q] = (P == 5) ? ex5[f][g][q] : ex7[f][g][q];
    checks++;
    if (rabs(real'(od[0].re) - e[0]) > 1.0 || rabs(real'(od[0].im) - e[1]) > 1.0 ||
        rabs(real'(od[1].re) - e[2]) > 1.0 || rabs(real'(od[1].im) - e[3]) > 1.0) begin
      failures++;
      $display("P=%0d frame %0d group %0d: got tr (%0d,%0d) ti (%0d,%0d) want (%f,%f) (%f,%f)",
               P, f, g, od[0].re, od[0].im, od[1].re, od[1].im, e[0], e[1], e[2], e[3]);
    end
    checks++;
    if (os != (g == 0)) begin failures++; $display("P=%0d: out_sop wrong", P); end
    if (g == 0) begin
      checks++;
      if (cyc - t_last != 2) begin
        failures++; $display("P=%0d frame %0d: latency %0d, expected 2", P, f, cyc - t_last);
      end
    end
  endtask

  int f5 = 0, g5 = 0, f7 = 0, g7 = 0;
  always @(posedge clk) begin
    if (rst_n && ov5 && f5 < FRAMES) begin
      check_out(5, f5, g5, od5, os5, last5[f5]);
      if (g5 == 2) begin g5 <= 0; f5 <= f5 + 1; end else g5 <= g5 + 1;
    end else if (rst_n && g5 != 0) begin
      checks++; failures++; $display("P=5: gap between groups");
    end
    if (rst_n && ov7 && f7 < FRAMES) begin
      check_out(7, f7, g7, od7, os7, last7[f7]);
      if (g7 == 3) begin g7 <= 0; f7 <= f7 + 1; end else g7 <= g7 + 1;
    end else if (rst_n && g7 != 0) begin
      checks++; failures++; $display("P=7: gap between groups");
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    iv5 = 0; is5 = 0; iv7 = 0; is7 = 0; id5 = '{default: '0}; id7 = '{default: '0};
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      drive(5, iv5, is5, id5);
      drive(7, iv7, is7, id7);
    join
    repeat (20) @(posedge clk);
    checks++;
    if (f5 != FRAMES || f7 != FRAMES) begin failures++; $display("frames out: %0d %0d", f5, f7); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
