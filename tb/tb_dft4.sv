// tb_dft4: self-checking test of the parallel 4-point DFT. Random vectors are
// compared with the DFT definition y_k = sum_n x_n (-j)^(n*k), evaluated here
// with integer arithmetic, one cycle after they enter.
module tb_dft4;
  import fft_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  in_valid = 0, in_sop = 0, out_valid, out_sop;
  cplx_t in_data [4], out_data [4];
  int checks = 0, failures = 0;

  dft4 dut (.*);

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int xr [4], xi [4], yr, yi;
    in_data = '{default: '0};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 200; it++) begin
      @(negedge clk);
      for (int n = 0; n < 4; n++) begin
        xr[n] = $signed($urandom_range(0, 16000)) - 8000;
        xi[n] = $signed($urandom_range(0, 16000)) - 8000;
        in_data[n].re = DW'(xr[n]);
        in_data[n].im = DW'(xi[n]);
      end
      in_valid = 1; in_sop = (it % 4 == 0);
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid || out_sop !== (it % 4 == 0)) begin
        failures++;
        $display("flags wrong at %0d", it);
      end
      for (int k = 0; k < 4; k++) begin
        yr = 0; yi = 0;
        for (int n = 0; n < 4; n++) begin
          // (-j)^e: 0 -> 1, 1 -> -j, 2 -> -1, 3 -> j
          case ((n * k) % 4)
            0: begin yr += xr[n]; yi += xi[n]; end
            1: begin yr += xi[n]; yi -= xr[n]; end
            2: begin yr -= xr[n]; yi -= xi[n]; end
            3: begin yr -= xi[n]; yi += xr[n]; end
          endcase
        end
        checks++;
        if (out_data[k].re !== DW'(yr) || out_data[k].im !== DW'(yi)) begin
          failures++;
          $display("y%0d mismatch at %0d: got (%0d,%0d) want (%0d,%0d)", k, it,
                   out_data[k].re, out_data[k].im, DW'(yr), DW'(yi));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
