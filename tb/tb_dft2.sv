// tb_dft2: self-checking test of the butterfly. Random pairs enter every cycle,
// some cycles idle; each output is compared one cycle later with a + b and
// a - b computed here, and the start-of-frame flag must follow the data.
module tb_dft2;
  import fft_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  in_valid = 0, in_sop = 0, out_valid, out_sop;
  cplx_t in_data [2], out_data [2];
  int checks = 0, failures = 0;

  dft2 dut (.*);

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [DW-1:0] rnd_val();
    return DW'($signed($urandom_range(0, 20000)) - 10000);
  endfunction

  initial begin
    cplx_t a, b;
    logic  v, s;
    in_data = '{default: '0};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      v = ($urandom_range(0, 3) != 0);
      s = v && ($urandom_range(0, 2) == 0);
      a.re = rnd_val(); a.im = rnd_val();
      b.re = rnd_val(); b.im = rnd_val();
      in_valid = v; in_sop = s; in_data[0] = a; in_data[1] = b;
      @(negedge clk);
      checks++;
      if (out_valid !== v || out_sop !== s) begin
        failures++;
        $display("flag mismatch at %0d: valid %b/%b sop %b/%b", i, out_valid, v, out_sop, s);
      end
      if (v) begin
        checks++;
        if (out_data[0].re !== DW'(a.re + b.re) || out_data[0].im !== DW'(a.im + b.im) ||
            out_data[1].re !== DW'(a.re - b.re) || out_data[1].im !== DW'(a.im - b.im)) begin
          failures++;
          $display("data mismatch at %0d", i);
        end
      end
      in_valid = 0; in_sop = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
