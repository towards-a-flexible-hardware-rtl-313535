// prime_dft_check: test driver and checker for one prime_dft of size P, used by
// tb_prime_dft. It sends FRAMES random frames, back to back or with random idle
// cycles, and compares every output with a DFT evaluated here in floating point
// (tolerance TOL least-significant bits per component). It also checks the
// timing: a fixed latency of LAT cycles from the last input cycle of a frame to
// the first output cycle, and output frames spaced by (P+1)/2 cycles while the
// input runs without gaps. Results are reported on checks/failures when done.
module prime_dft_check
  import fft_pkg::*;
#(
  parameter int P      = 5,
  parameter int FRAMES = 40,
  parameter int TOL    = 3,
  parameter int LAT    = P + 7
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic done
);

  localparam int CYC = (P + 1) / 2;
  localparam int AMP = 32000 / P / 2;

  logic  in_valid, in_ready, out_valid, out_sop, overflow;
  cplx_t in_data [2], out_data [2];

  prime_dft #(.P(P)) dut (
    .clk, .rst_n, .in_valid, .in_data, .in_ready, .out_valid, .out_sop, .out_data, .overflow
  );

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  real exp_re [FRAMES][P], exp_im [FRAMES][P];
  int  t_last_in [FRAMES];
  int  cyc_cnt, in_beat, in_done, in_frames, out_frames, out_slot, prev_sop;
  bit  gapless [FRAMES];

  initial begin
    checks = 0; failures = 0; done = 0;
    in_valid = 0; in_data = '{default: '0};
    in_frames = 0;
    @(posedge rst_n);
    for (int f = 0; f < FRAMES; f++) begin
      int xr [P], xi [P];
      bit gaps;
      gaps = (f >= FRAMES / 2) && ($urandom_range(0, 1) == 1);
      gapless[f] = !gaps;
      for (int n = 0; n < P; n++) begin
        xr[n] = $signed($urandom_range(0, 2 * AMP)) - AMP;
        xi[n] = $signed($urandom_range(0, 2 * AMP)) - AMP;
      end
      for (int k = 0; k < P; k++) begin
        real sr, si, a;
        sr = 0.0; si = 0.0;
        for (int n = 0; n < P; n++) begin
          a  = -2.0 * PI * real'((n * k) % P) / real'(P);
          sr += real'(xr[n]) * $cos(a) - real'(xi[n]) * $sin(a);
          si += real'(xr[n]) * $sin(a) + real'(xi[n]) * $cos(a);
        end
        exp_re[f][k] = sr; exp_im[f][k] = si;
      end
      for (int c = 0; c < CYC; c++) begin
        @(negedge clk);
        while (c == 0 && !in_ready) begin
          in_valid = 0;
          @(negedge clk);
        end
        if (gaps) begin
          in_valid = 0;
          repeat ($urandom_range(0, 2)) @(negedge clk);
        end
        in_valid = 1;
        for (int i = 0; i < 2; i++) begin
          in_data[i].re = (2 * c + i < P) ? DW'(xr[2 * c + i]) : DW'(12345);  // pad slot: ignored
          in_data[i].im = (2 * c + i < P) ? DW'(xi[2 * c + i]) : DW'(-321);
        end
      end
      in_frames = f + 1;
    end
    @(negedge clk);
    in_valid = 0;
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      cyc_cnt <= 0; in_beat <= 0; in_done <= 0; out_frames <= 0; out_slot <= 0; prev_sop <= -1;
    end else begin
      cyc_cnt <= cyc_cnt + 1;
      if (in_valid && in_ready) begin
        if (in_beat == CYC - 1) begin
          t_last_in[in_done] <= cyc_cnt;
          in_done <= in_done + 1;
          in_beat <= 0;
        end else in_beat <= in_beat + 1;
      end
      if (out_valid) begin
        int f;
        f = out_frames;
        if (out_sop) begin
          checks++;
          if (out_slot != 0) begin failures++; $display("P=%0d: out_sop inside a frame", P); end
          // latency
          checks++;
          if (cyc_cnt - t_last_in[f] != LAT) begin
            failures++;
            $display("P=%0d frame %0d: latency %0d, expected %0d", P, f, cyc_cnt - t_last_in[f], LAT);
          end
          // spacing of frames whose inputs came without gaps
          if (f > 0 && f < FRAMES / 2) begin
            checks++;
            if (cyc_cnt - prev_sop != CYC) begin
              failures++;
              $display("P=%0d frame %0d: spacing %0d, expected %0d", P, f, cyc_cnt - prev_sop, CYC);
            end
          end
          prev_sop <= cyc_cnt;
        end
        for (int i = 0; i < 2; i++) begin
          int k;
          k = 2 * out_slot + i;
          checks++;
          if (k < P) begin
            if (rabs(real'(out_data[i].re) - exp_re[f][k]) > real'(TOL) ||
                rabs(real'(out_data[i].im) - exp_im[f][k]) > real'(TOL)) begin
              failures++;
              $display("P=%0d frame %0d y%0d: got (%0d,%0d) want (%f,%f)", P, f, k,
                       int'(out_data[i].re), int'(out_data[i].im), exp_re[f][k], exp_im[f][k]);
            end
          end else if (out_data[i] != '0) begin
            failures++;
            $display("P=%0d frame %0d: pad slot not zero", P, f);
          end
        end
        if (out_slot == CYC - 1) begin
          out_slot <= 0;
          out_frames <= out_frames + 1;
          if (out_frames + 1 == FRAMES) done <= 1;
        end else out_slot <= out_slot + 1;
      end
      if (overflow && !done) begin
        failures++;
        $display("P=%0d: overflow", P);
        done <= 1;
      end
    end
  end

endmodule
