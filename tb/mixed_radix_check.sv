// mixed_radix_check: test driver and checker for one mixed_radix_dft of size
// N = 2^K * P and streaming width SW. It sends FRAMES random frames: the first half as fast as
// in_ready allows (so the input pacing stalls the sender), the second half with
// random idle cycles inside frames and between them. Every output sample is
// compared with a DFT of size N evaluated here in floating point (tolerance TOL
// per component). Timing checks: output frames are contiguous, spaced by
// R*(P+1)/SW cycles while the input is saturated, and an isolated first frame
// has a latency of LAT cycles (last input cycle to first output cycle; 0 skips
// the check). Counts of stalls, gapped frames, prime frames and pad slots are
// reported on the outputs.
module mixed_radix_check
  import fft_pkg::*;
#(
  parameter int P      = 5,
  parameter int K      = 2,
  parameter int FRAMES = 12,
  parameter int TOL    = 4,
  parameter int LAT    = 0,
  parameter int SW     = 2
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   n_stall,
  output int   n_gap_frames,
  output int   n_prime_frames,
  output int   n_pad_slots,
  output logic done
);

  localparam int R      = 1 << K;
  localparam int N      = R * P;
  localparam int CYC    = N / SW;
  localparam int PERIOD = R * (P + 1) / SW;
  localparam int AMP    = 30000 / N / 2;

  logic  in_valid, in_ready, out_valid, out_sop, overflow;
  cplx_t in_data [SW], out_data [SW];

  mixed_radix_dft #(.P(P), .K(K), .SW(SW)) dut (
    .clk, .rst_n, .in_valid, .in_data, .in_ready, .out_valid, .out_sop, .out_data, .overflow
  );

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  real exp_re [FRAMES][N], exp_im [FRAMES][N];
  int  t_last_in [FRAMES];
  int  cyc_cnt, in_beat, in_done, out_frames, out_slot, prev_sop;

  initial begin
    checks = 0; failures = 0; done = 0; n_stall = 0; n_gap_frames = 0;
    in_valid = 0; in_data = '{default: '0};
    @(posedge rst_n);
    repeat (2) @(negedge clk);
    for (int f = 0; f < FRAMES; f++) begin
      int xr [N], xi [N];
      bit gaps;
      gaps = (f >= FRAMES / 2);
      if (gaps) n_gap_frames++;
      for (int n = 0; n < N; n++) begin
        xr[n] = $signed($urandom_range(0, 2 * AMP)) - AMP;
        xi[n] = $signed($urandom_range(0, 2 * AMP)) - AMP;
      end
      for (int k = 0; k < N; k++) begin
        real sr, si, a;
        sr = 0.0; si = 0.0;
        for (int n = 0; n < N; n++) begin
          a  = -2.0 * PI * real'((n * k) % N) / real'(N);
          sr += real'(xr[n]) * $cos(a) - real'(xi[n]) * $sin(a);
          si += real'(xr[n]) * $sin(a) + real'(xi[n]) * $cos(a);
        end
        exp_re[f][k] = sr; exp_im[f][k] = si;
      end
      // the first frame is sent alone, to measure the latency
      if (f == 1) begin
        in_valid = 0;
        wait (out_frames >= 1);
        @(negedge clk);
      end
      for (int c = 0; c < CYC; c++) begin
        if (gaps && $urandom_range(0, 3) == 0) begin
          in_valid = 0;
          repeat ($urandom_range(1, 3)) @(negedge clk);
        end
        while (c == 0 && !in_ready) begin
          in_valid = 0;
          n_stall++;
          @(negedge clk);
        end
        in_valid = 1;
        for (int i = 0; i < SW; i++) begin
          in_data[i].re = DW'(xr[SW * c + i]);
          in_data[i].im = DW'(xi[SW * c + i]);
        end
        @(negedge clk);
      end
      if (gaps) begin
        in_valid = 0;
        repeat ($urandom_range(0, 2 * PERIOD)) @(negedge clk);
      end
    end
    in_valid = 0;
  end

  // prime frames and zero pads seen at the input of the prime kernel(s)
  if (!(SW == 4 && K == 2)) begin : g_cnt2
    localparam int NPK = SW / 2;
    logic [NPK-1:0] pad_hit;
    for (genvar g = 0; g < NPK; g++) begin : g_k
      assign pad_hit[g] = dut.g_r2.g_prime[g].u_prime.in_valid &&
                          dut.g_r2.g_prime[g].u_prime.in_data[1] == '0 &&
                          dut.g_r2.g_prime[g].u_prime.u_p.u_perm.wcnt == (P - 1) / 2;
    end
    always @(posedge clk) begin
      if (!rst_n) begin
        n_prime_frames <= 0; n_pad_slots <= 0;
      end else begin
        n_pad_slots <= n_pad_slots + $countones(pad_hit);
        if (dut.g_r2.g_prime[0].u_prime.out_valid && dut.g_r2.g_prime[0].u_prime.out_sop)
          n_prime_frames <= n_prime_frames + NPK;
      end
    end
  end else begin : g_cnt4
    always @(posedge clk) begin
      if (!rst_n) begin
        n_prime_frames <= 0; n_pad_slots <= 0;
      end else begin
        n_pad_slots <= n_pad_slots +
          int'(dut.g_r4.g_prime[0].u_prime.in_valid && dut.g_r4.g_prime[0].u_prime.in_data[1] == '0 &&
               dut.g_r4.g_prime[0].u_prime.u_p.u_perm.wcnt == (P - 1) / 2) +
          int'(dut.g_r4.g_prime[1].u_prime.in_valid && dut.g_r4.g_prime[1].u_prime.in_data[1] == '0 &&
               dut.g_r4.g_prime[1].u_prime.u_p.u_perm.wcnt == (P - 1) / 2);
        if (dut.g_r4.g_prime[0].u_prime.out_valid && dut.g_r4.g_prime[0].u_prime.out_sop)
          n_prime_frames <= n_prime_frames + 2;
      end
    end
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      cyc_cnt <= 0; in_beat <= 0; in_done <= 0; out_frames <= 0; out_slot <= 0;
      prev_sop <= -1;
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
        checks++;
        if (out_sop != (out_slot == 0)) begin
          failures++;
          $display("N=%0d: out_sop at slot %0d", N, out_slot);
        end
        if (out_sop) begin
          if (f == 0 && LAT > 0) begin
            checks++;
            if (cyc_cnt - t_last_in[0] != LAT) begin
              failures++;
              $display("N=%0d: latency %0d, expected %0d", N, cyc_cnt - t_last_in[0], LAT);
            end
          end
          if (f == 0) $display("N=%0d: latency of an isolated frame %0d cycles", N, cyc_cnt - t_last_in[0]);
          if (f >= 2 && f < FRAMES / 2) begin
            checks++;
            if (cyc_cnt - prev_sop != PERIOD) begin
              failures++;
              $display("N=%0d frame %0d: spacing %0d, expected %0d", N, f, cyc_cnt - prev_sop, PERIOD);
            end
          end
          prev_sop <= cyc_cnt;
        end
        for (int i = 0; i < SW; i++) begin
          int k;
          k = SW * out_slot + i;
          checks++;
          if (rabs(real'(out_data[i].re) - exp_re[f][k]) > real'(TOL) ||
              rabs(real'(out_data[i].im) - exp_im[f][k]) > real'(TOL)) begin
            failures++;
            $display("N=%0d frame %0d y%0d: got (%0d,%0d) want (%f,%f)", N, f, k,
                     int'(out_data[i].re), int'(out_data[i].im), exp_re[f][k], exp_im[f][k]);
          end
        end
        if (out_slot == CYC - 1) begin
          out_slot <= 0;
          out_frames <= out_frames + 1;
          if (out_frames + 1 == FRAMES) done <= 1;
        end else out_slot <= out_slot + 1;
      end else if (out_slot != 0) begin
        checks++;
        failures++;
        $display("N=%0d: gap inside an output frame", N);
      end
      if (overflow && !done) begin
        failures++;
        $display("N=%0d: overflow", N);
        done <= 1;
      end
    end
  end

endmodule
