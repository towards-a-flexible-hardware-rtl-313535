// twiddle_mult: point-wise multiplication of a streamed frame by constant
// twiddle factors (roots of unity), SW samples per cycle (2 or 4).
//
// The frame holds the P rows of the R-point power-of-two part of an N = R*P
// point DFT (R = 2^K), in the layout of radix-2 stage S (see fft_pkg):
// slot t = r*R + u carries row r, vector position stage_pos(S, K, u).
//   S < K-1 : the internal twiddle of a radix-2 decimation-in-frequency stage.
//             The lower output of butterfly q, with h = R >> (S+1) and
//             j = q mod h, is multiplied by w_{2h}^j; upper outputs by 1.
//   S = K-1 : the twiddle between the two factors of the mixed-radix DFT. The
//             last stage leaves output k1 = bitrev(pos) of row r in position
//             pos, which is multiplied by w_N^(r*k1).
//   S = K   : rows hold the DFT_R outputs in natural order (as a parallel
//             dft4 leaves them): slot r*R + k1 is multiplied by w_N^(r*k1).
// w_n = exp(-j*2*pi/n). The coefficient of each slot comes from a table built
// while elaborating; a slot counter, restarted by in_sop, selects it.
//
// Products are rounded to nearest and wrap at DW bits. Latency one cycle;
// valid and start-of-frame flags travel with the data.
// What is multiplied by what follows the mixed-radix factorization of the
// published design; the stage layout, the coefficient format and rounding are this
// design's choices.
module twiddle_mult
  import fft_pkg::*;
#(
  parameter int P = 5,
  parameter int K = 2,
  parameter int S = 1,
  parameter int SW = 2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  logic  in_sop,
  input  cplx_t in_data [SW],
  output logic  out_valid,
  output logic  out_sop,
  output cplx_t out_data [SW]
);

  localparam int R    = 1 << K;
  localparam int N    = R * P;
  localparam int CYC  = N / SW;
  localparam int CCW  = clog2_min1(CYC);
  localparam int PW   = DW + CW + 1;

  // exponent e and root order n of the factor w_n^e for slot t
  function automatic int tw_num(int t);
    int r = t / R, u = t % R;
    int h = R >> (S + 1);
    if (S == K)     return r * u;
    if (S == K - 1) return r * bitrev(stage_pos(K - 1, K, u), K);
    if (u % 2 == 0) return 0;
    return (u / 2) % h;
  endfunction

  function automatic int tw_den();
    if (S >= K - 1) return N;
    return 2 * (R >> (S + 1));
  endfunction

  coef_t tab [N];
  for (genvar t = 0; t < N; t++) begin : g_tab
    localparam int E  = tw_num(t);
    localparam int D  = tw_den();
    localparam int CR = fx_cos(E, D);
    localparam int CI = -fx_sin(E, D);
    assign tab[t].re = CW'(CR);
    assign tab[t].im = CW'(CI);
  end

  logic [CCW-1:0] cnt, cyc;
  assign cyc = in_sop ? '0 : cnt;

  always_ff @(posedge clk) begin
    if (!rst_n)        cnt <= '0;
    else if (in_valid) cnt <= (cyc == CCW'(CYC - 1)) ? '0 : cyc + 1'b1;
  end

  function automatic logic signed [DW-1:0] rnd(logic signed [PW-1:0] a);
    return DW'((a + (PW'(1) <<< (CFRAC - 1))) >>> CFRAC);
  endfunction

  cplx_t prod [SW];
  always_comb begin
    for (int i = 0; i < SW; i++) begin
      coef_t w;
      w = tab[SW * cyc + i];
      prod[i].re = rnd(PW'(in_data[i].re) * PW'(w.re) - PW'(in_data[i].im) * PW'(w.im));
      prod[i].im = rnd(PW'(in_data[i].re) * PW'(w.im) + PW'(in_data[i].im) * PW'(w.re));
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_sop   <= 1'b0;
      out_data  <= '{default: '0};
    end else begin
      out_valid <= in_valid;
      out_sop   <= in_valid & in_sop;
      if (in_valid) out_data <= prod;
    end
  end

endmodule
