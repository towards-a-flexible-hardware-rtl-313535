// mixed_radix_dft: streaming DFT of size N = 2^K * P (P an odd prime), SW
// complex samples per cycle, default N = 20 (K = 2, P = 5) with SW = 2.
//
// The DFT is factored as N = R * P with R = 2^K. The input x is viewed as a P x R
// matrix whose row r is x[r], x[r+P], ..., x[r+(R-1)P]:
//   1. a DFT of size R on every row, computed as K radix-2 stages
//      (butterfly, then twiddle), with a permutation in front of each stage;
//   2. multiplication of element k1 of row r by w_N^(r*k1);
//   3. transposition, so that column k1 becomes one prime frame;
//   4. a DFT of size P on every column (prime_dft);
//   5. output y[k1 + R*k2] = element k2 of prime frame k1, put back in order.
// Chain: stream_perm (rows in) -> [stream_perm (between stages) ->] dft2 ->
// twiddle_mult, K times -> stream_perm (to prime frames) -> prime_dft ->
// stream_perm (natural order out).
//
// Streaming width: with SW = 2 each radix-2 stage is one butterfly and one
// prime_dft follows the transposition. Wider streams (SW = 4 or 8, SW must
// divide 2^K) put SW/2 butterflies side by side in every stage (lanes 2q and
// 2q+1 feed butterfly q) and SW/2 prime kernels side by side after the
// transposition; kernel g takes lanes 2g, 2g+1 and the columns
// g*2R/SW .. (g+1)*2R/SW - 1 one after the other.
// SW = 4 with K = 2 builds the variant with a parallel DFT_4 instead: one row
// per cycle through dft4 and a twiddle stage, then a transposition that feeds
// two prime_dft kernels side by side (columns 0 and 1 to one, 2 and 3 to the
// other), and a permutation that merges their outputs into natural order.
// Every width has a transform period of R*(P+1)/SW cycles against N/SW cycles
// of input: the zero pad costs R/SW cycles per transform.
//
// Rate: a prime frame carries P samples and one zero pad, so the prime DFTs
// need R*(P+1)/SW cycles per transform, more than the N/SW cycles of the
// input. The input permutation therefore spaces its output frames by
// R*(P+1)/SW cycles (12 for N = 20, SW = 2) and in_ready falls when both of its banks are full: start a
// frame only while in_ready is high. After that, every unit gets its frames at
// that spacing and never overflows.
//
// Interface: frames of N samples in natural order, SW per cycle (slots SW*c to
// SW*c+SW-1 in cycle c); the cycles of a frame need not be contiguous. Output frames
// are in natural order, contiguous, out_sop on the first cycle. overflow is
// sticky and reports a frame sent while in_ready was low. Arithmetic is
// fixed-point without scaling and wraps at DW bits: keep |re|, |im| of the
// input below 2^(DW-1) / N.
//
// The factorization, the order of the units, the transposition, the DFT_4
// variant and the duplicated prime kernels at wider streams follow the
// published design. The permutation between radix-2 stages, radix-2 (not
// radix-4) stages at widths above two when 2^K > 4, the pacing at the input,
// and the fixed-point arithmetic are this design's choices.
module mixed_radix_dft
  import fft_pkg::*;
#(
  parameter int P = 5,
  parameter int K = 2,
  parameter int SW = 2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  cplx_t in_data [SW],
  output logic  in_ready,
  output logic  out_valid,
  output logic  out_sop,
  output cplx_t out_data [SW],
  output logic  overflow
);

  localparam int R = 1 << K;
  localparam int N = R * P;

  if (!(SW == 4 && K == 2)) begin : g_r2
    // ---- radix-2 stages, SW/2 butterflies and SW/2 prime kernels -----------
    localparam int NPK    = SW / 2;          // prime kernels side by side
    localparam int PSLOTS = R * (P + 1);     // slots of R prime frames
    localparam int PERIOD = PSLOTS / SW;     // cycles per transform

    if (SW < 2 || SW % 2 != 0 || R % SW != 0) begin : g_bad_sw
      $error("mixed_radix_dft: SW must be even and divide 2^K");
    end

    // stage s: a_* feeds the butterflies, b_* the twiddle, t_* leaves the stage
    logic  a_valid [K], a_sop [K], b_valid [K], b_sop [K], t_valid [K], t_sop [K];
    logic  unused_last_sop;
    assign unused_last_sop = t_sop[K-1];  // the transposition counts slots itself
    cplx_t a_data [K][SW], b_data [K][SW], t_data [K][SW];
    logic  ovf [K + 2];

    stream_perm #(
      .KIND(PERM_ROWS_IN), .P(P), .K(K), .S(0),
      .IN_SLOTS(N), .OUT_SLOTS(N), .MIN_PERIOD(PERIOD), .SW(SW)
    ) u_perm_in (
      .clk, .rst_n, .in_valid, .in_data, .in_ready,
      .out_valid(a_valid[0]), .out_sop(a_sop[0]), .out_data(a_data[0]), .overflow(ovf[0])
    );

    for (genvar s = 0; s < K; s++) begin : g_stage
      if (s > 0) begin : g_perm
        logic unused_ready;
        stream_perm #(
          .KIND(PERM_STAGE), .P(P), .K(K), .S(s),
          .IN_SLOTS(N), .OUT_SLOTS(N), .MIN_PERIOD(0), .SW(SW)
        ) u_perm (
          .clk, .rst_n,
          .in_valid(t_valid[s-1]), .in_data(t_data[s-1]), .in_ready(unused_ready),
          .out_valid(a_valid[s]), .out_sop(a_sop[s]), .out_data(a_data[s]),
          .overflow(ovf[s])
        );
      end

      // lanes 2q and 2q+1 carry the two inputs of one butterfly
      logic [NPK-1:0] bv, bs;
      for (genvar q = 0; q < NPK; q++) begin : g_bfly
        cplx_t bin [2], bout [2];
        assign bin[0] = a_data[s][2 * q];
        assign bin[1] = a_data[s][2 * q + 1];
        dft2 u_bfly (
          .clk, .rst_n,
          .in_valid(a_valid[s]), .in_sop(a_sop[s]), .in_data(bin),
          .out_valid(bv[q]), .out_sop(bs[q]), .out_data(bout)
        );
        assign b_data[s][2 * q]     = bout[0];
        assign b_data[s][2 * q + 1] = bout[1];
      end
      assign b_valid[s] = bv[0];
      assign b_sop[s]   = bs[0];

      always_ff @(posedge clk) begin
        if (rst_n) a_bfly_sync: assert ((bv == '0 || bv == '1) && (bs == '0 || bs == '1))
          else $error("mixed_radix_dft: butterflies out of step");
      end

      twiddle_mult #(.P(P), .K(K), .S(s), .SW(SW)) u_twid (
        .clk, .rst_n,
        .in_valid(b_valid[s]), .in_sop(b_sop[s]), .in_data(b_data[s]),
        .out_valid(t_valid[s]), .out_sop(t_sop[s]), .out_data(t_data[s])
      );
    end

    // transposition into R prime frames of P + 1 slots
    logic  c_valid, c_sop, c_ready;
    cplx_t c_data [SW];
    stream_perm #(
      .KIND(PERM_TO_PRIME), .P(P), .K(K), .S(0),
      .IN_SLOTS(N), .OUT_SLOTS(PSLOTS), .MIN_PERIOD(0), .SW(SW)
    ) u_perm_mid (
      .clk, .rst_n,
      .in_valid(t_valid[K-1]), .in_data(t_data[K-1]), .in_ready(c_ready),
      .out_valid(c_valid), .out_sop(c_sop), .out_data(c_data), .overflow(ovf[K])
    );

    // prime kernel g takes lanes 2g and 2g+1
    logic  d_valid [NPK], d_sop [NPK], d_ready [NPK], d_ovf [NPK];
    cplx_t d_data [SW];
    for (genvar g = 0; g < NPK; g++) begin : g_prime
      cplx_t lane_in [2], lane_out [2];
      assign lane_in[0] = c_data[2 * g];
      assign lane_in[1] = c_data[2 * g + 1];
      prime_dft #(.P(P)) u_prime (
        .clk, .rst_n,
        .in_valid(c_valid), .in_data(lane_in), .in_ready(d_ready[g]),
        .out_valid(d_valid[g]), .out_sop(d_sop[g]), .out_data(lane_out), .overflow(d_ovf[g])
      );
      assign d_data[2 * g]     = lane_out[0];
      assign d_data[2 * g + 1] = lane_out[1];
    end

    logic o_ready, o_ovf;
    stream_perm #(
      .KIND(PERM_OUT), .P(P), .K(K), .S(0),
      .IN_SLOTS(PSLOTS), .OUT_SLOTS(N), .MIN_PERIOD(0), .SW(SW)
    ) u_perm_out (
      .clk, .rst_n,
      .in_valid(d_valid[0]), .in_data(d_data), .in_ready(o_ready),
      .out_valid, .out_sop, .out_data, .overflow(o_ovf)
    );

    always_comb begin
      ovf[K + 1] = o_ovf;
      for (int g = 0; g < NPK; g++) ovf[K + 1] |= d_ovf[g];
      overflow = 1'b0;
      for (int i = 0; i < K + 2; i++) overflow |= ovf[i];
    end

    // Frame alignment inside the pipeline: every unit sees whole frames, and
    // the prime kernels run in step.
    always_ff @(posedge clk) begin
      if (rst_n && t_valid[K-1]) a_mid_free: assert (c_ready)
        else $error("mixed_radix_dft: transposition buffer has no free bank");
      for (int g = 0; g < NPK; g++) begin
        if (rst_n && c_valid && c_sop) a_prime_free: assert (d_ready[g])
          else $error("mixed_radix_dft: prime DFT has no free bank");
        if (rst_n) a_prime_sync: assert (d_valid[g] == d_valid[0] && d_sop[g] == d_sop[0])
          else $error("mixed_radix_dft: prime kernels out of step");
      end
      if (rst_n && d_valid[0] && d_sop[0]) a_out_free: assert (o_ready)
        else $error("mixed_radix_dft: output permutation has no free bank");
    end
  end else begin : g_r4

    // ---- streaming width 4 with a parallel DFT_4 (R = 4) ----------------------
    localparam int R4      = 4;
    localparam int PSLOTS4 = R4 * (P + 1);
    localparam int PERIOD4 = PSLOTS4 / 4;

    if (K != 2) begin : g_bad_k
      $error("mixed_radix_dft: SW = 4 needs K = 2");
    end

    logic  a_valid, a_sop, b_valid, b_sop, t_valid, t_sop, c_valid, c_sop, c_ready;
    cplx_t a_data [4], b_data [4], t_data [4], c_data [4];
    logic  ovf_in, ovf_mid, ovf_out;

    stream_perm #(
      .KIND(PERM4_ROWS_IN), .P(P), .K(2), .S(0),
      .IN_SLOTS(N), .OUT_SLOTS(N), .MIN_PERIOD(PERIOD4), .SW(4)
    ) u_perm_in (
      .clk, .rst_n, .in_valid, .in_data, .in_ready,
      .out_valid(a_valid), .out_sop(a_sop), .out_data(a_data), .overflow(ovf_in)
    );

    dft4 u_dft4 (
      .clk, .rst_n, .in_valid(a_valid), .in_sop(a_sop), .in_data(a_data),
      .out_valid(b_valid), .out_sop(b_sop), .out_data(b_data)
    );

    twiddle_mult #(.P(P), .K(2), .S(2), .SW(4)) u_twid (
      .clk, .rst_n, .in_valid(b_valid), .in_sop(b_sop), .in_data(b_data),
      .out_valid(t_valid), .out_sop(t_sop), .out_data(t_data)
    );

    stream_perm #(
      .KIND(PERM4_TO_PRIME), .P(P), .K(2), .S(0),
      .IN_SLOTS(N), .OUT_SLOTS(PSLOTS4), .MIN_PERIOD(0), .SW(4)
    ) u_perm_mid (
      .clk, .rst_n, .in_valid(t_valid), .in_data(t_data), .in_ready(c_ready),
      .out_valid(c_valid), .out_sop(c_sop), .out_data(c_data), .overflow(ovf_mid)
    );

    // two prime kernels side by side, lanes 0-1 and lanes 2-3
    logic  d_valid [2], d_sop [2], d_ready [2], d_ovf [2];
    cplx_t d_data [2][2];
    for (genvar u = 0; u < 2; u++) begin : g_prime
      cplx_t lane_in [2];
      assign lane_in[0] = c_data[2 * u];
      assign lane_in[1] = c_data[2 * u + 1];
      prime_dft #(.P(P)) u_prime (
        .clk, .rst_n, .in_valid(c_valid), .in_data(lane_in), .in_ready(d_ready[u]),
        .out_valid(d_valid[u]), .out_sop(d_sop[u]), .out_data(d_data[u]), .overflow(d_ovf[u])
      );
    end

    cplx_t e_data [4];
    assign e_data[0] = d_data[0][0];
    assign e_data[1] = d_data[0][1];
    assign e_data[2] = d_data[1][0];
    assign e_data[3] = d_data[1][1];

    logic o_ready;
    stream_perm #(
      .KIND(PERM_OUT), .P(P), .K(2), .S(4),
      .IN_SLOTS(PSLOTS4), .OUT_SLOTS(N), .MIN_PERIOD(0), .SW(4)
    ) u_perm_out (
      .clk, .rst_n, .in_valid(d_valid[0]), .in_data(e_data), .in_ready(o_ready),
      .out_valid, .out_sop, .out_data, .overflow(ovf_out)
    );

    assign overflow = ovf_in | ovf_mid | ovf_out | d_ovf[0] | d_ovf[1];

    logic unused_sw4;
    assign unused_sw4 = t_sop ^ d_sop[1];

    always_ff @(posedge clk) begin
      if (rst_n && t_valid) a_mid4_free: assert (c_ready)
        else $error("mixed_radix_dft: transposition buffer has no free bank");
      if (rst_n && c_valid && c_sop) a_prime4_free: assert (d_ready[0] && d_ready[1])
        else $error("mixed_radix_dft: prime DFT has no free bank");
      if (rst_n) a_prime4_sync: assert (d_valid[0] == d_valid[1])
        else $error("mixed_radix_dft: prime kernels out of step");
      if (rst_n && d_valid[0] && d_sop[0]) a_out4_free: assert (o_ready)
        else $error("mixed_radix_dft: output permutation has no free bank");
    end
  end

endmodule
