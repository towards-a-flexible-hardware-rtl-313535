// fft_pkg: types, constants and elaboration-time helper functions shared by the
// streaming mixed-radix DFT.
//
// Samples are complex fixed-point numbers (cplx_t): DW-bit two's-complement real
// and imaginary parts, integer scaling (no implicit fraction). Constant
// coefficients (cosines, sines, twiddle factors) are CW-bit signed with CFRAC
// fractional bits, so 1.0 is exactly representable. The published design builds its
// units in floating point with a selectable precision; the fixed-point format
// here is this design's own choice.
//
// The remaining functions describe the data orders of the streaming pipeline.
// They are evaluated only while elaborating (to build the read tables of the
// permutation units and the coefficient tables), never in hardware:
//   * A frame is a sequence of "slots"; with streaming width SW, slots SW*c to
//     SW*c+SW-1 travel together in cycle c.
//   * perm_src(kind, ...) gives, for an output slot of a permutation unit,
//     the input slot it copies, or -1 for an inserted zero.
package fft_pkg;

  localparam int DW    = 16;  // bits per real/imag component of a sample
  localparam int CW    = 16;  // bits per constant coefficient
  localparam int CFRAC = 14;  // fractional bits of a coefficient (1.0 = 2^14)

  typedef struct packed {
    logic signed [DW-1:0] re;
    logic signed [DW-1:0] im;
  } cplx_t;

  typedef struct packed {
    logic signed [CW-1:0] re;
    logic signed [CW-1:0] im;
  } coef_t;

  // Kinds of reordering performed by stream_perm.
  typedef enum logic [2:0] {
    PERM_ROWS_IN = 3'd0,  // natural input -> rows of x~, in stage-0 butterfly order
    PERM_STAGE   = 3'd1,  // between radix-2 stages: stage s-1 layout -> stage s layout
    PERM_TO_PRIME= 3'd2,  // twiddled rows -> transposed, one prime frame per column
    PERM_OUT     = 3'd3,  // prime outputs -> natural output order
    PERM_PRIME_P = 3'd4,  // forward adjustment P of a prime DFT
    PERM_PRIME_Q = 3'd5,  // inverse adjustment Q of a prime DFT
    PERM4_ROWS_IN  = 3'd6,  // width 4: natural input -> one row of x~ per cycle
    PERM4_TO_PRIME = 3'd7   // width 4: twiddled rows (natural order) -> prime frames
  } perm_kind_e;

  localparam real PI = 3.14159265358979323846;

  function automatic int clog2_min1(int v);
    return (v <= 2) ? 1 : $clog2(v);
  endfunction

  // round(cos(2*pi*num/den) * 2^CFRAC)
  function automatic int fx_cos(int num, int den);
    return $rtoi($floor($cos(2.0 * PI * real'(num) / real'(den)) * real'(1 << CFRAC) + 0.5));
  endfunction

  // round(sin(2*pi*num/den) * 2^CFRAC)
  function automatic int fx_sin(int num, int den);
    return $rtoi($floor($sin(2.0 * PI * real'(num) / real'(den)) * real'(1 << CFRAC) + 0.5));
  endfunction

  // Bit reversal of v over nbits bits.
  function automatic int bitrev(int v, int nbits);
    int r = 0;
    for (int b = 0; b < nbits; b++) if (v[b]) r |= 1 << (nbits - 1 - b);
    return r;
  endfunction

  // Radix-2 decimation-in-frequency over R = 2^K points. In stage s the
  // butterfly q pairs positions ia = blk*2h + j and ia + h, with h = R >> (s+1),
  // blk = q / h, j = q % h. Slot 2q carries position ia, slot 2q+1 position ia+h.
  function automatic int stage_pos(int s, int K, int slot);
    int h   = (1 << K) >> (s + 1);
    int q   = slot / 2;
    int ia  = (q / h) * 2 * h + (q % h);
    return (slot % 2 == 1) ? ia + h : ia;
  endfunction

  // Inverse of stage_pos: the slot (within a row) carrying position pos in stage s.
  function automatic int stage_slot(int s, int K, int pos);
    for (int t = 0; t < (1 << K); t++) if (stage_pos(s, K, t) == pos) return t;
    return 0;
  endfunction

  // Source slot for output slot t of a permutation unit.
  //   P: prime size, K: log2 of the power-of-two factor R, s: stage (PERM_STAGE).
  // Frame layouts (N = R*P, SW samples per cycle, slot SW*c + lane in cycle c):
  //   natural      : slot k holds element k (N slots)
  //   rows, stage s: slot r*R + u holds row r of x~ (x[r + P*c]), stage_pos(s,K,u)
  //   prime frames : R frames of P + 1 slots, one per column k1, slot P of each
  //                  a padding zero. SW/2 prime kernels take lane pairs 0-1,
  //                  2-3, ...; kernel g gets columns g*F .. g*F+F-1 (F = 2R/SW)
  //                  one after the other, see prime_slot (R*(P+1) slots)
  //   P output     : slot 0 = x0, slot 1 = 0, slots 2m, 2m+1 = x_m, x_{P-m}
  //   Q input      : slot 0 = y0, slot 2k, 2k+1 = y_k, y_{P-k}
  // Parallel DFT_4 variant (R = 4, SW = 4):
  //   rows         : slot 4r + c holds x[r + P*c] (one whole row per cycle)
  //   twiddled rows: slot 4r + k1 holds element k1 of row r

  // Slot of the prime-frame layout that holds element j of column k1.
  function automatic int prime_slot(int P, int R, int sw, int k1, int j);
    int H = (P + 1) / 2;
    int F = 2 * R / sw;
    int c = (k1 % F) * H + j / 2;
    return sw * c + (k1 / F) * 2 + j % 2;
  endfunction

  // Inverse of prime_slot: column (k1) and element (j) held by slot t.
  function automatic int prime_col(int P, int R, int sw, int t);
    int H = (P + 1) / 2;
    int F = 2 * R / sw;
    return ((t % sw) / 2) * F + (t / sw) / H;
  endfunction

  function automatic int prime_elem(int P, int sw, int t);
    int H = (P + 1) / 2;
    return ((t / sw) % H) * 2 + t % 2;
  endfunction

  function automatic int perm_src(perm_kind_e kind, int P, int K, int s, int sw, int t);
    int R = 1 << K;
    int r, u, pos, k1, j, m;
    case (kind)
      PERM_ROWS_IN: begin
        // row r, slot u holds position pos = c, i.e. x[r + P*c]
        r   = t / R;
        u   = t % R;
        pos = stage_pos(0, K, u);
        return r + P * pos;
      end
      PERM_STAGE: begin
        r   = t / R;
        u   = t % R;
        pos = stage_pos(s, K, u);
        return r * R + stage_slot(s - 1, K, pos);
      end
      PERM_TO_PRIME: begin
        // After the last stage, position pos of row r holds DFT_R output bitrev(pos).
        k1 = prime_col(P, R, sw, t);
        j  = prime_elem(P, sw, t);
        if (j == P) return -1;
        pos = bitrev(k1, K);
        return j * R + stage_slot(K - 1, K, pos);
      end
      PERM_OUT: begin
        // y[k1 + R*k2] is element k2 of prime frame k1
        k1 = t % R;
        j  = t / R;
        return prime_slot(P, R, sw, k1, j);
      end
      PERM4_ROWS_IN: begin
        r = t / 4;
        return r + P * (t % 4);
      end
      PERM4_TO_PRIME: begin
        k1 = prime_col(P, R, sw, t);
        j  = prime_elem(P, sw, t);
        return (j == P) ? -1 : j * 4 + k1;
      end
      PERM_PRIME_P: begin
        if (t == 0) return 0;
        if (t == 1) return -1;
        m = t / 2;
        return (t % 2 == 0) ? m : P - m;
      end
      PERM_PRIME_Q: begin
        if (t == 0) return 0;
        if (t == P) return -1;
        if (t <= (P - 1) / 2) return 2 * t;
        return 2 * (P - t) + 1;
      end
      default: return -1;
    endcase
  endfunction

endpackage
