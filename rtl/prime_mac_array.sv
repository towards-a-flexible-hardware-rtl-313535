// prime_mac_array: the multiply-and-accumulate array of a prime-sized DFT of size
// P (odd prime), streaming width 2.
//
// Input: per frame, M+1 = (P+1)/2 consecutive pairs (sum_m, diff_m) from the
// first butterfly, where pair 0 is (x0, x0) (x0 and an inserted zero) and pair m
// (m = 1..M) is (x_m + x_{P-m}, x_m - x_{P-m}). in_sop marks pair 0.
//
// Group 0 is the accumulator for y0 = sum of all sum_m. Group k (k = 1..M) forms
//   tr_k = sum over m of cos(2*pi*k*m/P) * sum_m
//   ti_k = sum over m of sin(2*pi*k*m/P) * diff_m
// with real multiplications only; for m = 0 the coefficients are 1 and 0, so tr_k
// starts at x0 and ti_k at 0. The outputs of a prime DFT are then
// y_k = tr_k - j*ti_k and y_{P-k} = tr_k + j*ti_k (done after this array).
//
// The groups form a systolic chain: group g sees each pair g cycles after group
// 0 (a register stage between neighbouring groups for the data and for the pair
// index). Every group has its own accumulators; at pair 0 the feedback input of
// its adders is replaced by zero, so back-to-back frames need no gap. Group g
// finishes a frame g cycles after group 0, so the groups finish in consecutive
// cycles and one output multiplexer serves them all: one (tr, ti) pair per
// cycle, group 0 first (marked by out_sop; its ti is zero), then groups 1..M.
// Latency from the last pair of a frame to the output of group 0 is 2 cycles.
//
// The structure (accumulator plus M MAC groups, registers between them,
// zero-select at the adders, output multiplexer) follows the published design. The
// fixed-point formats, the single-cycle multiply-accumulate and the rounding
// (products accumulated at full precision, rounded once at the output) are this
// design's choices. out_data wraps at DW bits.
module prime_mac_array
  import fft_pkg::*;
#(
  parameter int P = 5
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  logic  in_sop,
  input  cplx_t in_data [2],   // [0] = sum, [1] = difference
  output logic  out_valid,
  output logic  out_sop,
  output cplx_t out_data [2]   // [0] = tr, [1] = ti of one group
);

  localparam int M   = (P - 1) / 2;
  localparam int G   = M + 1;                       // number of groups, Eq. 23
  localparam int MW  = clog2_min1(G);
  localparam int AW  = DW + CW + clog2_min1(G) + 1; // accumulator width
  localparam int GW  = clog2_min1(G);

  typedef logic signed [AW-1:0] acc_t;

  // ---- pair index at the array input -----------------------------------------
  logic [MW-1:0] m_cnt, m_in;
  assign m_in = in_sop ? '0 : m_cnt;

  always_ff @(posedge clk) begin
    if (!rst_n)        m_cnt <= '0;
    else if (in_valid) m_cnt <= (m_in == MW'(M)) ? '0 : m_in + 1'b1;
  end

  // ---- systolic delay line: stage g feeds group g ----------------------------
  logic          d_valid [G];
  logic [MW-1:0] d_m     [G];
  cplx_t         d_data  [G][2];

  assign d_valid[0] = in_valid;
  assign d_m[0]     = m_in;
  assign d_data[0]  = in_data;

  for (genvar g = 1; g < G; g++) begin : g_dly
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        d_valid[g] <= 1'b0;
        d_m[g]     <= '0;
        d_data[g]  <= '{default: '0};
      end else begin
        d_valid[g] <= d_valid[g-1];
        d_m[g]     <= d_m[g-1];
        d_data[g]  <= d_data[g-1];
      end
    end
  end

  // ---- groups ------------------------------------------------------------------
  acc_t acc_tr_re [G], acc_tr_im [G], acc_ti_re [G], acc_ti_im [G];
  logic done [G];

  for (genvar g = 0; g < G; g++) begin : g_grp
    // coefficient tables of this group, indexed by the pair index m
    logic signed [CW-1:0] c_tab [G];
    logic signed [CW-1:0] s_tab [G];
    for (genvar m = 0; m < G; m++) begin : g_coef
      localparam int C = fx_cos(g * m, P);
      localparam int S = fx_sin(g * m, P);
      assign c_tab[m] = CW'(C);
      assign s_tab[m] = CW'(S);
    end

    logic signed [CW-1:0] c, s;
    acc_t p_tr_re, p_tr_im, p_ti_re, p_ti_im;
    logic first;

    assign c       = c_tab[d_m[g]];
    assign s       = s_tab[d_m[g]];
    assign first   = (d_m[g] == '0);
    assign p_tr_re = AW'(c) * AW'(d_data[g][0].re);
    assign p_tr_im = AW'(c) * AW'(d_data[g][0].im);
    assign p_ti_re = AW'(s) * AW'(d_data[g][1].re);
    assign p_ti_im = AW'(s) * AW'(d_data[g][1].im);

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        acc_tr_re[g] <= '0;
        acc_tr_im[g] <= '0;
        acc_ti_re[g] <= '0;
        acc_ti_im[g] <= '0;
        done[g]      <= 1'b0;
      end else begin
        done[g] <= d_valid[g] && (d_m[g] == MW'(M));
        if (d_valid[g]) begin
          acc_tr_re[g] <= (first ? '0 : acc_tr_re[g]) + p_tr_re;
          acc_tr_im[g] <= (first ? '0 : acc_tr_im[g]) + p_tr_im;
          acc_ti_re[g] <= (first ? '0 : acc_ti_re[g]) + p_ti_re;
          acc_ti_im[g] <= (first ? '0 : acc_ti_im[g]) + p_ti_im;
        end
      end
    end
  end

  // ---- output multiplexer --------------------------------------------------------
  function automatic logic signed [DW-1:0] rnd(acc_t a);
    return DW'((a + (acc_t'(1) <<< (CFRAC - 1))) >>> CFRAC);
  endfunction

  logic          sel_any;
  logic [GW-1:0] sel;
  logic [G-1:0]  done_vec;
  always_comb begin
    sel_any  = 1'b0;
    sel      = '0;
    done_vec = '0;
    for (int g = 0; g < G; g++) begin
      done_vec[g] = done[g];
      if (done[g]) begin
        sel_any = 1'b1;
        sel     = GW'(g);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_sop   <= 1'b0;
      out_data  <= '{default: '0};
    end else begin
      out_valid <= sel_any;
      out_sop   <= done[0];
      if (sel_any) begin
        out_data[0].re <= rnd(acc_tr_re[sel]);
        out_data[0].im <= rnd(acc_tr_im[sel]);
        out_data[1].re <= rnd(acc_ti_re[sel]);
        out_data[1].im <= rnd(acc_ti_im[sel]);
      end
    end
  end

  // The groups finish in distinct cycles, so at most one is selected.
  always_ff @(posedge clk) begin
    if (rst_n) a_one_group: assert ((done_vec & (done_vec - 1'b1)) == '0)
      else $error("prime_mac_array: two groups finished in the same cycle");
  end

endmodule
