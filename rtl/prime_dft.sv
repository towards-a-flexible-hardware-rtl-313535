// prime_dft: streaming DFT of an odd prime size P with a streaming width of two
// complex samples per cycle, built without Rader's or Bluestein's algorithm.
//
// The DFT matrix is symmetric: output pairs (y_k, y_{P-k}) use conjugate roots
// of unity, so each needs only real multiplications of the input sums
// x_m + x_{P-m} and differences x_m - x_{P-m}:
//   y_k, y_{P-k} = tr_k -/+ j*ti_k,
//   tr_k = x0 + sum_m cos(2*pi*k*m/P)(x_m + x_{P-m}),
//   ti_k =      sum_m sin(2*pi*k*m/P)(x_m - x_{P-m}),   m, k = 1..(P-1)/2,
// and y0 = x0 + sum_m (x_m + x_{P-m}).
// Pipeline: forward adjustment P (pairs x_m with x_{P-m}, x0 with a zero) ->
// butterfly (sums and differences) -> MAC array (one accumulator for y0 and
// (P-1)/2 MAC groups) -> multiply ti by -j -> butterfly -> inverse adjustment Q
// (back to natural order).
//
// Interface: a frame is P samples in natural order, two per cycle, plus one
// ignored pad slot: (P+1)/2 cycles. Start a frame only while in_ready is high;
// a frame's cycles need not be contiguous. The output frame has the same shape,
// its pad slot zero, with out_sop on the first cycle. A new frame can enter every
// (P+1)/2 cycles. The first output cycle of a frame comes P + 7 cycles after its
// last input cycle. overflow is sticky and flags a frame sent while
// no buffer was free.
//
// The split into adjustment, butterfly and MAC sub-modules follows the published design.
// Fixed-point arithmetic, the output wrap-around at DW bits and the register
// placement are this design's choices.
module prime_dft
  import fft_pkg::*;
#(
  parameter int P = 5
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  cplx_t in_data [2],
  output logic  in_ready,
  output logic  out_valid,
  output logic  out_sop,
  output cplx_t out_data [2],
  output logic  overflow
);

  logic  p_valid, p_sop, b1_valid, b1_sop, mac_valid, mac_sop, b2_valid, b2_sop;
  cplx_t p_data [2], b1_data [2], mac_data [2], rot_data [2], b2_data [2];
  logic  ovf_in, ovf_out;
  logic  q_ready;

  prime_adj_in #(.P(P)) u_p (
    .clk, .rst_n, .in_valid, .in_data, .in_ready,
    .out_valid(p_valid), .out_sop(p_sop), .out_data(p_data), .overflow(ovf_in)
  );

  dft2 u_bfly_in (
    .clk, .rst_n, .in_valid(p_valid), .in_sop(p_sop), .in_data(p_data),
    .out_valid(b1_valid), .out_sop(b1_sop), .out_data(b1_data)
  );

  prime_mac_array #(.P(P)) u_mac (
    .clk, .rst_n, .in_valid(b1_valid), .in_sop(b1_sop), .in_data(b1_data),
    .out_valid(mac_valid), .out_sop(mac_sop), .out_data(mac_data)
  );

  // multiply the sine part by -j: (a + jb)(-j) = b - ja
  always_comb begin
    rot_data[0]    = mac_data[0];
    rot_data[1].re = mac_data[1].im;
    rot_data[1].im = -mac_data[1].re;
  end

  dft2 u_bfly_out (
    .clk, .rst_n, .in_valid(mac_valid), .in_sop(mac_sop), .in_data(rot_data),
    .out_valid(b2_valid), .out_sop(b2_sop), .out_data(b2_data)
  );

  prime_adj_out #(.P(P)) u_q (
    .clk, .rst_n, .in_valid(b2_valid), .in_data(b2_data), .in_ready(q_ready),
    .out_valid, .out_sop, .out_data, .overflow(ovf_out)
  );

  assign overflow = ovf_in | ovf_out;

  // b2_sop and q_ready are implied by the frame timing: Q is written in whole
  // frames of (P+1)/2 cycles and always has a free bank at the MAC output rate.
  always_ff @(posedge clk) begin
    if (rst_n && (b2_valid)) a_q_free: assert (q_ready) else $error("prime_dft: inverse adjustment has no free bank");
  end

  always_ff @(posedge clk) begin
    if (rst_n && b2_sop) a_q_aligned: assert (b2_valid) else $error("prime_dft: frame start without data");
  end

endmodule
