// dft4: fully parallel DFT of size 4, four complex samples per cycle.
//
// Two butterfly stages with a fixed lane exchange in front of, between and after
// them, and a multiplication by -j (a swap of real and imaginary parts with one
// negation, no multiplier) on one lane between the stages:
//   a0 = x0 + x2, a1 = x0 - x2, b0 = x1 + x3, b1 = -j (x1 - x3)
//   y0 = a0 + b0, y2 = a0 - b0, y1 = a1 + b1, y3 = a1 - b1.
// The output is registered: latency one cycle, a new vector every cycle.
// This is the building block a streaming width of four uses in place of two
// DFT2 stages. The network is the published design's; the output register and the
// fixed-point wrap-around at DW bits are this design's choices.
module dft4
  import fft_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  logic  in_sop,
  input  cplx_t in_data [4],
  output logic  out_valid,
  output logic  out_sop,
  output cplx_t out_data [4]
);

  function automatic cplx_t add(cplx_t a, cplx_t b);
    cplx_t r;
    r.re = a.re + b.re;
    r.im = a.im + b.im;
    return r;
  endfunction

  function automatic cplx_t sub(cplx_t a, cplx_t b);
    cplx_t r;
    r.re = a.re - b.re;
    r.im = a.im - b.im;
    return r;
  endfunction

  cplx_t a0, a1, b0, b1, d13;
  cplx_t y [4];

  always_comb begin
    // first stage (lanes 1 and 2 exchanged in front of it)
    a0  = add(in_data[0], in_data[2]);
    a1  = sub(in_data[0], in_data[2]);
    b0  = add(in_data[1], in_data[3]);
    d13 = sub(in_data[1], in_data[3]);
    // -j on the lower lane
    b1.re = d13.im;
    b1.im = -d13.re;
    // second stage, outputs put back in natural order
    y[0] = add(a0, b0);
    y[2] = sub(a0, b0);
    y[1] = add(a1, b1);
    y[3] = sub(a1, b1);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_sop   <= 1'b0;
      out_data  <= '{default: '0};
    end else begin
      out_valid <= in_valid;
      out_sop   <= in_valid & in_sop;
      if (in_valid) out_data <= y;
    end
  end

endmodule
