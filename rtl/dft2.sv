// dft2: streaming DFT of size 2 (the butterfly), one pair of complex samples per
// cycle: out[0] = in[0] + in[1], out[1] = in[0] - in[1].
//
// The result is registered, so the latency is one cycle and a new pair can enter
// every cycle. The valid and start-of-frame flags travel with the data.
// Sums wrap at DW bits (fft_pkg); callers keep their signal range inside it.
// The butterfly itself is the published design's; the register at the output and the
// fixed-point wrap-around are this design's choices.
module dft2
  import fft_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  logic  in_sop,
  input  cplx_t in_data [2],
  output logic  out_valid,
  output logic  out_sop,
  output cplx_t out_data [2]
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_sop   <= 1'b0;
      out_data  <= '{default: '0};
    end else begin
      out_valid <= in_valid;
      out_sop   <= in_valid & in_sop;
      if (in_valid) begin
        out_data[0].re <= in_data[0].re + in_data[1].re;
        out_data[0].im <= in_data[0].im + in_data[1].im;
        out_data[1].re <= in_data[0].re - in_data[1].re;
        out_data[1].im <= in_data[0].im - in_data[1].im;
      end
    end
  end

endmodule
