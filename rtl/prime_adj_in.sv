// prime_adj_in: the forward adjustment unit P of a prime-sized DFT of size P. It takes a frame of P samples in natural order, two per cycle (x0 x1 | x2 x3 | ... | x_{P-1} pad), and emits the pairs the butterfly needs: (x0, 0), then (x_m, x_{P-m}) for m = 1..(P-1)/2. x0 is paired with an inserted zero so that it passes the butterfly unchanged into every accumulator.
//
// It is a stream_perm with a fixed order: a double-buffered frame store that is
// written in arrival order and read in the permuted order, so frames of
// (P+1)/2 cycles stream back to back. Latency: one frame time plus two cycles.
// out_sop marks the first cycle of each frame. in_ready is high while a bank is
// free; overflow is sticky and flags data that arrived with no bank free.
// The reordering is the one the published design gives for the P unit; building it as
// a double buffer is this design's choice.
module prime_adj_in
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

  stream_perm #(
    .KIND      (PERM_PRIME_P),
    .P         (P),
    .K         (1),
    .S         (0),
    .IN_SLOTS  (P + 1),
    .OUT_SLOTS (P + 1),
    .MIN_PERIOD(0)
  ) u_perm (
    .clk, .rst_n, .in_valid, .in_data, .in_ready,
    .out_valid, .out_sop, .out_data, .overflow
  );

endmodule
