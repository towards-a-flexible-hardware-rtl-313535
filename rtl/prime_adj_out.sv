// prime_adj_out: the inverse adjustment unit Q of a prime-sized DFT of size P. It takes the output pairs of the second butterfly, (y0, -), then (y_k, y_{P-k}) for k = 1..(P-1)/2, and emits the frame in natural order, two per cycle (y0 y1 | y2 y3 | ... | y_{P-1} 0); the last slot is a zero pad.
//
// It is a stream_perm with a fixed order: a double-buffered frame store that is
// written in arrival order and read in the permuted order, so frames of
// (P+1)/2 cycles stream back to back. Latency: one frame time plus two cycles.
// out_sop marks the first cycle of each frame. in_ready is high while a bank is
// free; overflow is sticky and flags data that arrived with no bank free.
// The reordering is the one the published design gives for the Q unit; building it as
// a double buffer is this design's choice.
module prime_adj_out
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
    .KIND      (PERM_PRIME_Q),
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
