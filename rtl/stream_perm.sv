// stream_perm: streaming permutation unit, SW samples per cycle (2 or 4).
//
// The unit reorders frames of samples. A frame of IN_SLOTS samples arrives SW
// per cycle (slots SW*c .. SW*c+SW-1 in cycle c) and leaves as a frame of
// OUT_SLOTS samples, SW per cycle, where output slot t copies input slot
// fft_pkg::perm_src(KIND, P, K, S, SW, t), or is zero where that function returns -1
// (the padding zero a prime-sized DFT needs). KIND selects one of the fixed
// orders listed in fft_pkg; the read table is computed while elaborating.
//
// Structure: two frame banks of registers (double buffering). Writes fill one
// bank in arrival order; a full bank is read in permuted order while the other
// bank fills, so whole frames stream through back to back. A frame can be read
// only after its last sample has been written, so the latency is one frame time
// plus two cycles. MIN_PERIOD > 0 holds the start of an output frame until at
// least MIN_PERIOD cycles after the previous start; the input permutation of the
// mixed-radix pipeline uses it to pace frames to the rate of the prime DFT.
//
// Interface: in_valid/in_data (no back-pressure inside a frame); in_ready is
// high while the bank being written is free, and a sender starts a frame only
// when it is high. out_valid/out_sop/out_data are registered; out_sop marks the
// first cycle of a frame, and the cycles of one frame are contiguous.
// overflow is a sticky flag raised when data arrive while no bank is free.
//
// The published design uses permutation units built as switch-memory-switch blocks but
// does not give their insides; this double-buffered register bank is the
// simplest structure with that function.
module stream_perm
  import fft_pkg::*;
#(
  parameter perm_kind_e KIND       = PERM_PRIME_P,
  parameter int         P          = 5,
  parameter int         K          = 2,
  parameter int         S          = 1,
  parameter int         IN_SLOTS   = P + 1,
  parameter int         OUT_SLOTS  = P + 1,
  parameter int         MIN_PERIOD = 0,
  parameter int         SW         = 2
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

  localparam int IN_CYC  = IN_SLOTS / SW;
  localparam int OUT_CYC = OUT_SLOTS / SW;
  localparam int IAW     = clog2_min1(IN_SLOTS);
  localparam int WCW     = clog2_min1(IN_CYC);
  localparam int RCW     = clog2_min1(OUT_CYC);
  localparam int PCW     = clog2_min1(MIN_PERIOD + 2) + 1;

  // ---- read table ---------------------------------------------------------
  logic [IAW-1:0] src_idx  [OUT_SLOTS];
  logic           src_zero [OUT_SLOTS];
  for (genvar t = 0; t < OUT_SLOTS; t++) begin : g_tab
    localparam int SRC = perm_src(KIND, P, K, S, SW, t);
    assign src_idx[t]  = (SRC < 0) ? '0 : IAW'(SRC);
    assign src_zero[t] = (SRC < 0);
  end

  // ---- storage ------------------------------------------------------------
  cplx_t          mem [2][IN_SLOTS];
  logic [1:0]     full;
  logic           wb, rb;
  logic [WCW-1:0] wcnt;
  logic [RCW-1:0] rcnt;
  logic [PCW-1:0] since;

  logic wr_ok, wr_last, period_ok, beat, rd_last;

  assign in_ready  = ~full[wb];
  assign wr_ok     = in_valid & ~full[wb];
  assign wr_last   = wr_ok && (wcnt == WCW'(IN_CYC - 1));
  assign period_ok = (MIN_PERIOD <= 1) || (since >= PCW'(MIN_PERIOD));
  assign beat      = (rcnt != '0) || (full[rb] && period_ok);
  assign rd_last   = beat && (rcnt == RCW'(OUT_CYC - 1));

  // write side
  always_ff @(posedge clk) begin
    if (wr_ok) begin
      for (int i = 0; i < SW; i++) mem[wb][SW * wcnt + i] <= in_data[i];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wcnt     <= '0;
      wb       <= 1'b0;
      rb       <= 1'b0;
      rcnt     <= '0;
      full     <= '0;
      since    <= '1;
      overflow <= 1'b0;
    end else begin
      if (in_valid && full[wb]) overflow <= 1'b1;
      if (wr_ok) begin
        wcnt <= wr_last ? '0 : wcnt + 1'b1;
        if (wr_last) wb <= ~wb;
      end
      for (int b = 0; b < 2; b++) begin
        if (wr_last && wb == b[0]) full[b] <= 1'b1;
        if (rd_last && rb == b[0]) full[b] <= 1'b0;
      end
      if (beat) begin
        rcnt <= rd_last ? '0 : rcnt + 1'b1;
        if (rd_last) rb <= ~rb;
      end
      if (beat && rcnt == '0) since <= PCW'(1);
      else if (since != '1)   since <= since + 1'b1;
    end
  end

  // read side: registered outputs
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_sop   <= 1'b0;
      out_data  <= '{default: '0};
    end else begin
      out_valid <= beat;
      out_sop   <= beat && (rcnt == '0);
      if (beat) begin
        for (int i = 0; i < SW; i++) begin
          if (src_zero[SW * rcnt + i]) out_data[i] <= '0;
          else                         out_data[i] <= mem[rb][src_idx[SW * rcnt + i]];
        end
      end
    end
  end

  // A frame must never arrive while both banks are occupied.
  always_ff @(posedge clk) begin
    if (rst_n && (in_valid)) a_no_overflow: assert (!full[wb]) else $error("stream_perm: frame arrived with no free bank");
  end


endmodule
