// tb_stream_perm: self-checking test of the streaming permutation unit with two
// of its orders, both for N = 20 (P = 5, R = 4):
//   A: natural order -> rows of the 5 x 4 input matrix in radix-2 stage-0 order,
//      paced to one frame per 12 cycles (MIN_PERIOD = 12);
//   B: 4 prime frames of 6 slots -> natural output order (24 slots in, 20 out).
// Frames are sent as fast as in_ready allows. Expected orders are written out
// here by hand, not taken from the package. Checked: every sample, out_sop,
// contiguous output frames, spacing of A's output frames, no overflow.
module tb_stream_perm;
  import fft_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int FRAMES = 10;
  int checks = 0, failures = 0;

  logic  a_iv, a_ir, a_ov, a_os, a_of, b_iv, b_ir, b_ov, b_os, b_of;
  cplx_t a_id [2], a_od [2], b_id [2], b_od [2];

  stream_perm #(.KIND(PERM_ROWS_IN), .P(5), .K(2), .S(0), .IN_SLOTS(20), .OUT_SLOTS(20),
                .MIN_PERIOD(12)) dut_a (
    .clk, .rst_n, .in_valid(a_iv), .in_data(a_id), .in_ready(a_ir),
    .out_valid(a_ov), .out_sop(a_os), .out_data(a_od), .overflow(a_of));

  stream_perm #(.KIND(PERM_OUT), .P(5), .K(2), .S(0), .IN_SLOTS(24), .OUT_SLOTS(20),
                .MIN_PERIOD(0)) dut_b (
    .clk, .rst_n, .in_valid(b_iv), .in_data(b_id), .in_ready(b_ir),
    .out_valid(b_ov), .out_sop(b_os), .out_data(b_od), .overflow(b_of));

  // sample value: frame number in re, slot number in im
  function automatic cplx_t tag(int f, int s);
    cplx_t v;
    v.re = DW'(f + 1);
    v.im = DW'(s);
    return v;
  endfunction

  // expected source slot of each output slot
  int exp_a [20], exp_b [20];
  initial begin
    int order0 [4] = '{0, 2, 1, 3};
    for (int r = 0; r < 5; r++)
      for (int u = 0; u < 4; u++) exp_a[r * 4 + u] = r + 5 * order0[u];
    for (int k = 0; k < 20; k++) exp_b[k] = (k % 4) * 6 + k / 4;
  end

  task automatic send(ref logic iv, ref cplx_t id [2], ref logic ir, input int slots);
    for (int f = 0; f < FRAMES; f++) begin
      for (int c = 0; c < slots / 2; c++) begin
        @(negedge clk);
        while (c == 0 && !ir) begin iv = 0; stalls++; @(negedge clk); end
        iv = 1;
        id[0] = tag(f, 2 * c);
        id[1] = tag(f, 2 * c + 1);
      end
    end
    @(negedge clk);
    iv = 0;
  endtask

  int a_slot = 0, a_frame = 0, b_slot = 0, b_frame = 0, cyc = 0, a_prev = -100;
  int stalls = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && a_ov) begin
      for (int i = 0; i < 2; i++) begin
        checks++;
        if (a_od[i] != tag(a_frame, exp_a[2 * a_slot + i])) begin
          failures++;
          $display("A frame %0d slot %0d: got (%0d,%0d)", a_frame, 2 * a_slot + i, a_od[i].re, a_od[i].im);
        end
      end
      checks++;
      if (a_os != (a_slot == 0)) begin failures++; $display("A: out_sop wrong"); end
      if (a_os) begin
        checks++;
        if (cyc - a_prev < 12) begin failures++; $display("A: frames %0d cycles apart", cyc - a_prev); end
        a_prev <= cyc;
      end
      if (a_slot == 9) begin a_slot <= 0; a_frame <= a_frame + 1; end
      else a_slot <= a_slot + 1;
    end else if (rst_n && a_slot != 0) begin
      checks++; failures++; $display("A: gap inside an output frame");
    end
    if (rst_n && b_ov) begin
      for (int i = 0; i < 2; i++) begin
        checks++;
        if (b_od[i] != tag(b_frame, exp_b[2 * b_slot + i])) begin
          failures++;
          $display("B frame %0d slot %0d: got (%0d,%0d)", b_frame, 2 * b_slot + i, b_od[i].re, b_od[i].im);
        end
      end
      checks++;
      if (b_os != (b_slot == 0)) begin failures++; $display("B: out_sop wrong"); end
      if (b_slot == 9) begin b_slot <= 0; b_frame <= b_frame + 1; end
      else b_slot <= b_slot + 1;
    end else if (rst_n && b_slot != 0) begin
      checks++; failures++; $display("B: gap inside an output frame");
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a_iv = 0; b_iv = 0; a_id = '{default: '0}; b_id = '{default: '0};
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      send(a_iv, a_id, a_ir, 20);
      send(b_iv, b_id, b_ir, 24);
    join
    repeat (60) @(posedge clk);
    checks += 4;
    if (a_frame != FRAMES) begin failures++; $display("A: %0d frames out", a_frame); end
    if (b_frame != FRAMES) begin failures++; $display("B: %0d frames out", b_frame); end
    if (a_of || b_of)      begin failures++; $display("overflow flagged"); end
    if (stalls == 0)       begin failures++; $display("in_ready never held the sender back"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
