// tb_prime_adj_out: self-checking test of the inverse adjustment unit Q: input (y0, -), (y1, y_{P-1}), (y2, y_{P-2}), ..., output y0..y_{P-1} in natural order and a zero pad.
// Two instances, P = 5 and P = 7, receive tagged frames as fast as in_ready
// allows (and some with idle cycles); the expected slot orders are written out
// here by hand. Checked: every sample, out_sop, contiguous output frames of
// (P+1)/2 cycles, one output frame per input frame, no overflow.
module tb_prime_adj_out;
  import fft_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int FRAMES = 12;
  int checks = 0, failures = 0;

  // expected source slot of each output slot, -1 = inserted zero
  int exp5 [6] = '{0, 2, 4, 5, 3, -1};
  int exp7 [8] = '{0, 2, 4, 6, 7, 5, 3, -1};

  logic  iv5, ir5, ov5, os5, of5, iv7, ir7, ov7, os7, of7;
  cplx_t id5 [2], od5 [2], id7 [2], od7 [2];

  prime_adj_out #(.P(5)) dut5 (.clk, .rst_n, .in_valid(iv5), .in_data(id5), .in_ready(ir5),
    .out_valid(ov5), .out_sop(os5), .out_data(od5), .overflow(of5));
  prime_adj_out #(.P(7)) dut7 (.clk, .rst_n, .in_valid(iv7), .in_data(id7), .in_ready(ir7),
    .out_valid(ov7), .out_sop(os7), .out_data(od7), .overflow(of7));

  function automatic cplx_t tag(int f, int s);
    cplx_t v;
    v.re = DW'(f + 1);
    v.im = DW'(s + 1);
    return v;
  endfunction

  function automatic cplx_t expect_val(int f, int src);
    return (src < 0) ? cplx_t'('0) : tag(f, src);
  endfunction

  task automatic send(ref logic iv, ref cplx_t id [2], ref logic ir, input int cyc);
    for (int f = 0; f < FRAMES; f++) begin
      for (int c = 0; c < cyc; c++) begin
        @(negedge clk);
        if (f >= FRAMES / 2 && $urandom_range(0, 2) == 0) begin
          iv = 0;
          @(negedge clk);
        end
        while (c == 0 && !ir) begin iv = 0; @(negedge clk); end
        iv = 1;
        id[0] = tag(f, 2 * c);
        id[1] = tag(f, 2 * c + 1);
      end
    end
    @(negedge clk);
    iv = 0;
  endtask

  int s5 = 0, f5 = 0, s7 = 0, f7 = 0;

  always @(posedge clk) begin
    if (rst_n && ov5) begin
      for (int i = 0; i < 2; i++) begin
        checks++;
        if (od5[i] != expect_val(f5, exp5[2 * s5 + i])) begin
          failures++;
          $display("P=5 frame %0d slot %0d: got (%0d,%0d)", f5, 2 * s5 + i, od5[i].re, od5[i].im);
        end
      end
      checks++;
      if (os5 != (s5 == 0)) begin failures++; $display("P=5: out_sop wrong"); end
      if (s5 == 2) begin s5 <= 0; f5 <= f5 + 1; end else s5 <= s5 + 1;
    end else if (rst_n && s5 != 0) begin
      checks++; failures++; $display("P=5: gap inside an output frame");
    end
    if (rst_n && ov7) begin
      for (int i = 0; i < 2; i++) begin
        checks++;
        if (od7[i] != expect_val(f7, exp7[2 * s7 + i])) begin
          failures++;
          $display("P=7 frame %0d slot %0d: got (%0d,%0d)", f7, 2 * s7 + i, od7[i].re, od7[i].im);
        end
      end
      checks++;
      if (os7 != (s7 == 0)) begin failures++; $display("P=7: out_sop wrong"); end
      if (s7 == 3) begin s7 <= 0; f7 <= f7 + 1; end else s7 <= s7 + 1;
    end else if (rst_n && s7 != 0) begin
      checks++; failures++; $display("P=7: gap inside an output frame");
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
    iv5 = 0; iv7 = 0; id5 = '{default: '0}; id7 = '{default: '0};
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      send(iv5, id5, ir5, 3);
      send(iv7, id7, ir7, 4);
    join
    repeat (20) @(posedge clk);
    checks += 2;
    if (f5 != FRAMES || f7 != FRAMES) begin failures++; $display("frames out: %0d %0d", f5, f7); end
    if (of5 || of7) begin failures++; $display("overflow flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
