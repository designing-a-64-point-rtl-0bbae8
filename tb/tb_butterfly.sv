// tb_butterfly: drives the pipelined butterfly with random operands, random
// twiddle selects and random gaps in in_valid, and checks that every result
// appears exactly BF_LAT = 2 cycles after its operands with
//   sum    = (a+b) >>> 1
//   diff_w = ((a-b) >>> 1) * W64^(e mod 8) * W64^(8*(e div 8))
// from the fixed-point reference model. A second instance with 16-bit adders
// (WIDE_SUM = 0) is checked the same way against the wrap-around model.
module tb_butterfly;
  import fft_pkg::*;
  import fft_ref_pkg::*;

  logic       clk = 1'b0, rst = 1'b1;
  logic       in_valid = 1'b0;
  cplx_t      a = '0, b = '0;
  logic [2:0] csdb1 = '0;
  logic [1:0] csdb2 = '0;
  logic       out_valid;
  cplx_t      sum, diff_w;

  butterfly dut (.*);

  logic  out_valid16;
  cplx_t sum16, diff_w16;
  butterfly #(.WIDE_SUM(1'b0)) dut16 (
    .clk, .rst, .in_valid, .a, .b, .csdb1, .csdb2,
    .out_valid(out_valid16), .sum(sum16), .diff_w(diff_w16)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected outputs, indexed by issue cycle
  typedef struct { bit v; int sr, si, dr, di; int wr, wi, xr, xi; } exp_t;
  exp_t hist [$];

  int cycle = 0;

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 3000; i++) begin
      exp_t ex;
      int ar, ai, br, bi, e;
      @(negedge clk);
      // check what the pipeline shows now against the operands of 2 cycles ago
      if (hist.size() == BF_LAT) begin
        ex = hist.pop_front();
        checks++;
        if (out_valid != ex.v) begin
          failures++;
          $display("FAIL out_valid %0b expected %0b at %0d", out_valid, ex.v, i);
        end
        if (ex.v) begin
          checks++;
          if (int'(sum.re) != ex.sr || int'(sum.im) != ex.si ||
              int'(diff_w.re) != ex.dr || int'(diff_w.im) != ex.di) begin
            failures++;
            if (failures < 10)
              $display("FAIL got sum (%0d,%0d) diff (%0d,%0d) expected (%0d,%0d) (%0d,%0d)",
                       sum.re, sum.im, diff_w.re, diff_w.im, ex.sr, ex.si, ex.dr, ex.di);
          end
          checks++;
          if (out_valid16 != 1'b1 || int'(sum16.re) != ex.wr || int'(sum16.im) != ex.wi ||
              int'(diff_w16.re) != ex.xr || int'(diff_w16.im) != ex.xi) begin
            failures++;
            if (failures < 10)
              $display("FAIL 16-bit: got sum (%0d,%0d) diff (%0d,%0d) expected (%0d,%0d) (%0d,%0d)",
                       sum16.re, sum16.im, diff_w16.re, diff_w16.im, ex.wr, ex.wi, ex.xr, ex.xi);
          end
        end
      end
      // new operands
      if (i < 6) begin          // extreme values first
        ar = (i % 2) ? -32768 : 32767;  ai = ar;
        br = (ar > 0) ? -32768 : 32767;  bi = (i % 3 == 0) ? ar : br;
      end else begin
        ar = int'($signed(16'($urandom)));  ai = int'($signed(16'($urandom)));
        br = int'($signed(16'($urandom)));  bi = int'($signed(16'($urandom)));
      end
      e        = int'($urandom_range(31));
      in_valid = ($urandom_range(3) != 0);
      a.re = 16'(ar); a.im = 16'(ai); b.re = 16'(br); b.im = 16'(bi);
      csdb1 = 3'(e % 8);
      csdb2 = 2'(e / 8);
      ex.v = in_valid;
      begin
        int war, wai, wbr, wbi;
        war = ar; wai = ai; wbr = br; wbi = bi;
        bfly(war, wai, wbr, wbi, e, 1'b0);
        ex.wr = war; ex.wi = wai; ex.xr = wbr; ex.xi = wbi;
      end
      bfly(ar, ai, br, bi, e);
      ex.sr = ar; ex.si = ai; ex.dr = br; ex.di = bi;
      hist.push_back(ex);
      cycle++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
