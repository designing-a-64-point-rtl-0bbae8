// tb_scm: checks the CSD constant multiplier for every exponent E = 0..31.
// One scm instance per exponent is driven with random and extreme complex
// inputs; each output is compared with (x * C + ...) >>> 14 computed with
// ordinary multiplication and constants taken from $cos / $sin, then
// saturated to 16 bits.
module tb_scm;
  import fft_pkg::*;
  import fft_ref_pkg::*;

  cplx_t x;
  cplx_t y [32];

  for (genvar e = 0; e < 32; e++) begin : g_dut
    scm #(.E(e)) dut (.x(x), .y(y[e]));
  end

  int checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int re, input int im);
    x.re = 16'(re);
    x.im = 16'(im);
    #1;
    for (int e = 0; e < 32; e++) begin
      int er, ei;
      er = re; ei = im;
      if (e != 0) begin
        er = sat16((longint'(re) * ref_cos(e) + longint'(im) * ref_sin(e)) >>> 14);
        ei = sat16((longint'(im) * ref_cos(e) - longint'(re) * ref_sin(e)) >>> 14);
      end
      checks++;
      if (int'(y[e].re) != er || int'(y[e].im) != ei) begin
        failures++;
        if (failures < 10)
          $display("FAIL E=%0d x=(%0d,%0d) got (%0d,%0d) expected (%0d,%0d)",
                   e, re, im, y[e].re, y[e].im, er, ei);
      end
    end
  endtask

  initial begin
    apply(32767, 32767);
    apply(-32768, -32768);
    apply(32767, -32768);
    apply(-32768, 32767);
    apply(1, 0);
    apply(0, -1);
    for (int i = 0; i < 500; i++)
      apply(int'($signed(16'($urandom))), int'($signed(16'($urandom))));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
