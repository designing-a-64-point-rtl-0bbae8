// tb_fft64_example: reproduces the example run published with the original
// design. The eight banks start with a given memory image of random words
// (example_before.hex), one forward transform is run, and the memory image
// after it is compared with the published result (example_after.hex).
//
// That run was made with 16-bit butterfly adders, so the processor is built
// here with WIDE_SUM = 0. Both files hold one 32-bit word per line, line
// 8*bank + address. The word in bank b, address a is sample
// n = 8a + (b - a) mod 8 before the transform; after it, the same place holds
// X(bitrev6(n)), which the host port returns for index k = bitrev6(n).
// Each result is checked
//   * bit for bit against the fixed-point reference model (16-bit adders), and
//   * against the published word, within TOL LSB per component. The twiddle
//     constants of the original are not known exactly, hence the tolerance.
// Five published words (bank/address 5/1, 2/4, 0/5, 7/6, 0/6) are left out of
// the second comparison; they do not agree with the rest of the image.
module tb_fft64_example;
  import fft_pkg::*;
  import fft_ref_pkg::*;

  localparam int TOL = 3;

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic       ifft = 1'b0;
  logic       en_fft = 1'b0;
  logic       busy, done_fft, bypass;
  logic       host_we = 1'b0;
  logic [5:0] host_widx = '0;
  cplx_t      host_wdata = '0;
  logic [5:0] host_ridx = '0;
  cplx_t      host_rdata;

  fft64_top #(.WIDE_SUM(1'b0)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] img_in [64];
  logic [31:0] img_out [64];
  int mr[64], mi[64];

  function automatic bit skipped(int b, int a);
    return (b == 5 && a == 1) || (b == 2 && a == 4) || (b == 0 && a == 5) ||
           (b == 7 && a == 6) || (b == 0 && a == 6);
  endfunction

  function automatic int absd(int x, int y);
    return (x > y) ? x - y : y - x;
  endfunction

  initial begin
    int cyc, maxdev, compared;
    $readmemh("tb/example_before.hex", img_in);
    $readmemh("tb/example_after.hex", img_out);
    repeat (3) @(negedge clk);
    rst = 1'b0;
    // load the image through the host port
    for (int b = 0; b < 8; b++) begin
      for (int a = 0; a < 8; a++) begin
        int n;
        n = 8 * a + (b - a + 8) % 8;
        mr[n] = int'($signed(img_in[8 * b + a][31:16]));
        mi[n] = int'($signed(img_in[8 * b + a][15:0]));
        @(negedge clk);
        host_we    = 1'b1;
        host_widx  = 6'(n);
        host_wdata = img_in[8 * b + a];
      end
    end
    @(negedge clk);
    host_we = 1'b0;
    fft_model(mr, mi, 1'b0);
    // run
    en_fft = 1'b1;
    @(negedge clk);
    en_fft = 1'b0;
    cyc = 1;
    while (!done_fft) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (cyc != 197) begin
      failures++;
      $display("FAIL latency %0d", cyc);
    end
    // compare
    maxdev = 0;
    compared = 0;
    for (int b = 0; b < 8; b++) begin
      for (int a = 0; a < 8; a++) begin
        int n, gr, gi, pr, pi;
        n = 8 * a + (b - a + 8) % 8;
        host_ridx = 6'(bitrev6(n));
        #1;
        gr = int'(host_rdata.re);
        gi = int'(host_rdata.im);
        checks++;
        if (gr != mr[n] || gi != mi[n]) begin
          failures++;
          $display("FAIL bank %0d address %0d: %0d,%0d model %0d,%0d", b, a, gr, gi, mr[n], mi[n]);
        end
        if (!skipped(b, a)) begin
          pr = int'($signed(img_out[8 * b + a][31:16]));
          pi = int'($signed(img_out[8 * b + a][15:0]));
          if (absd(gr, pr) > maxdev) maxdev = absd(gr, pr);
          if (absd(gi, pi) > maxdev) maxdev = absd(gi, pi);
          compared++;
          checks++;
          if (absd(gr, pr) > TOL || absd(gi, pi) > TOL) begin
            failures++;
            $display("FAIL bank %0d address %0d: %08h published %08h", b, a, host_rdata, img_out[8 * b + a]);
          end
        end
        @(negedge clk);
      end
    end
    $display("published words compared: %0d, largest deviation %0d LSB", compared, maxdev);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
