// tb_fft64_top: end-to-end test of the 64-point FFT/IFFT processor at its
// default size.
//
// Samples are written through the host port, a transform is started with
// en_fft, and the 64 results are read back in natural order. Every result is
// compared bit for bit with a fixed-point model of the algorithm
// (fft_ref_pkg::fft_model) and, for inputs small enough never to saturate,
// with a floating-point DFT within a few LSB. The runs cover:
//   * a single complex tone, random data at moderate and at full scale
//     (forward transform),
//   * random data through the inverse transform (ifft = 1),
//   * a restart: en_fft pulsed again in the middle of a transform, after
//     which the result must be the transform of the memory contents at the
//     restart.
// The latency from en_fft to done_fft is checked against the schedule
// (197 cycles) and each mechanism is counted: forward and inverse runs,
// restarts, pass-boundary bypass loads, every CSD select value of both
// multiplier banks, loads into both register banks, and ignored host
// writes while busy.
module tb_fft64_top;
  import fft_pkg::*;
  import fft_ref_pkg::*;

  localparam int LATENCY = 197;
  localparam int TOL     = 6;     // LSB allowed against the float DFT

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

  fft64_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_fft = 0, n_ifft = 0, n_restart = 0, n_bypass = 0, n_ignored = 0;
  logic [7:0] seen_csdb1 = '0;
  logic [3:0] seen_csdb2 = '0;
  logic [1:0] seen_load  = '0;

  always @(posedge clk) begin
    if (bypass) n_bypass++;
    if (dut.u_proc.u_mcsm.issue) begin
      seen_csdb1[dut.u_proc.u_mcsm.csdb1] <= 1'b1;
      seen_csdb2[dut.u_proc.u_mcsm.csdb2] <= 1'b1;
    end
    if (dut.u_proc.u_mcsm.mem_load) seen_load[dut.u_proc.u_mcsm.load_sel] <= 1'b1;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // view of the memory contents, for the restart check
  cplx_t snap [N_BANKS][BANK_DEPTH];
  for (genvar b = 0; b < N_BANKS; b++) begin : g_snap
    for (genvar a = 0; a < BANK_DEPTH; a++) begin : g_word
      assign snap[b][a] = dut.g_bank[b].u_mem.mem[a];
    end
  end

  int xr[64], xi[64];      // current input
  int mr[64], mi[64];      // fixed-point model
  real fr[64], fi[64];     // float reference

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic host_write_all(input bit inv);
    ifft = inv;
    for (int n = 0; n < 64; n++) begin
      @(negedge clk);
      host_we       = 1'b1;
      host_widx     = 6'(n);
      host_wdata.re = 16'(xr[n]);
      host_wdata.im = 16'(xi[n]);
    end
    @(negedge clk);
    host_we = 1'b0;
  endtask

  task automatic start();
    @(negedge clk);
    en_fft = 1'b1;
    @(negedge clk);
    en_fft = 1'b0;
  endtask

  // start, then count cycles until done_fft
  task automatic run_timed();
    int cyc;
    start();
    cyc = 1;
    while (!done_fft) begin
      @(negedge clk);
      cyc++;
      // a host write while busy must be ignored: aim it at sample 0
      if (cyc == 20) begin
        host_we = 1'b1; host_widx = 6'd0; host_wdata = 32'h1234_5678;
      end else if (cyc == 21) begin
        host_we = 1'b0;
        n_ignored++;
      end
    end
    check(cyc == LATENCY, $sformatf("latency %0d cycles, expected %0d", cyc, LATENCY));
  endtask

  // read all results and compare with the models
  task automatic read_check(input bit inv, input bit use_float, input string tag);
    int maxerr;
    maxerr = 0;
    for (int k = 0; k < 64; k++) begin
      int er, ei, gr, gi;
      @(negedge clk);
      host_ridx = 6'(k);
      #1;
      gr = int'(host_rdata.re);
      gi = int'(host_rdata.im);
      if (inv) begin
        er = mi[bitrev6(k)];  // model ran on swapped data
        ei = mr[bitrev6(k)];
      end else begin
        er = mr[bitrev6(k)];
        ei = mi[bitrev6(k)];
      end
      check(gr == er && gi == ei,
            $sformatf("%s k=%0d got (%0d,%0d) model (%0d,%0d)", tag, k, gr, gi, er, ei));
      if (use_float) begin
        int dr, di;
        dr = (gr > rnd(fr[k])) ? gr - rnd(fr[k]) : rnd(fr[k]) - gr;
        di = (gi > rnd(fi[k])) ? gi - rnd(fi[k]) : rnd(fi[k]) - gi;
        if (dr > maxerr) maxerr = dr;
        if (di > maxerr) maxerr = di;
        check(dr <= TOL && di <= TOL,
              $sformatf("%s k=%0d got (%0d,%0d) dft (%f,%f)", tag, k, gr, gi, fr[k], fi[k]));
      end
    end
    if (use_float) $display("%s: largest deviation from the float DFT %0d LSB", tag, maxerr);
  endtask

  // fixed-point model of the whole run, with the host swap for the inverse
  task automatic model(input bit inv);
    for (int n = 0; n < 64; n++) begin
      mr[n] = inv ? xi[n] : xr[n];
      mi[n] = inv ? xr[n] : xi[n];
    end
    fft_model(mr, mi);
  endtask

  task automatic run_case(input bit inv, input bit use_float, input string tag);
    host_write_all(inv);
    model(inv);
    if (use_float) dft(xr, xi, inv, fr, fi);
    run_timed();
    read_check(inv, use_float, tag);
    if (inv) n_ifft++; else n_fft++;
  endtask

  function automatic int rand_range(int amp);
    return int'($urandom_range(2 * amp)) - amp;
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;

    // 1: complex tone at bin 5
    for (int n = 0; n < 64; n++) begin
      xr[n] = rnd(12000.0 * $cos(2.0 * PI * 5 * n / 64.0));
      xi[n] = rnd(12000.0 * $sin(2.0 * PI * 5 * n / 64.0));
    end
    run_case(1'b0, 1'b1, "tone");
    check(host_rdata.re == host_rdata.re, "tone read");

    // 2: random, moderate amplitude
    for (int n = 0; n < 64; n++) begin
      xr[n] = rand_range(8000);
      xi[n] = rand_range(8000);
    end
    run_case(1'b0, 1'b1, "random");

    // 3: random, full scale (exact model only: saturation may occur)
    for (int n = 0; n < 64; n++) begin
      xr[n] = int'($signed(16'($urandom)));
      xi[n] = int'($signed(16'($urandom)));
    end
    run_case(1'b0, 1'b0, "fullscale");

    // 4: inverse transform of random data
    for (int n = 0; n < 64; n++) begin
      xr[n] = rand_range(8000);
      xi[n] = rand_range(8000);
    end
    run_case(1'b1, 1'b1, "ifft");

    // 5: restart in the middle of a transform
    for (int n = 0; n < 64; n++) begin
      xr[n] = rand_range(8000);
      xi[n] = rand_range(8000);
    end
    host_write_all(1'b0);
    start();
    repeat (120) @(negedge clk);        // well into pass 1
    en_fft = 1'b1;
    @(negedge clk);
    en_fft = 1'b0;
    n_restart++;
    // the memory as the restarted transform finds it
    for (int n = 0; n < 64; n++) begin
      cplx_t w;
      w = snap[map_bank(6'(n))][map_addr(6'(n))];
      mr[n] = int'(w.re);
      mi[n] = int'(w.im);
    end
    fft_model(mr, mi);
    begin
      int cyc;
      cyc = 1;
      while (!done_fft) begin
        @(negedge clk);
        cyc++;
      end
      check(cyc == LATENCY, $sformatf("restart latency %0d", cyc));
    end
    read_check(1'b0, 1'b0, "restart");
    n_fft++;

    // mechanisms
    $display("forward runs %0d, inverse runs %0d, restarts %0d, pass-boundary bypass loads %0d",
             n_fft, n_ifft, n_restart, n_bypass);
    $display("csdb1 values seen %b, csdb2 values seen %b, register banks loaded %b, ignored host writes %0d",
             seen_csdb1, seen_csdb2, seen_load, n_ignored);
    check(n_fft > 0,          "no forward transform");
    check(n_ifft > 0,         "no inverse transform");
    check(n_restart > 0,      "no restart");
    check(n_bypass > 0,       "no pass-boundary bypass");
    check(&seen_csdb1,        "a CSD bank 1 select never used");
    check(&seen_csdb2,        "a CSD bank 2 select never used");
    check(&seen_load,         "a register bank never loaded");
    check(n_ignored > 0,      "no host write during busy");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
