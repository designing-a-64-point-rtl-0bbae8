// tb_fft_processor: runs the FFT engine on eight memory banks initialised
// with random full-scale data (written directly through the banks' write
// ports while the engine is idle). After done_fft, memory position n (bank
// (n mod 8 + n div 8) mod 8, address n div 8) must hold X(bitrev6(n)) of the
// fixed-point reference model, i.e. the in-place, bit-reversed result. Also
// checks the latency (197 cycles from en_fft to done_fft), that exactly 16
// group stores and 16 group loads happen, and that the engine never reads
// and writes memory in one cycle. Three transforms are run back to back.
module tb_fft_processor;
  import fft_pkg::*;
  import fft_ref_pkg::*;

  logic  clk = 1'b0, rst = 1'b1, en_fft = 1'b0;
  logic  done_fft, busy, memwrite, bypass;
  addr_t read_add [N_BANKS];
  cplx_t read_data [N_BANKS];
  addr_t write_add [N_BANKS];
  cplx_t write_data [N_BANKS];

  fft_processor dut (.*);

  // testbench access to the banks while the engine is idle
  logic  tb_we = 1'b0;
  bank_t tb_bank = '0;
  addr_t tb_addr = '0;
  cplx_t tb_data = '0;

  for (genvar b = 0; b < N_BANKS; b++) begin : g_bank
    memory_bank #(.DEPTH(BANK_DEPTH), .WIDTH(WORD_W)) u_mem (
      .clk,
      .we   (busy ? memwrite : (tb_we && tb_bank == bank_t'(b))),
      .waddr(busy ? write_add[b] : tb_addr),
      .wdata(busy ? write_data[b] : tb_data),
      .raddr(busy ? read_add[b] : tb_addr),
      .rdata(read_data[b])
    );
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_stores = 0, n_loads = 0;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (busy) begin
    if (memwrite) n_stores++;
    if (dut.mem_load) n_loads++;
  end

  int xr[64], xi[64];

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int run = 0; run < 3; run++) begin
      int cyc;
      // random contents, full scale
      for (int n = 0; n < 64; n++) begin
        xr[n] = int'($signed(16'($urandom)));
        xi[n] = int'($signed(16'($urandom)));
        if (run == 2) begin       // last run: smaller amplitude
          xr[n] = xr[n] / 8;
          xi[n] = xi[n] / 8;
        end
        @(negedge clk);
        tb_we      = 1'b1;
        tb_bank    = bank_t'((n % 8 + n / 8) % 8);
        tb_addr    = addr_t'(n / 8);
        tb_data.re = 16'(xr[n]);
        tb_data.im = 16'(xi[n]);
      end
      @(negedge clk);
      tb_we = 1'b0;
      fft_model(xr, xi);
      n_stores = 0;
      n_loads  = 0;
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
      checks++;
      if (n_stores != 16 || n_loads != 16) begin
        failures++;
        $display("FAIL %0d stores, %0d loads", n_stores, n_loads);
      end
      // in-place, bit-reversed result
      for (int n = 0; n < 64; n++) begin
        tb_bank = bank_t'((n % 8 + n / 8) % 8);
        tb_addr = addr_t'(n / 8);
        #1;
        checks++;
        if (int'(read_data[tb_bank].re) != xr[n] || int'(read_data[tb_bank].im) != xi[n]) begin
          failures++;
          if (failures < 10)
            $display("FAIL position %0d: %0d,%0d expected %0d,%0d", n,
                     read_data[tb_bank].re, read_data[tb_bank].im, xr[n], xi[n]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
