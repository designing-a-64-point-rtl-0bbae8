// tb_agu: steps the address generator through the 16 group loads and the 16
// group stores of one transform, in an interleaved order, and checks that for
// every element q of the current group the bank holding that sample receives
// the sample's address. Group g of pass 0 holds samples g + 8q, group g of
// pass 1 holds samples 8g + q; sample n lives in bank (n + n/8) mod 8 at
// address n/8 (computed here independently of the design's package). Also
// checks clear.
module tb_agu;
  import fft_pkg::*;

  logic  clk = 1'b0, rst = 1'b1;
  logic  clear = 1'b0, rd_step = 1'b0, wr_step = 1'b0;
  addr_t read_add [N_BANKS];
  addr_t write_add [N_BANKS];
  addr_t rd_group, wr_group;
  logic  rd_pass, wr_pass;

  agu dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // check one side (0 = read, 1 = write) for group index cnt (0..15)
  task automatic check_side(input bit wr, input int cnt);
    int pass, g;
    pass = cnt / 8;
    g    = cnt % 8;
    for (int q = 0; q < 8; q++) begin
      int n, bank, addr, got;
      n    = pass ? 8 * g + q : g + 8 * q;
      bank = (n % 8 + n / 8) % 8;
      addr = n / 8;
      got  = wr ? int'(write_add[bank]) : int'(read_add[bank]);
      checks++;
      if (got != addr || (wr ? int'(wr_group) : int'(rd_group)) != g
                      || (wr ? wr_pass : rd_pass) != 1'(pass)) begin
        failures++;
        $display("FAIL %s cnt %0d q %0d: bank %0d address %0d expected %0d",
                 wr ? "write" : "read", cnt, q, bank, got, addr);
      end
    end
  endtask

  initial begin
    int rc, wc;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int rep = 0; rep < 2; rep++) begin
      rc = 0; wc = 0;
      #1;
      check_side(1'b0, 0);
      check_side(1'b1, 0);
      while (wc < 16) begin
        @(negedge clk);
        rd_step = (rc < 16) && (rc <= wc + 2) && ($urandom_range(1) == 1);
        wr_step = !rd_step && (wc < rc) && ($urandom_range(1) == 1);
        @(posedge clk);
        #1;
        if (rd_step) rc++;
        if (wr_step) wc++;
        if (rc < 16) check_side(1'b0, rc);
        if (wc < 16) check_side(1'b1, wc);
      end
      // clear for the next transform
      @(negedge clk);
      rd_step = 1'b0; wr_step = 1'b0;
      rd_step = 1'b1; clear = 1'b1;
      @(negedge clk);
      clear = 1'b0; rd_step = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
