// tb_mcsm: checks the control unit's schedule with an abstract model of the
// data path. The testbench tracks which sample sits in which register of the
// two register banks, how many butterfly levels each sample has been through
// and when each register's pending write-back lands. It then checks, cycle by
// cycle, that
//   * every issued butterfly pairs samples n and n+h of the right level
//     (h = 32, 16, .., 1) and requests twiddle exponent (n mod 2h) * 32/h,
//   * its operands are ready (no read before the write-back 3 cycles on),
//   * wb_valid / wb_sel / wb_idx repeat the issue selects 2 cycles later,
//   * a group is loaded only after its samples finished the previous pass in
//     memory, and loaded or stored only when no write-back is pending,
//   * loads and stores never share a cycle,
//   * 192 butterflies run, all 64 samples end in memory after 6 levels, and
//     done_fft rises 197 cycles after en_fft (196 cycles of work) and stays high,
//   * the pass-boundary load takes sample 7 from register 0 of bank 2, and
//     only once the last column has finished there,
// for a full transform and for one restarted half way.
module tb_mcsm;
  import fft_pkg::*;

  logic       clk = 1'b0, rst = 1'b1, en_fft = 1'b0;
  logic       busy, done_fft, mem_load, load_sel, mem_store, store_sel;
  logic       issue, in_sel, wb_valid, wb_sel, bypass;
  addr_t      rs1, rs2, wb_idx1, wb_idx2;
  logic [2:0] csdb1;
  logic [1:0] csdb2;

  mcsm dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0d: %s", t, what);
    end
  endtask

  int t;                         // cycle since en_fft
  int samples [2][8];
  int ready   [2][8];
  int level   [64];              // levels done, as held in the register banks
  int mem_lvl [64];              // levels done, as held in memory
  int loads, issues, stores, bypass_loads;
  int wbq_bank [$], wbq_i1 [$], wbq_i2 [$], wbq_t [$];

  task automatic reset_model();
    loads = 0; issues = 0; stores = 0;
    for (int n = 0; n < 64; n++) begin level[n] = 0; mem_lvl[n] = 0; end
    for (int b = 0; b < 2; b++)
      for (int q = 0; q < 8; q++) begin samples[b][q] = -1; ready[b][q] = 0; end
    wbq_bank.delete(); wbq_i1.delete(); wbq_i2.delete(); wbq_t.delete();
  endtask

  // sample, at the end of each cycle (just before the edge), what the
  // controller asks for in that cycle
  always @(negedge clk) if (!rst) begin
    check(!(mem_load && mem_store), "load and store in one cycle");
    if (wbq_t.size() > 0 && wbq_t[0] + 2 == t) begin
      check(wb_valid && wb_sel == 1'(wbq_bank[0]) && int'(wb_idx1) == wbq_i1[0]
            && int'(wb_idx2) == wbq_i2[0], "write-back selects");
      void'(wbq_t.pop_front()); void'(wbq_bank.pop_front());
      void'(wbq_i1.pop_front()); void'(wbq_i2.pop_front());
    end else begin
      check(!wb_valid, "spurious write-back");
    end
    if (issue) begin
      int bk, n1, n2, lv, h, e;
      bk = int'(in_sel);
      n1 = samples[bk][rs1];
      n2 = samples[bk][rs2];
      lv = level[n1] + 1;
      h  = 64 >> lv;
      e  = (n1 % (2 * h)) * (32 / h);
      check(n1 >= 0 && n2 - n1 == h && (n1 % (2 * h)) < h && level[n2] == level[n1],
            $sformatf("butterfly on samples %0d, %0d at level %0d", n1, n2, lv));
      check(int'({csdb2, csdb1}) == e,
            $sformatf("twiddle %0d for sample %0d level %0d, expected %0d", {csdb2, csdb1}, n1, lv, e));
      check(ready[bk][rs1] <= t && ready[bk][rs2] <= t, "operand not yet written back");
      ready[bk][rs1] = t + 3;
      ready[bk][rs2] = t + 3;
      level[n1]++;
      level[n2]++;
      issues++;
      wbq_t.push_back(t); wbq_bank.push_back(bk);
      wbq_i1.push_back(int'(rs1)); wbq_i2.push_back(int'(rs2));
    end
    if (mem_load) begin
      int bk, pass, g;
      bk   = int'(load_sel);
      pass = loads / 8;
      g    = loads % 8;
      if (bypass) bypass_loads++;
      for (int q = 0; q < 8; q++) begin
        int n;
        n = pass ? 8 * g + q : g + 8 * q;
        check(ready[bk][q] <= t, "load over a pending write-back");
        if (bypass && q == 7) begin
          // forwarded from register 0 of bank 2
          check(bk == 0 && samples[1][0] == n && level[n] == 3 && ready[1][0] <= t,
                $sformatf("bypass of sample %0d", n));
        end else begin
          check(mem_lvl[n] == 3 * pass, $sformatf("sample %0d loaded before pass %0d done", n, pass));
          level[n] = mem_lvl[n];
        end
        samples[bk][q] = n;
      end
      loads++;
    end
    if (mem_store) begin
      int bk;
      bk = int'(store_sel);
      for (int q = 0; q < 8; q++) begin
        check(ready[bk][q] <= t + 1, "store before the last write-back");
        check(level[samples[bk][q]] % 3 == 0 && level[samples[bk][q]] > 0,
              "store of an unfinished group");
        mem_lvl[samples[bk][q]] = level[samples[bk][q]];
      end
      stores++;
    end
    t++;
  end

  task automatic pulse_start();
    @(posedge clk);
    #1 en_fft = 1'b1;
    @(posedge clk);
    #1 en_fft = 1'b0;
    reset_model();
    t = 1;
  endtask

  initial begin
    t = 0;
    bypass_loads = 0;
    reset_model();
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    // full transform
    pulse_start();
    while (!done_fft && t < 400) begin @(posedge clk); #1; end
    #1;
    check(t == 197, $sformatf("done after %0d cycles, expected 197", t));
    check(issues == 192, $sformatf("%0d butterflies", issues));
    check(loads == 16 && stores == 16, $sformatf("%0d loads %0d stores", loads, stores));
    for (int n = 0; n < 64; n++) check(mem_lvl[n] == 6, $sformatf("sample %0d levels %0d", n, mem_lvl[n]));
    repeat (10) @(posedge clk);
    check(done_fft && !busy, "done_fft held");
    // restart half way
    pulse_start();
    repeat (90) @(posedge clk);
    pulse_start();
    while (!done_fft && t < 400) begin @(posedge clk); #1; end
    #1;
    check(t == 197, $sformatf("restart: done after %0d cycles", t));
    check(issues == 192, "restart: butterfly count");
    check(bypass_loads > 0, "no pass-boundary bypass seen");
    $display("pass-boundary bypass loads seen: %0d", bypass_loads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
