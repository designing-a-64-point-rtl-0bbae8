// tb_register_bank: loads random groups, performs random butterfly
// write-backs of two distinct registers, and checks both operand read ports
// and the full register view against a shadow model after every step.
module tb_register_bank;
  import fft_pkg::*;

  logic  clk = 1'b0, rst = 1'b1;
  logic  load_en = 1'b0, wr_en = 1'b0;
  cplx_t load_data [RADIX];
  addr_t wr_idx1 = '0, wr_idx2 = '0, rd_idx1 = '0, rd_idx2 = '0;
  cplx_t wr_data1 = '0, wr_data2 = '0;
  cplx_t rd_data1, rd_data2;
  cplx_t regs [RADIX];

  register_bank dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  cplx_t shadow [RADIX];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int i = 0; i < RADIX; i++) begin
      rd_idx1 = addr_t'(i);
      rd_idx2 = addr_t'(7 - i);
      #1;
      checks++;
      if (rd_data1 != shadow[i] || rd_data2 != shadow[7 - i] || regs[i] != shadow[i]) begin
        failures++;
        $display("FAIL reg %0d: port1 %h port2 %h view %h expected %h / %h",
                 i, rd_data1, rd_data2, regs[i], shadow[i], shadow[7 - i]);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < RADIX; i++) begin
      load_data[i] = '0;
      shadow[i]    = '0;
    end
    repeat (2) @(negedge clk);
    rst = 1'b0;
    check_all();               // cleared by reset
    for (int it = 0; it < 300; it++) begin
      @(negedge clk);
      if (it % 13 == 0) begin
        load_en = 1'b1; wr_en = 1'b0;
        for (int i = 0; i < RADIX; i++) load_data[i] = $urandom;
      end else begin
        load_en  = 1'b0;
        wr_en    = ($urandom_range(3) != 0);
        wr_idx1  = addr_t'($urandom_range(7));
        wr_idx2  = wr_idx1 ^ addr_t'($urandom_range(1, 7));
        wr_data1 = $urandom;
        wr_data2 = $urandom;
      end
      @(posedge clk);
      #1;
      if (load_en) begin
        for (int i = 0; i < RADIX; i++) shadow[i] = load_data[i];
      end else if (wr_en) begin
        shadow[wr_idx1] = wr_data1;
        shadow[wr_idx2] = wr_data2;
      end
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
