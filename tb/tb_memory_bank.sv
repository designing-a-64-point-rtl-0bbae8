// tb_memory_bank: fills one 8 x 32-bit two-port bank, then performs random
// writes while reading a different random address in the same cycle, and
// checks every combinational read against a shadow array. Also checks that
// a read of the word being written shows the old value until the edge.
module tb_memory_bank;

  localparam int DEPTH = 8;
  localparam int WIDTH = 32;

  logic             clk = 1'b0;
  logic             we = 1'b0;
  logic [2:0]       waddr = '0, raddr = '0;
  logic [WIDTH-1:0] wdata = '0;
  logic [WIDTH-1:0] rdata;

  memory_bank #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [WIDTH-1:0] shadow [DEPTH];

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_read(input logic [2:0] a);
    raddr = a;
    #1;
    checks++;
    if (rdata !== shadow[a]) begin
      failures++;
      $display("FAIL addr %0d read %h expected %h", a, rdata, shadow[a]);
    end
  endtask

  initial begin
    // fill
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1'b1; waddr = 3'(a); wdata = $urandom;
      shadow[a] = wdata;
    end
    @(negedge clk);
    we = 1'b0;
    for (int a = 0; a < DEPTH; a++) check_read(3'(a));
    // simultaneous write and read
    for (int i = 0; i < 500; i++) begin
      logic [2:0] wa, ra;
      logic       w;
      @(negedge clk);
      wa = 3'($urandom_range(7));
      ra = 3'($urandom_range(7));
      w  = ($urandom_range(1) == 1);
      we = w; waddr = wa; wdata = $urandom;
      check_read(ra);             // before the edge: old contents
      @(posedge clk);
      #1;
      if (w) shadow[wa] = wdata;
      check_read(ra);             // after the edge
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
