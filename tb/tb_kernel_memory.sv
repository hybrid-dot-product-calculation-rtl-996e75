// Testbench of kernel_memory: random writes, then reads compared with a
// reference array; read data must appear in the cycle after rd_en.
module tb_kernel_memory;
  import hdp_pkg::*;
  localparam int DEPTH = 64;
  localparam int AW = $clog2(DEPTH);
  logic clk = 0, we = 0, rd_en = 0;
  logic [AW-1:0] waddr, raddr;
  logic [WORD_W-1:0] wdata, rdata;
  logic [WORD_W-1:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  kernel_memory #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(posedge clk);
      #1 we = 1; waddr = AW'(a); wdata = {$urandom, $urandom}; ref_mem[a] = wdata;
    end
    for (int n = 0; n < 500; n++) begin
      int a, r;
      @(posedge clk);
      #1;
      a = $urandom_range(0, DEPTH - 1);
      r = $urandom_range(0, DEPTH - 1);
      we = ($urandom_range(0, 1) == 1) && (a != r);
      waddr = AW'(a); wdata = {$urandom, $urandom};
      if (we) ref_mem[a] = wdata;
      rd_en = 1; raddr = AW'(r);
      @(posedge clk);
      #1 we = 0; rd_en = 0;
      checks++;
      if (rdata != ref_mem[r]) begin
        failures++;
        if (failures < 10) $display("FAIL addr %0d got %h exp %h", r, rdata, ref_mem[r]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
