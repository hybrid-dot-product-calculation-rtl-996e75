// Testbench of feature_map_memory: fills every bank through the external
// port, then reads and writes all banks in parallel through the row ports and
// checks row reads and external reads against a reference model, including
// the rule that a row write wins over an external write to the same word.
module tb_feature_map_memory;
  import hdp_pkg::*;
  localparam int NBANK = 3, DEPTH = 32;
  localparam int AW = $clog2(DEPTH), BW = $clog2(NBANK);
  logic clk = 0;
  logic [NBANK-1:0] rd_en = '0, we = '0;
  logic [NBANK-1:0][AW-1:0] raddr, waddr;
  logic [NBANK-1:0][WORD_W-1:0] rdata, wdata;
  logic ext_en = 0, ext_we = 0;
  logic [BW-1:0] ext_bank;
  logic [AW-1:0] ext_addr;
  logic [WORD_W-1:0] ext_wdata, ext_rdata;
  logic [WORD_W-1:0] ref_mem [NBANK][DEPTH];
  int checks = 0, failures = 0;

  feature_map_memory #(.NBANK(NBANK), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < NBANK; b++)
      for (int a = 0; a < DEPTH; a++) begin
        @(posedge clk);
        #1 ext_en = 1; ext_we = 1; ext_bank = BW'(b); ext_addr = AW'(a);
        ext_wdata = {$urandom, $urandom}; ref_mem[b][a] = ext_wdata;
      end
    for (int n = 0; n < 400; n++) begin
      int ra [NBANK];
      int eb, ea;
      @(posedge clk);
      #1;
      ext_en = 0; ext_we = 0;
      // external write, possibly colliding with a row write
      eb = $urandom_range(0, NBANK - 1);
      ea = $urandom_range(0, DEPTH - 1);
      if (n % 2 == 0) begin
        ext_en = 1; ext_we = 1; ext_bank = BW'(eb); ext_addr = AW'(ea);
        ext_wdata = {$urandom, $urandom};
      end
      for (int b = 0; b < NBANK; b++) begin
        int wa;
        wa = (n % 4 == 0 && b == eb) ? ea : $urandom_range(0, DEPTH - 1);
        ra[b] = $urandom_range(0, DEPTH - 1);
        rd_en[b] = 1; raddr[b] = AW'(ra[b]);
        we[b] = $urandom_range(0, 1);
        waddr[b] = AW'(wa); wdata[b] = {$urandom, $urandom};
      end
      // expected read data is the content before this cycle's writes
      begin
        logic [WORD_W-1:0] expd [NBANK];
        for (int b = 0; b < NBANK; b++) expd[b] = ref_mem[b][ra[b]];
        if (ext_we) ref_mem[eb][ea] = ext_wdata;
        for (int b = 0; b < NBANK; b++) if (we[b]) ref_mem[b][waddr[b]] = wdata[b];
        @(posedge clk);
        #1;
        rd_en = '0; we = '0; ext_en = 0; ext_we = 0;
        for (int b = 0; b < NBANK; b++) begin
          checks++;
          if (rdata[b] != expd[b]) begin
            failures++;
            if (failures < 10) $display("FAIL bank %0d got %h exp %h", b, rdata[b], expd[b]);
          end
        end
      end
      // read back one word through the external port
      ext_en = 1; ext_we = 0; ext_bank = BW'(eb); ext_addr = AW'(ea);
      @(posedge clk);
      #1;
      checks++;
      if (ext_rdata != ref_mem[eb][ea]) begin
        failures++;
        if (failures < 10) $display("FAIL ext read bank %0d addr %0d", eb, ea);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
