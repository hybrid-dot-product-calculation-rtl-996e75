// Testbench of address_generator: a strided convolution pass and a fully
// connected pass. Every issued (fmm_addr, kmem_addr, first, last) is compared
// with the loop nest computed in the testbench. The testbench plays the
// result path: it returns each position's credit after a random delay, checks
// that no more than CREDITS positions are ever outstanding, that stalls
// happen, and that done comes only after the last credit is back.
module tb_address_generator;
  import hdp_pkg::*;
  localparam int CREDITS = 4;
  logic clk = 0, rst_n = 0, start = 0, wb_pop = 0;
  layer_cfg_t cfg;
  logic rd_en, first, last, stall, busy, done;
  logic [ADDR_W-1:0] fmm_addr, kmem_addr;
  int checks = 0, failures = 0, nstall = 0, outstanding = 0, returned = 0;
  int delay_q[$];
  typedef struct { int fa; int ka; bit f; bit l; } iss_t;
  iss_t exp_q[$];

  address_generator #(.CREDITS(CREDITS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // issued words against the model; credit return with random delay
  always @(posedge clk) begin
    if (rst_n && stall) nstall++;
    if (rst_n && rd_en) begin
      iss_t e;
      checks++;
      e = exp_q.pop_front();
      if (int'(fmm_addr) != e.fa || int'(kmem_addr) != e.ka || first != e.f || last != e.l) begin
        failures++;
        if (failures < 10) $display("FAIL got %0d %0d %0b%0b exp %0d %0d %0b%0b",
                                    fmm_addr, kmem_addr, first, last, e.fa, e.ka, e.f, e.l);
      end
      if (first) begin
        outstanding++;
        checks++;
        if (outstanding > CREDITS) begin failures++; $display("FAIL too many outstanding"); end
      end
      if (last) delay_q.push_back($urandom_range(3, 25));
    end
    wb_pop <= 1'b0;
    if (delay_q.size() > 0) begin
      if (delay_q[0] == 0) begin
        void'(delay_q.pop_front());
        wb_pop <= 1'b1;
        outstanding--;
        returned++;
      end else delay_q[0]--;
    end
  end

  task automatic run(layer_cfg_t c);
    int npos;
    for (int oy = 0; oy < int'(c.oh); oy++)
      for (int ox = 0; ox < int'(c.ow); ox++)
        for (int ky = 0; ky < int'(c.kh); ky++)
          for (int j = 0; j < int'(c.kw * c.cw); j++) begin
            iss_t e;
            e.fa = int'(c.in_base) + ((oy * int'(c.stride) + ky) * int'(c.in_w) + ox * int'(c.stride)) * int'(c.cw) + j;
            e.ka = ky * int'(c.kw * c.cw) + j;
            e.f  = (ky == 0 && j == 0);
            e.l  = (ky == int'(c.kh) - 1 && j == int'(c.kw * c.cw) - 1);
            exp_q.push_back(e);
          end
    npos = int'(c.oh) * int'(c.ow);
    returned = 0;
    @(posedge clk);
    #1 cfg = c; start = 1;
    @(posedge clk);
    #1 start = 0;
    while (!done) @(posedge clk);
    checks += 3;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d words not issued", exp_q.size()); end
    if (returned != npos) begin failures++; $display("FAIL done before all credits: %0d of %0d", returned, npos); end
    #1;
    if (busy) failures++;
  endtask

  initial begin
    layer_cfg_t c;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    c = '0;
    c.wmode = WMODE_8; c.in_base = 16'd5; c.in_w = DIM_W'(9); c.cw = DIM_W'(2); c.kh = DIM_W'(2);
    c.kw = DIM_W'(3); c.stride = DIM_W'(2); c.oh = DIM_W'(3); c.ow = DIM_W'(4);
    run(c);
    c = '0;
    c.wmode = WMODE_2; c.in_base = 16'd100; c.in_w = DIM_W'(1); c.cw = DIM_W'(5); c.kh = DIM_W'(1);
    c.kw = DIM_W'(1); c.stride = DIM_W'(1); c.oh = DIM_W'(1); c.ow = DIM_W'(1);
    run(c);
    c = '0;
    c.wmode = WMODE_2; c.in_base = 16'd0; c.in_w = DIM_W'(6); c.cw = DIM_W'(1); c.kh = DIM_W'(1);
    c.kw = DIM_W'(1); c.stride = DIM_W'(1); c.oh = DIM_W'(6); c.ow = DIM_W'(6);
    run(c);
    checks++;
    if (nstall == 0) begin failures++; $display("FAIL no stall seen"); end
    $display("stall cycles %0d", nstall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
