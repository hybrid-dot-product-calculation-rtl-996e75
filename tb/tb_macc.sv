// Testbench of macc: random chain inputs, codes and activation multiples,
// checked against x + (0, A, 2A, or the i0 multiple) computed directly.
module tb_macc;
  localparam int W = 13;
  logic [W-1:0] x, i2, i1, i0, o;
  logic         i4, i3;
  int checks = 0, failures = 0;

  macc #(.W(W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      int a, xv, sel, mode, addend, expv;
      a    = $urandom_range(0, 255);
      xv   = int'($urandom_range(0, 4000)) - 1500;
      sel  = $urandom_range(0, 3);
      mode = $urandom_range(0, 1);
      if (n < 4) begin a = 255; xv = (n < 2) ? 3060 - 765 : -1020 + 255; sel = (n % 2) ? 1 : 3; mode = n % 2; end
      x  = W'(xv);
      i2 = W'(a);
      i1 = W'(2 * a);
      i0 = mode ? W'(3 * a) : W'(-a);
      {i4, i3} = sel[1:0];
      case (sel)
        0: addend = 0;
        1: addend = mode ? 3 * a : -a;
        2: addend = 2 * a;
        default: addend = a;
      endcase
      expv = xv + addend;
      #1;
      checks++;
      if ($signed(o) !== W'(expv) || int'($signed(o)) != expv) begin
        failures++;
        if (failures < 10) $display("FAIL x=%0d a=%0d sel=%0d mode=%0d o=%0d exp=%0d", xv, a, sel, mode, $signed(o), expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
