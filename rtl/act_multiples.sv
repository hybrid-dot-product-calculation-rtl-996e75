// Activation multiples for the MACC units of a hybrid core.
//
// For each of the eight unsigned 8-bit activations A it forms A, 2A, the
// selectable multiple 3A (8-bit weight layers, where the lower weight digits
// are 0..3) or -A (2-bit weight layers, weights in {-1, 0, 1}), and -A for the
// most significant plane, whose digit is signed in both modes. That these
// multiples are formed once, outside the MACCs, and chosen by the layer
// configuration follows the document; the outputs are MULT_W-bit two's
// complement values. Purely combinational.
module act_multiples
  import hdp_pkg::*;
#(
  parameter int unsigned N = NACT
) (
  input  wmode_e                           wmode,
  input  logic [N-1:0][ACT_W-1:0]          act,
  output logic [N-1:0][MULT_W-1:0]  m1,    // A
  output logic [N-1:0][MULT_W-1:0]  m2,    // 2A
  output logic [N-1:0][MULT_W-1:0]  msel,  // 3A (WMODE_8) or -A (WMODE_2)
  output logic [N-1:0][MULT_W-1:0]  mneg   // -A
);

  always_comb begin
    for (int i = 0; i < N; i++) begin
      logic [MULT_W-1:0] a;
      a       = MULT_W'(act[i]);
      m1[i]   = a;
      m2[i]   = a << 1;
      mneg[i] = -a;
      msel[i] = (wmode == WMODE_8) ? (a << 1) + a : -a;
    end
  end

endmodule
