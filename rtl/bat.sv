// bat: block of address transformer, Z = Z(T).
//
// Only the classes of pseudoequivalent chains that neither the counter (one
// code interval) nor the free control-memory outputs (V) can identify are
// transformed. In the example that is the single class B4 = {alpha_6,
// alpha_7}, coded K_D(B4) = 1 on one variable z1, so the block reduces to
// z1 = 1 exactly at the output addresses of alpha_6 (10100) and alpha_7
// (11000) and 0 elsewhere. Purely combinational.
module bat
  import cmcu_pkg::*;
(
  input  addr_t         t,
  output logic [R4-1:0] z
);

  always_comb begin
    z = '0;
    unique case (t)
      A_O6, A_O7: z[0] = 1'b1;  // class B4
      default:    z    = '0;
    endcase
  end

endmodule
