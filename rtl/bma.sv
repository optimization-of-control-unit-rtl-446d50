// bma: block of microinstruction address, Phi = Phi(T, Z, V, X).
//
// When the current microinstruction is a chain output (y0 = 0) this block
// supplies the address loaded into the counter. It first identifies the
// class of pseudoequivalent chains from three sources:
//   v1 = 1          class B3, code from the free control-memory output;
//   z1 = 1          class B4, code from the address transformer;
//   v1 = z1 = 0     a class coded by one interval of the counter value T:
//                   B1 = 0000*, B2 = 001**, B5 = 111**.
// Then it picks the target by the logical conditions x1..x5:
//   B2 -> x3 b9 | ~x3 b26
//   B3 -> x1 b18 | ~x1 x2 b20 | ~x1 ~x2 b26
//   B4 -> x5 b27 | ~x5 b5
// Those three lines are the transition system of the example. The example
// does not give the transitions of B1 and B5; this design uses
//   B1 -> x4 b3 | ~x4 b7
//   B5 -> x2 b22 | ~x2 x3 b14 | ~x2 ~x3 b29
// so that every chain of the flow chart can be reached. For any other input
// the output is 00000. Purely combinational; x[k-1] is condition x_k.
module bma
  import cmcu_pkg::*;
(
  input  addr_t          t,
  input  logic [R4-1:0]  z,
  input  logic [R3-1:0]  v,
  input  logic [L_X-1:0] x,
  output addr_t          phi
);

  logic x1, x2, x3, x4, x5;
  assign {x5, x4, x3, x2, x1} = x;

  always_comb begin
    phi = '0;
    if (v[0]) begin                          // B3
      if (x1)       phi = A_B18;
      else if (x2)  phi = A_B20;
      else          phi = A_B26;
    end else if (z[0]) begin                 // B4
      if (x5)       phi = A_B27;
      else          phi = A_B5;
    end else begin
      casez (t)
        5'b0000?: phi = x4 ? A_B3 : A_B7;    // B1
        5'b001??: phi = x3 ? A_B9 : A_B26;   // B2
        5'b111??: phi = x2 ? A_B22 : (x3 ? A_B14 : A_B29); // B5
        default:  phi = '0;
      endcase
    end
  end

endmodule
