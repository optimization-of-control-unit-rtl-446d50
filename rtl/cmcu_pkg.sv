// cmcu_pkg: sizes, field layout and the control-memory image of the
// compositional microprogram control unit U2 that interprets the example
// flow chart Gamma_1 (31 microinstructions, 9 linear chains, 5 classes).
//
// Sizes that come from the example: M = 31 microinstructions, so an address
// has R = 5 bits; N = 13 microoperations, one-hot coded, so a word of the
// control memory needs N+2 bits (the microoperations plus y0 and yE); PROM
// chips have t = 4 outputs, so R0 = ceil((N+2)/t) = 4 chips and R3 = R0*t-N-2
// = 1 output is free. That free bit carries the code V (one bit, v1) of the
// class B3. The one class left for the address transformer (B4) needs
// R4 = 1 bit, z1. The example uses the logical conditions x1..x5.
//
// Addressing follows the example: b1..b25 sit at 00000..11000, b26..b28 at
// 11100..11110 and b29..b31 at 11001..11011; cell 11111 is unused and all
// zero. T1 is the most significant address bit.
//
// Own choices (the microoperation content of each cell is left open):
// vertex b_q issues the single microoperation y_k with k = ((q-1) mod N)+1,
// and the word is laid out as {v1, yE, y0, y13..y1} from bit 15 down.
package cmcu_pkg;

  localparam int unsigned M_WORDS = 31;                     // microinstructions
  localparam int unsigned R       = 5;                      // address bits, eq. (1)
  localparam int unsigned N_MO    = 13;                     // microoperations
  localparam int unsigned T_OUT   = 4;                      // outputs per PROM chip
  localparam int unsigned R0      = (N_MO + 2 + T_OUT - 1) / T_OUT; // eq. (8)
  localparam int unsigned R3      = R0 * T_OUT - N_MO - 2;  // eq. (9): free outputs
  localparam int unsigned R4      = 1;                      // eq. (12), I_D = 1
  localparam int unsigned L_X     = 5;                      // logical conditions x1..x5
  localparam int unsigned W_CM    = R0 * T_OUT;             // control-memory word
  localparam int unsigned CELLS   = 1 << R;

  typedef logic [R-1:0]    addr_t;
  typedef logic [W_CM-1:0] cm_word_t;

  // The same word seen as its fields.
  typedef struct packed {
    logic [R3-1:0]   v;    // class code from the free PROM outputs
    logic            ye;   // end of the algorithm
    logic            y0;   // next microinstruction at address + 1
    logic [N_MO-1:0] y;    // y[k-1] is microoperation y_k
  } cm_fields_t;

  // Output addresses of the linear chains alpha_1..alpha_9.
  localparam addr_t A_O1 = 5'b00001;  // alpha_1, class B1
  localparam addr_t A_O2 = 5'b00101;  // alpha_2, class B2
  localparam addr_t A_O3 = 5'b00111;  // alpha_3, class B2
  localparam addr_t A_O4 = 5'b01100;  // alpha_4, class B3
  localparam addr_t A_O5 = 5'b10000;  // alpha_5, class B3
  localparam addr_t A_O6 = 5'b10100;  // alpha_6, class B4
  localparam addr_t A_O7 = 5'b11000;  // alpha_7, class B4
  localparam addr_t A_O8 = 5'b11110;  // alpha_8, class B5
  localparam addr_t A_O9 = 5'b11011;  // alpha_9, final chain (yE)

  // Addresses of the chain inputs that transitions lead to.
  localparam addr_t A_B3  = 5'b00010;
  localparam addr_t A_B5  = 5'b00100;
  localparam addr_t A_B7  = 5'b00110;
  localparam addr_t A_B9  = 5'b01000;
  localparam addr_t A_B14 = 5'b01101;
  localparam addr_t A_B18 = 5'b10001;
  localparam addr_t A_B20 = 5'b10011;
  localparam addr_t A_B22 = 5'b10101;
  localparam addr_t A_B26 = 5'b11100;
  localparam addr_t A_B27 = 5'b11101;
  localparam addr_t A_B29 = 5'b11001;
  localparam addr_t A_START = 5'b00000; // b1

  // Index q of the vertex b_q held at address a, 0 for the unused cell.
  function automatic int unsigned vertex_at(addr_t a);
    int unsigned n = int'(a);
    if (n <= 24)      return n + 1;   // b1..b25
    else if (n <= 27) return n + 4;   // b29..b31
    else if (n <= 30) return n - 2;   // b26..b28
    else              return 0;
  endfunction

  function automatic logic is_olc_output(addr_t a);
    return a inside {A_O1, A_O2, A_O3, A_O4, A_O5, A_O6, A_O7, A_O8, A_O9};
  endfunction

  // Word of the control memory at address a.
  function automatic cm_word_t cm_word(addr_t a);
    cm_fields_t  f = '0;
    int unsigned q = vertex_at(a);
    if (q != 0) begin
      f.y[(q - 1) % N_MO] = 1'b1;                   // one-hot microoperation
      f.y0   = !is_olc_output(a);                   // stay inside the chain
      f.ye   = (a == A_O9);                         // end of the algorithm
      f.v[0] = (a == A_O4) || (a == A_O5);          // K_E(B3) = 1
    end
    return cm_word_t'(f);
  endfunction

endpackage
