// cmcu_ref_pkg: reference model of the flow chart Gamma_1 at the level of
// vertices b1..b31, used by the testbenches to work out expected values
// without the RTL's address arithmetic.
//
// Linear chains (first..last vertex) and the address of each chain's first
// vertex, components of a chain at consecutive addresses:
//   a1 b1..b2   00000    a4 b9..b13  01000    a7 b22..b25 10101
//   a2 b3..b6   00010    a5 b14..b17 01101    a8 b26..b28 11100
//   a3 b7..b8   00110    a6 b18..b21 10001    a9 b29..b31 11001
// Classes: B1={a1} B2={a2,a3} B3={a4,a5} B4={a6,a7} B5={a8}; a9 ends.
// Transitions from a class (x[k-1] is x_k):
//   B1: x4 -> b3,  else b7
//   B2: x3 -> b9,  else b26
//   B3: x1 -> b18, else x2 -> b20, else b26
//   B4: x5 -> b27, else b5
//   B5: x2 -> b22, else x3 -> b14, else b29
// Each vertex b_q issues microoperation y_k, k = ((q-1) mod 13) + 1.
package cmcu_ref_pkg;

  localparam int NCHAIN = 9;
  localparam int FIRST [1:NCHAIN] = '{1, 3, 7, 9, 14, 18, 22, 26, 29};
  localparam int LAST  [1:NCHAIN] = '{2, 6, 8, 13, 17, 21, 25, 28, 31};
  localparam int ADDR0 [1:NCHAIN] = '{0, 2, 6, 8, 13, 17, 21, 28, 25};
  localparam int CLASS [1:NCHAIN] = '{1, 2, 2, 3, 3, 4, 4, 5, 0};

  function automatic int chain_of(int q);
    for (int g = 1; g <= NCHAIN; g++)
      if (q >= FIRST[g] && q <= LAST[g]) return g;
    return 0;
  endfunction

  function automatic int addr_of(int q);
    int g = chain_of(q);
    return ADDR0[g] + (q - FIRST[g]);
  endfunction

  // Vertex at an address, 0 if the cell is unused.
  function automatic int vertex_at_addr(int a);
    for (int q = 1; q <= 31; q++)
      if (addr_of(q) == a) return q;
    return 0;
  endfunction

  function automatic bit is_last(int q);
    return q == LAST[chain_of(q)];
  endfunction

  function automatic int class_of_vertex(int q);
    return CLASS[chain_of(q)];
  endfunction

  // Next vertex after b_q under conditions x; 0 after the final vertex.
  function automatic int next_vertex(int q, logic [4:0] x);
    if (!is_last(q)) return q + 1;
    case (class_of_vertex(q))
      1: return x[3] ? 3 : 7;
      2: return x[2] ? 9 : 26;
      3: return x[0] ? 18 : (x[1] ? 20 : 26);
      4: return x[4] ? 27 : 5;
      5: return x[1] ? 22 : (x[2] ? 14 : 29);
      default: return 0;
    endcase
  endfunction

  // Expected control-memory fields at address a.
  function automatic logic [12:0] exp_y(int a);
    int q = vertex_at_addr(a);
    logic [12:0] y = '0;
    if (q != 0) y[(q - 1) % 13] = 1'b1;
    return y;
  endfunction

  function automatic logic exp_y0(int a);
    int q = vertex_at_addr(a);
    return q != 0 && !is_last(q);
  endfunction

  function automatic logic exp_ye(int a);
    int q = vertex_at_addr(a);
    return q != 0 && is_last(q) && class_of_vertex(q) == 0;
  endfunction

  function automatic logic exp_v(int a);
    int q = vertex_at_addr(a);
    return q != 0 && is_last(q) && class_of_vertex(q) == 3;
  endfunction

  function automatic logic exp_z(int a);
    int q = vertex_at_addr(a);
    return q != 0 && is_last(q) && class_of_vertex(q) == 4;
  endfunction

  // Full 16-bit word {v1, yE, y0, y13..y1}.
  function automatic logic [15:0] exp_word(int a);
    return {exp_v(a), exp_ye(a), exp_y0(a), exp_y(a)};
  endfunction

endpackage
