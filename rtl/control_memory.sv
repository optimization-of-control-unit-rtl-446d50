// control_memory: control memory CM of the unit, built of R0 PROM chips.
//
// Each word holds the one-hot microoperations y1..yN, the flag y0 (the next
// microinstruction is the next address of the same linear chain), the flag
// yE (end of the algorithm) and, in the R3 outputs the chips leave free, the
// class code V of the classes in Pi_E. With N = 13 and t = 4 that is four
// chips and one free bit, v1, which is 1 at the chain outputs 01100 and
// 10000 (class B3).
//
// Interface: addr is the counter T; fetch is the fetch flip-flop output and
// enables the chips; y, y0, ye and v are the fields of the addressed word,
// available in the same cycle (combinational read). All zero when fetch = 0.
module control_memory
  import cmcu_pkg::*;
(
  input  addr_t             addr,
  input  logic              fetch,
  output logic [N_MO-1:0]   y,     // y[k-1] is microoperation y_k
  output logic              y0,
  output logic              ye,
  output logic [R3-1:0]     v
);

  cm_word_t word;

  // The chips must hold every microinstruction of the flow chart.
  if (M_WORDS > CELLS) begin : g_size_check
    $error("control memory has %0d cells for %0d microinstructions", CELLS, M_WORDS);
  end

  for (genvar c = 0; c < R0; c++) begin : g_chip
    prom_chip #(.CHIP(c), .TW(T_OUT)) u_chip (
      .addr (addr),
      .oe   (fetch),
      .dout (word[c*T_OUT +: T_OUT])
    );
  end

  cm_fields_t fields;
  assign fields = cm_fields_t'(word);

  assign y  = fields.y;
  assign y0 = fields.y0;
  assign ye = fields.ye;
  assign v  = fields.v;

endmodule
