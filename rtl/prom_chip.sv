// prom_chip: one PROM chip of the control memory, CELLS words of T_OUT bits.
//
// The control memory of the unit is split across R0 identical chips; chip
// number CHIP holds bits [CHIP*T_OUT +: T_OUT] of each control-memory word
// (cmcu_pkg::cm_word). Reading is asynchronous, as for a PROM: dout follows
// addr within the same cycle. When the chip is not enabled (oe = 0, the
// fetch flip-flop is clear) the outputs are 0, so no microoperation and
// neither y0 nor yE is issued.
//
// The split into chips with t outputs is the one the design method counts
// (R0 = ceil((N+2)/t)); the output-enable behaviour is this design's choice.
module prom_chip
  import cmcu_pkg::*;
#(
  parameter int unsigned CHIP = 0,
  parameter int unsigned TW   = T_OUT
) (
  input  addr_t         addr,
  input  logic          oe,
  output logic [TW-1:0] dout
);

  logic [TW-1:0] cells [CELLS];

  initial begin
    for (int unsigned a = 0; a < CELLS; a++)
      cells[a] = TW'(cm_word(addr_t'(a)) >> (CHIP * TW));
  end

  assign dout = oe ? cells[addr] : '0;

endmodule
