// ct_counter: microinstruction address counter CT.
//
// On a clock edge with start = 1 the counter is loaded with the address of
// the first microinstruction (b1 at 00000). Otherwise, while fetch = 1, it
// counts up when y0 = 1 (the next component of the same linear chain sits at
// the next address) and loads the address phi from the address block when
// y0 = 0. While fetch = 0 it holds its value, so after the algorithm ends the
// last address stays in place.
//
// The three sources (start, +1, phi) follow the structure of the unit; the
// hold while not fetching and the asynchronous reset to 0 are this design's
// choices.
module ct_counter
  import cmcu_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  logic  fetch,
  input  logic  y0,
  input  addr_t phi,
  output addr_t t
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       t <= '0;
    else if (start)   t <= A_START;
    else if (fetch) begin
      if (y0)         t <= t + addr_t'(1);
      else            t <= phi;
    end
  end

endmodule
