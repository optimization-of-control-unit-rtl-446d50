// cmcu_u2: compositional microprogram control unit U2 for the flow chart
// Gamma_1, the top of the design.
//
// The microprogram is a set of linear chains of microinstructions placed at
// consecutive addresses. Inside a chain the counter CT simply counts
// (y0 = 1). At a chain output (y0 = 0) the address block BMA computes the
// next address from the class of pseudoequivalent chains the output belongs
// to and the logical conditions X. The class code comes from whichever of
// three sources can supply it most cheaply: the counter value T itself
// (classes whose outputs form one code interval), the free outputs V of the
// control-memory PROM chips, or the address transformer BAT (Z = Z(T)) for
// the rest. A Start pulse loads address 00000 and sets the fetch flip-flop
// TF; the microinstruction with yE = 1 clears TF and the unit stops.
//
// Timing: one microinstruction per clock while fetch = 1. The control
// memory is read combinationally from T, so y, y0 and ye belong to the
// address held in CT during that cycle; x is sampled at the edge that ends
// a cycle with y0 = 0. Start is sampled on a clock edge; the first
// microinstruction appears in the cycle after it.
//
// Ports: y are the microoperations y1..y13 for the data path, fetch tells
// they are valid, t is the current microinstruction address; x are the
// logical conditions x1..x5 from the data path. rst_n is an asynchronous
// reset of this design's own choosing.
//
// The structure (three code sources, which block sees which signal) follows
// the published unit U2; the example's transitions for classes B1 and B5,
// the microoperation content, the reset and the hold of CT after the end are
// this design's own. The assertions at the end use rst_n in their disable
// condition, so lint reports rst_n as used both synchronously and
// asynchronously; that use is in checking code only.
module cmcu_u2
  import cmcu_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [L_X-1:0]  x,
  output logic [N_MO-1:0] y,
  output logic            fetch,
  output logic            ye,
  output addr_t           t
);

  logic           y0;
  logic [R3-1:0]  v;
  logic [R4-1:0]  z;
  addr_t          phi;

  fetch_ff u_tf (
    .clk   (clk),
    .rst_n (rst_n),
    .start (start),
    .ye    (ye),
    .fetch (fetch)
  );

  ct_counter u_ct (
    .clk   (clk),
    .rst_n (rst_n),
    .start (start),
    .fetch (fetch),
    .y0    (y0),
    .phi   (phi),
    .t     (t)
  );

  control_memory u_cm (
    .addr  (t),
    .fetch (fetch),
    .y     (y),
    .y0    (y0),
    .ye    (ye),
    .v     (v)
  );

  bat u_bat (
    .t (t),
    .z (z)
  );

  bma u_bma (
    .t   (t),
    .z   (z),
    .v   (v),
    .x   (x),
    .phi (phi)
  );

  // Rules of the structure: a running unit issues exactly one
  // microoperation per microinstruction (one-hot coding), a chain output is
  // never both the end and a step inside a chain, and a class code comes
  // from at most one of the two extra sources.
  a_onehot_y: assert property (@(posedge clk) disable iff (!rst_n)
                               fetch |-> $onehot(y));
  a_end_not_inside: assert property (@(posedge clk) disable iff (!rst_n)
                                     ye |-> !y0);
  a_one_source: assert property (@(posedge clk) disable iff (!rst_n)
                                 fetch && !y0 |-> !(v[0] && z[0]));

endmodule
