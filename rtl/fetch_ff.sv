// fetch_ff: fetch flip-flop TF, a clocked set/reset flip-flop.
//
// A Start pulse sets it; the microoperation yE of the last microinstruction
// clears it at the next clock edge, which stops the unit. While it is set
// (fetch = 1) the control memory is read. Set wins over reset when both are
// present, so a new Start always restarts the unit.
//
// Set by Start and reset by yE follows the structure of the unit; the
// priority and the asynchronous reset are this design's choices.
module fetch_ff (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic ye,
  output logic fetch
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     fetch <= 1'b0;
    else if (start) fetch <= 1'b1;
    else if (ye)    fetch <= 1'b0;
  end

endmodule
