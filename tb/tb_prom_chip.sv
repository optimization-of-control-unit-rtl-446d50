// tb_prom_chip: reads every cell of all four chips of the control memory,
// with the output enable on and off, and compares with the slice of the
// reference word that each chip should hold.
module tb_prom_chip;
  import cmcu_ref_pkg::*;

  logic [4:0] addr;
  logic       oe;
  logic [3:0] dout [4];
  int checks = 0, failures = 0;

  for (genvar c = 0; c < 4; c++) begin : g_dut
    prom_chip #(.CHIP(c), .TW(4)) dut (.addr(addr), .oe(oe), .dout(dout[c]));
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++) begin
      for (int a = 0; a < 32; a++) begin
        logic [15:0] w;
        addr = 5'(a);
        oe   = e[0];
        #1;
        w = e[0] ? exp_word(a) : 16'h0;
        for (int c = 0; c < 4; c++) begin
          checks++;
          if (dout[c] !== w[c*4 +: 4]) begin
            failures++;
            $display("chip %0d addr %05b oe %0d: got %h want %h", c, addr, oe, dout[c], w[c*4 +: 4]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
