// tb_bma: for the output of every chain that belongs to a class, and every
// value of x1..x5, presents the counter value and the class code sources
// (v1, z1) that the unit would present, and checks that phi is the address
// of the vertex the transition system selects. Also checks that the three
// transition lines of Table 1 give the printed excitation codes.
module tb_bma;
  import cmcu_ref_pkg::*;

  logic [4:0] t, x, phi;
  logic [0:0] z, v;
  int checks = 0, failures = 0;

  bma dut (.t(t), .z(z), .v(v), .x(x), .phi(phi));

  task automatic check(logic [4:0] want, string what);
    checks++;
    if (phi !== want) begin
      failures++;
      $display("%s: t %05b v %0d z %0d x %05b: phi %05b want %05b",
               what, t, v, z, x, phi, want);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int g = 1; g <= NCHAIN; g++) begin
      automatic int q = LAST[g];
      if (CLASS[g] == 0) continue;
      for (int xv = 0; xv < 32; xv++) begin
        t = 5'(addr_of(q));
        v = exp_v(addr_of(q));
        z = exp_z(addr_of(q));
        x = 5'(xv);
        #1;
        check(5'(addr_of(next_vertex(q, x))), "chain output");
      end
    end
    // Lines of the transition table, with the codes printed there
    // (x[k-1] is x_k).
    t = 5'b00101; v = 0; z = 0; x = 5'b00100; #1; check(5'b01000, "B2 x3");
    x = 5'b00000; #1; check(5'b11100, "B2 ~x3");
    t = 5'b01100; v = 1; z = 0; x = 5'b00001; #1; check(5'b10001, "B3 x1");
    x = 5'b00010; #1; check(5'b10011, "B3 ~x1 x2");
    x = 5'b00000; #1; check(5'b11100, "B3 ~x1 ~x2");
    t = 5'b10100; v = 0; z = 1; x = 5'b10000; #1; check(5'b11101, "B4 x5");
    x = 5'b00000; #1; check(5'b00100, "B4 ~x5");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
