// tb_bat: checks z1 for every counter value: 1 only at the outputs of the
// chains of class B4 (10100 and 11000).
module tb_bat;
  import cmcu_ref_pkg::*;

  logic [4:0] t;
  logic [0:0] z;
  int checks = 0, failures = 0;
  int ones = 0;

  bat dut (.t(t), .z(z));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin

    for (int a = 0; a < 32; a++) begin
      t = 5'(a);
      #1;
      checks++;
      if (z[0] !== exp_z(a)) begin
        failures++;
        $display("t %05b: z1 %0d want %0d", t, z, exp_z(a));
      end
      ones += int'(z[0]);
    end
    checks++;
    if (ones != 2) begin
      failures++;
      $display("z1 set at %0d addresses, want 2", ones);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
