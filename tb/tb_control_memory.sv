// tb_control_memory: reads every address with fetch on and off and checks
// the microoperations, y0, yE and the free-output class code v1.
module tb_control_memory;
  import cmcu_ref_pkg::*;

  logic [4:0]  addr;
  logic        fetch;
  logic [12:0] y;
  logic        y0, ye;
  logic [0:0]  v;
  int checks = 0, failures = 0;
  int n_v = 0, n_e = 0, n_0 = 0;

  control_memory dut (.addr(addr), .fetch(fetch), .y(y), .y0(y0), .ye(ye), .v(v));

  task automatic check(string what, logic [15:0] got, logic [15:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("addr %05b fetch %0d %s: got %h want %h", addr, fetch, what, got, want);
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

    for (int e = 0; e < 2; e++) begin
      for (int a = 0; a < 32; a++) begin
        addr  = 5'(a);
        fetch = e[0];
        #1;
        check("y",  16'(y),  e[0] ? 16'(exp_y(a))  : 16'h0);
        check("y0", 16'(y0), e[0] ? 16'(exp_y0(a)) : 16'h0);
        check("yE", 16'(ye), e[0] ? 16'(exp_ye(a)) : 16'h0);
        check("v1", 16'(v),  e[0] ? 16'(exp_v(a))  : 16'h0);
        if (e[0]) begin
          n_v += int'(v); n_e += int'(ye); n_0 += int'(y0);
        end
      end
    end
    // Counts fixed by the example: two chain outputs of B3, one final
    // vertex, 31 - 9 vertices inside chains.
    check("count v1", 16'(n_v), 16'd2);
    check("count yE", 16'(n_e), 16'd1);
    check("count y0", 16'(n_0), 16'd22);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
