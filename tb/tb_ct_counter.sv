// tb_ct_counter: drives start, fetch, y0 and phi at random for many cycles
// and compares the counter with a model: start loads 00000, otherwise with
// fetch = 1 it counts when y0 = 1 and loads phi when y0 = 0, and it holds
// when fetch = 0. Each case is counted and must occur.
module tb_ct_counter;
  logic       clk = 0, rst_n = 0, start = 0, fetch = 0, y0 = 0;
  logic [4:0] phi = '0, t, model;
  int checks = 0, failures = 0;
  int n_start = 0, n_inc = 0, n_load = 0, n_hold = 0, n_wrap = 0;

  ct_counter dut (.clk(clk), .rst_n(rst_n), .start(start), .fetch(fetch),
                  .y0(y0), .phi(phi), .t(t));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '0;
    repeat (2) @(posedge clk);
    checks++;
    if (t !== 5'd0) begin failures++; $display("reset value %05b", t); end
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      start = ($urandom_range(0, 15) == 0);
      fetch = ($urandom_range(0, 7) != 0);
      y0    = ($urandom_range(0, 3) != 0);
      phi   = 5'($urandom);
      if (start)          begin model = 5'd0;        n_start++; end
      else if (!fetch)    n_hold++;
      else if (y0)        begin
        if (model == 5'd31) n_wrap++;
        model = model + 5'd1; n_inc++;
      end
      else                begin model = phi;         n_load++;  end
      @(posedge clk);
      #1;
      checks++;
      if (t !== model) begin
        failures++;
        $display("cycle %0d: t %05b want %05b", i, t, model);
      end
    end
    checks++;
    if (n_start == 0 || n_inc == 0 || n_load == 0 || n_hold == 0) begin
      failures++;
      $display("a case never occurred: start %0d inc %0d load %0d hold %0d",
               n_start, n_inc, n_load, n_hold);
    end
    $display("start %0d inc %0d (wrap %0d) load %0d hold %0d", n_start, n_inc, n_wrap, n_load, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
