// tb_fetch_ff: drives start and yE at random and compares the fetch flag
// with a model: start sets it, yE clears it, start wins when both are 1.
module tb_fetch_ff;
  logic clk = 0, rst_n = 0, start = 0, ye = 0, fetch, model = 0;
  int checks = 0, failures = 0;
  int n_set = 0, n_clr = 0, n_both = 0;

  fetch_ff dut (.clk(clk), .rst_n(rst_n), .start(start), .ye(ye), .fetch(fetch));

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    checks++;
    if (fetch !== 1'b0) begin failures++; $display("reset value %0d", fetch); end
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      start = ($urandom_range(0, 5) == 0);
      ye    = ($urandom_range(0, 4) == 0);
      if (start && ye) n_both++;
      if (start)    begin model = 1'b1; n_set++; end
      else if (ye)  begin if (model) n_clr++; model = 1'b0; end
      @(posedge clk);
      #1;
      checks++;
      if (fetch !== model) begin
        failures++;
        $display("cycle %0d: fetch %0d want %0d", i, fetch, model);
      end
    end
    checks++;
    if (n_set == 0 || n_clr == 0 || n_both == 0) begin
      failures++;
      $display("a case never occurred: set %0d clear %0d both %0d", n_set, n_clr, n_both);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
