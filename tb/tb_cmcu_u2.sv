// tb_cmcu_u2: runs the whole control unit, at its default sizes, through
// the flow chart Gamma_1 many times with random logical conditions.
//
// Each cycle the testbench knows, from the vertex-level reference model,
// which vertex b_q must be executing; it checks the address, the
// microoperations and yE, and after each chain output it picks the next
// vertex by the transition system. It counts every mechanism of the unit:
// start, counting inside a chain, a next address taken with the class code
// from the counter (B1, B2, B5), from the free control-memory output
// (B3) and from the address transformer (B4), the end of the algorithm by
// yE, and a restart by start while running. Each must occur at least once.
// Each run must also take exactly one clock per executed microinstruction.
module tb_cmcu_u2;
  import cmcu_ref_pkg::*;

  logic        clk = 0, rst_n = 0, start = 0;
  logic [4:0]  x = '0;
  logic [12:0] y;
  logic        fetch, ye;
  logic [4:0]  t;
  int checks = 0, failures = 0;
  int n_start = 0, n_count = 0, n_src_ct = 0, n_src_v = 0, n_src_z = 0;
  int n_end = 0, n_restart = 0;
  int seen_chain [1:NCHAIN];
  int fetch_cycles = 0;   // clock edges seen with fetch = 1

  always @(posedge clk) if (fetch) fetch_cycles++;

  cmcu_u2 dut (.clk(clk), .rst_n(rst_n), .start(start), .x(x),
               .y(y), .fetch(fetch), .ye(ye), .t(t));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("%0t: %s (t %05b y %h ye %0d fetch %0d)", $time, what, t, y, ye, fetch);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (seen_chain[g]) seen_chain[g] = 0;
    repeat (2) @(posedge clk);
    #1;
    check(fetch == 1'b0 && y == '0 && ye == 1'b0, "idle after reset");
    @(negedge clk) rst_n = 1;
    @(negedge clk);
    check(fetch == 1'b0 && y == '0, "idle before start");

    for (int run = 0; run < 400; run++) begin
      automatic int q = 1, steps = 0, cyc0 = 0;
      automatic bit restart = (run % 25 == 24);
      automatic int restart_at = $urandom_range(3, 12);
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      cyc0 = fetch_cycles;
      n_start++;
      // Walk the flow chart, one vertex per clock.
      while (1) begin
        automatic int nq;
        x = 5'($urandom);
        #1;
        check(fetch == 1'b1, "fetch set while running");
        check(t == 5'(addr_of(q)), $sformatf("address of b%0d", q));
        check(y == exp_y(addr_of(q)), $sformatf("microoperations of b%0d", q));
        check(ye == (class_of_vertex(q) == 0 && is_last(q)), $sformatf("yE at b%0d", q));
        seen_chain[chain_of(q)]++;
        steps++;
        nq = next_vertex(q, x);
        if (!is_last(q)) n_count++;
        else case (class_of_vertex(q))
          1, 2, 5: n_src_ct++;
          3:       n_src_v++;
          4:       n_src_z++;
          default: ;
        endcase
        if (restart && steps == restart_at) begin
          // A new start pulse in the middle of a run restarts at b1.
          @(negedge clk) start = 1;
          @(negedge clk) start = 0;
          #1;
          check(t == 5'd0 && fetch == 1'b1, "restart loads b1");
          n_restart++;
          restart = 0;
          q = 1;
          steps = 0;
          cyc0 = fetch_cycles;
          continue;
        end
        @(negedge clk);
        if (nq == 0) break;
        q = nq;
      end
      // The final microinstruction cleared the fetch flip-flop.
      #1;
      check(fetch == 1'b0 && y == '0 && ye == 1'b0, "stopped after yE");
      n_end++;
      @(negedge clk);
      check(fetch == 1'b0 && y == '0, "stays stopped");
      check(fetch_cycles - cyc0 == steps,
            $sformatf("%0d clocks for %0d microinstructions", fetch_cycles - cyc0, steps));
    end

    check(n_start > 0, "start occurred");
    check(n_count > 0, "counting inside a chain occurred");
    check(n_src_ct > 0, "class code from the counter occurred");
    check(n_src_v > 0, "class code from the control memory occurred");
    check(n_src_z > 0, "class code from the address transformer occurred");
    check(n_end > 0, "end by yE occurred");
    check(n_restart > 0, "restart occurred");
    for (int g = 1; g <= NCHAIN; g++) check(seen_chain[g] > 0, $sformatf("chain %0d executed", g));
    $display("runs %0d: count %0d, next address by CT %0d, by V %0d, by Z %0d, ends %0d, restarts %0d",
             n_start, n_count, n_src_ct, n_src_v, n_src_z, n_end, n_restart);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
