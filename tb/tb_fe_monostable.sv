// Self-checking testbench for the front-end monostable.
//
// A 1 MHz clock stands for the LE pulses. FE is driven asynchronously with
// random high and low times (from a fraction of a clock period up to many
// periods), its edges kept away from the clock edges. The testbench keeps
// its own record of FE at the last clock edge and checks, at random
// instants and just before every edge, that LOAD = FE and not FE-at-last-
// edge. It also checks that every FE rising edge gives exactly one clock
// edge with LOAD high and that a long FE high level gives no more.
`timescale 1ns / 1ps
module tb_fe_monostable;

  logic le = 1'b0;
  logic rst_n;
  logic fe;
  logic load;
  int   checks = 0, failures = 0;
  int   n_fe_rise = 0, n_load_edges = 0, n_held_high = 0;
  bit   fe_at_edge = 1'b0;

  fe_monostable dut (.le(le), .rst_n(rst_n), .fe(fe), .load(load));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $realtime);
    end
  endtask

  always #500 le = ~le;

  always @(posedge le) if (rst_n) begin
    if (load) n_load_edges++;
    else if (fe && fe_at_edge) n_held_high++;
    fe_at_edge = fe;
  end
  always @(posedge fe) if (rst_n) n_fe_rise++;

  // Check just before each rising clock edge.
  always @(negedge le) if (rst_n) begin
    #499;
    check(load == (fe && !fe_at_edge), "LOAD before the edge");
  end

  initial begin
    #20_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; fe = 1'b0;
    #1200;
    check(load == 1'b0, "no LOAD in reset");
    rst_n = 1'b1;
    @(posedge le);
    repeat (300) begin
      int t;
      // keep FE edges at least 20 ns from the rising clock edges
      t = 20 + ($urandom % 960);
      #(t) fe = ~fe;
      #5 check(load == (fe && !fe_at_edge), "LOAD right after an FE edge");
      repeat ($urandom % 8) @(posedge le);
      @(posedge le);
    end
    fe = 1'b0;
    @(posedge le); @(posedge le);
    check(n_load_edges == n_fe_rise, "one LOAD per FE rising edge");
    check(n_fe_rise > 100, "enough FE edges");
    check(n_held_high > 100, "FE held high seen without new LOAD");
    $display("fe rises %0d, loads %0d, held-high edges %0d", n_fe_rise, n_load_edges, n_held_high);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
