// Self-checking testbench for the OOK modulator switch model.
//
// Open switch (gate low): the receiver sees R_m = 3552 ohm, is matched and
// the reflection coefficient is 0. Closed switch (gate high): R_m is
// shorted, the receiver is mismatched and the reflection is -1.0 (-32768
// in Q1.15). The gate is driven with 20 random values.
`timescale 1ns / 1ps
module tb_ook_switch;

  logic              gate;
  logic [15:0]       r_load_ohm;
  logic              mismatched;
  logic signed [15:0] reflection;
  int   checks = 0, failures = 0;

  ook_switch dut (.gate(gate), .r_load_ohm(r_load_ohm),
                  .mismatched(mismatched), .reflection(reflection));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: r=%0d mis=%0b refl=%0d", what, $realtime,
               r_load_ohm, mismatched, reflection);
    end
  endtask

  initial begin
    #100_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    gate = 1'b0;
    #10;
    repeat (20) begin
      bit g;
      g = 1'($urandom);
      gate = g;
      #10;
      if (g) begin
        check(r_load_ohm == 16'd0,  "closed switch shorts R_m");
        check(mismatched == 1'b1,   "closed switch mismatches");
        check(reflection == -16'sd32768, "closed switch reflects -1");
      end else begin
        check(r_load_ohm == 16'd3552, "open switch leaves R_m = R_p");
        check(mismatched == 1'b0,     "open switch is matched");
        check(reflection == 16'sd0,   "open switch reflects 0");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
