// Self-checking testbench for the latch-enable pulse generator model.
//
// Drives the trigger with a 1 MHz clock of random phase jitter and checks
// that every rising edge of the trigger, and only those, gives one LE
// pulse that starts with the edge and lasts 1 ns (5 inverters of 0.2 ns,
// the document's "almost 1 ns").
`timescale 1ns / 1ps
module tb_mono_sync;

  logic trig;
  logic le;
  int   checks = 0, failures = 0;
  int   n_trig_rise = 0, n_le = 0;

  mono_sync dut (.trig(trig), .le(le));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $realtime);
    end
  endtask

  realtime t_trig_rise, t_le_rise;

  always @(posedge trig) begin
    n_trig_rise++;
    t_trig_rise = $realtime;
  end
  always @(posedge le) begin
    n_le++;
    t_le_rise = $realtime;
    check(trig == 1'b1, "LE pulse only while the trigger is high");
    check(($realtime - t_trig_rise) < 0.01, "LE starts with the trigger edge");
  end
  always @(negedge le) if ($realtime > 10.0) begin
    real w;
    w = $realtime - t_le_rise;
    check(w > 0.95 && w < 1.05, "LE pulse width 1 ns");
  end

  initial begin
    #200_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    trig = 1'b0;
    #20;
    n_le = 0; n_trig_rise = 0;
    repeat (100) begin
      #(495 + ($urandom % 10)) trig = 1'b1;
      #(495 + ($urandom % 10)) trig = 1'b0;
    end
    #20;
    check(le == 1'b0, "LE low at rest");
    check(n_le == n_trig_rise, "one LE pulse per rising trigger edge");
    check(n_le == 100, "100 pulses for 100 edges");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
