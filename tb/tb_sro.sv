// Self-checking testbench for the ring-oscillator model.
//
// Holds the enable low and checks that the output rests low; then enables
// it and checks the start-up delay (three stage delays, 500 ns), the period
// (1 us, the frequency the document targets, within 1%) and the 50% duty
// cycle over 50 periods; finally disables it and checks that it stops.
// The expected values come from f = I / (N * C * V) worked out by hand:
// 1.08 uA / (3 * 200 fF * 1.8 V) = 1 MHz.
`timescale 1ns / 1ps
module tb_sro;

  logic en;
  logic clk;
  int   checks = 0, failures = 0;

  sro dut (.en(en), .clk(clk));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $realtime);
    end
  endtask

  realtime t_en, t_r[$], t_f[$];

  always @(posedge clk) t_r.push_back($realtime);
  always @(negedge clk) t_f.push_back($realtime);

  initial begin
    #400_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 1'b0;
    #3000;
    check(clk == 1'b0, "clock rests low while disabled");
    t_r.delete(); t_f.delete();
    #2000;
    check(t_r.size() == 0, "no edges while disabled");
    en = 1'b1;
    t_en = $realtime;
    #51_000;
    check(t_r.size() >= 50, "at least 50 rising edges in 51 us");
    if (t_r.size() >= 50) begin
      real first, period, high;
      first  = t_r[0] - t_en;
      period = (t_r[49] - t_r[0]) / 49.0;
      high   = t_f[1] - t_r[1];
      $display("start-up %0.3f ns, period %0.3f ns, high %0.3f ns", first, period, high);
      check(first > 495.0 && first < 505.0, "first rising edge after 3 stage delays");
      check(period > 990.0 && period < 1010.0, "period 1 us within 1%");
      check(high > 495.0 && high < 505.0, "duty cycle 50%");
      for (int i = 1; i < 50; i++)
        check((t_r[i] - t_r[i-1]) > 990.0 && (t_r[i] - t_r[i-1]) < 1010.0, "every period within 1%");
    end
    en = 1'b0;
    #2000;
    t_r.delete();
    #5000;
    check(t_r.size() == 0, "oscillator stops when disabled");
    check(clk == 1'b0, "clock rests low after disable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
