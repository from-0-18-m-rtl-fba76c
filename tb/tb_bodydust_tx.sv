// End-to-end testbench of the Body Dust transmitter at its default
// parameters (1 MHz ring oscillator, 4-bit packets).
//
// Stimulus: a current-to-frequency converter model turns a sensor current
// into the FE pulse train, 7 kHz per nA. The five sensors are visited in
// turn with their 3-bit address on the address input, as the on-chip
// multiplexer would do (it is much slower in the chip, so each sensor gets
// only a few FE periods here). Addresses 101 and 001 give the packets 1101
// and 1001 of the document's glucose/lactate example. The last run uses the
// fastest FE rate the document quotes, about 100 kHz.
//
// Checks:
//  - a reference model of the packet register, kept here, predicts the
//    serial bit at the middle of every bit period; the switch state,
//    resistance and reflection must follow the bit;
//  - latency: the header bit starts at the first LE pulse after the FE
//    rising edge, no later than one oscillator period (1 us);
//  - rate: every bit lasts one oscillator period, 1 us within 1%;
//  - a base-station decoder that sees only the switch state finds the
//    packets, checks their addresses, and recovers the FE frequency of each
//    sensor from the packet spacing, within 2%.
// Each mechanism of the design is counted and must occur: LOAD pulses,
// shifts, switch closures, FE held high across LE pulses (no new packet),
// completed packets and oscillator start after power-on.
`timescale 1ns / 1ps
module tb_bodydust_tx;
  import bodydust_pkg::*;

  logic              por_n;
  logic              fe;
  logic [ADDR_W-1:0] addr;
  logic              sdata;
  logic [15:0]       r_load_ohm;
  logic              mismatched;
  logic signed [15:0] reflection;
  logic              le;
  logic              load;

  int checks = 0, failures = 0;

  bodydust_tx dut (
    .por_n(por_n), .fe(fe), .addr(addr), .sdata(sdata),
    .r_load_ohm(r_load_ohm), .mismatched(mismatched), .reflection(reflection),
    .le(le), .load(load)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $realtime);
    end
  endtask

  // ---------------------------------------------------------------- model
  bit              pending = 1'b0;   // FE rose, no LE pulse since
  realtime         t_fe_rise;
  logic [PKT_W-1:0] exp_reg = '0;
  realtime         t_le_last = 0.0;
  int n_load = 0, n_shift = 0, n_held = 0, n_close = 0, n_le = 0, n_packets = 0;
  bit fe_at_le = 1'b0;
  int bits_left = 0;  // packet bits still to be shifted out

  always @(posedge fe) if (por_n) begin
    pending   = 1'b1;
    t_fe_rise = $realtime;
  end

  always @(posedge le) if (por_n) begin
    n_le++;
    if (t_le_last > 0.0)
      check(($realtime - t_le_last) > 990.0 && ($realtime - t_le_last) < 1010.0,
            "bit period 1 us");
    t_le_last = $realtime;
    check(load == pending, "LOAD high exactly when an FE edge is waiting");
    if (pending) begin
      n_load++;
      check(($realtime - t_fe_rise) <= 1001.0, "header within one period of FE edge");
      exp_reg = make_packet(addr);
      bits_left = PKT_W - 1;
      pending = 1'b0;
    end else begin
      if (bits_left > 0) begin
        n_shift++;
        bits_left--;
      end
      if (fe && fe_at_le) n_held++;
      exp_reg = {exp_reg[PKT_W-2:0], 1'b0};
    end
    fe_at_le = fe;
    #500;
    check(sdata == exp_reg[PKT_W-1], "serial bit matches model");
    check(mismatched == sdata, "switch follows the bit");
    check(r_load_ohm == (sdata ? 16'd0 : 16'd3552), "modulator resistance");
    check(reflection == (sdata ? -16'sd32768 : 16'sd0), "reflection coefficient");
  end

  always @(posedge mismatched) if (por_n) n_close++;

  // ------------------------------------------------------ base station
  // Samples the switch state in the middle of each bit period (it knows
  // the 1 MHz bit clock), finds header bits and records packet times.
  int      rx_state = 0;
  logic [ADDR_W-1:0] rx_addr;
  realtime rx_t_hdr;
  realtime rx_last_t[8];
  int      rx_count[8];
  real     rx_sum_dt[8];
  logic [ADDR_W-1:0] exp_addr_q[$];

  always @(posedge le) if (por_n) begin
    #500;
    if (rx_state == 0) begin
      if (mismatched) begin
        rx_state = 1;
        rx_t_hdr = $realtime;
        rx_addr  = '0;
      end
    end else begin
      rx_addr  = {rx_addr[ADDR_W-2:0], mismatched};
      rx_state = rx_state + 1;
      if (rx_state == PKT_W) begin
        rx_state = 0;
        n_packets++;
        check(exp_addr_q.size() > 0, "packet expected");
        if (exp_addr_q.size() > 0)
          check(rx_addr == exp_addr_q.pop_front(), "decoded address");
        if (rx_count[rx_addr] > 0) rx_sum_dt[rx_addr] += rx_t_hdr - rx_last_t[rx_addr];
        rx_count[rx_addr]++;
        rx_last_t[rx_addr] = rx_t_hdr;
      end
    end
  end

  // ---------------------------------------------------------- stimulus
  // FE from a current-to-frequency converter, 7 kHz/nA, 50% duty cycle.
  task automatic run_sensor(input logic [ADDR_W-1:0] a, input real freq_hz, input int periods);
    real half_ns;
    half_ns = 0.5e9 / freq_hz;
    addr = a;
    rx_count[a]  = 0;
    rx_sum_dt[a] = 0.0;
    repeat (periods) begin
      // keep the FE edge away from the 1 ns LE pulse, as a real edge would
      // be resolved one way or the other by the latch
      if (($realtime - t_le_last) < 3.0) #5;
      exp_addr_q.push_back(a);
      fe = 1'b1;
      #(half_ns);
      fe = 1'b0;
      #(half_ns);
    end
    #10_000;  // let the last packet finish
    check(rx_count[a] == periods, "one packet per FE period");
    if (rx_count[a] > 1) begin
      real f_rx;
      f_rx = 1.0e9 / (rx_sum_dt[a] / real'(rx_count[a] - 1));
      $display("sensor %0d: FE %0.1f Hz, recovered %0.1f Hz from %0d packets",
               a, freq_hz, f_rx, rx_count[a]);
      check(f_rx > 0.98 * freq_hz && f_rx < 1.02 * freq_hz, "frequency recovered from packet rate");
    end
  endtask

  initial begin
    #20_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real currents_na[N_SENSORS] = '{3.0, 1.0, 5.0, 2.0, 4.0};
  logic [ADDR_W-1:0] sensor_addr[N_SENSORS] = '{3'b101, 3'b001, 3'b000, 3'b010, 3'b011};
  int osc_started = 0;

  initial begin
    por_n = 1'b0; fe = 1'b0; addr = '0;
    #3000;
    check(sdata == 1'b0 && mismatched == 1'b0, "switch open in reset");
    por_n = 1'b1;
    fork
      begin @(posedge le); osc_started = 1; end
      #1500;
    join_any
    check(osc_started == 1, "oscillator starts after power-on");
    #3000;
    check(sdata == 1'b0, "no packet without FE edge");

    for (int s = 0; s < int'(N_SENSORS); s++)
      run_sensor(sensor_addr[s], 7.0e3 * currents_na[s], 6);
    // fastest FE rate named in the document
    run_sensor(3'b100, 100.0e3, 20);

    check(n_load > 0,    "mechanism: LOAD pulse");
    check(n_shift > 0,   "mechanism: shift");
    check(n_close > 0,   "mechanism: switch closed (backscatter)");
    check(n_held > 0,    "mechanism: FE held high without new packet");
    check(n_packets > 0, "mechanism: complete packet");
    check(n_load == n_packets, "every LOAD gave a complete packet");
    check(n_shift == 3 * n_load, "three shifts of packet bits per packet");
    $display("loads %0d shifts %0d closures %0d held-high %0d packets %0d LE pulses %0d",
             n_load, n_shift, n_close, n_held, n_packets, n_le);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
