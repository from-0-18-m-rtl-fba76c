// Self-checking testbench for the PISO register.
//
// Clocks the register with a plain clock standing for the LE pulses and
// drives random LOAD and parallel words, including loads in the middle of
// a packet. A reference model kept in this testbench (a queue of the bits
// still to come out, header first) predicts the serial output after every
// edge. Also checks that a loaded packet comes out in exactly four edges,
// MSB first, followed by zeros, and that the asynchronous clear works.
`timescale 1ns / 1ps
module tb_piso;

  localparam int W = 4;

  logic         le = 1'b0;
  logic         rst_n;
  logic         load;
  logic [W-1:0] par_in;
  logic         sout;
  int   checks = 0, failures = 0;

  piso #(.W(W)) dut (.le(le), .rst_n(rst_n), .load(load), .par_in(par_in), .sout(sout));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $realtime);
    end
  endtask

  always #500 le = ~le;

  bit model[$];  // bits still to leave, front = current output

  task automatic edge_and_check(input bit ld, input logic [W-1:0] word);
    @(negedge le);
    load   = ld;
    par_in = word;
    @(posedge le);
    if (ld) begin
      model.delete();
      for (int i = W - 1; i >= 0; i--) model.push_back(word[i]);
    end else if (model.size() > 0) begin
      void'(model.pop_front());
    end
    #100;
    check(sout == ((model.size() > 0) ? model[0] : 1'b0), "serial output matches model");
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; load = 1'b0; par_in = '0;
    #1200;
    check(sout == 1'b0, "cleared by reset");
    rst_n = 1'b1;

    // One packet 1101 as in the document's example: 1, 1, 0, 1, then zeros.
    edge_and_check(1'b1, 4'b1101);
    check(sout == 1'b1, "header first");
    edge_and_check(1'b0, 4'b0000); check(sout == 1'b1, "A2");
    edge_and_check(1'b0, 4'b0000); check(sout == 1'b0, "A1");
    edge_and_check(1'b0, 4'b0000); check(sout == 1'b1, "A0");
    edge_and_check(1'b0, 4'b0000); check(sout == 1'b0, "idle after four bits");
    edge_and_check(1'b0, 4'b1111); check(sout == 1'b0, "parallel input ignored without LOAD");

    // Random traffic: a load about one edge in six.
    repeat (400) edge_and_check(($urandom % 6) == 0, 4'($urandom));

    // Clear in the middle of a packet.
    edge_and_check(1'b1, 4'b1111);
    #50 rst_n = 1'b0;
    #10 check(sout == 1'b0, "asynchronous clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
