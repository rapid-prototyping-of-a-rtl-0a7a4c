`timescale 1ns / 1ps
// Self-checking test of the result multiplexer: random channel values, each
// of the 15 one-hot selects must pass its channel.
module tb_result_mux;
  import st_alu_pkg::*;
  int checks = 0;
  int failures = 0;
  logic [N_MUX-1:0] sel;
  word_t [N_MUX-1:0] chan;
  word_t y;

  result_mux dut (.sel(sel), .chan(chan), .y(y));

  initial begin
    #100000 failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 20; r++) begin
      for (int k = 0; k < N_MUX; k++) chan[k] = word_t'($urandom);
      for (int k = 0; k < N_MUX; k++) begin
        sel = N_MUX'(1) << k;
        #1;
        checks++;
        if (y != chan[k]) begin failures++; $display("FAIL: line %0d y=%h expected %h", k, y, chan[k]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
