`timescale 1ns / 1ps
// Self-checking test of the instruction decoder: all 32 selection codes;
// codes 1..15 must give the table value 2**(code-1) on the decoder lines,
// other codes no line.
module tb_instr_decoder;
  import st_alu_pkg::*;
  int checks = 0;
  int failures = 0;
  logic [4:0] sel;
  logic [14:0] deco;
  // decoder line values of the instruction table, in code order 1..15
  localparam logic [15:0] TABLE [15] = '{16'h0001, 16'h0002, 16'h0004, 16'h0008, 16'h0010,
    16'h0020, 16'h0040, 16'h0080, 16'h0100, 16'h0200, 16'h0400, 16'h0800, 16'h1000,
    16'h2000, 16'h4000};

  instr_decoder dut (.sel(sel), .deco(deco));

  initial begin
    #10000 failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 32; c++) begin
      sel = 5'(c);
      #1;
      checks++;
      if (c >= 1 && c <= 15) begin
        if ({1'b0, deco} != TABLE[c-1]) begin
          failures++; $display("FAIL: code %0d deco=%h", c, deco);
        end
      end else if (deco != '0) begin
        failures++; $display("FAIL: code %0d deco=%h expected none", c, deco);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
