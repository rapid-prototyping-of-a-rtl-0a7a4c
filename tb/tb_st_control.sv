`timescale 1ns / 1ps
// Self-checking test of one ST control block (C-element with one inverted
// input). Drives all input sequences of length 6 from every reachable state
// and compares the output with a reference model: the output copies req_in
// when req_in differs from ack_in and holds otherwise; rst forces 0.
module tb_st_control;
  int checks = 0;
  int failures = 0;
  logic rst, req_in, ack_in, xi;
  logic model;

  st_control dut (.rst(rst), .req_in(req_in), .ack_in(ack_in), .xi(xi));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000 failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; req_in = 1'b0; ack_in = 1'b0; model = 1'b0;
    #1;
    check(xi == 1'b0, "reset value");
    rst = 1'b0;
    #1;
    for (int seq = 0; seq < 4096; seq++) begin
      for (int s = 0; s < 6; s++) begin
        {rst, req_in, ack_in} = {1'b0, 2'(seq >> (2 * s))};
        if (s == 5 && seq[0]) rst = 1'b1;
        #1;
        if (rst) model = 1'b0;
        else if (req_in != ack_in) model = req_in;
        check(xi == model, $sformatf("seq %0d step %0d req=%b ack=%b xi=%b", seq, s, req_in, ack_in, xi));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
