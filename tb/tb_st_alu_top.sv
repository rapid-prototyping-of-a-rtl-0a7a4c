`timescale 1ns / 1ps
// End-to-end test of the self-timed ALU at its default parameters.
//
// The testbench is the requesting environment: for each instruction it sets
// the selection code and the input word, performs one four-phase handshake
// on req/ack and waits for busy to fall. It runs every instruction first,
// then a long random program (with unused codes mixed in), and checks
// after every instruction:
//   - the accumulator, the output port and the X/Y registers against the
//     reference model,
//   - exactly one total-test pulse per valid instruction (none for unused
//     codes) and the operations counter,
//   - the timing: the done pulse at (p-1)*3.03 ns and the accumulator load
//     at (a-1)*3.03 ns after req, and busy low (n*3.03+1.01) ns after req,
//     with p, a, n the done pulse, load pulse and train length of the type,
//   - that nothing toggles while no request is pending (stopped clock).
// It counts how often each mechanism happened (each operation type, each
// instruction, each compare outcome, unused codes, a reset in the middle
// of an instruction) and counts a failure for any that never did.
// It prints the instruction rate per type (MIPS) it observed.
module tb_st_alu_top;
  import st_alu_pkg::*;
  import alu_ref_pkg::*;
  localparam real T_LINK = 3.03;   // forward link: 3 macros of 1.01 ns
  localparam real T_BACK = 1.01;

  int checks = 0;
  int failures = 0;

  logic        rst, req, ack, busy, tot_test;
  logic [4:0]  sel;
  word_t       din, acc, port_out, x_reg, y_reg;
  logic [15:0] op_count;

  st_alu_top dut (.rst(rst), .req(req), .ack(ack), .busy(busy), .sel(sel), .din(din),
                  .acc(acc), .port_out(port_out), .x_reg(x_reg), .y_reg(y_reg),
                  .tot_test(tot_test), .op_count(op_count));

  // event monitors
  int      n_tt, n_accclk, n_xi_edges;
  realtime t_tt, t_accclk;
  always @(posedge tot_test)        begin n_tt++; t_tt = $realtime; end
  always @(posedge dut.acc_clk)     begin n_accclk++; t_accclk = $realtime; end
  always @(dut.xi)                  n_xi_edges++;

  // mechanism counters
  int n_type [4];
  int n_instr [16];
  int n_cmp [3];
  int n_unused, n_reset_mid;
  real t_cycle_sum [4];

  word_t m_acc, m_port, m_x, m_y;
  int    m_count;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bit near(realtime a, realtime b);
    return (a - b < 0.01) && (b - a < 0.01);
  endfunction

  function automatic int type_of(int code);
    case (code)
      13: return 1;
      15: return 3;
      3, 4, 6, 7, 9, 10: return 2;
      default: return 0;
    endcase
  endfunction

  task automatic do_reset();
    rst = 1'b0; #1 rst = 1'b1; #20 rst = 1'b0; #5;
    m_acc = '0; m_port = '0; m_x = '0; m_y = '0; m_count = 0;
  endtask

  task automatic execute(input int code, input word_t data);
    realtime t0, t_done;
    int tt0, ac0, pulses, load_at, ty;
    bit valid;
    valid = (code >= 1 && code <= 15);
    sel = 5'(code); din = data;
    wait (!busy);
    #1;
    tt0 = n_tt; ac0 = n_accclk;
    t0 = $realtime;
    req = 1'b1;
    wait (ack);
    req = 1'b0;
    wait (!ack);
    wait (!busy);
    t_done = $realtime;
    #2;
    if (valid) begin
      ty = type_of(code);
      n_type[ty]++;
      n_instr[code]++;
      pulses = ref_pulses(sel_e'(code));
      load_at = (ty == 0) ? 2 : (ty == 2) ? 3 : (ty == 3) ? 8 : 0;
      if (code == 13) m_port = m_acc;
      if (code == 7) m_x = data;
      if (code == 10) m_y = data;
      if (code == 9) begin
        if (m_acc < data) n_cmp[0]++; else if (m_acc == data) n_cmp[1]++; else n_cmp[2]++;
      end
      m_acc = ref_acc(sel_e'(code), m_acc, data);
      m_count++;
      check(n_tt - tt0 == 1, $sformatf("code %0d: %0d done pulses", code, n_tt - tt0));
      check(near(t_tt - t0, (pulses - 1) * T_LINK),
            $sformatf("code %0d: done pulse at %0.3f ns", code, t_tt - t0));
      check(n_accclk - ac0 == (load_at == 0 ? 0 : 1), $sformatf("code %0d: %0d acc loads", code, n_accclk - ac0));
      if (load_at != 0)
        check(near(t_accclk - t0, (load_at - 1) * T_LINK),
              $sformatf("code %0d: acc load at %0.3f ns", code, t_accclk - t0));
      check(near(t_done - t0, pulses * T_LINK + T_BACK),
            $sformatf("code %0d: busy fell after %0.3f ns", code, t_done - t0));
      t_cycle_sum[ty] += t_done - t0;
    end else begin
      n_unused++;
      check(n_tt == tt0 && n_accclk == ac0, $sformatf("unused code %0d does nothing", code));
    end
    check(acc == m_acc, $sformatf("code %0d: acc %h expected %h", code, acc, m_acc));
    check(port_out == m_port, $sformatf("code %0d: port %h expected %h", code, port_out, m_port));
    check(x_reg == m_x && y_reg == m_y, $sformatf("code %0d: X/Y registers", code));
    check(int'(op_count) == m_count, $sformatf("op_count %0d expected %0d", op_count, m_count));
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = 1'b0; sel = '0; din = '0;
    do_reset();
    check(acc == 0 && op_count == 0 && !busy && !ack, "clean after reset");
    // every instruction once, in code order
    execute(1, 16'h0005);
    for (int c = 2; c <= 15; c++) execute(c, word_t'($urandom));
    // compare: equal, lower, greater
    execute(1, 16'h1000); execute(9, 16'h1000);
    execute(1, 16'h1000); execute(9, 16'h2000);
    execute(1, 16'h1000); execute(9, 16'h0800);
    // multiplication with a known result
    execute(1, 16'd300); execute(15, 16'd200);
    check(acc == 16'(300 * 200), "300*200 modulo 2**16");
    // stopped clock: no activity without a request
    begin
      int e0;
      e0 = n_xi_edges;
      #500;
      check(n_xi_edges == e0, "no pulse while idle");
    end
    // random program
    for (int i = 0; i < 400; i++) begin
      int code;
      code = int'($urandom % 18);
      if (code == 16) code = 0;
      if (code == 17) code = 16 + int'($urandom % 16);
      execute(code, (i % 7 == 0) ? m_acc : word_t'($urandom));
    end
    // reset in the middle of a multiplication: everything clears, and the
    // next instruction runs normally
    sel = 5'(SEL_MUL); din = 16'h0003;
    req = 1'b1;
    wait (ack);
    req = 1'b0;
    #8;
    check(busy, "multiplication in flight");
    do_reset();
    n_reset_mid++;
    check(!busy && acc == 0 && op_count == 0, "reset in flight clears");
    execute(1, 16'h00AA);
    execute(8, 16'h0000);
    check(acc == 16'h00AB, "runs after reset");

    for (int t = 0; t < 4; t++) begin
      check(n_type[t] > 0, $sformatf("type %0d executed %0d times", t + 1, n_type[t]));
      if (n_type[t] > 0)
        $display("type %0d: %0d instructions, %0.2f ns each, %0.1f MIPS", t + 1, n_type[t],
                 t_cycle_sum[t] / n_type[t], 1000.0 * n_type[t] / t_cycle_sum[t]);
    end
    for (int c = 1; c <= 15; c++) check(n_instr[c] > 0, $sformatf("instruction %0d executed", c));
    for (int k = 0; k < 3; k++) check(n_cmp[k] > 0, $sformatf("compare outcome %0d seen", k));
    check(n_unused > 0, "unused codes exercised");
    check(n_reset_mid > 0, "reset in flight exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
