// tb_control_counter: self-checking test of the control counter and its
// decoding. With F_T = 1 and a slave clock strobe every other clock it walks
// the states T0..T14 several times with a random S LSB and compares A, B, C
// and the F1-edge, ADD.T, Ca.T and T14 strobes with the state table worked
// out from the control pulse definitions (A = T0+T1, B = T0+T1+T2,
// C = T2+T3, ADD.T in odd states, Ca.T in even states, both gated by
// B + S_lsb). It also checks that one computation is 15 strobes long and
// that the counter stays in T0 while F_T = 0.
module tb_control_counter;
  import corr_pkg::*;
  logic clk = 0, rst_n = 0, ft = 0, cp = 0, s_lsb = 0;
  logic [3:0] cnt;
  ctrl_t ctrl;
  int checks = 0, failures = 0;

  control_counter dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    repeat (3) @(posedge clk);
    @(negedge clk);
    check(cnt == 0 && !ctrl.t14 && !ctrl.f1_up, "idle at T0");
    for (int run = 0; run < 40; run++) begin
      int ticks;
      ft <= 1;
      ticks = 0;
      for (int k = 0; k <= 14; k++) begin
        bit b_exp, g;
        @(negedge clk);
        s_lsb = 1'($urandom);
        cp = 0;
        #1;
        check(cnt == 4'(k), $sformatf("state T%0d", k));
        check(ctrl.a == (k <= 1), "A");
        b_exp = (k <= 2);
        check(ctrl.b == b_exp, "B");
        check(ctrl.c == (k == 2 || k == 3), "C");
        check(!ctrl.add_t && !ctrl.ca_t && !ctrl.f1_up && !ctrl.t14, "no strobe without cp");
        @(posedge clk);          // one clock with no slave clock pulse
        @(negedge clk);
        check(cnt == 4'(k), "holds between pulses");
        cp = 1;
        #1;
        g = b_exp || s_lsb;
        check(ctrl.f1_up == ((k % 2 == 0) && k != 14), $sformatf("F1 edge T%0d", k));
        check(ctrl.add_t == ((k % 2 == 1) && g), $sformatf("ADD.T T%0d", k));
        check(ctrl.ca_t == ((k % 2 == 0) && k != 0 && g), $sformatf("Ca.T T%0d", k));
        check(ctrl.t14 == (k == 14), "T14");
        ticks++;
        @(posedge clk);
        #1 cp = 0;
      end
      check(ticks == 15, "15 strobes per computation");
      @(negedge clk);
      check(cnt == 0, "back to T0");
      ft <= 0;
      cp = 1;
      @(posedge clk);
      #1 cp = 0;
      @(negedge clk);
      check(cnt == 0, "held in T0 while F_T = 0");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
