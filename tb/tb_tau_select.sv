// tb_tau_select: self-checking test of the tau_m select switch. For random
// tap contents every switch position m = 0..18 must route the A/D word
// (m = 0) or stage m; positions 19..31 read 0.
module tb_tau_select;
  logic [4:0] m;
  logic [5:0] direct, r_out;
  logic [17:0][5:0] taps;
  int checks = 0, failures = 0;

  tau_select dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      direct = 6'($urandom);
      for (int k = 0; k < 18; k++) taps[k] = 6'($urandom);
      for (int mm = 0; mm < 32; mm++) begin
        logic [5:0] exp_v;
        m = 5'(mm);
        #1;
        exp_v = (mm == 0) ? direct : (mm <= 18) ? taps[mm-1] : 6'd0;
        checks++;
        if (r_out !== exp_v) begin failures++; $display("FAIL m=%0d", mm); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
