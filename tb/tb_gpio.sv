// tb_gpio: random direction, inversion, internal and pad values; checks the
// pad output value and enable and the inverted input value seen by the DAC.
module tb_gpio;
  logic [9:0] dir, inv, test_sig, pin_in, pin_out, pin_oe, in_val;
  int checks = 0, failures = 0;
  gpio dut (.dir, .inv, .test_sig, .pin_in, .pin_out, .pin_oe, .in_val);
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    #100000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int k = 0; k < 2000; k++) begin
      dir = 10'($urandom); inv = 10'($urandom); test_sig = 10'($urandom); pin_in = 10'($urandom);
      #1;
      for (int i = 0; i < 10; i++) begin
        check(pin_oe[i] == dir[i], "output enable");
        if (dir[i]) begin
          check(pin_out[i] == (inv[i] ? !test_sig[i] : test_sig[i]), "output value");
          check(in_val[i] == 1'b0, "output pin reads zero");
        end else
          check(in_val[i] == (inv[i] ? !pin_in[i] : pin_in[i]), "input value");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
