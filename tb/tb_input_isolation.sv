// tb_input_isolation: random system and test values in both modes; the CUT
// must see the test values in test mode and the system inputs otherwise.
module tb_input_isolation;

  localparam int unsigned W = 4;
  logic         test_mode;
  logic [W-1:0] sys_in, test_in, cut_in;
  int           checks = 0, failures = 0;

  input_isolation #(.W(W)) dut (.*);

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 100; i++) begin
      test_mode = 1'($urandom);
      sys_in    = W'($urandom);
      test_in   = W'($urandom);
      #1;
      checks++;
      if (cut_in !== (test_mode ? test_in : sys_in)) begin
        failures++;
        $display("FAIL: mode=%b sys=%b test=%b cut=%b", test_mode, sys_in, test_in, cut_in);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
