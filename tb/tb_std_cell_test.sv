// Self-checking testbench for std_cell_test: all 16 combinations of A, B
// and SW; C must be A & B whichever gate is selected.
module tb_std_cell_test;
  logic a, b, c;
  logic [1:0] sw;
  int checks = 0, failures = 0;

  std_cell_test dut (.i_a(a), .i_b(b), .i_sw(sw), .o_c(c));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int i = 0; i < 16; i++) begin
      {sw, a, b} = 4'(i);
      #10;
      check(c == (a & b), $sformatf("sw=%0d a=%b b=%b c=%b", sw, a, b, c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
