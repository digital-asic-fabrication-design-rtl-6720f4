// Self-checking testbench for dsp_mac with 4 lanes: random signed operand
// sets (including the extreme values) are accumulated and compared with a
// reference sum modulo 2^32; also checks that i_en low holds the sum and
// that i_clear empties it and wins over i_en.
module tb_dsp_mac;
  localparam int N = 4;
  logic clk = 0, rst = 1, clr = 0, en = 0;
  logic [N-1:0][15:0] a, b;
  logic signed [31:0] acc;
  logic signed [31:0] model;
  int checks = 0, failures = 0;

  dsp_mac #(.N(N), .SAMPLE_W(16), .ACC_W(32)) dut (
    .i_clk(clk), .i_rst(rst), .i_clear(clr), .i_en(en), .i_a(a), .i_b(b), .o_acc(acc));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [15:0] pick();
    case ($urandom_range(5))
      0: return 16'h8000;
      1: return 16'h7FFF;
      2: return 16'hFFFF;
      default: return 16'($urandom);
    endcase
  endfunction

  initial begin
    #1 rst = 1; #10 rst = 0;
    model = 0;
    check(acc == 0, "reset clears");
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      foreach (a[j]) begin a[j] = pick(); b[j] = pick(); end
      en  = ($urandom_range(7) != 0);
      clr = ($urandom_range(50) == 0);
      @(posedge clk);
      if (clr) model = 0;
      else if (en)
        for (int j = 0; j < N; j++)
          model += 32'(signed'(a[j])) * 32'(signed'(b[j]));
      #1;
      check(acc == model, $sformatf("step %0d: acc %h model %h", n, acc, model));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
