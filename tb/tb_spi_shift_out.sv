// Self-checking testbench for spi_shift_out (32 bits). Loads fixed and
// random words with a one-cycle START, checks every bit on o_Q MSB first
// on the 32 following clock edges, that zeros follow, that a second START
// without a reset does not reload, and that reset clears the output.
module tb_spi_shift_out;
  localparam int W = 32;
  logic clk = 0, rst, start, q;
  logic [W-1:0] d;
  int checks = 0, failures = 0;

  spi_shift_out #(.DATA_WIDTH(W)) dut (.i_CLK(clk), .i_RST(rst), .i_START(start), .i_D(d), .o_Q(q));

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

  task automatic shift_word(input logic [W-1:0] v);
    rst = 1; start = 0;
    @(negedge clk); rst = 0;
    check(q == 1'b0, "output low after reset");
    d = v; start = 1;
    @(negedge clk); start = 0; d = ~v;   // input may change after the load
    for (int i = W - 1; i >= 0; i--) begin
      check(q == v[i], $sformatf("bit %0d of %h", i, v));
      @(negedge clk);
    end
    for (int k = 0; k < 3; k++) begin
      check(q == 1'b0, "zeros after the word");
      @(negedge clk);
    end
    // A second start in the same transaction must not reload.
    d = '1; start = 1; @(negedge clk); start = 0;
    check(q == 1'b0, "no reload without reset");
  endtask

  initial begin
    logic [W-1:0] vals [5] = '{32'd100, 32'd256, 32'd10498, 32'h0, 32'hFFFF_FFFF};
    rst = 1; start = 0; d = 0;
    foreach (vals[i]) shift_word(vals[i]);
    for (int i = 0; i < 20; i++) shift_word($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
