// Self-checking testbench for spi_shift_in (32-bit data, marker bit 32).
// Shifts in fixed and random words MSB first, checks the word and the
// marker after exactly 32 shifts, that the marker is still clear after 31,
// that shifting stops when the enable is fed back from the marker, and
// that nothing moves while the enable is low.
module tb_spi_shift_in;
  localparam int W = 32;
  logic clk = 0, rst, en, d;
  logic [W:0] q;
  int checks = 0, failures = 0;

  spi_shift_in #(.DATA_WIDTH(W)) dut (.i_CLK(clk), .i_RST(rst), .i_EN(en), .i_D(d), .o_Q(q));

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

  // Shift a word in; with use_marker the enable is ~q[W] as in the SPI
  // block and extra clocks are given to show it stops by itself.
  task automatic shift_word(input logic [W-1:0] v, input bit use_marker);
    rst = 1; en = 0; d = 0;
    @(negedge clk); rst = 0;
    check(q == (W+1)'(1), "reset value is 1");
    for (int i = W - 1; i >= 0; i--) begin
      d  = v[i];
      en = use_marker ? !q[W] : 1'b1;
      @(negedge clk);
      if (i == 1) check(q[W] == 1'b0, "marker clear after 31 shifts");
    end
    if (use_marker) begin
      for (int k = 0; k < 5; k++) begin
        en = !q[W]; d = $urandom_range(1); @(negedge clk);
      end
    end
    en = 0;
    check(q == {1'b1, v}, $sformatf("word %h received, got %h", v, q));
  endtask

  initial begin
    logic [W-1:0] vals [5] = '{32'd100, 32'd256, 32'd10498, 32'h0, 32'hFFFF_FFFF};
    rst = 1; en = 0; d = 0;
    foreach (vals[i]) shift_word(vals[i], 1'b0);
    for (int i = 0; i < 20; i++) shift_word($urandom, 1'b1);
    // Enable low: no shift at all.
    rst = 1; @(negedge clk); rst = 0; en = 0;
    for (int i = 0; i < W; i++) begin d = $urandom_range(1); @(negedge clk); end
    check(q == (W+1)'(1), "no shift while enable low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
