// Self-checking testbench for wishbone_test with the counter clock
// (period 14) unrelated to the bus clock (period 10). Checks that the
// counter counts PCLK edges, that a write sets it (a read after the load
// lands lies within a few counts of the written value plus elapsed PCLK
// edges), that it wraps from all ones to zero, that o_busy covers the load,
// and that a stopped PCLK stops the count.
module tb_wishbone_test;
  import asic_pkg::*;
  logic sysclk = 0, pclk_free = 0, pclk_en = 1, rst = 1, busy;
  logic pclk;
  reg_wr_t wr;
  reg_file_t rd;
  int checks = 0, failures = 0;
  int unsigned pedges = 0;

  assign pclk = pclk_free & pclk_en;
  wishbone_test dut (.i_sysclk(sysclk), .i_pclk(pclk), .i_rst(rst), .i_wr(wr), .o_rd(rd), .o_busy(busy));

  always #5 sysclk = ~sysclk;
  always #7 pclk_free = ~pclk_free;
  always @(posedge pclk) pedges++;

  initial begin
    repeat (50000) @(posedge sysclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [31:0] count();
    return rd[WBT_REG_COUNT];
  endfunction

  task automatic set_and_check(input logic [31:0] v);
    int unsigned p0, seen_busy;
    logic [31:0] got;
    int unsigned elapsed;
    @(negedge sysclk);
    wr = '{valid: 1'b1, regno: WBT_REG_COUNT, data: v};
    @(negedge sysclk);
    wr = '0;
    seen_busy = busy;
    while (busy) @(negedge sysclk);
    check(seen_busy == 1, "busy during load");
    p0 = pedges;
    repeat (10) @(negedge sysclk);
    got = count();
    elapsed = pedges - p0;
    // value = v + edges since load (load edge itself is within the window)
    check((got - v) <= elapsed + 1 && (got - v) + 4 >= elapsed,
          $sformatf("set %h: read %h after %0d PCLK edges", v, got, elapsed));
  endtask

  initial begin
    logic [31:0] a, b;
    int unsigned p0;
    wr = '0;
    #1 rst = 1; #20 rst = 0;
    // Free counting from reset.
    repeat (5) @(negedge sysclk);
    a = count(); p0 = pedges;
    repeat (100) @(negedge sysclk);
    b = count();
    check(b - a >= pedges - p0 - 1 && b - a <= pedges - p0 + 1,
          $sformatf("counts PCLK edges: %0d vs %0d", b - a, pedges - p0));
    set_and_check(32'd100);
    set_and_check(32'h1234_5678);
    set_and_check(32'h0);
    for (int i = 0; i < 10; i++) set_and_check($urandom);
    // Overflow is discarded: wraps to zero.
    set_and_check(32'hFFFF_FFF0);
    repeat (20) @(negedge sysclk);
    check(count() < 32'd40, $sformatf("wrapped past zero: %h", count()));
    // Stopped clock: the value holds.
    pclk_en = 0;
    repeat (5) @(negedge sysclk);
    a = count();
    repeat (50) @(negedge sysclk);
    check(count() == a, "no counting without PCLK");
    pclk_en = 1;
    repeat (10) @(negedge sysclk);
    check(count() != a, "counting again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
