// Self-checking testbench for dsp_addr_counters, 32 words in 4 banks.
// Runs many "new sample + convolution" sequences and checks: the write
// address advances by one per sample; during a convolution the four banks
// together address exactly the four consecutive words up..up+3 (mod 32),
// with o_rot naming the bank of the oldest; the coefficient row counts
// down from the last row to 0 with o_last only on row 0; after the
// convolution the up counter is back at the next write address.
module tb_dsp_addr_counters;
  localparam int DEPTH = 32, BANKS = 4, ROWS = DEPTH / BANKS;
  logic clk = 0, rst = 1, adv = 0, start = 0, step = 0;
  logic [4:0] wr_addr;
  logic [BANKS-1:0][2:0] data_row;
  logic [1:0] rot;
  logic [2:0] filt_row;
  logic last;
  int checks = 0, failures = 0;

  dsp_addr_counters #(.DEPTH(DEPTH), .BANKS(BANKS)) dut (
    .i_clk(clk), .i_rst(rst), .i_advance_wr(adv), .i_start(start), .i_step(step),
    .o_wr_addr(wr_addr), .o_data_row(data_row), .o_rot(rot), .o_filt_row(filt_row), .o_last(last));

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

  initial begin
    int wp, base;
    #1 rst = 1; #10 rst = 0;
    wp = 0;
    for (int s = 0; s < 40; s++) begin
      @(negedge clk);
      check(wr_addr == 5'(wp), $sformatf("write address %0d (exp %0d)", wr_addr, wp));
      adv = 1; start = 1;
      @(negedge clk);
      adv = 0; start = 0;
      wp = (wp + 1) % DEPTH;
      base = wp;
      for (int g = 0; g < ROWS; g++) begin
        check(filt_row == 3'(ROWS - 1 - g), "coefficient row counts down");
        check(last == (g == ROWS - 1), "last flag on row 0 only");
        check(int'(rot) == (base + g * BANKS) % BANKS, "rotation");
        for (int j = 0; j < BANKS; j++) begin
          int a;
          a = (base + g * BANKS + j) % DEPTH;
          check(data_row[a % BANKS] == 3'(a / BANKS),
                $sformatf("group %0d lane %0d: bank %0d row %0d exp %0d", g, j, a % BANKS,
                          data_row[a % BANKS], a / BANKS));
        end
        step = 1;
        @(negedge clk);
        step = 0;
      end
      check(wr_addr == 5'(wp), "back at the oldest sample after the convolution");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
