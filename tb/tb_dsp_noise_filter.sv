// Self-checking testbench for dsp_noise_filter, reduced to 64 taps. Two
// instances, one with 4 multipliers and one with 1, get the same register
// writes; the bus clock (period 10) and the core clock (period 7) are
// unrelated. It loads random coefficients, primes the sample memory with
// 64 samples, then streams samples and checks every RESULT against
//   y[n] = sum_k h[k] * x[n-k]   (signed, modulo 2^32),
// that o_irq and STATUS.done rise with the result and fall on the next
// sample, that the core time per sample is TAPS/N_MULT + 3 core clocks
// (measured from the core accepting the sample to the result leaving it),
// that a sample written while busy is dropped and flagged, and that the
// flag clears.
module tb_dsp_noise_filter;
  import asic_pkg::*;
  localparam int TAPS = 64;
  logic sysclk = 0, pclk = 0, rst = 1;
  reg_wr_t wr;
  reg_file_t rd4, rd1;
  logic busy4, busy1, irq4, irq1;
  int checks = 0, failures = 0;
  logic signed [15:0] h [TAPS];
  logic signed [15:0] x [$];

  dsp_noise_filter #(.TAPS(TAPS), .N_MULT(4)) dut4 (
    .i_sysclk(sysclk), .i_pclk(pclk), .i_rst(rst), .i_wr(wr), .o_rd(rd4), .o_busy(busy4), .o_irq(irq4));
  dsp_noise_filter #(.TAPS(TAPS), .N_MULT(1)) dut1 (
    .i_sysclk(sysclk), .i_pclk(pclk), .i_rst(rst), .i_wr(wr), .o_rd(rd1), .o_busy(busy1), .o_irq(irq1));

  always #5 sysclk = ~sysclk;
  always #3.5 pclk = ~pclk;

  // Core clocks per sample, seen from outside: PCLK edges while o_busy is
  // high (from the sample write until the result is back on the bus side).
  int run4 = 0, run1 = 0, last_run4 = 0, last_run1 = 0;
  always @(posedge pclk) begin
    if (busy4) run4++;
    else if (run4 != 0) begin last_run4 = run4; run4 = 0; end
    if (busy1) run1++;
    else if (run1 != 0) begin last_run1 = run1; run1 = 0; end
  end

  initial begin
    repeat (400000) @(posedge sysclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic write(input logic [3:0] r, input logic [31:0] d);
    @(negedge sysclk);
    wr = '{valid: 1'b1, regno: r, data: d};
    @(negedge sysclk);
    wr = '0;
  endtask

  task automatic wait_idle();
    @(negedge sysclk);
    while (busy4 || busy1) @(negedge sysclk);
  endtask

  function automatic logic [31:0] model();
    logic [31:0] y = 0;
    int n = x.size() - 1;
    for (int k = 0; k < TAPS; k++) y += 32'(h[k]) * 32'(x[n - k]);
    return y;
  endfunction

  function automatic logic signed [15:0] rnd16();
    return 16'($urandom);
  endfunction

  initial begin
    logic [31:0] y;
    wr = '0;
    #1 rst = 1; #20 rst = 0;
    // Coefficients.
    write(DSP_REG_COEF_ADDR, 0);
    for (int k = 0; k < TAPS; k++) begin
      h[k] = rnd16();
      write(DSP_REG_COEF_DATA, {16'h0, h[k]});
      wait_idle();
    end
    check(rd4[DSP_REG_COEF_ADDR] == TAPS % TAPS && rd1[DSP_REG_COEF_ADDR] == 0, "pointer wrapped");
    // Prime and stream.
    for (int n = 0; n < TAPS + 40; n++) begin
      x.push_back(rnd16());
      write(DSP_REG_SAMPLE, {16'h0, x[n]});
      check(!irq4 && !irq1 && rd4[DSP_REG_STATUS][1] == 0, "done falls on a new sample");
      wait_idle();
      repeat (2) @(posedge pclk);
      check(irq4 && irq1 && rd4[DSP_REG_STATUS][1:0] == 2'b11, "done/irq and ready after the result");
      if (n >= TAPS - 1) begin
        y = model();
        check(rd4[DSP_REG_RESULT] == y, $sformatf("n=%0d 4 lanes: %h vs %h", n, rd4[DSP_REG_RESULT], y));
        check(rd1[DSP_REG_RESULT] == y, $sformatf("n=%0d 1 lane: %h vs %h", n, rd1[DSP_REG_RESULT], y));
      end
      check(last_run4 >= TAPS / 4 + 3 && last_run4 <= TAPS / 4 + 12, $sformatf("4-lane core cycles %0d", last_run4));
      check(last_run1 >= TAPS + 3 && last_run1 <= TAPS + 12, $sformatf("1-lane core cycles %0d", last_run1));
    end
    // A sample written while a convolution runs is dropped and flagged.
    x.push_back(rnd16());
    write(DSP_REG_SAMPLE, {16'h0, x[$]});
    write(DSP_REG_SAMPLE, 32'h7FFF);
    check(rd4[DSP_REG_STATUS][2] && rd1[DSP_REG_STATUS][2], "dropped write flagged");
    wait_idle();
    check(rd4[DSP_REG_RESULT] == model() && rd1[DSP_REG_RESULT] == model(), "dropped write left no trace");
    write(DSP_REG_STATUS, 0);
    check(!rd4[DSP_REG_STATUS][2] && !rd1[DSP_REG_STATUS][2], "flag cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
