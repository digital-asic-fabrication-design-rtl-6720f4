// Full-size testbench of user_area_top at its default parameters (a
// 1024-tap filter with one multiplier). Over wishbone it loads all 1024
// coefficients, streams 1024 samples to fill the sample memory and then
// a few more, and checks each filter output after the memory is full
// against a reference convolution, together with the interrupt and the
// time one convolution takes (TAPS + 3 filter clocks plus the clock
// crossings, checked here as a window of system clocks).
module tb_user_area_full;
  import asic_pkg::*;
  localparam int TAPS  = 1024;
  localparam int EXTRA = 6;

  logic wb_clk = 0, wb_rst = 1;
  logic stb = 0, cyc = 0, we = 0, ack, irq;
  logic [31:0] dat_i = 0, adr = 0, dat_o;
  logic pclk2, miso, sc_c;
  int checks = 0, failures = 0;

  user_area_top dut (
    .wb_clk_i(wb_clk), .wb_rst_i(wb_rst), .wbs_stb_i(stb), .wbs_cyc_i(cyc), .wbs_we_i(we),
    .wbs_sel_i(4'hF), .wbs_dat_i(dat_i), .wbs_adr_i(adr), .wbs_ack_o(ack), .wbs_dat_o(dat_o),
    .dsp_irq_o(irq), .ext_clk_i(1'b0), .gate_override_i(1'b0), .clk_override_i(1'b0),
    .pclk2_o(pclk2), .spi_bclk_i(1'b0), .spi_ss_i(1'b1), .spi_mosi_i(1'b0), .spi_miso_o(miso),
    .sc_a_i(1'b0), .sc_b_i(1'b0), .sc_sw_i(2'b00), .sc_c_o(sc_c));

  always #5 wb_clk = ~wb_clk;

  initial begin
    repeat (3000000) @(posedge wb_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wb_cycle(input logic w, input int m, input int r, input logic [31:0] d,
                          output logic [31:0] q);
    @(negedge wb_clk);
    stb = 1; cyc = 1; we = w; dat_i = d;
    adr = 32'h3000_0000 | (32'(r) << 5) | (32'(m) << 2);
    @(negedge wb_clk);
    while (!ack) @(negedge wb_clk);
    q = dat_o;
    stb = 0; cyc = 0; we = 0;
  endtask

  logic signed [15:0] h [TAPS];
  logic signed [15:0] x [$];

  function automatic logic [31:0] conv();
    logic [31:0] y = 0;
    int n = x.size() - 1;
    for (int k = 0; k < TAPS; k++) y += 32'(h[k]) * 32'(x[n - k]);
    return y;
  endfunction

  initial begin
    logic [31:0] q, y;
    int t0, cycles;
    #1 wb_rst = 1;
    #30 wb_rst = 0;
    wb_cycle(1, MOD_DSP, DSP_REG_COEF_ADDR, 0, q);
    for (int k = 0; k < TAPS; k++) begin
      h[k] = 16'($urandom);
      wb_cycle(1, MOD_DSP, DSP_REG_COEF_DATA, {16'h0, h[k]}, q);
    end
    wb_cycle(0, MOD_DSP, DSP_REG_COEF_ADDR, 0, q);
    check(q == 0, "coefficient pointer wrapped after 1024 writes");
    for (int n = 0; n < TAPS + EXTRA; n++) begin
      x.push_back(16'($urandom));
      wb_cycle(1, MOD_DSP, DSP_REG_SAMPLE, {16'h0, x[n]}, q);
      t0 = int'($time / 10);
      do wb_cycle(0, MOD_DSP, DSP_REG_STATUS, 0, q); while (q[1:0] != 2'b11);
      cycles = int'($time / 10) - t0;
      if (n >= TAPS - 1) begin
        check(irq, "interrupt raised");
        check(cycles >= TAPS && cycles <= TAPS + 20, $sformatf("convolution time %0d cycles", cycles));
        wb_cycle(0, MOD_DSP, DSP_REG_RESULT, 0, y);
        check(y == conv(), $sformatf("filter output n=%0d: %h vs %h", n, y, conv()));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
