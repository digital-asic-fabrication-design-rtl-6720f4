// End-to-end testbench of user_area_top (DSP at 32 taps, 4 multipliers).
// A wishbone master model (the management SoC) and an SPI master model
// (an external tester) drive the chip together:
//   - wishbone test counter set and read over wishbone and over SPI,
//     a second load held off (wishbone stall) until the first has crossed;
//   - clock module: gating PCLK0 stops the counter, PCLK2 edges counted
//     from the harness clock, the external clock, gated off, and with the
//     gate override and clock override pins;
//   - DSP: coefficients loaded over wishbone, samples written over both
//     buses, every result checked against a reference convolution, the
//     interrupt line, a wishbone sample write held off while the filter
//     runs, an SPI sample write dropped (and flagged) while the filter
//     clock is gated off;
//   - standard cell test: C = A & B for each gate selection.
// Each of these mechanisms is counted and a failure is counted for any
// mechanism that never happened.
module tb_user_area_top;
  import asic_pkg::*;
  localparam int TAPS = 32;
  localparam int NM   = 4;

  logic wb_clk = 0, wb_rst = 1, ext_clk = 0;
  logic stb = 0, cyc = 0, we = 0, ack, irq;
  logic [31:0] dat_i = 0, adr = 0, dat_o;
  logic gate_ovr = 0, clk_ovr = 0, pclk2;
  logic bclk = 0, ss = 0, mosi = 0, miso;
  logic sc_a = 0, sc_b = 0, sc_c;
  logic [1:0] sc_sw = 0;

  int checks = 0, failures = 0;
  int n_wb_stall = 0, n_spi_write = 0, n_spi_read = 0, n_conv = 0, n_irq = 0;
  int n_drop = 0, n_gate_off = 0, n_ext_sel = 0, n_gate_ovr = 0, n_clk_ovr = 0;
  int n_cnt_wb = 0, n_cnt_spi = 0, n_stdcell = 0;
  int pclk2_edges = 0, ext_edges = 0;

  user_area_top #(.DSP_TAPS(TAPS), .DSP_N_MULT(NM)) dut (
    .wb_clk_i(wb_clk), .wb_rst_i(wb_rst), .wbs_stb_i(stb), .wbs_cyc_i(cyc), .wbs_we_i(we),
    .wbs_sel_i(4'hF), .wbs_dat_i(dat_i), .wbs_adr_i(adr), .wbs_ack_o(ack), .wbs_dat_o(dat_o),
    .dsp_irq_o(irq), .ext_clk_i(ext_clk), .gate_override_i(gate_ovr), .clk_override_i(clk_ovr),
    .pclk2_o(pclk2), .spi_bclk_i(bclk), .spi_ss_i(ss), .spi_mosi_i(mosi), .spi_miso_o(miso),
    .sc_a_i(sc_a), .sc_b_i(sc_b), .sc_sw_i(sc_sw), .sc_c_o(sc_c));

  always #5  wb_clk  = ~wb_clk;
  always #13 ext_clk = ~ext_clk;
  always @(posedge pclk2)   pclk2_edges++;
  always @(posedge ext_clk) ext_edges++;
  always @(posedge irq)     n_irq++;

  initial begin
    repeat (400000) @(posedge wb_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- wishbone master ----------------
  task automatic wb_cycle(input logic w, input int m, input int r, input logic [31:0] d,
                          output logic [31:0] q, output int waited);
    @(negedge wb_clk);
    stb = 1; cyc = 1; we = w; dat_i = d;
    adr = 32'h3000_0000 | (32'(r) << 5) | (32'(m) << 2);
    waited = 0;
    @(negedge wb_clk);
    while (!ack) begin @(negedge wb_clk); waited++; end
    q = dat_o;
    stb = 0; cyc = 0; we = 0;
  endtask

  task automatic wb_write(input int m, input int r, input logic [31:0] d);
    logic [31:0] q;
    int waited;
    wb_cycle(1, m, r, d, q, waited);
    if (waited > 0) n_wb_stall++;
  endtask

  task automatic wb_read(input int m, input int r, output logic [31:0] q);
    int waited;
    wb_cycle(0, m, r, 0, q, waited);
  endtask

  // ---------------- SPI master ----------------
  localparam int HALF = 23;
  task automatic bit_xfer(input logic b, output logic sampled);
    mosi = b;
    #(HALF) bclk = 1;
    #(HALF) sampled = miso; bclk = 0;
  endtask

  task automatic spi_xfer(input logic rd, input int m, input int r, input logic [31:0] wdata,
                          output logic [31:0] rdata);
    logic s;
    logic [7:0] cmd;
    cmd = {rd, 4'(r), 3'(m)};
    ss = 0; #(HALF);
    for (int i = 7; i >= 0; i--) bit_xfer(cmd[i], s);
    repeat (6) @(posedge wb_clk);
    #1;
    for (int i = 31; i >= 0; i--) begin
      bit_xfer(wdata[i], s);
      rdata[i] = s;
    end
    repeat (6) @(posedge wb_clk);
    #1 ss = 1;
    #(4 * HALF);
  endtask

  task automatic spi_write(input int m, input int r, input logic [31:0] d);
    logic [31:0] q;
    spi_xfer(1'b0, m, r, d, q);
  endtask

  task automatic spi_read(input int m, input int r, output logic [31:0] q);
    spi_xfer(1'b1, m, r, 0, q);
  endtask

  // ---------------- DSP reference ----------------
  logic signed [15:0] h [TAPS];
  logic signed [15:0] x [$];

  function automatic logic [31:0] conv();
    logic [31:0] y = 0;
    int n = x.size() - 1;
    for (int k = 0; k < TAPS; k++) y += 32'(h[k]) * 32'(x[n - k]);
    return y;
  endfunction

  task automatic dsp_wait_done();
    logic [31:0] st;
    do wb_read(MOD_DSP, DSP_REG_STATUS, st); while (st[1:0] != 2'b11);
  endtask


  // PCLK2 and external clock edges in a 1 us window.
  task automatic count_edges(output int p2, output int ext);
    int p0, e0;
    p0 = pclk2_edges; e0 = ext_edges;
    #1000;
    p2 = pclk2_edges - p0; ext = ext_edges - e0;
  endtask

  initial begin
    logic [31:0] q, q2, y;
    int p2, ex;
    #2 ss = 1;
    #1 wb_rst = 1;
    #30 wb_rst = 0;

    // ---- wishbone test counter ----
    wb_write(MOD_WBTEST, WBT_REG_COUNT, 32'h1000);
    wb_write(MOD_WBTEST, WBT_REG_COUNT, 32'h2000_0000);   // held off until the first load lands
    repeat (8) @(posedge wb_clk);
    wb_read(MOD_WBTEST, WBT_REG_COUNT, q);
    check(q > 32'h2000_0000 && q < 32'h2000_0040, $sformatf("counter loaded over wishbone: %h", q));
    if (q > 32'h2000_0000 && q < 32'h2000_0040) n_cnt_wb++;
    wb_read(MOD_WBTEST, WBT_REG_COUNT, q2);
    check(q2 > q, "counter runs");

    spi_write(MOD_WBTEST, WBT_REG_COUNT, 32'h5555_0000);
    n_spi_write++;
    wb_read(MOD_WBTEST, WBT_REG_COUNT, q);
    check(q > 32'h5555_0000 && q < 32'h5555_0100, $sformatf("counter loaded over SPI: %h", q));
    if (q > 32'h5555_0000 && q < 32'h5555_0100) n_cnt_spi++;
    spi_read(MOD_WBTEST, WBT_REG_COUNT, q2);
    n_spi_read++;
    check(q2 > q && q2 < q + 32'h100, $sformatf("counter read over SPI: %h after %h", q2, q));

    // ---- clock gating: PCLK0 off stops the counter ----
    wb_write(MOD_CLOCK, CLK_REG_GATE, 32'b001);
    repeat (6) @(posedge wb_clk);
    wb_read(MOD_WBTEST, WBT_REG_COUNT, q);
    repeat (20) @(posedge wb_clk);
    wb_read(MOD_WBTEST, WBT_REG_COUNT, q2);
    check(q == q2, "gated counter holds");
    if (q == q2) n_gate_off++;
    wb_read(MOD_CLOCK, CLK_REG_STATUS, q);
    check(q[2:0] == 3'b110, "status shows PCLK0 gated");
    wb_write(MOD_CLOCK, CLK_REG_GATE, 32'b000);
    repeat (6) @(posedge wb_clk);
    wb_read(MOD_WBTEST, WBT_REG_COUNT, q);
    repeat (20) @(posedge wb_clk);
    wb_read(MOD_WBTEST, WBT_REG_COUNT, q2);
    check(q2 > q, "counter runs again");

    // ---- PCLK2 sources ----
    count_edges(p2, ex);
    check(p2 >= 99 && p2 <= 101, $sformatf("PCLK2 from harness clock: %0d", p2));
    wb_write(MOD_CLOCK, CLK_REG_SELECT, 32'b100);
    repeat (4) @(posedge wb_clk);
    count_edges(p2, ex);
    check(p2 >= ex - 1 && p2 <= ex + 1, $sformatf("PCLK2 from external clock: %0d vs %0d", p2, ex));
    if (p2 >= ex - 1 && p2 <= ex + 1) n_ext_sel++;
    spi_read(MOD_CLOCK, CLK_REG_SELECT, q);
    n_spi_read++;
    check(q[2:0] == 3'b100, "select register over SPI");
    wb_write(MOD_CLOCK, CLK_REG_GATE, 32'b100);
    repeat (4) @(posedge wb_clk);
    count_edges(p2, ex);
    check(p2 == 0, $sformatf("PCLK2 gated off: %0d", p2));
    // Gate override: every clock on, harness clock while the clock override is low.
    gate_ovr = 1;
    count_edges(p2, ex);
    check(p2 >= 99 && p2 <= 101, $sformatf("gate override, harness clock: %0d", p2));
    if (p2 >= 99 && p2 <= 101) n_gate_ovr++;
    wb_read(MOD_CLOCK, CLK_REG_STATUS, q);
    check(q[9:8] == 2'b01 && q[2:0] == 3'b111 && q[6:4] == 3'b000, $sformatf("status under gate override %h", q));
    clk_ovr = 1;
    count_edges(p2, ex);
    check(p2 >= ex - 1 && p2 <= ex + 1, $sformatf("clock override, external clock: %0d vs %0d", p2, ex));
    if (p2 >= ex - 1 && p2 <= ex + 1) n_clk_ovr++;
    wb_read(MOD_CLOCK, CLK_REG_STATUS, q);
    check(q[9:8] == 2'b11 && q[2:0] == 3'b111 && q[6:4] == 3'b111, $sformatf("status under clock override %h", q));
    gate_ovr = 0; clk_ovr = 0;
    wb_write(MOD_CLOCK, CLK_REG_GATE, 32'b000);
    wb_write(MOD_CLOCK, CLK_REG_SELECT, 32'b000);
    repeat (4) @(posedge wb_clk);
    count_edges(p2, ex);
    check(p2 >= 99 && p2 <= 101, $sformatf("PCLK2 back on harness clock: %0d", p2));

    // ---- DSP ----
    wb_write(MOD_DSP, DSP_REG_COEF_ADDR, 0);
    for (int k = 0; k < TAPS; k++) begin
      h[k] = 16'($urandom);
      wb_write(MOD_DSP, DSP_REG_COEF_DATA, {16'h0, h[k]});
    end
    spi_read(MOD_DSP, DSP_REG_COEF_ADDR, q);
    n_spi_read++;
    check(q == 0, "coefficient pointer wrapped (read over SPI)");
    // Stream samples; back-to-back wishbone writes are held off while the
    // filter runs. Every other result is read back and checked.
    for (int n = 0; n < 3 * TAPS; n++) begin
      x.push_back(16'($urandom));
      wb_write(MOD_DSP, DSP_REG_SAMPLE, {16'h0, x[n]});
      if (n >= TAPS - 1 && n % 2 == 0) begin
        dsp_wait_done();
        check(irq, "interrupt with the result");
        wb_read(MOD_DSP, DSP_REG_RESULT, y);
        check(y == conv(), $sformatf("filter output n=%0d: %h vs %h", n, y, conv()));
        if (y == conv()) n_conv++;
      end
    end
    dsp_wait_done();
    // A sample over SPI.
    x.push_back(16'($urandom));
    spi_write(MOD_DSP, DSP_REG_SAMPLE, {16'h0, x[$]});
    n_spi_write++;
    dsp_wait_done();
    wb_read(MOD_DSP, DSP_REG_RESULT, y);
    check(y == conv(), "filter output for an SPI sample");
    if (y == conv()) n_conv++;
    spi_read(MOD_DSP, DSP_REG_RESULT, q);
    n_spi_read++;
    check(q == y, "filter output read over SPI");
    // Filter clock gated off: the next sample waits, an SPI sample is dropped.
    wb_write(MOD_CLOCK, CLK_REG_GATE, 32'b010);
    repeat (4) @(posedge wb_clk);
    x.push_back(16'($urandom));
    wb_write(MOD_DSP, DSP_REG_SAMPLE, {16'h0, x[$]});
    spi_write(MOD_DSP, DSP_REG_SAMPLE, 32'h0000_7FFF);
    n_spi_write++;
    wb_read(MOD_DSP, DSP_REG_STATUS, q);
    check(q[2] == 1'b1 && q[1:0] == 2'b00, $sformatf("SPI sample dropped while busy: %h", q));
    if (q[2]) n_drop++;
    wb_write(MOD_CLOCK, CLK_REG_GATE, 32'b000);
    dsp_wait_done();
    wb_read(MOD_DSP, DSP_REG_RESULT, y);
    check(y == conv(), "dropped sample left no trace");
    wb_write(MOD_DSP, DSP_REG_STATUS, 0);
    wb_read(MOD_DSP, DSP_REG_STATUS, q);
    check(q[2] == 1'b0, "drop flag cleared");

    // ---- standard cell test ----
    for (int i = 0; i < 16; i++) begin
      {sc_sw, sc_a, sc_b} = 4'(i);
      #5;
      check(sc_c == (sc_a & sc_b), "standard cell AND");
      n_stdcell++;
    end

    // ---- every mechanism happened ----
    check(n_wb_stall  > 0, "wishbone stall");
    check(n_spi_write > 0, "SPI write");
    check(n_spi_read  > 0, "SPI read");
    check(n_cnt_wb    > 0, "counter set over wishbone");
    check(n_cnt_spi   > 0, "counter set over SPI");
    check(n_conv      > 0, "filter output");
    check(n_irq       > 0, "DSP interrupt");
    check(n_drop      > 0, "dropped SPI write");
    check(n_gate_off  > 0, "clock gated off");
    check(n_ext_sel   > 0, "external clock selected");
    check(n_gate_ovr  > 0, "gate override");
    check(n_clk_ovr   > 0, "clock override");
    check(n_stdcell   > 0, "standard cell test");
    $display("mechanisms: wb_stall=%0d spi_write=%0d spi_read=%0d cnt_wb=%0d cnt_spi=%0d conv=%0d irq=%0d drop=%0d gate_off=%0d ext_sel=%0d gate_ovr=%0d clk_ovr=%0d stdcell=%0d",
             n_wb_stall, n_spi_write, n_spi_read, n_cnt_wb, n_cnt_spi, n_conv, n_irq, n_drop,
             n_gate_off, n_ext_sel, n_gate_ovr, n_clk_ovr, n_stdcell);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
