// Self-checking testbench for user_regbus with three peripheral models
// (random register contents, controllable busy). Checks wishbone reads
// (data, one-cycle acknowledge, zero outside the window or for a missing
// module), wishbone writes (one strobe to the right peripheral with the
// right register and data), the hold-off while a peripheral is busy, SPI
// writes winning a same-cycle clash and SPI reads following the address.
module tb_user_regbus;
  import asic_pkg::*;
  logic clk = 0, rst = 1;
  logic stb = 0, cyc = 0, we = 0, ack;
  logic [3:0] sel = 4'hF;
  logic [31:0] dat_i = 0, adr = 0, dat_o;
  logic [6:0] spi_addr = 0;
  logic spi_wvalid = 0;
  logic [31:0] spi_wdata = 0, spi_rdata;
  reg_wr_t wr [N_MOD];
  reg_file_t rd [N_MOD];
  logic [N_MOD-1:0] busy = '0;
  int checks = 0, failures = 0;
  int strobes [N_MOD];
  reg_wr_t last_wr [N_MOD];

  user_regbus dut (
    .i_clk(clk), .i_rst(rst), .wbs_stb_i(stb), .wbs_cyc_i(cyc), .wbs_we_i(we), .wbs_sel_i(sel),
    .wbs_dat_i(dat_i), .wbs_adr_i(adr), .wbs_ack_o(ack), .wbs_dat_o(dat_o),
    .i_spi_addr(spi_addr), .i_spi_wvalid(spi_wvalid), .i_spi_wdata(spi_wdata), .o_spi_rdata(spi_rdata),
    .o_wr(wr), .i_rd(rd), .i_busy(busy));

  always #5 clk = ~clk;

  always @(posedge clk)
    for (int m = 0; m < N_MOD; m++)
      if (wr[m].valid) begin strobes[m]++; last_wr[m] = wr[m]; end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [31:0] wb_addr(input int m, input int r);
    return 32'h3000_0000 | (32'(r) << 5) | (32'(m) << 2);
  endfunction

  // Classic wishbone cycle; returns read data and the cycles waited.
  task automatic wb_cycle(input logic w, input logic [31:0] a, input logic [31:0] d,
                          output logic [31:0] q, output int waited);
    @(negedge clk);
    stb = 1; cyc = 1; we = w; adr = a; dat_i = d;
    waited = 0;
    @(negedge clk);
    while (!ack) begin @(negedge clk); waited++; end
    q = dat_o;
    stb = 0; cyc = 0; we = 0;
    @(negedge clk);
    check(!ack, "acknowledge lasts one cycle");
  endtask

  initial begin
    logic [31:0] q;
    int waited, s0;
    foreach (rd[m]) foreach (rd[m][r]) rd[m][r] = $urandom;
    foreach (strobes[m]) strobes[m] = 0;
    #1 rst = 1; #20 rst = 0;
    // Reads
    for (int n = 0; n < 60; n++) begin
      int m, r;
      m = $urandom_range(N_MOD - 1); r = $urandom_range(15);
      wb_cycle(0, wb_addr(m, r), 0, q, waited);
      check(q == rd[m][r], $sformatf("wb read m%0d r%0d", m, r));
      check(waited == 0, "read acknowledged after one cycle");
    end
    wb_cycle(0, wb_addr(5, 1), 0, q, waited);
    check(q == 0, "missing module reads 0");
    wb_cycle(0, 32'h2000_0004, 0, q, waited);
    check(q == 0, "outside window reads 0");
    // Writes
    for (int n = 0; n < 60; n++) begin
      int m, r;
      logic [31:0] d;
      m = $urandom_range(N_MOD - 1); r = $urandom_range(15); d = $urandom;
      s0 = strobes[0] + strobes[1] + strobes[2];
      wb_cycle(1, wb_addr(m, r), d, q, waited);
      check(strobes[0] + strobes[1] + strobes[2] == s0 + 1, "one strobe per write");
      check(last_wr[m].regno == 4'(r) && last_wr[m].data == d, "strobe content");
    end
    s0 = strobes[0] + strobes[1] + strobes[2];
    wb_cycle(1, 32'h2000_0000, 1, q, waited);
    check(strobes[0] + strobes[1] + strobes[2] == s0, "write outside the window ignored");
    // Busy holds a write off.
    busy[2] = 1;
    fork
      wb_cycle(1, wb_addr(2, 3), 32'hCAFE, q, waited);
      begin
        repeat (8) @(posedge clk);
        check(last_wr[2].data != 32'hCAFE, "no strobe while busy");
        #1 busy[2] = 0;
      end
    join
    check(waited >= 7, $sformatf("write held while busy (%0d cycles)", waited));
    check(last_wr[2].data == 32'hCAFE, "held write delivered");
    // SPI write clashing with a wishbone write to the same module.
    s0 = strobes[1];
    fork
      wb_cycle(1, wb_addr(1, 2), 32'h1111, q, waited);
      begin
        @(negedge clk);
        #1;
        spi_addr = {4'd5, 3'd1}; spi_wdata = 32'h2222; spi_wvalid = 1;
        @(negedge clk);
        #1;
        spi_wvalid = 0;
      end
    join
    check(strobes[1] == s0 + 2, "both writes delivered");
    check(waited == 1, "wishbone write waited for the SPI write");
    check(last_wr[1].data == 32'h1111 && last_wr[1].regno == 2, "wishbone write last");
    // SPI read port.
    for (int n = 0; n < 40; n++) begin
      spi_addr = 7'($urandom);
      #1;
      if (spi_addr[2:0] < N_MOD)
        check(spi_rdata == rd[spi_addr[2:0]][spi_addr[6:3]], "spi read");
      else
        check(spi_rdata == 0, "spi read of a missing module");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
