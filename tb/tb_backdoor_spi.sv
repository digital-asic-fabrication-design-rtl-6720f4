// Self-checking testbench for backdoor_spi. An SPI master model (bus clock
// unrelated to the system clock) runs write and read transactions to
// random addresses. Writes: o_DOUT_VALID must pulse exactly once, for one
// system clock, between the 2nd and 4th system clock edge after the last
// data bit, with the right address and data. Reads: the word returned on
// MISO must be the value the tb's register model gives for the address,
// and no write strobe may appear. Also checks that a transaction cut
// short by slave select produces no strobe.
module tb_backdoor_spi;
  import asic_pkg::*;
  logic sysclk = 0, bclk = 0, ss = 0, mosi = 0, miso;
  logic [DATA_W-1:0] data_out, data_in;
  logic [ADDR_W-1:0] addr;
  logic read, dout_valid;
  int checks = 0, failures = 0;
  int valid_pulses = 0, valid_len = 0, max_valid_len = 0;
  int edges_since_last_bit = 0, valid_delay = -1;

  backdoor_spi dut (
    .i_SYSCLK(sysclk), .i_BCLK(bclk), .i_SS(ss), .i_MOSI(mosi), .i_DATA_OUT(data_out),
    .o_MISO(miso), .o_ADDR(addr), .o_READ(read), .o_DATA_IN(data_in), .o_DOUT_VALID(dout_valid));

  always #5 sysclk = ~sysclk;

  // Register model read mux: a fixed function of the address.
  function automatic logic [31:0] model(input logic [6:0] a);
    return {a, 25'h0} ^ (32'h9E37_79B9 * (a + 1));
  endfunction
  assign data_out = model(addr);

  initial begin
    repeat (200000) @(posedge sysclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge sysclk) begin
    edges_since_last_bit++;
    if (dout_valid) begin
      if (valid_len == 0) begin valid_pulses++; valid_delay = edges_since_last_bit; end
      valid_len++;
      if (valid_len > max_valid_len) max_valid_len = valid_len;
    end else valid_len = 0;
  end

  always @(posedge bclk) edges_since_last_bit = 0;

  int half = 17;   // half period of the bus clock

  task automatic bit_xfer(input logic b, output logic sampled);
    mosi = b;
    #(half) bclk = 1;
    #(half) sampled = miso; bclk = 0;
  endtask

  task automatic spi_xfer(input logic rd, input logic [6:0] a, input logic [31:0] wdata,
                          output logic [31:0] rdata, input int cut_after = 40);
    logic s;
    logic [7:0] cmd = {rd, a};
    ss = 0; #(half);
    for (int i = 7; i >= 0; i--) bit_xfer(cmd[i], s);
    if (cut_after == 8) begin ss = 1; #(4 * half); return; end
    repeat (6) @(posedge sysclk);   // let the address cross (read path)
    #1;
    for (int i = 31; i >= 0; i--) begin
      bit_xfer(wdata[i], s);
      rdata[i] = s;
    end
    repeat (6) @(posedge sysclk);
    #1 ss = 1;
    #(4 * half);
  endtask

  initial begin
    logic [31:0] r, w;
    logic [6:0] a;
    int n_before;
    #2 ss = 1;   // slave select starts high: reset edge
    #20;
    // Writes
    for (int n = 0; n < 30; n++) begin
      a = $urandom; w = $urandom;
      half = 7 + $urandom_range(30);
      n_before = valid_pulses;
      max_valid_len = 0;
      fork
        spi_xfer(1'b0, a, w, r);
        begin
          @(posedge sysclk iff dout_valid);
          check(addr == a && data_in == w && read == 1'b0,
                $sformatf("write strobe addr %h data %h (got %h %h)", a, w, addr, data_in));
        end
      join
      check(valid_pulses == n_before + 1, "one strobe per write");
      check(max_valid_len == 1, "strobe lasts one system clock");
      check(valid_delay >= 2 && valid_delay <= 4,
            $sformatf("strobe 2-4 system clocks after last bit (got %0d)", valid_delay));
    end
    // Reads
    for (int n = 0; n < 30; n++) begin
      a = $urandom;
      half = 7 + $urandom_range(30);
      n_before = valid_pulses;
      spi_xfer(1'b1, a, $urandom, r);
      check(r == model(a), $sformatf("read addr %h: exp %h got %h", a, model(a), r));
      check(valid_pulses == n_before, "no strobe on a read");
    end
    // Aborted write: SS rises after the command byte.
    n_before = valid_pulses;
    spi_xfer(1'b0, 7'h15, 32'h1234_5678, r, 8);
    repeat (10) @(posedge sysclk);
    check(valid_pulses == n_before, "no strobe on an aborted write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
