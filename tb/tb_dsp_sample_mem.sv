// Self-checking testbench for dsp_sample_mem with 64 words in 4 banks:
// fills every address with random data, then reads random rows from all
// banks at once and checks each bank's registered output one clock later
// against a reference array (word a sits in bank a%4, row a/4). Writes
// during reads are checked too.
module tb_dsp_sample_mem;
  localparam int DEPTH = 64, WIDTH = 16, BANKS = 4, ROWS = DEPTH / BANKS;
  logic clk = 0, we = 0;
  logic [5:0] waddr;
  logic [WIDTH-1:0] wdata;
  logic [BANKS-1:0][3:0] rrow;
  logic [BANKS-1:0][WIDTH-1:0] rdata;
  logic [WIDTH-1:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  dsp_sample_mem #(.DEPTH(DEPTH), .WIDTH(WIDTH), .BANKS(BANKS)) dut (
    .i_clk(clk), .i_we(we), .i_waddr(waddr), .i_wdata(wdata), .i_rrow(rrow), .o_rdata(rdata));

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
    logic [BANKS-1:0][3:0] prev_rows;
    logic [WIDTH-1:0] exp_q [BANKS];
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = 6'(a); wdata = 16'($urandom); ref_mem[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 300; n++) begin
      foreach (rrow[b]) rrow[b] = 4'($urandom);
      foreach (exp_q[b]) exp_q[b] = ref_mem[rrow[b] * BANKS + b];
      // occasional write to a row not read this cycle
      we = ($urandom_range(3) == 0);
      waddr = 6'($urandom); wdata = 16'($urandom);
      if (we && rrow[waddr % BANKS] == waddr / BANKS) we = 0;
      @(negedge clk);
      if (we) ref_mem[waddr] = wdata;
      we = 0;
      foreach (rdata[b])
        check(rdata[b] == exp_q[b], $sformatf("bank %0d row %0d: %h vs %h", b, rrow[b], rdata[b], exp_q[b]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
