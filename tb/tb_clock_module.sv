// Self-checking testbench for clock_module. Harness clock period 10,
// external clock period 14. For each setting of the GATE and SELECT
// registers and of the two override pins it counts the rising edges of
// every PCLK over a fixed window and compares them with the count the
// selected source gives (or zero when gated), and checks the register
// read-back and the STATUS register.
module tb_clock_module;
  import asic_pkg::*;
  logic hclk = 0, eclk = 0, rst = 1, gate_ovr = 0, clk_ovr = 0;
  reg_wr_t wr;
  reg_file_t rd;
  logic sysclk;
  logic [2:0] pclk;
  int checks = 0, failures = 0;
  int cnt [3];
  int hcnt, ecnt;

  clock_module #(.N_PCLK(3)) dut (
    .i_harness_clk(hclk), .i_ext_clk(eclk), .i_rst(rst), .i_gate_override(gate_ovr),
    .i_clk_override(clk_ovr), .i_wr(wr), .o_rd(rd), .o_sysclk(sysclk), .o_pclk(pclk));

  always #5 hclk = ~hclk;
  always #7 eclk = ~eclk;

  for (genvar i = 0; i < 3; i++) begin : g_cnt
    always @(posedge pclk[i]) cnt[i]++;
  end
  always @(posedge hclk) hcnt++;
  always @(posedge eclk) ecnt++;

  initial begin
    repeat (50000) @(posedge hclk);
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
    @(negedge hclk);
    wr = '{valid: 1'b1, regno: r, data: d};
    @(negedge hclk);
    wr = '0;
  endtask

  // expected source per PCLK: 0 = off, 1 = harness, 2 = external
  task automatic measure(input int e0, input int e1, input int e2, input string what);
    int exp_cnt [3];
    int src [3] = '{e0, e1, e2};
    repeat (4) @(negedge hclk);
    foreach (cnt[i]) cnt[i] = 0;
    hcnt = 0; ecnt = 0;
    #1400;
    foreach (cnt[i]) begin
      exp_cnt[i] = (src[i] == 0) ? 0 : (src[i] == 1) ? hcnt : ecnt;
      check(cnt[i] >= exp_cnt[i] - 1 && cnt[i] <= exp_cnt[i] + 1,
            $sformatf("%s: PCLK%0d edges %0d, expected %0d", what, i, cnt[i], exp_cnt[i]));
    end
  endtask

  initial begin
    wr = '0;
    #1 rst = 1; #12 rst = 0;
    check(rd[CLK_REG_GATE][2:0] == 3'b000 && rd[CLK_REG_SELECT][2:0] == 3'b000, "reset values");
    measure(1, 1, 1, "default: all on, harness");
    check(sysclk === hclk, "SYSCLK is the harness clock");
    write(CLK_REG_GATE, 32'b010);
    check(rd[CLK_REG_GATE][2:0] == 3'b010, "GATE read-back");
    check(rd[CLK_REG_STATUS][2:0] == 3'b101, "STATUS effective enables");
    measure(1, 0, 1, "PCLK1 gated");
    write(CLK_REG_SELECT, 32'b101);
    check(rd[CLK_REG_STATUS][6:4] == 3'b101, "STATUS effective selects");
    measure(2, 0, 2, "PCLK0/2 external, PCLK1 gated");
    write(CLK_REG_GATE, 32'b111);
    measure(0, 0, 0, "all gated");
    gate_ovr = 1; clk_ovr = 0;
    measure(1, 1, 1, "gate override, clock override low");
    check(rd[CLK_REG_STATUS][9:8] == 2'b01 && rd[CLK_REG_STATUS][2:0] == 3'b111, "STATUS pins");
    clk_ovr = 1;
    measure(2, 2, 2, "gate override, clock override high");
    gate_ovr = 0;
    measure(0, 0, 0, "override released, registers rule again");
    write(CLK_REG_GATE, 32'b000);
    write(CLK_REG_SELECT, 32'b010);
    measure(1, 2, 1, "PCLK1 external");
    // Reset restores the defaults.
    rst = 1; #10 rst = 0;
    measure(1, 1, 1, "after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
