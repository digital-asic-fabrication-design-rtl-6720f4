// Voice road-noise isolation module: a Wiener filter applied in the time
// domain as a direct convolution (FIR) of TAPS taps, one output per input
// sample.
//
//   y[n] = sum_{k=0}^{TAPS-1} h[k] * x[n-k]
//
// Datapath: a circular sample memory and a coefficient memory (TAPS x 16
// bits each, dsp_sample_mem), an up counter over the samples and a down
// counter over the coefficients (dsp_addr_counters), N_MULT multipliers
// feeding a 32-bit accumulator (dsp_mac). The products are taken from the
// oldest sample with the last coefficient towards the newest sample with
// the first, N_MULT pairs per clock.
//
// Use: write all TAPS coefficients (register 1 sets the write pointer,
// each write of register 2 stores one coefficient and advances it), then
// write TAPS samples to prime the sample memory (their outputs are junk
// until it is full). From then on each write of register 0 (SAMPLE)
// replaces the oldest sample and starts one convolution; when it ends the
// sum appears in register 3 (RESULT), STATUS bit 1 (done) and o_irq rise,
// and the next sample may be written. STATUS bit 0 is "ready".
//
// Clocking: the register side runs on SYSCLK; the filter core runs on its
// own peripheral clock (PCLK). Commands (sample or coefficient) go to the
// core through one toggle handshake and results come back through another.
// While a command or a convolution is outstanding o_busy is high: a
// wishbone write is then held off, while a write that cannot wait (from
// SPI) is dropped and sets STATUS bit 2 (cleared by writing STATUS).
//
// Timing: one convolution takes TAPS/N_MULT + 3 PCLK cycles in the core
// (1 to store the sample, TAPS/N_MULT memory reads, 1 to drain the
// multiply-accumulate, 1 to hand over the result), plus the clock crossings
// (two to three cycles of each clock each way).
//
// Follows the design: memory sizes, the two counters and their directions,
// the N multipliers, the 32-bit accumulator, replacing the oldest sample,
// the result returned on the bus followed by an accumulator reset and an
// interrupt flag to the processor. Own choices: the register map, the
// default of one multiplier, signed arithmetic with a wrapping
// accumulator, the result as the full 32-bit sum (no rescaling), and the
// handshakes between the clocks.
module dsp_noise_filter
  import asic_pkg::*;
#(
  parameter int unsigned TAPS     = 1024,
  parameter int unsigned N_MULT   = 1,
  parameter int unsigned SAMPLE_W = 16,
  parameter int unsigned ACC_W    = 32
) (
  input  logic      i_sysclk,  // bus clock
  input  logic      i_pclk,    // filter core clock
  input  logic      i_rst,     // asynchronous, active high
  input  reg_wr_t   i_wr,      // register write (SYSCLK)
  output reg_file_t o_rd,      // register read-back (SYSCLK)
  output logic      o_busy,    // a command or convolution is outstanding
  output logic      o_irq      // result ready for the processor
);

  localparam int unsigned ROWS   = TAPS / N_MULT;
  localparam int unsigned TAP_W  = $clog2(TAPS);
  localparam int unsigned ROW_W  = (ROWS > 1) ? $clog2(ROWS) : 1;
  localparam int unsigned ROT_W  = (N_MULT > 1) ? $clog2(N_MULT) : 1;

  typedef struct packed {
    dsp_cmd_e            kind;
    logic [TAP_W-1:0]    addr;
    logic [SAMPLE_W-1:0] data;
  } dsp_cmd_t;

  // ------------------------------------------------------------------
  // Register side (SYSCLK)
  // ------------------------------------------------------------------
  logic [TAP_W-1:0] coef_ptr_q;
  logic             done_q, dropped_q, conv_pend_q;
  logic [ACC_W-1:0] result_q;
  logic             cmd_busy, cmd_send;
  dsp_cmd_t         cmd_a;
  logic             res_valid_a;
  logic [ACC_W-1:0] res_data_a;

  logic wr_sample, wr_coef;
  assign wr_sample = i_wr.valid && i_wr.regno == DSP_REG_SAMPLE;
  assign wr_coef   = i_wr.valid && i_wr.regno == DSP_REG_COEF_DATA;

  always_comb begin
    cmd_send   = 1'b0;
    cmd_a.kind = DSP_CMD_SAMPLE;
    cmd_a.addr = coef_ptr_q;
    cmd_a.data = i_wr.data[SAMPLE_W-1:0];
    if (wr_sample && !cmd_busy && !conv_pend_q) begin
      cmd_send = 1'b1;
    end else if (wr_coef && !cmd_busy) begin
      cmd_send   = 1'b1;
      cmd_a.kind = DSP_CMD_COEF;
    end
  end

  always_ff @(posedge i_sysclk or posedge i_rst) begin
    if (i_rst) begin
      coef_ptr_q  <= '0;
      done_q      <= 1'b0;
      dropped_q   <= 1'b0;
      conv_pend_q <= 1'b0;
      result_q    <= '0;
    end else begin
      if (i_wr.valid && i_wr.regno == DSP_REG_COEF_ADDR) coef_ptr_q <= i_wr.data[TAP_W-1:0];
      if (i_wr.valid && i_wr.regno == DSP_REG_STATUS)    dropped_q  <= 1'b0;
      if ((wr_sample || wr_coef) && !cmd_send)           dropped_q  <= 1'b1;
      if (cmd_send && cmd_a.kind == DSP_CMD_COEF)        coef_ptr_q <= coef_ptr_q + 1'b1;
      if (cmd_send && cmd_a.kind == DSP_CMD_SAMPLE) begin
        conv_pend_q <= 1'b1;
        done_q      <= 1'b0;
      end
      if (res_valid_a) begin
        result_q    <= res_data_a;
        conv_pend_q <= 1'b0;
        done_q      <= 1'b1;
      end
    end
  end

  assign o_busy = cmd_busy || conv_pend_q;
  assign o_irq  = done_q;

  always_comb begin
    o_rd = '0;
    o_rd[DSP_REG_COEF_ADDR][TAP_W-1:0] = coef_ptr_q;
    o_rd[DSP_REG_RESULT][ACC_W-1:0]    = result_q;
    o_rd[DSP_REG_STATUS][0]            = !o_busy;
    o_rd[DSP_REG_STATUS][1]            = done_q;
    o_rd[DSP_REG_STATUS][2]            = dropped_q;
  end

  // ------------------------------------------------------------------
  // Clock crossings
  // ------------------------------------------------------------------
  logic     cmd_valid_b, cmd_take_b;
  dsp_cmd_t cmd_b;
  logic     res_send_b, res_busy_b;
  logic signed [ACC_W-1:0] acc;

  cdc_handshake #(.WIDTH($bits(dsp_cmd_t))) u_cmd_cdc (
    .i_a_clk   (i_sysclk),
    .i_a_rst   (i_rst),
    .i_a_valid (cmd_send),
    .i_a_data  (cmd_a),
    .o_a_busy  (cmd_busy),
    .i_b_clk   (i_pclk),
    .i_b_rst   (i_rst),
    .o_b_valid (cmd_valid_b),
    .o_b_data  (cmd_b),
    .i_b_ready (cmd_take_b)
  );

  cdc_handshake #(.WIDTH(ACC_W)) u_res_cdc (
    .i_a_clk   (i_pclk),
    .i_a_rst   (i_rst),
    .i_a_valid (res_send_b),
    .i_a_data  (acc),
    .o_a_busy  (res_busy_b),
    .i_b_clk   (i_sysclk),
    .i_b_rst   (i_rst),
    .o_b_valid (res_valid_a),
    .o_b_data  (res_data_a),
    .i_b_ready (1'b1)
  );

  // ------------------------------------------------------------------
  // Filter core (PCLK)
  // ------------------------------------------------------------------
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN, S_DONE} state_e;
  state_e state_q;

  logic [TAP_W-1:0]                    wr_addr;
  logic [N_MULT-1:0][ROW_W-1:0]        data_row;
  logic [ROT_W-1:0]                    rot;
  logic [ROW_W-1:0]                    filt_row;
  logic                                last;
  logic [N_MULT-1:0][SAMPLE_W-1:0]     data_rd, coef_rd, lane_a, lane_b;
  logic                                data_we, coef_we, advance_wr, start, step;
  logic                                rd_valid_q, mac_clear;

  always_comb begin
    cmd_take_b = 1'b0;
    data_we    = 1'b0;
    coef_we    = 1'b0;
    advance_wr = 1'b0;
    start      = 1'b0;
    step       = 1'b0;
    mac_clear  = 1'b0;
    res_send_b = 1'b0;
    unique case (state_q)
      S_IDLE: if (cmd_valid_b) begin
        cmd_take_b = 1'b1;
        if (cmd_b.kind == DSP_CMD_SAMPLE) begin
          data_we    = 1'b1;
          advance_wr = 1'b1;
          start      = 1'b1;
          mac_clear  = 1'b1;
        end else begin
          coef_we    = 1'b1;
        end
      end
      S_RUN:   step       = 1'b1;
      S_DRAIN: ;
      S_DONE:  res_send_b = !res_busy_b;
      default: ;
    endcase
  end

  always_ff @(posedge i_pclk or posedge i_rst) begin
    if (i_rst) begin
      state_q    <= S_IDLE;
      rd_valid_q <= 1'b0;
    end else begin
      rd_valid_q <= (state_q == S_RUN);
      unique case (state_q)
        S_IDLE:  if (cmd_valid_b && cmd_b.kind == DSP_CMD_SAMPLE) state_q <= S_RUN;
        S_RUN:   if (last) state_q <= S_DRAIN;
        S_DRAIN: state_q <= S_DONE;
        S_DONE:  if (res_send_b) state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  dsp_addr_counters #(.DEPTH(TAPS), .BANKS(N_MULT)) u_counters (
    .i_clk        (i_pclk),
    .i_rst        (i_rst),
    .i_advance_wr (advance_wr),
    .i_start      (start),
    .i_step       (step),
    .o_wr_addr    (wr_addr),
    .o_data_row   (data_row),
    .o_rot        (rot),
    .o_filt_row   (filt_row),
    .o_last       (last)
  );

  dsp_sample_mem #(.DEPTH(TAPS), .WIDTH(SAMPLE_W), .BANKS(N_MULT)) u_data_mem (
    .i_clk   (i_pclk),
    .i_we    (data_we),
    .i_waddr (wr_addr),
    .i_wdata (cmd_b.data),
    .i_rrow  (data_row),
    .o_rdata (data_rd)
  );

  dsp_sample_mem #(.DEPTH(TAPS), .WIDTH(SAMPLE_W), .BANKS(N_MULT)) u_coef_mem (
    .i_clk   (i_pclk),
    .i_we    (coef_we),
    .i_waddr (cmd_b.addr),
    .i_wdata (cmd_b.data),
    .i_rrow  ({N_MULT{filt_row}}),
    .o_rdata (coef_rd)
  );

  // Lane j multiplies the j-th oldest sample of the group with the
  // coefficient at the mirrored position; the rotation stays constant
  // during a convolution, so the registered read data lines up with it.
  always_comb begin
    for (int j = 0; j < N_MULT; j++) begin
      lane_a[j] = data_rd[(int'(rot) + j) % N_MULT];
      lane_b[j] = coef_rd[N_MULT - 1 - j];
    end
  end

  dsp_mac #(.N(N_MULT), .SAMPLE_W(SAMPLE_W), .ACC_W(ACC_W)) u_mac (
    .i_clk   (i_pclk),
    .i_rst   (i_rst),
    .i_clear (mac_clear),
    .i_en    (rd_valid_q),
    .i_a     (lane_a),
    .i_b     (lane_b),
    .o_acc   (acc)
  );

endmodule
