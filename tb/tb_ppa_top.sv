// tb_ppa_top: end-to-end test of the full-size array (8x8 cells, 64 I/O
// registers, default parameters).
//
// 1. A configuration is built and shifted in through the serial chain.
// 2. Calibration step c0 = (t0*x00 + t1*x10 + t2*x20 + t3*x30) / 4 on
//    one-bit streams: t_i is written into the west inbound register of row i,
//    x_i0 into the east inbound register of row i; x travels west along its
//    row (PASS units), meets t in column 0 where a unit multiplies them, and
//    a tree of averaging units in columns 0 and 1 forms the sum/4, which
//    travels south down column 1 to the south outbound register of column 1.
//    The result is read back through the processor port (IIR filter) and
//    measured directly on out_pin[1]; both are compared with the value
//    computed here from the written numbers.
//        (0,0) S-unit: p0 = t0*x0                -> (1,0)
//        (1,0) E-unit: s01 = (t1*x1 + p0)/2      -> (1,1)
//        (1,1) S-unit: pass s01                  -> (2,1) -> (3,1)
//        (2,0) S-unit: p2 = t2*x2                -> (3,0)
//        (3,0) E-unit: s23 = (t3*x3 + p2)/2      -> (3,1)
//        (3,1) S-unit: c0 = (s01 + s23)/2        -> (4,1) ... (7,1) -> south
// 3. A pin-to-pin path that uses the wrap-around: in_pin[6] enters column 6
//    from the north, is inverted by the N-unit of cell (0,6), leaves north,
//    wraps to the south side of column 6, passes the S-unit of cell (7,6)
//    and leaves on out_pin[6]. Every bit is checked against the path's
//    1 + 3 + 1 + 1 + 3 + 1 = 10 register stages (3 per unit function): the
//    bit taken from in_pin at one clock edge leaves 9 edges later.
// 4. A wrapped dithered value: the west outbound register of row 5 dithers a
//    value; it re-enters on the east side of row 5, is sent east again by
//    cell (5,7) and read back from the east outbound register of row 5 and
//    on out_pin[8+5].
// 5. Feedback functions in the mesh: a square-root unit in row 6 and a
//    divide unit in row 7 (dividend from the west, divisor from the south),
//    their results sent east to out_pin[8+6] and out_pin[8+7].
// Each mechanism is counted; one that never happened counts as a failure.
module tb_ppa_top;
  import ppa_pkg::*;

  localparam int ROWS = 8, COLS = 8;
  localparam int NB = 2 * (ROWS + COLS);
  localparam int NIO = 2 * NB;
  localparam int PU_BITS = ROWS * COLS * 4 * PU_CFG_W;
  localparam int CFG_LEN = PU_BITS + NIO * IO_CFG_W;
  localparam int IN_N = 0, IN_E = COLS, IN_S = COLS + ROWS, IN_W = 2 * COLS + ROWS;

  logic clk = 1'b0, rst_n = 1'b0, run = 1'b0;
  logic cfg_shift = 1'b0, cfg_sdi = 1'b0, cfg_sdo;
  logic [5:0] io_addr = '0;
  logic io_wr = 1'b0;
  logic [7:0] io_wdata = '0, io_rdata;
  logic [ROWS+COLS-1:0] in_pin = '0, out_pin;
  int checks = 0, failures = 0;

  ppa_top dut (.clk, .rst_n, .run, .cfg_shift, .cfg_sdi, .cfg_sdo,
               .io_addr, .io_wr, .io_wdata, .io_rdata, .pin_clk(clk), .in_pin, .out_pin);

  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // mechanism counters
  int n_feedback = 0, n_cfg_bits = 0, n_mul_avg = 0, n_iir_reads = 0, n_pin_bits = 0, n_wrap = 0, n_outpin = 0;

  // ---------------------------------------------------------------- config
  logic [CFG_LEN-1:0] cfgv;
  localparam fsel_cfg_t NONE = '0;

  function automatic fsel_cfg_t pick(input int cand);
    return fsel(3'(cand), 3'd0, 1'b0, 1'b0);
  endfunction
  function automatic fsel_cfg_t mult(input int a, input int b);
    return fsel(3'(a), 3'(b), 1'b1, 1'b0);
  endfunction

  task automatic set_pu(input int r, input int c, input int d, input pu_cfg_t pc);
    cfgv[((r * COLS + c) * 4 + d) * PU_CFG_W +: PU_CFG_W] = pc;
  endtask
  task automatic set_io(input int k, input io_mode_e m, input int sh);
    io_cfg_t ic;
    ic.mode = m;
    ic.iir_shift = 4'(sh);
    cfgv[PU_BITS + k * IO_CFG_W +: IO_CFG_W] = ic;
  endtask

  task automatic build_config();
    cfgv = '0;
    // x_i travels west along rows 0..3 (cells (r,7)..(r,1), W-units pass E input)
    for (int r = 0; r < 4; r++)
      for (int c = 1; c < COLS; c++)
        set_pu(r, c, DIR_W, pu_cfg(pick(DIR_E), NONE, F3_PASS, 8'h00));
    set_pu(0, 0, DIR_S, pu_cfg(mult(DIR_W, DIR_E), NONE, F3_PASS, 8'h00));
    set_pu(1, 0, DIR_E, pu_cfg(mult(DIR_W, DIR_E), pick(DIR_N), F3_AVE, 8'h00));
    set_pu(1, 1, DIR_S, pu_cfg(pick(DIR_W), NONE, F3_PASS, 8'h00));
    set_pu(2, 0, DIR_S, pu_cfg(mult(DIR_W, DIR_E), NONE, F3_PASS, 8'h00));
    set_pu(2, 1, DIR_S, pu_cfg(pick(DIR_N), NONE, F3_PASS, 8'h00));
    set_pu(3, 0, DIR_E, pu_cfg(mult(DIR_W, DIR_E), pick(DIR_N), F3_AVE, 8'h00));
    set_pu(3, 1, DIR_S, pu_cfg(pick(DIR_W), pick(DIR_N), F3_AVE, 8'h00));
    for (int r = 4; r < ROWS; r++)
      set_pu(r, 1, DIR_S, pu_cfg(pick(DIR_N), NONE, F3_PASS, 8'h00));
    for (int r = 0; r < 4; r++) begin
      set_io(IN_W + r, IO_DITHER, 8);
      set_io(IN_E + r, IO_DITHER, 8);
    end
    set_io(NB + IN_S + 1, IO_PASS, 9);
    // pin path in column 6 with wrap-around
    set_io(IN_N + 6, IO_PASS, 8);
    set_pu(0, 6, DIR_N, pu_cfg(fsel(3'(DIR_N), 3'd0, 1'b0, 1'b1), NONE, F3_PASS, 8'h00));
    set_io(NB + IN_N + 6, IO_PASS, 8);
    set_io(IN_S + 6, IO_PASS, 8);
    set_pu(ROWS - 1, 6, DIR_S, pu_cfg(pick(DIR_S), NONE, F3_PASS, 8'h00));
    set_io(NB + IN_S + 6, IO_PASS, 8);
    // wrapped dither in row 5
    set_io(NB + IN_W + 5, IO_DITHER, 8);
    set_io(IN_E + 5, IO_PASS, 8);
    set_pu(5, COLS - 1, DIR_E, pu_cfg(pick(DIR_E), NONE, F3_PASS, 8'h00));
    set_io(NB + IN_E + 5, IO_PASS, 9);
    // feedback functions: row 6 square root, row 7 divide, sent east to pins
    set_io(IN_W + 6, IO_DITHER, 8);
    set_pu(6, 0, DIR_E, pu_cfg(pick(DIR_W), NONE, F3_SQRT, 8'h00));
    set_io(IN_W + 7, IO_DITHER, 8);
    set_io(IN_S + 0, IO_DITHER, 8);
    set_pu(7, 0, DIR_E, pu_cfg(pick(DIR_W), pick(DIR_S), F3_DIV, 8'h00));
    for (int c = 1; c < COLS; c++) begin
      set_pu(6, c, DIR_E, pu_cfg(pick(DIR_W), NONE, F3_PASS, 8'h00));
      set_pu(7, c, DIR_E, pu_cfg(pick(DIR_W), NONE, F3_PASS, 8'h00));
    end
    set_io(NB + IN_E + 6, IO_PASS, 9);
    set_io(NB + IN_E + 7, IO_PASS, 9);
  endtask

  task automatic shift_config();
    @(negedge clk);
    run = 1'b0;
    for (int i = 0; i < CFG_LEN; i++) begin
      cfg_shift = 1'b1;
      cfg_sdi = cfgv[i];
      @(negedge clk);
      n_cfg_bits++;
    end
    cfg_shift = 1'b0;
    check(dut.cfg_bits == cfgv, "configuration loaded through the serial chain");
  endtask

  task automatic io_write(input int k, input int v);
    @(negedge clk);
    io_addr = 6'(k); io_wdata = 8'(v); io_wr = 1'b1;
    @(negedge clk);
    io_wr = 1'b0;
  endtask

  task automatic io_read(input int k, output int v);
    io_addr = 6'(k);
    #1;
    v = $signed(io_rdata);
  endtask

  // ---------------------------------------------------------------- pin path
  logic [15:0] pin_hist;
  bit pin_check_on = 0;
  always @(posedge clk) begin
    if (run) begin
      #2;
      pin_hist = {pin_hist[14:0], in_pin[6]};
      if (pin_check_on) begin
        checks++;
        n_pin_bits++;
        if (out_pin[6] != ~pin_hist[9]) begin
          failures++;
          if (failures < 10) $display("FAIL pin path bit: out %b in %b", out_pin[6], pin_hist[9]);
        end
      end
      @(negedge clk) in_pin[6] = 1'($urandom);
    end
  end

  // ---------------------------------------------------------------- one vector
  task automatic vector(input int t [4], input int x [4]);
    real expect_c;
    int ones, got, ones_w;
    expect_c = 0.0;
    for (int i = 0; i < 4; i++) begin
      io_write(IN_W + i, t[i]);
      io_write(IN_E + i, x[i]);
      expect_c += (t[i] / 128.0) * (x[i] / 128.0);
    end
    expect_c = expect_c / 4.0;
    repeat (3000) @(posedge clk);
    ones = 0; ones_w = 0;
    for (int i = 0; i < 8192; i++) begin
      @(posedge clk); #1;
      ones += int'(out_pin[1]);
      ones_w += int'(out_pin[COLS + 5]);
    end
    n_outpin++;
    begin
      real m;
      m = 2.0 * ones / 8192.0 - 1.0;
      io_read(NB + IN_S + 1, got);
      $display("vector: c0 expected %f, out_pin mean %f, read %0d/128", expect_c, m, got);
      check(m > expect_c - 0.05 && m < expect_c + 0.05,
            $sformatf("c0 stream mean %f expected %f", m, expect_c));
      n_iir_reads++;
      check(real'(got) / 128.0 > expect_c - 0.09 && real'(got) / 128.0 < expect_c + 0.09,
            $sformatf("c0 read back %0d/128 expected %f", got, expect_c));
      n_mul_avg++;
      // wrapped dither: value written into the west outbound register of row 5
      m = 2.0 * ones_w / 8192.0 - 1.0;
      check(m > wrap_val / 128.0 - 0.05 && m < wrap_val / 128.0 + 0.05,
            $sformatf("wrapped stream mean %f expected %f", m, wrap_val / 128.0));
      io_read(NB + IN_E + 5, got);
      check(got > wrap_val - 12 && got < wrap_val + 12,
            $sformatf("wrapped value read %0d expected %0d", got, wrap_val));
      n_wrap++;
    end
  endtask

  int wrap_val;

  initial begin
    int t [4], x [4];
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    build_config();
    shift_config();
    wrap_val = -70;
    io_write(NB + IN_W + 5, wrap_val);
    @(negedge clk) run = 1'b1;
    repeat (20) @(posedge clk);
    pin_check_on = 1;

    t = '{100, -80, 60, 120};  x = '{110, 90, -100, 70};
    vector(t, x);
    wrap_val = 45;
    io_write(NB + IN_W + 5, wrap_val);
    t = '{-120, 127, 50, -90}; x = '{100, 110, 120, -60};
    vector(t, x);
    t = '{$signed(8'($urandom)), $signed(8'($urandom)), $signed(8'($urandom)), $signed(8'($urandom))};
    x = '{$signed(8'($urandom)), $signed(8'($urandom)), $signed(8'($urandom)), $signed(8'($urandom))};
    vector(t, x);

    // square root of 0.25 and 0.49, divide 0.375 / 0.75 and -0.25 / 0.5
    for (int k = 0; k < 2; k++) begin
      int o6, o7;
      real m6, m7, e6, e7;
      io_write(IN_W + 6, k == 0 ? 32 : 63);
      io_write(IN_W + 7, k == 0 ? 48 : -32);
      io_write(IN_S + 0, k == 0 ? 96 : 64);
      e6 = (k == 0) ? 0.5 : $sqrt(63.0 / 128.0);
      e7 = (k == 0) ? 0.5 : -0.5;
      repeat (3000) @(posedge clk);
      o6 = 0; o7 = 0;
      for (int i = 0; i < 8192; i++) begin
        @(posedge clk); #1;
        o6 += int'(out_pin[COLS + 6]);
        o7 += int'(out_pin[COLS + 7]);
      end
      m6 = 2.0 * o6 / 8192.0 - 1.0;
      m7 = 2.0 * o7 / 8192.0 - 1.0;
      $display("sqrt: %f expected %f; divide: %f expected %f", m6, e6, m7, e7);
      check(m6 > e6 - 0.06 && m6 < e6 + 0.06, $sformatf("sqrt in mesh %f expected %f", m6, e6));
      check(m7 > e7 - 0.06 && m7 < e7 + 0.06, $sformatf("divide in mesh %f expected %f", m7, e7));
      n_feedback++;
    end

    pin_check_on = 0;
    $display("mechanisms: config bits %0d, multiply-average results %0d, IIR reads %0d, pin bits %0d, wrap-around %0d, output pin measurements %0d, feedback functions %0d",
             n_cfg_bits, n_mul_avg, n_iir_reads, n_pin_bits, n_wrap, n_outpin, n_feedback);
    checks += 7;
    if (n_feedback == 0) failures++;
    if (n_cfg_bits == 0) failures++;
    if (n_mul_avg == 0) failures++;
    if (n_iir_reads == 0) failures++;
    if (n_pin_bits == 0) failures++;
    if (n_wrap == 0) failures++;
    if (n_outpin == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
