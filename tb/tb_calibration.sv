// tb_calibration: a complete 4 x 4 calibration C = T x X on the full-size
// array (default parameters), all four outputs computed at once:
//     c_j = (t0*x0j + t1*x1j + t2*x2j + t3*x3j) / 4,  j = 0..3
// Mapping, for output j in columns 2j and 2j+1:
//   t_i enters from the west in row i and runs east through E-units.
//   x0j enters column 2j from the north, x1j column 2j from the south,
//   x2j column 2j+1 from the north, x3j column 2j+1 from the south; they run
//   along their column (S-units down, N-units up) to the row that uses them.
//   (0,2j)   S-unit  p0j  = t0*x0j                    -> (1,2j)
//   (1,2j)   S-unit  s01j = (t1*x1j + p0j)/2          -> (2,2j) -> (3,2j)
//   (2,2j+1) S-unit  p2j  = t2*x2j                    -> (3,2j+1)
//   (3,2j+1) W-unit  s23j = (t3*x3j + p2j)/2          -> (3,2j)
//   (3,2j)   S-unit  c_j  = (s01j + s23j)/2           -> down column 2j to
//            the south outbound register of column 2j and out_pin[2j].
// Several calibration vectors are run with one matrix; every c_j is compared
// with the value computed here, on the pin stream and through the processor
// read port.
module tb_calibration;
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
    repeat (200000) @(posedge clk);
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

  logic [CFG_LEN-1:0] cfgv;
  localparam fsel_cfg_t NONE = '0;

  function automatic fsel_cfg_t pick(input int cand);
    return fsel(3'(cand), 3'd0, 1'b0, 1'b0);
  endfunction
  function automatic fsel_cfg_t mult(input int a, input int b);
    return fsel(3'(a), 3'(b), 1'b1, 1'b0);
  endfunction
  function automatic pu_cfg_t pass(input int cand);
    return pu_cfg(pick(cand), NONE, F3_PASS, 8'h00);
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
    for (int i = 0; i < 4; i++) begin
      set_io(IN_W + i, IO_DITHER, 8);
      for (int c = 0; c < COLS; c++) set_pu(i, c, DIR_E, pass(DIR_W));   // t_i east
    end
    for (int j = 0; j < 4; j++) begin
      int a, b;
      a = 2 * j; b = 2 * j + 1;
      set_io(IN_N + a, IO_DITHER, 8);   // x0j
      set_io(IN_S + a, IO_DITHER, 8);   // x1j
      set_io(IN_N + b, IO_DITHER, 8);   // x2j
      set_io(IN_S + b, IO_DITHER, 8);   // x3j
      set_io(NB + IN_S + a, IO_PASS, 9);  // c_j
      // column a: x1j up from the south to row 1, c_j down from row 3
      for (int r = 2; r < ROWS; r++) set_pu(r, a, DIR_N, pass(DIR_S));
      set_pu(0, a, DIR_S, pu_cfg(mult(DIR_W, DIR_N), NONE, F3_PASS, 8'h00));
      set_pu(1, a, DIR_S, pu_cfg(mult(DIR_W, DIR_S), pick(DIR_N), F3_AVE, 8'h00));
      set_pu(2, a, DIR_S, pass(DIR_N));
      set_pu(3, a, DIR_S, pu_cfg(pick(DIR_N), pick(DIR_E), F3_AVE, 8'h00));
      for (int r = 4; r < ROWS; r++) set_pu(r, a, DIR_S, pass(DIR_N));
      // column b: x2j down to row 2, x3j up to row 3
      set_pu(0, b, DIR_S, pass(DIR_N));
      set_pu(1, b, DIR_S, pass(DIR_N));
      set_pu(2, b, DIR_S, pu_cfg(mult(DIR_W, DIR_N), NONE, F3_PASS, 8'h00));
      set_pu(3, b, DIR_W, pu_cfg(mult(DIR_W, DIR_S), pick(DIR_N), F3_AVE, 8'h00));
      for (int r = 4; r < ROWS; r++) set_pu(r, b, DIR_N, pass(DIR_S));
    end
  endtask

  task automatic shift_config();
    @(negedge clk);
    run = 1'b0;
    for (int i = 0; i < CFG_LEN; i++) begin
      cfg_shift = 1'b1;
      cfg_sdi = cfgv[i];
      @(negedge clk);
    end
    cfg_shift = 1'b0;
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

  int xm [4][4];

  task automatic calibrate(input int t [4]);
    real expect_c [4];
    int ones [4];
    for (int i = 0; i < 4; i++) io_write(IN_W + i, t[i]);
    for (int j = 0; j < 4; j++) begin
      expect_c[j] = 0.0;
      for (int i = 0; i < 4; i++) expect_c[j] += (t[i] / 128.0) * (xm[i][j] / 128.0);
      expect_c[j] /= 4.0;
      ones[j] = 0;
    end
    repeat (3000) @(posedge clk);
    for (int n = 0; n < 8192; n++) begin
      @(posedge clk); #1;
      for (int j = 0; j < 4; j++) ones[j] += int'(out_pin[2 * j]);
    end
    for (int j = 0; j < 4; j++) begin
      real m;
      int got;
      m = 2.0 * ones[j] / 8192.0 - 1.0;
      io_read(NB + IN_S + 2 * j, got);
      $display("c%0d expected %f, stream %f, read %0d/128", j, expect_c[j], m, got);
      check(m > expect_c[j] - 0.05 && m < expect_c[j] + 0.05,
            $sformatf("c%0d stream mean %f expected %f", j, m, expect_c[j]));
      check(got / 128.0 > expect_c[j] - 0.09 && got / 128.0 < expect_c[j] + 0.09,
            $sformatf("c%0d read %0d/128 expected %f", j, got, expect_c[j]));
    end
  endtask

  initial begin
    int t [4];
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    build_config();
    shift_config();
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) xm[i][j] = $signed(8'($urandom));
    for (int j = 0; j < 4; j++) begin
      io_write(IN_N + 2 * j, xm[0][j]);
      io_write(IN_S + 2 * j, xm[1][j]);
      io_write(IN_N + 2 * j + 1, xm[2][j]);
      io_write(IN_S + 2 * j + 1, xm[3][j]);
    end
    @(negedge clk) run = 1'b1;
    t = '{120, -100, 90, 110};
    calibrate(t);
    for (int v = 0; v < 2; v++) begin
      for (int i = 0; i < 4; i++) t[i] = $signed(8'($urandom));
      calibrate(t);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
