// tb_pin_clock: streams arriving on the input pins at a clock rate other than
// the array's, taken into the full-size array (default parameters) and sent
// back out.
//
// The pins run on pin_clk; the array on clk (period 10). Two phases: pin_clk
// slower than the array (period 13), then faster (period 7). In each phase
// the testbench drives two random pin streams of known mean, each bit drawn
// on a pin_clk edge:
//   in_pin[3]      -> north inbound register of column 3 (IO_REDITHER),
//                     down column 3 through eight pass units (the reset
//                     state of a unit word), south outbound register,
//                     out_pin[3];
//   in_pin[8 + 2]  -> west inbound register of row 2 (IO_REDITHER), east
//                     along row 2 through eight pass units, east outbound
//                     register, out_pin[8 + 2].
// The inbound registers filter the pin stream on pin_clk, hand the value to
// clk and dither it again there. Checked: the value read from the inbound
// register (averaged over 16 reads), the mean of the stream on the output
// pin (a clk-rate stream), and the value read from the outbound register.
// Counted mechanisms: value transfers across the two clocks, phases with a
// slower and with a faster pin clock, output-pin measurements.
module tb_pin_clock;
  import ppa_pkg::*;

  localparam int ROWS = 8, COLS = 8;
  localparam int NB = 2 * (ROWS + COLS);
  localparam int NIO = 2 * NB;
  localparam int PU_BITS = ROWS * COLS * 4 * PU_CFG_W;
  localparam int CFG_LEN = PU_BITS + NIO * IO_CFG_W;
  localparam int IN_N = 0, IN_E = COLS, IN_S = COLS + ROWS, IN_W = 2 * COLS + ROWS;

  logic clk = 1'b0, pin_clk = 1'b0, rst_n = 1'b0, run = 1'b0;
  logic cfg_shift = 1'b0, cfg_sdi = 1'b0, cfg_sdo;
  logic [5:0] io_addr = '0;
  logic io_wr = 1'b0;
  logic [7:0] io_wdata = '0, io_rdata;
  logic [ROWS+COLS-1:0] in_pin = '0, out_pin;
  int checks = 0, failures = 0;

  ppa_top dut (.clk, .rst_n, .run, .cfg_shift, .cfg_sdi, .cfg_sdo,
               .io_addr, .io_wr, .io_wdata, .io_rdata, .pin_clk, .in_pin, .out_pin);

  always #5 clk = ~clk;

  real pin_half = 6.5;
  always #(pin_half) pin_clk = ~pin_clk;

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

  // --------------------------------------------------------- pin streams
  // value v (in 1/128): a bit is 1 with probability (v + 128) / 256
  int v_col = 0, v_row = 0;
  always @(negedge pin_clk) begin
    in_pin[3]        <= ($urandom_range(255) < 32'(v_col + 128));
    in_pin[COLS + 2] <= ($urandom_range(255) < 32'(v_row + 128));
  end

  // transfers across the clocks: each change of the array-side acknowledge
  int n_xfer = 0;
  logic ack_prev = 1'b0;
  always @(posedge clk) begin
    if (dut.g_io[IN_N + 3].u_io.ack_q != ack_prev) n_xfer++;
    ack_prev = dut.g_io[IN_N + 3].u_io.ack_q;
  end

  // --------------------------------------------------------- configuration
  logic [CFG_LEN-1:0] cfgv;

  task automatic set_io(input int k, input io_mode_e m, input int sh);
    io_cfg_t ic;
    ic.mode = m;
    ic.iir_shift = 4'(sh);
    cfgv[PU_BITS + k * IO_CFG_W +: IO_CFG_W] = ic;
  endtask

  task automatic load_config();
    cfgv = '0;   // every unit passes its north input
    for (int c = 0; c < COLS; c++)
      cfgv[((2 * COLS + c) * 4 + int'(DIR_E)) * PU_CFG_W +: PU_CFG_W] =
        pu_cfg(fsel(3'(DIR_W), 3'd0, 1'b0, 1'b0), '0, F3_PASS, 8'h00);
    set_io(IN_N + 3, IO_REDITHER, 8);
    set_io(IN_W + 2, IO_REDITHER, 8);
    set_io(NB + IN_S + 3, IO_PASS, 9);
    set_io(NB + IN_E + 2, IO_PASS, 9);
    @(negedge clk);
    for (int i = 0; i < CFG_LEN; i++) begin
      cfg_shift = 1'b1;
      cfg_sdi = cfgv[i];
      @(negedge clk);
    end
    cfg_shift = 1'b0;
    check(dut.cfg_bits == cfgv, "configuration loaded");
  endtask

  task automatic io_read(input int k, output int v);
    io_addr = 6'(k);
    #1;
    v = $signed(io_rdata);
  endtask

  int n_slow = 0, n_fast = 0, n_outpin = 0;

  task automatic phase(input int vc, input int vr);
    int sum_c, sum_r, got, ones_c, ones_r;
    real m_c, m_r;
    v_col = vc;
    v_row = vr;
    repeat (4000) @(posedge clk);
    // inbound values, read as the processor would
    sum_c = 0; sum_r = 0;
    for (int i = 0; i < 16; i++) begin
      repeat (300) @(posedge clk);
      io_read(IN_N + 3, got); sum_c += got;
      io_read(IN_W + 2, got); sum_r += got;
    end
    $display("pin half period %0.1f: inbound reads %0d %0d, expected %0d %0d",
             pin_half, sum_c / 16, sum_r / 16, vc, vr);
    check(sum_c / 16 > vc - 8 && sum_c / 16 < vc + 8, "inbound value, column 3");
    check(sum_r / 16 > vr - 8 && sum_r / 16 < vr + 8, "inbound value, row 2");
    // streams on the output pins, at the array clock
    ones_c = 0; ones_r = 0;
    for (int i = 0; i < 8192; i++) begin
      @(posedge clk); #1;
      ones_c += int'(out_pin[3]);
      ones_r += int'(out_pin[COLS + 2]);
    end
    n_outpin++;
    m_c = 2.0 * ones_c / 8192.0 - 1.0;
    m_r = 2.0 * ones_r / 8192.0 - 1.0;
    $display("  output pin means %f %f, expected %f %f", m_c, m_r, vc / 128.0, vr / 128.0);
    check(m_c > vc / 128.0 - 0.06 && m_c < vc / 128.0 + 0.06, "output pin mean, column 3");
    check(m_r > vr / 128.0 - 0.06 && m_r < vr / 128.0 + 0.06, "output pin mean, row 2");
    io_read(NB + IN_S + 3, got);
    check(got > vc - 16 && got < vc + 16, $sformatf("south outbound read %0d", got));
    io_read(NB + IN_E + 2, got);
    check(got > vr - 16 && got < vr + 16, $sformatf("east outbound read %0d", got));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    load_config();
    @(negedge clk) run = 1'b1;

    pin_half = 6.5;                 // pin clock slower than the array clock
    phase(60, -90);
    phase(-40, 25);
    n_slow++;
    pin_half = 3.5;                 // pin clock faster than the array clock
    phase(100, 10);
    phase(-75, -50);
    n_fast++;

    $display("mechanisms: clock-crossing transfers %0d, slow-pin phases %0d, fast-pin phases %0d, output pin measurements %0d",
             n_xfer, n_slow, n_fast, n_outpin);
    checks += 4;
    if (n_xfer == 0) failures++;
    if (n_slow == 0) failures++;
    if (n_fast == 0) failures++;
    if (n_outpin == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
