// tb_io_register: checks the four stream sources of io_register (re-timed
// pass-through, dithered value, alternating zero, re-dithered input) and the IIR read
// path: with the register's own dithered stream looped back into its input,
// the value read settles to the value written. The filter side runs on a
// separate clock (period 7 against 10), so the re-dither and read-back checks
// also cover the transfer between the two clock rates.
module tb_io_register;
  import ppa_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b1;
  io_cfg_t cfg;
  logic wr_en;
  logic [VAL_W-1:0] wdata, rdata;
  logic src, stream;
  logic loopback;
  int checks = 0, failures = 0;

  logic src_mux;
  assign src_mux = loopback ? stream : src;

  // The arriving stream runs on its own clock, 7 time units against 10.
  logic sclk = 1'b0;
  io_register dut (.clk, .rst_n, .en, .cfg, .wr_en, .wdata, .rdata,
                   .src_clk(sclk), .src_i(src_mux), .stream_o(stream));

  always #5 clk = ~clk;
  always #3.5 sclk = ~sclk;

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
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic write(input int v);
    @(negedge clk);
    wr_en = 1'b1; wdata = 8'(v);
    @(negedge clk);
    wr_en = 1'b0;
  endtask

  initial begin
    cfg.mode = IO_PASS; cfg.iir_shift = 4'd8;
    wr_en = 1'b0; wdata = '0; src = 1'b0; loopback = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // pass: re-timed by one cycle
    begin
      logic prev;
      prev = src;
      for (int i = 0; i < 200; i++) begin
        src = 1'($urandom);
        @(posedge clk); #1;
        check(stream == src, $sformatf("pass %0d", i));
      end
    end
    // zero: alternating
    @(negedge clk) cfg.mode = IO_ZERO;
    @(posedge clk); #1;
    for (int i = 0; i < 50; i++) begin
      logic last;
      last = stream;
      @(posedge clk); #1;
      check(stream != last, "zero alternates");
    end
    // re-dither: same value as the arriving stream, but decorrelated from it
    @(negedge clk) cfg.mode = IO_REDITHER;
    for (int k = 0; k < 2; k++) begin
      int ones_s, ones_o, agree, pv;
      pv = (k == 0) ? 600 : -400;     // arriving stream value in 1/1000
      ones_s = 0; ones_o = 0; agree = 0;
      for (int i = 0; i < 3000; i++) begin
        @(negedge sclk) src = ($urandom % 2000) < (pv + 1000);
      end
      for (int i = 0; i < 8000; i++) begin
        @(negedge sclk) src = ($urandom % 2000) < (pv + 1000);
        @(posedge clk); #1;
        ones_s += int'(src);
        ones_o += int'(stream);
        agree  += int'(stream == src);
      end
      begin
        real ms, mo, ma;
        ms = 2.0 * ones_s / 8000.0 - 1.0;
        mo = 2.0 * ones_o / 8000.0 - 1.0;
        ma = 2.0 * agree / 8000.0 - 1.0;
        check(mo > ms - 0.08 && mo < ms + 0.08, $sformatf("redither value %f, source %f", mo, ms));
        // an XNOR product with the source equals the product of the values
        check(ma > ms * mo - 0.08 && ma < ms * mo + 0.08,
              $sformatf("redither correlation %f, product of values %f", ma, ms * mo));
      end
    end

    // dither with loopback into the IIR filter: written value read back
    @(negedge clk) cfg.mode = IO_DITHER;
    cfg.iir_shift = 4'd10;
    loopback = 1'b1;
    begin
      int vals [6];
      vals = '{-100, -40, 0, 25, 90, 120};
      for (int k = 0; k < 6; k++) begin
        int ones, got;
        ones = 0;
        write(vals[k]);
        repeat (8000) @(posedge clk);
        for (int i = 0; i < 4096; i++) begin @(posedge clk); #1; ones += int'(stream); end
        got = int'($signed(rdata));
        check(got >= vals[k] - 14 && got <= vals[k] + 14,
              $sformatf("iir read %0d expected %0d", got, vals[k]));
        // stream density (2*ones/4096 - 1)*128 = ones/16 - 128
        check(ones / 16 - 128 >= vals[k] - 6 && ones / 16 - 128 <= vals[k] + 6,
              $sformatf("dither density %0d expected %0d", ones / 16 - 128, vals[k]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
