// tb_dither_gen: checks that dither_gen produces a stream whose density of
// ones is (V+128)/256 for a range of values, and that the stream bit is
// registered (it reacts to a new value one cycle after the value changes,
// at the earliest). Two generators with different seeds must give
// decorrelated streams: the mean of their XNOR matches the product of their
// bipolar values.
module tb_dither_gen;
  import ppa_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b1;
  logic [VAL_W-1:0] va, vb;
  logic ba, bb;
  int checks = 0, failures = 0;

  dither_gen #(.SEED(16'hACE1)) dut  (.clk, .rst_n, .en, .value(va), .bit_o(ba));
  dither_gen #(.SEED(16'h3C5F)) dut2 (.clk, .rst_n, .en, .value(vb), .bit_o(bb));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(input int signed a, input int signed b, input int n);
    int ones_a = 0, agree = 0;
    real ma, mab, ea, eab;
    va = 8'(a); vb = 8'(b);
    repeat (3) @(posedge clk);
    for (int i = 0; i < n; i++) begin
      @(posedge clk);
      ones_a += int'(ba);
      agree  += int'(ba == bb);
    end
    ma  = 2.0 * ones_a / n - 1.0;
    mab = 2.0 * agree / n - 1.0;
    ea  = a / 128.0;
    eab = (a / 128.0) * (b / 128.0);
    checks += 2;
    if (ma < ea - 0.04 || ma > ea + 0.04) begin
      failures++;
      $display("FAIL value %0d: stream mean %f expected %f", a, ma, ea);
    end
    if (mab < eab - 0.06 || mab > eab + 0.06) begin
      failures++;
      $display("FAIL product %0d*%0d: xnor mean %f expected %f", a, b, mab, eab);
    end
  endtask

  initial begin
    va = '0; vb = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // Extremes: -128 never gives a one.
    va = 8'h80;
    repeat (3) @(posedge clk);
    begin
      int ones = 0;
      for (int i = 0; i < 500; i++) begin @(posedge clk); ones += int'(ba); end
      checks++;
      if (ones != 0) begin failures++; $display("FAIL -128 gave %0d ones", ones); end
    end
    // Registered output: after switching to +127 at a clock edge, the bit
    // seen right after that edge still belongs to the old value.
    @(negedge clk); va = 8'd127;
    #1;
    checks++;
    if (ba !== 1'b0) begin failures++; $display("FAIL output not registered"); end
    // -128 -> +127: from the next edge on, nearly every bit is one.
    begin
      int ones = 0;
      for (int i = 0; i < 256; i++) begin @(posedge clk); #1; ones += int'(ba); end
      checks++;
      if (ones < 250) begin failures++; $display("FAIL +127 gave only %0d ones", ones); end
    end
    measure(0, 0, 8000);
    measure(64, -64, 8000);
    measure(-96, 100, 8000);
    measure(127, 50, 8000);
    measure(-30, -90, 8000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
