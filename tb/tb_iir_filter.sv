// tb_iir_filter: drives iir_filter with constant streams and with streams of
// known density and compares the output with a reference model of the same
// recurrence (y += (x - y) >> k, computed here with integers), then checks
// that the settled value is near the stream's bipolar value.
module tb_iir_filter;
  import ppa_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b1;
  logic [3:0] shift;
  logic b;
  logic [VAL_W-1:0] v;
  int checks = 0, failures = 0;

  iir_filter dut (.clk, .rst_n, .en, .shift, .bit_i(b), .value_o(v));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint ref_y;   // fixed point, 12 fraction bits below 1/128

  function automatic int ref_out(input longint y);
    longint q;
    q = y >>> 12;
    if (q > 127) q = 127;
    if (q < -128) q = -128;
    return int'(q);
  endfunction

  task automatic run(input int k, input int density_per_256, input int n);
    int acc = 0;
    shift = 4'(k);
    for (int i = 0; i < n; i++) begin
      longint tgt;
      // deterministic pattern with the requested density
      acc += density_per_256;
      b = (acc >= 256);
      if (acc >= 256) acc -= 256;
      @(posedge clk); #1;
      tgt = b ? (longint'(128) <<< 12) : -(longint'(128) <<< 12);
      ref_y = ref_y + ((tgt - ref_y) >>> k);
      checks++;
      if ($signed(v) != ref_out(ref_y)) begin
        failures++;
        if (failures < 10) $display("FAIL k=%0d step %0d: got %0d expected %0d", k, i, $signed(v), ref_out(ref_y));
      end
    end
    // settled value near 2*d/256 - 1
    begin
      real e, g;
      e = (2.0 * density_per_256 / 256.0 - 1.0) * 128.0;
      g = $signed(v);
      checks++;
      if (g < e - 6 || g > e + 6) begin
        failures++;
        $display("FAIL settle k=%0d d=%0d: got %f expected %f", k, density_per_256, g, e);
      end
    end
  endtask

  initial begin
    shift = 4'd4; b = 1'b0; ref_y = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    run(1, 0, 50);          // fastest setting, full swings both ways
    run(1, 256, 50);
    run(4, 256 - 0, 200);   // all ones -> saturates at +127
    run(6, 0, 600);         // all zeros -> -128
    run(8, 192, 3000);      // +0.5
    run(5, 64, 600);        // -0.5
    run(10, 128, 8000);     // 0
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
