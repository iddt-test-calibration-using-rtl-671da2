// tb_processing_unit: exercises every F3 operation of processing_unit with
// random bipolar streams of chosen values on its candidate inputs.
//  - bit-exact checks against delayed inputs for PASS, MUL (XNOR), INVERT,
//    LUT2 (window logic, SET, CLEAR), with the 3-cycle latency,
//  - a set/reset latch built with LUT3 (control logic with feedback),
//  - exact count checks for AVE, SUB and HALF (the residual makes the
//    output count equal half the input count to within two),
//  - mean-value checks for ADD (also saturation and MUL by 2), DIV, SQR and
//    SQRT.
module tb_processing_unit;
  import ppa_pkg::*;

  localparam int LAT = 3;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b1;
  pu_cfg_t cfg;
  logic [NCAND-1:0] cand;
  logic y;
  int checks = 0, failures = 0;

  processing_unit dut (.clk, .rst_n, .en, .cfg, .cand, .out_o(y));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Per-input bipolar values in 1/1000; cand[i] is 1 with probability (v+1)/2.
  int val [NCAND];
  logic [NCAND-1:0] hist [$];   // cand as applied, newest last

  function automatic logic [NCAND-1:0] draw();
    logic [NCAND-1:0] c;
    for (int i = 0; i < NCAND; i++)
      c[i] = ($urandom % 2000) < (val[i] + 1000);
    return c;
  endfunction

  // Drive one cycle: new inputs after the edge, sample output after the edge.
  task automatic step();
    cand = draw();
    hist.push_back(cand);
    if (hist.size() > 8) void'(hist.pop_front());
    @(posedge clk); #1;
  endtask

  function automatic logic [NCAND-1:0] past(input int n);  // inputs applied n edges ago
    return hist[hist.size() - n];
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic set_vals(input int v0, input int v1, input int v2, input int v3);
    val[0] = v0; val[1] = v1; val[2] = v2; val[3] = v3;
    for (int i = 4; i < NCAND; i++) val[i] = 0;
  endtask

  // Bit-exact: y(t) == f(cand(t-LAT))
  task automatic exact_run(input pu_cfg_t c, input int n, input int kind, input string name);
    cfg = c;
    repeat (6) step();
    for (int i = 0; i < n; i++) begin
      logic [NCAND-1:0] p;
      logic e;
      step();
      p = past(LAT);
      unique case (kind)
        0: e = p[2];                                   // PASS
        1: e = ~(p[0] ^ p[1]);                         // MUL
        2: e = ~p[3];                                  // INVERT
        default: e = c.lut[{1'b0, p[1], p[3]}];        // LUT2 of cand1, cand3
      endcase
      check(y == e, $sformatf("%s cycle %0d: got %b expected %b", name, i, y, e));
    end
  endtask

  // Mean of the output over n cycles, in 1/1000.
  task automatic mean_run(input pu_cfg_t c, input int n, output int m);
    int ones = 0;
    cfg = c;
    repeat (64) step();
    for (int i = 0; i < n; i++) begin
      step();
      ones += int'(y);
    end
    m = (2000 * ones) / n - 1000;
  endtask

  task automatic mean_check(input pu_cfg_t c, input int expect_m, input int tol, input string name);
    int m;
    mean_run(c, 8000, m);
    check(m >= expect_m - tol && m <= expect_m + tol,
          $sformatf("%s: mean %0d/1000 expected %0d/1000", name, m, expect_m));
  endtask

  // Exact average: ones(out) vs (ones(a) + ones(b)) / 2, with b = cand1 or
  // (half_mode) an alternating stream.
  task automatic ave_run(input pu_cfg_t c, input bit inv_b, input bit half_mode, input string name);
    int oa = 0, ob = 0, oy = 0, n = 4000;
    cfg = c;
    repeat (8) step();
    for (int i = 0; i < n + LAT; i++) begin
      step();
      if (i < n) begin
        oa += int'(cand[0]);
        ob += half_mode ? (i % 2) : int'(cand[1] ^ inv_b);
      end
      if (i >= LAT) oy += int'(y);
    end
    check((2 * oy - (oa + ob)) <= 4 && (2 * oy - (oa + ob)) >= -4,
          $sformatf("%s: out ones %0d, input ones %0d + %0d", name, oy, oa, ob));
  endtask

  localparam fsel_cfg_t NONE = '0;

  initial begin
    cfg = '0; cand = '0;
    set_vals(0, 0, 0, 0);
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // ---------------- routing / single stream / window logic (exact)
    set_vals(200, -400, 600, 100);
    exact_run(pu_cfg(fsel(3'd2, 3'd0, 1'b0, 1'b0), NONE, F3_PASS, 8'h00), 300, 0, "PASS");
    exact_run(pu_cfg(fsel(3'd0, 3'd1, 1'b1, 1'b0), NONE, F3_PASS, 8'h00), 300, 1, "MUL");
    exact_run(pu_cfg(fsel(3'd3, 3'd0, 1'b0, 1'b1), NONE, F3_PASS, 8'h00), 300, 2, "INVERT");
    for (int k = 0; k < 6; k++) begin
      logic [7:0] lut;
      lut = (k == 0) ? 8'h0F : (k == 1) ? 8'h00 : 8'($urandom);   // SET, CLEAR, random
      exact_run(pu_cfg(fsel(3'd1, 3'd0, 1'b0, 1'b0), fsel(3'd3, 3'd0, 1'b0, 1'b0), F3_LUT2, lut),
                100, 3, $sformatf("LUT2 %h", lut[3:0]));
    end

    // ---------------- control logic: set/reset latch y' = p | (~q & y)
    begin
      logic [7:0] lut;
      for (int i = 0; i < 8; i++) lut[i] = i[2] | (~i[1] & i[0]);
      set_vals(-1000, -1000, 0, 0);           // both inputs constantly 0
      cfg = pu_cfg(fsel(3'd0, 3'd0, 1'b0, 1'b0), fsel(3'd1, 3'd0, 1'b0, 1'b0), F3_LUT3, lut);
      repeat (6) step();
      check(y == 1'b0, "LUT3 latch idle low");
      val[0] = 1000; step(); val[0] = -1000;   // one set pulse
      repeat (1) step();
      check(y == 1'b0, "LUT3 latch set too early");
      step();
      check(y == 1'b1, "LUT3 latch set after 3 cycles");
      repeat (20) step();
      check(y == 1'b1, "LUT3 latch holds");
      val[1] = 1000; step(); val[1] = -1000;   // one reset pulse
      repeat (2) step();
      check(y == 1'b0, "LUT3 latch reset");
      repeat (10) step();
      check(y == 1'b0, "LUT3 latch stays reset");
    end

    // ---------------- fractional arithmetic
    set_vals(500, -300, 0, 0);
    ave_run(pu_cfg(fsel(3'd0, 3'd0, 1'b0, 1'b0), fsel(3'd1, 3'd0, 1'b0, 1'b0), F3_AVE, 8'h00), 1'b0, 1'b0, "AVE");
    ave_run(pu_cfg(fsel(3'd0, 3'd0, 1'b0, 1'b0), fsel(3'd1, 3'd0, 1'b0, 1'b1), F3_AVE, 8'h00), 1'b1, 1'b0, "SUB");
    ave_run(pu_cfg(fsel(3'd0, 3'd0, 1'b0, 1'b0), NONE, F3_HALF, 8'h00), 1'b0, 1'b1, "HALF");

    // MUL and ADD: (a*b + c)/2 = (0.5*-0.3 + 0.8)/2 = 0.325
    set_vals(500, -300, 800, 0);
    mean_check(pu_cfg(fsel(3'd0, 3'd1, 1'b1, 1'b0), fsel(3'd2, 3'd0, 1'b0, 1'b0), F3_AVE, 8'h00),
               325, 40, "MUL-and-AVE");

    set_vals(300, 400, 0, 0);
    mean_check(pu_cfg(fsel(3'd0, 3'd0, 1'b0, 1'b0), fsel(3'd1, 3'd0, 1'b0, 1'b0), F3_ADD, 8'h00),
               700, 40, "ADD");
    set_vals(-200, -500, 0, 0);
    mean_check(pu_cfg(fsel(3'd0, 3'd0, 1'b0, 1'b0), fsel(3'd1, 3'd0, 1'b0, 1'b0), F3_ADD, 8'h00),
               -700, 40, "ADD negative");
    set_vals(700, 600, 0, 0);
    mean_check(pu_cfg(fsel(3'd0, 3'd0, 1'b0, 1'b0), fsel(3'd1, 3'd0, 1'b0, 1'b0), F3_ADD, 8'h00),
               1000, 15, "ADD saturates");
    set_vals(350, 0, 0, 0);
    mean_check(pu_cfg(fsel(3'd0, 3'd0, 1'b0, 1'b0), fsel(3'd0, 3'd0, 1'b0, 1'b0), F3_ADD, 8'h00),
               700, 40, "MUL by 2");

    set_vals(300, 600, 0, 0);
    mean_check(pu_cfg(fsel(3'd0, 3'd0, 1'b0, 1'b0), fsel(3'd1, 3'd0, 1'b0, 1'b0), F3_DIV, 8'h00),
               500, 60, "DIV 0.3/0.6");
    set_vals(-200, 800, 0, 0);
    mean_check(pu_cfg(fsel(3'd0, 3'd0, 1'b0, 1'b0), fsel(3'd1, 3'd0, 1'b0, 1'b0), F3_DIV, 8'h00),
               -250, 60, "DIV -0.2/0.8");

    set_vals(-600, 0, 0, 0);
    mean_check(pu_cfg(fsel(3'd0, 3'd0, 1'b0, 1'b0), NONE, F3_SQR, 8'h00), 360, 40, "SQR -0.6");
    set_vals(800, 0, 0, 0);
    mean_check(pu_cfg(fsel(3'd0, 3'd0, 1'b0, 1'b0), NONE, F3_SQR, 8'h00), 640, 40, "SQR 0.8");

    set_vals(250, 0, 0, 0);
    mean_check(pu_cfg(fsel(3'd0, 3'd0, 1'b0, 1'b0), NONE, F3_SQRT, 8'h00), 500, 50, "SQRT 0.25");
    set_vals(160, 0, 0, 0);
    mean_check(pu_cfg(fsel(3'd0, 3'd0, 1'b0, 1'b0), NONE, F3_SQRT, 8'h00), 400, 50, "SQRT 0.16");
    set_vals(640, 0, 0, 0);
    mean_check(pu_cfg(fsel(3'd0, 3'd0, 1'b0, 1'b0), NONE, F3_SQRT, 8'h00), 800, 50, "SQRT 0.64");
    set_vals(-500, 0, 0, 0);
    mean_check(pu_cfg(fsel(3'd0, 3'd0, 1'b0, 1'b0), NONE, F3_SQRT, 8'h00), 0, 50, "SQRT of a negative gives 0");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
