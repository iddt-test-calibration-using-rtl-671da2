// tb_array_cell: configures the four directional units of one cell to route,
// multiply, combine each other's outputs and use feedback, and checks each
// stream leaving the cell:
//   N unit: PASS of the stream from the west         out_N(t) = in_W(t-3)
//   E unit: MUL of the streams from north and south  out_E(t) = XNOR(in_N, in_S)(t-3)
//   S unit: AVE of the cell's own N and E outputs    ones(out_S) = (ones(N)+ones(E))/2
//   W unit: INVERT of its own output (feedback)      out_W(t) = ~out_W(t-3)
module tb_array_cell;
  import ppa_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b1;
  pu_cfg_t cfg [4];
  logic [3:0] in_i, out_o;
  int checks = 0, failures = 0;

  array_cell dut (.clk, .rst_n, .en, .cfg_i(cfg), .in_i, .out_o);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [3:0] hin  [$];
  logic [3:0] hout [$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  localparam fsel_cfg_t NONE = '0;

  initial begin
    int on = 0, oe = 0, os = 0, n = 0;
    cfg[DIR_N] = pu_cfg(fsel(3'(DIR_W), 3'd0, 1'b0, 1'b0), NONE, F3_PASS, 8'h00);
    cfg[DIR_E] = pu_cfg(fsel(3'(DIR_N), 3'(DIR_S), 1'b1, 1'b0), NONE, F3_PASS, 8'h00);
    cfg[DIR_S] = pu_cfg(fsel(3'(4 + DIR_N), 3'd0, 1'b0, 1'b0),
                        fsel(3'(4 + DIR_E), 3'd0, 1'b0, 1'b0), F3_AVE, 8'h00);
    cfg[DIR_W] = pu_cfg(fsel(3'(4 + DIR_W), 3'd0, 1'b0, 1'b1), NONE, F3_PASS, 8'h00);
    in_i = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      in_i = 4'($urandom);
      @(posedge clk); #1;
      hin.push_back(in_i);
      hout.push_back(out_o);
      if (t >= 10) begin
        logic [3:0] p;
        p = hin[hin.size() - 3];
        check(out_o[DIR_N] == p[DIR_W], $sformatf("N route at %0d", t));
        check(out_o[DIR_E] == ~(p[DIR_N] ^ p[DIR_S]), $sformatf("E multiply at %0d", t));
        check(out_o[DIR_W] == ~hout[hout.size() - 4][DIR_W], $sformatf("W feedback at %0d", t));
        // AVE of own outputs: S at t uses N,E outputs seen 3 samples earlier
        if (t >= 20 && t < 2990) begin
          on += int'(hout[hout.size() - 4][DIR_N]);
          oe += int'(hout[hout.size() - 4][DIR_E]);
          os += int'(out_o[DIR_S]);
          n++;
        end
      end
    end
    check((2 * os - (on + oe)) <= 4 && (2 * os - (on + oe)) >= -4,
          $sformatf("S average: out ones %0d, inputs %0d + %0d", os, on, oe));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
