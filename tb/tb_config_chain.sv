// tb_config_chain: shifts random bits into config_chain and checks that,
// after LEN shifts, cfg_o holds them with the first bit sent in bit 0; that
// the register holds while shift_en is low; and that sdo returns the bits in
// the order they were sent, LEN shifts later.
module tb_config_chain;
  localparam int LEN = 40;

  logic clk = 1'b0, rst_n = 1'b0, shift_en = 1'b0, sdi = 1'b0, sdo;
  logic [LEN-1:0] cfg_o;
  int checks = 0, failures = 0;

  config_chain #(.LEN(LEN)) dut (.clk, .rst_n, .shift_en, .sdi, .sdo, .cfg_o);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
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

  logic [LEN-1:0] word [2];

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    check(cfg_o == '0, "reset value");
    for (int w = 0; w < 2; w++) begin
      word[w] = {$urandom, $urandom};
      for (int i = 0; i < LEN; i++) begin
        @(negedge clk);
        // sdo shows the bit sent LEN shifts earlier (first word: reset zeros)
        if (w == 1) check(sdo == word[0][i], $sformatf("sdo bit %0d", i));
        shift_en = 1'b1; sdi = word[w][i];
        @(posedge clk); #1;
      end
      @(negedge clk) shift_en = 1'b0;
      check(cfg_o == word[w], $sformatf("word %0d: %h expected %h", w, cfg_o, word[w]));
      repeat (5) @(posedge clk);
      check(cfg_o == word[w], "hold while shift_en is low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
