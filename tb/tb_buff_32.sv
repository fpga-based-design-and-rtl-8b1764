// tb_buff_32: checks that the register loads on en, holds without it and
// clears on reset, over random data.
module tb_buff_32;
  logic        clk = 1'b0, rst = 1'b1, en = 1'b0;
  logic [31:0] d = '0, q;
  logic [31:0] model;
  int checks = 0, failures = 0;

  buff_32 #(.W(32)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    d = 32'hdeadbeef; en = 1'b1;
    @(negedge clk);
    check(q == 32'h0, "not cleared by reset");
    rst = 1'b0;
    model = '0;
    for (int i = 0; i < 200; i++) begin
      en = 1'($urandom);
      d = $urandom;
      @(negedge clk);
      if (en) model = d;
      check(q == model, $sformatf("cycle %0d q=%h exp %h", i, q, model));
    end
    rst = 1'b1; en = 1'b1;
    @(negedge clk);
    check(q == 32'h0, "not cleared by reset with en high");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
