// tb_sample_ram: writes random words to every address of a 16 x 16 sample
// memory, reads them back in a shuffled order and checks the one-clock
// read latency and that rdata holds its value while re is low.
module tb_sample_ram;
  logic        clk = 1'b0;
  logic        we = 1'b0, re = 1'b0;
  logic [3:0]  waddr = '0, raddr = '0;
  logic [15:0] wdata = '0, rdata;
  logic [15:0] model [16];
  int checks = 0, failures = 0;

  sample_ram #(.DEPTH(16), .W(16)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int a = 0; a < 16; a++) begin
      @(negedge clk);
      we = 1'b1; waddr = 4'(a); wdata = 16'($urandom); model[a] = wdata;
    end
    @(negedge clk);
    we = 1'b0;
    for (int i = 0; i < 32; i++) begin
      logic [3:0] a;
      a = 4'((i * 7 + 3) % 16);
      @(negedge clk);
      re = 1'b1; raddr = a;
      @(negedge clk);
      re = 1'b0;
      check(rdata == model[a], $sformatf("addr %0d read %h exp %h", a, rdata, model[a]));
      raddr = ~a;
      @(negedge clk);
      check(rdata == model[a], $sformatf("addr %0d not held", a));
    end
    // write and read in the same clock, different addresses
    @(negedge clk);
    we = 1'b1; waddr = 4'd5; wdata = 16'hbeef; re = 1'b1; raddr = 4'd6;
    @(negedge clk);
    we = 1'b0; re = 1'b0;
    check(rdata == model[6], "read during write");
    model[5] = 16'hbeef;
    re = 1'b1; raddr = 4'd5;
    @(negedge clk);
    re = 1'b0;
    check(rdata == 16'hbeef, "written word not read back");
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
