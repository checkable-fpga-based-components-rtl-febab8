// Self-checking testbench of lut4: loads random program codes and reads
// every address, checking the output against the loaded code; checks that a
// code is held while cfg_we is low and that the read is combinational.
module tb_lut4;
  logic        clk = 1'b0;
  logic        cfg_we;
  logic [15:0] cfg_code;
  logic [3:0]  addr;
  logic        y;
  int checks = 0, failures = 0;

  lut4 dut (.clk(clk), .cfg_we(cfg_we), .cfg_code(cfg_code), .addr(addr), .y(y));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all(input logic [15:0] code);
    for (int x = 0; x < 16; x++) begin
      addr = 4'(x);
      #1;
      checks++;
      if (y !== ((code >> x) & 16'd1) != 0) begin
        failures++;
        $display("addr %h: y=%b, code %h", x, y, code);
      end
    end
  endtask

  initial begin
    logic [15:0] code;
    cfg_we = 1'b0; cfg_code = '0; addr = '0;
    // Walking ones: each memory bit alone.
    for (int k = 0; k < 16; k++) begin
      code = 16'd1 << k;
      @(negedge clk); cfg_we = 1'b1; cfg_code = code;
      @(negedge clk); cfg_we = 1'b0; cfg_code = ~code;
      check_all(code);
    end
    // Random codes, and a write with cfg_we low must not land.
    for (int t = 0; t < 40; t++) begin
      code = 16'($urandom);
      @(negedge clk); cfg_we = 1'b1; cfg_code = code;
      @(negedge clk); cfg_we = 1'b0; cfg_code = 16'($urandom);
      @(negedge clk);
      check_all(code);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
