// Self-checking testbench of version_shift_register: reset to zero, serial
// loading of random codes most significant bit first, holding while sync is
// low, against a bit-queue model.
module tb_version_shift_register;
  localparam int Z = 16;
  logic         clk = 1'b0;
  logic         rst_n;
  logic         sync, din;
  logic [Z-1:0] q;
  int checks = 0, failures = 0;

  version_shift_register #(.Z(Z)) dut (.clk(clk), .rst_n(rst_n), .sync(sync), .din(din), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit model [Z];  // model[0] = most recent bit

  task automatic compare();
    for (int k = 0; k < Z; k++) begin
      checks++;
      if (q[k] !== model[k]) begin
        failures++;
        $display("bit %0d: q=%b model=%b", k, q[k], model[k]);
      end
    end
  endtask

  initial begin
    logic [Z-1:0] code;
    rst_n = 1'b0; sync = 1'b0; din = 1'b0;
    foreach (model[k]) model[k] = 1'b0;
    #12 rst_n = 1'b1;
    @(negedge clk);
    compare();
    for (int t = 0; t < 30; t++) begin
      code = Z'($urandom);
      for (int k = Z - 1; k >= 0; k--) begin
        @(negedge clk); sync = 1'b1; din = code[k];
        for (int m = Z - 1; m > 0; m--) model[m] = model[m-1];
        model[0] = code[k];
      end
      @(negedge clk); sync = 1'b0; din = ~din;
      compare();
      checks++;
      if (q !== code) begin failures++; $display("code %h loaded as %h", code, q); end
      repeat (3) @(negedge clk);  // hold
      compare();
    end
    // Random sync pattern.
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      sync = 1'($urandom); din = 1'($urandom);
      if (sync) begin
        for (int m = Z - 1; m > 0; m--) model[m] = model[m-1];
        model[0] = din;
      end
      @(posedge clk); #1;
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
