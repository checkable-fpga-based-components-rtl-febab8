// Self-checking testbench of mod2_adder_stage: every output bit must equal
// its input bit when the register bit is 0 and its complement when it is 1.
module tb_mod2_adder_stage;
  localparam int Z = 16;
  logic [Z-1:0] x, r, y;
  int checks = 0, failures = 0;

  mod2_adder_stage #(.Z(Z)) dut (.x(x), .r(r), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      x = Z'($urandom);
      r = (t < 10) ? '0 : Z'($urandom);
      #1;
      for (int k = 0; k < Z; k++) begin
        checks++;
        if (y[k] !== (r[k] ? !x[k] : x[k])) begin
          failures++;
          $display("bit %0d: x=%b r=%b y=%b", k, x[k], r[k], y[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
