// Self-checking testbench of lut_array_multiplier at N = 8.
// The tb writes every LUT unit through the configuration port with codes it
// builds from the arithmetic of an element (sum and carry of a&b + c + d),
// then compares products with a * b: corner operands, a random sweep, and
// the same again under input versions in which every a input, every b input
// or both arrive inverted (the tb drives ~a / ~b and loads codes whose bit x
// holds the element's value at x ^ v).  It also checks the bit-relocation
// example of the method: version E moves original bit 3 to position D.
module tb_lut_array_multiplier;
  localparam int N    = 8;
  localparam int NLUT = 2 * N * N;
  localparam int SELW = $clog2(NLUT);

  logic             clk = 1'b0;
  logic             cfg_we;
  logic [SELW-1:0]  cfg_sel;
  logic [15:0]      cfg_code;
  logic [N-1:0]     a, b;
  logic [2*N-1:0]   p;
  int checks = 0, failures = 0;

  lut_array_multiplier #(.N(N)) dut (
    .clk(clk), .cfg_we(cfg_we), .cfg_sel(cfg_sel), .cfg_code(cfg_code),
    .a(a), .b(b), .p(p)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] element_code(bit carry, logic [3:0] v);
    logic [15:0] code;
    int unsigned total;
    logic [3:0] t;
    for (int x = 0; x < 16; x++) begin
      t       = 4'(x) ^ v;
      total   = (t[0] && t[1] ? 1 : 0) + (t[2] ? 1 : 0) + (t[3] ? 1 : 0);
      code[x] = carry ? (total >= 2) : (total % 2 == 1);
    end
    return code;
  endfunction

  task automatic load_all(input logic [3:0] v);
    for (int k = 0; k < NLUT; k++) begin
      @(negedge clk);
      cfg_we = 1'b1; cfg_sel = SELW'(k); cfg_code = element_code(k % 2 == 1, v);
    end
    @(negedge clk);
    cfg_we = 1'b0; cfg_code = 16'($urandom);
  endtask

  task automatic try(input logic [N-1:0] x, input logic [N-1:0] y, input bit inv_a, input bit inv_b);
    a = inv_a ? ~x : x;
    b = inv_b ? ~y : y;
    #1;
    checks++;
    if (p !== (2*N)'(x) * (2*N)'(y)) begin
      failures++;
      if (failures < 10) $display("%0d * %0d (inv %b%b): got %0d", x, y, inv_b, inv_a, p);
    end
  endtask

  initial begin
    logic [15:0] orig;
    cfg_we = 1'b0; cfg_sel = '0; cfg_code = '0; a = '0; b = '0;
    // Relocation example: version E (inputs B, C, D inverted) moves bit 3 to D.
    orig = 16'($urandom);
    checks++;
    if (cm_pkg::version_code(orig, 4'hE, 1'b0)[4'hD] !== orig[3]) begin
      failures++; $display("version E does not move bit 3 to D");
    end
    for (int vi = 0; vi < 4; vi++) begin
      bit ia, ib;
      ia = vi[0]; ib = vi[1];
      load_all({2'b00, ib, ia});
      for (int x = 0; x < 2**N; x += 17) begin
        for (int y = 0; y < 2**N; y += 15) try(N'(x), N'(y), ia, ib);
      end
      try('1, '1, ia, ib);
      try('0, '1, ia, ib);
      try('1, '0, ia, ib);
      for (int t = 0; t < 1000; t++) try(N'($urandom), N'($urandom), ia, ib);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
