// Self-checking testbench of version_controller at N = 8 (Z = 16 register
// bits, 128 LUT units).  A monitor collects the serial register bits and the
// LUT writes; for every version the tb checks that the register code went out
// most significant bit first in Z cycles, that every unit was written once,
// in index order, with a code whose bit x equals the element's sum or carry
// at the inputs x ^ v (inverted when the unit is inverted), and that ready
// rises Z + 2N^2 clock edges after reset is released, and Z + 2N^2 + 1
// edges after the edge that takes a request.  The tb derives each unit's
// input sources and the set of output units from the array's wiring rules on
// its own.  A request made while busy must be ignored.
module tb_version_controller;
  localparam int N    = 8;
  localparam int Z    = 2 * N;
  localparam int NLUT = 2 * N * N;
  localparam int SELW = $clog2(NLUT);

  logic            clk = 1'b0;
  logic            rst_n;
  logic            req;
  logic [Z-1:0]    reg_code;
  logic [NLUT-1:0] inv_mask;
  logic            busy, ready, sr_din, sr_sync, cfg_we;
  logic [SELW-1:0] cfg_sel;
  logic [15:0]     cfg_code;
  int checks = 0, failures = 0;

  version_controller #(.N(N)) dut (
    .clk(clk), .rst_n(rst_n), .req(req), .reg_code(reg_code), .inv_mask(inv_mask),
    .busy(busy), .ready(ready), .sr_din(sr_din), .sr_sync(sr_sync),
    .cfg_we(cfg_we), .cfg_sel(cfg_sel), .cfg_code(cfg_code)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Wiring of the array: source unit of inputs C and D (-1: constant zero).
  int  src_c [NLUT];
  int  src_d [NLUT];
  bit  is_out [NLUT];

  initial begin
    for (int i = 0; i < N; i++) begin
      for (int j = 0; j < N; j++) begin
        for (int t = 0; t < 2; t++) begin
          int k;
          k = 2 * (i * N + j) + t;
          src_c[k] = (i == 0) ? -1 : (j < N - 1) ? 2 * ((i - 1) * N + j + 1) : 2 * ((i - 1) * N + N - 1) + 1;
          src_d[k] = (j == 0) ? -1 : 2 * (i * N + j - 1) + 1;
        end
      end
    end
    // A unit is an output unit when no other unit reads it.
    for (int k = 0; k < NLUT; k++) is_out[k] = 1'b1;
    for (int k = 0; k < NLUT; k++) begin
      if (src_c[k] >= 0) is_out[src_c[k]] = 1'b0;
      if (src_d[k] >= 0) is_out[src_d[k]] = 1'b0;
    end
  end

  // Monitor.
  logic [Z-1:0] shifted;
  int           n_shift, n_write;
  logic [15:0]  written [NLUT];
  bit           order_ok;

  always @(posedge clk) begin
    if (sr_sync && rst_n) begin
      shifted <= {shifted[Z-2:0], sr_din};
      n_shift <= n_shift + 1;
    end
    if (cfg_we) begin
      if (int'(cfg_sel) != n_write) order_ok <= 1'b0;
      written[cfg_sel] <= cfg_code;
      n_write <= n_write + 1;
    end
  end

  function automatic logic [15:0] expected(int k, logic [Z-1:0] r, logic [NLUT-1:0] m);
    logic [3:0] v, t;
    logic inv;
    int i, j, total;
    logic [15:0] code;
    i = (k / 2) / N; j = (k / 2) % N;
    v[0] = r[j];
    v[1] = r[N + i];
    v[2] = (src_c[k] < 0) ? 1'b0 : (m[src_c[k]] && !is_out[src_c[k]]);
    v[3] = (src_d[k] < 0) ? 1'b0 : (m[src_d[k]] && !is_out[src_d[k]]);
    inv  = m[k] && !is_out[k];
    for (int x = 0; x < 16; x++) begin
      t = 4'(x) ^ v;
      total = ((t[0] && t[1]) ? 1 : 0) + (t[2] ? 1 : 0) + (t[3] ? 1 : 0);
      code[x] = inv ^ ((k % 2 == 1) ? (total >= 2) : (total % 2 == 1));
    end
    return code;
  endfunction

  task automatic check_version(input logic [Z-1:0] r, input logic [NLUT-1:0] m, input int cycles,
                             input int exp_cycles);
    checks++;
    if (cycles != exp_cycles) begin failures++; $display("ready after %0d cycles", cycles); end
    checks++;
    if (n_shift != Z || shifted !== r) begin
      failures++; $display("shifted %0d bits, code %h, expected %h", n_shift, shifted, r);
    end
    checks++;
    if (n_write != NLUT || !order_ok) begin failures++; $display("%0d writes, order %b", n_write, order_ok); end
    for (int k = 0; k < NLUT; k++) begin
      checks++;
      if (written[k] !== expected(k, r, m)) begin
        failures++;
        if (failures < 10) $display("unit %0d: code %h expected %h", k, written[k], expected(k, r, m));
      end
    end
  endtask

  task automatic clear_monitor();
    n_shift = 0; n_write = 0; order_ok = 1'b1; shifted = '0;
  endtask

  // Waits for ready, counting rising clock edges; checks busy meanwhile.
  task automatic wait_ready(output int cycles);
    cycles = 0;
    do begin
      @(posedge clk); #1;
      cycles++;
      if (!ready) begin
        checks++;
        if (!busy) begin failures++; $display("not ready yet not busy"); end
      end
    end while (!ready && cycles < 10 * NLUT);
  endtask

  initial begin
    int cycles;
    logic [Z-1:0] r;
    logic [NLUT-1:0] m;
    rst_n = 1'b0; req = 1'b0; reg_code = '0; inv_mask = '0;
    clear_monitor();
    @(negedge clk); @(negedge clk);
    rst_n = 1'b1;
    // The original version is loaded after reset.
    wait_ready(cycles);
    check_version('0, '0, cycles, Z + NLUT);
    for (int t = 0; t < 8; t++) begin
      r = Z'($urandom);
      for (int w = 0; w < NLUT; w += 32) m[w +: 32] = $urandom;
      if (t == 1) m = '1;
      if (t == 2) r = '0;
      if (t == 3) m = '0;
      @(negedge clk);
      clear_monitor();
      req = 1'b1; reg_code = r; inv_mask = m;
      @(negedge clk);
      req = 1'b0; reg_code = ~r; inv_mask = ~m;
      checks++;
      if (!busy || ready) begin failures++; $display("busy %b ready %b after req", busy, ready); end
      // A second request while busy is ignored.
      if (t == 4) begin
        @(negedge clk); req = 1'b1;
        @(negedge clk); req = 1'b0;
      end
      wait_ready(cycles);
      check_version(r, m, cycles + ((t == 4) ? 3 : 1), Z + NLUT + 1);
      // Ready stays while idle.
      repeat (3) @(negedge clk);
      checks++;
      if (!ready || busy || sr_sync || cfg_we) begin failures++; $display("idle outputs wrong"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
