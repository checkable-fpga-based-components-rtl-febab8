// Workload driver for one size of checkable_multiplier (used by tb_workloads).
//
// Runs the n-bit multiplier with the original version and NV random versions.
// Under each version it multiplies every factor pair 0 .. 2^n - 1 and
// compares with a * b.  It also records, for every element (the sum and
// carry units of an element share one address), which physical memory
// positions the factor pairs address.  A pair is in normal mode for
// threshold S when both factors are below S, and in emergency mode
// otherwise.  The thresholds are S0 + k * DELTA, k = 0 .. 7.
//
// For every threshold it reports, over all LUT units:
//   normal   - positions read by normal-mode pairs under the original version
//   hazard   - positions read only by emergency pairs under the original version
//   remain   - of those, positions still not read by normal-mode pairs under
//              any of the versions
// It counts a failure for a wrong product, or if the versions do not reduce
// the hazardous positions at the first threshold.  This measures which memory
// cells are addressed, not whether a wrong bit would reach an output.
module workload_runner #(
  parameter int N     = 4,
  parameter int S0    = 2,
  parameter int DELTA = 1,
  parameter int NV    = 8
) (
  input  logic clk,
  input  logic start,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int Z    = 2 * N;
  localparam int NLUT = 2 * N * N;
  localparam int NE   = N * N;
  localparam int NS   = 8;

  logic            rst_n;
  logic [N-1:0]    a, b;
  logic [2*N-1:0]  p;
  logic            p_valid, ver_busy, seq_active;
  logic            tbl_we, seq_step;
  logic [3:0]      tbl_addr, seq_entry;
  logic [Z-1:0]    tbl_reg_code, reg_code;
  logic [NLUT-1:0] tbl_inv_mask;
  logic [4:0]      seq_len;

  checkable_multiplier #(.N(N)) dut (
    .clk(clk), .rst_n(rst_n), .a(a), .b(b), .p(p), .p_valid(p_valid),
    .tbl_we(tbl_we), .tbl_addr(tbl_addr), .tbl_reg_code(tbl_reg_code),
    .tbl_inv_mask(tbl_inv_mask), .seq_len(seq_len), .seq_step(seq_step),
    .seq_dwell(32'd0), .seq_entry(seq_entry), .seq_active(seq_active),
    .ver_busy(ver_busy), .reg_code(reg_code)
  );

  logic [3:0] addr [NE];
  for (genvar i = 0; i < N; i++) begin : g_i
    for (genvar j = 0; j < N; j++) begin : g_j
      assign addr[i*N+j] = dut.u_array.g_row[i].g_col[j].addr;
    end
  end

  logic [15:0] cov_n0  [NS][NE];  // normal mode, original version
  logic [15:0] cov_all0 [NE];     // any pair, original version
  logic [15:0] cov_nv  [NS][NE];  // normal mode, any version

  function automatic bit is_output_unit(int k);
    int i, j;
    i = (k / 2) / N; j = (k / 2) % N;
    if (k % 2 == 0) return (j == 0) || (i == N - 1);
    return (i == N - 1) && (j == N - 1);
  endfunction

  task automatic apply(input logic [Z-1:0] r, input logic [NLUT-1:0] m);
    @(negedge clk);
    tbl_we = 1'b1; tbl_addr = '0; tbl_reg_code = r; tbl_inv_mask = m; seq_len = 5'd1;
    @(negedge clk);
    tbl_we = 1'b0; seq_step = 1'b1;
    @(negedge clk);
    seq_step = 1'b0;
    @(negedge clk);
    while (!p_valid) @(negedge clk);
    checks++;
    if (reg_code !== r) begin failures++; $display("n=%0d: register %h, expected %h", N, reg_code, r); end
  endtask

  task automatic sweep(input int v);
    for (int x = 0; x < 2**N; x++) begin
      for (int y = 0; y < 2**N; y++) begin
        a = N'(x); b = N'(y);
        #1;
        checks++;
        if (p !== (2*N)'(x) * (2*N)'(y)) begin
          failures++;
          if (failures < 10) $display("n=%0d version %0d: %0d * %0d, got %0d", N, v, x, y, p);
        end
        for (int e = 0; e < NE; e++) begin
          if (v == 0) cov_all0[e] |= 16'd1 << addr[e];
          for (int s = 0; s < NS; s++) begin
            if (x < S0 + s * DELTA && y < S0 + s * DELTA) begin
              if (v == 0) cov_n0[s][e] |= 16'd1 << addr[e];
              cov_nv[s][e] |= 16'd1 << addr[e];
            end
          end
        end
      end
    end
  endtask

  initial begin
    logic [NLUT-1:0] m;
    int normal, hazard, remain;
    rst_n = 1'b0; a = '0; b = '0; done = 1'b0; checks = 0; failures = 0;
    tbl_we = 1'b0; tbl_addr = '0; tbl_reg_code = '0; tbl_inv_mask = '0;
    seq_len = '0; seq_step = 1'b0;
    for (int e = 0; e < NE; e++) begin
      cov_all0[e] = '0;
      for (int s = 0; s < NS; s++) begin cov_n0[s][e] = '0; cov_nv[s][e] = '0; end
    end
    wait (start);
    @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    while (!p_valid) @(negedge clk);
    sweep(0);
    for (int v = 1; v <= NV; v++) begin
      for (int k = 0; k < NLUT; k++) m[k] = 1'($urandom) && !is_output_unit(k);
      apply(Z'($urandom), m);
      sweep(v);
    end
    for (int s = 0; s < NS; s++) begin
      normal = 0; hazard = 0; remain = 0;
      for (int e = 0; e < NE; e++) begin
        // Two units (sum, carry) per element.
        normal += 2 * $countones(cov_n0[s][e]);
        hazard += 2 * $countones(cov_all0[e] & ~cov_n0[s][e]);
        remain += 2 * $countones(cov_all0[e] & ~cov_n0[s][e] & ~cov_nv[s][e]);
      end
      $display("n=%0d S=%0d: normal %0d, hazard %0d, remain %0d of %0d positions",
               N, S0 + s * DELTA, normal, hazard, remain, 16 * NLUT);
      if (s == 0) begin
        checks++;
        if (remain >= hazard) begin failures++; $display("n=%0d: versions moved nothing", N); end
      end
      checks++;
      if (remain > hazard) begin failures++; $display("n=%0d: more hazardous positions", N); end
    end
    done = 1'b1;
  end
endmodule
