// End-to-end testbench of checkable_multiplier at its default size (N = 8).
//
// The multiplier is run on a sequence of program-code versions: the original
// one loaded after reset, versions with only a register code, only inverted
// LUT pairs, both, and an inversion mask that also names output units.  Under
// each version the tb checks the product against a * b for normal-mode
// factors (below the threshold S = 2, i.e. 0 and 1), emergency-range factors
// and random factors, checks that p_valid is low and the register holds the
// new code after a change, and records which physical memory positions of
// every LUT unit the normal-mode factors reach.  Versions are written into
// the sequencer table and applied with a step pulse; a last phase lets the
// sequencer cycle through four table entries on its own (dwell timer) while
// random products are checked in every valid cycle.
//
// Hidden-fault scenario: one memory cell of an internal LUT unit is stuck at
// 0.  Under the original version normal-mode factors never read it (no error,
// the fault is hidden) while emergency-range factors do.  A version that
// relocates the bit normal-mode factors read onto that cell, and inverts the
// unit, makes the fault show as a wrong product in normal mode.  A second
// scenario does the same for a 2:1 multiplexer of that unit stuck on one
// input, revealed by a version with register code zero.
//
// Mechanisms counted, each of which must occur: version change, non-zero
// register code, inverted pair, output units dropped from a mask, step
// ignored while busy, p_valid low during a change, relocation of a
// normal-mode read to a position not read under the original version,
// hidden fault, fault revealed in normal mode (memory cell and multiplexer),
// automatic advance, wrap of the sequence to entry 0.
module tb_checkable_multiplier;
  localparam int N    = 8;
  localparam int Z    = 2 * N;
  localparam int NLUT = 2 * N * N;
  localparam int K    = 16;

  logic            clk = 1'b0;
  logic            rst_n;
  logic [N-1:0]    a, b;
  logic [2*N-1:0]  p;
  logic            p_valid, ver_busy;
  logic [Z-1:0]    reg_code;
  logic            tbl_we, seq_step, seq_active;
  logic [3:0]      tbl_addr, seq_entry;
  logic [Z-1:0]    tbl_reg_code;
  logic [NLUT-1:0] tbl_inv_mask;
  logic [4:0]      seq_len;
  logic [31:0]     seq_dwell;
  int checks = 0, failures = 0;

  checkable_multiplier dut (
    .clk(clk), .rst_n(rst_n), .a(a), .b(b), .p(p), .p_valid(p_valid),
    .tbl_we(tbl_we), .tbl_addr(tbl_addr), .tbl_reg_code(tbl_reg_code),
    .tbl_inv_mask(tbl_inv_mask), .seq_len(seq_len), .seq_step(seq_step),
    .seq_dwell(seq_dwell), .seq_entry(seq_entry), .seq_active(seq_active),
    .ver_busy(ver_busy), .reg_code(reg_code)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Physical memory positions read by every LUT unit while `track` is set.
  bit          track;
  logic [15:0] cov_orig [N*N*2];  // under the original version
  logic [15:0] cov_all  [N*N*2];  // under any version

  for (genvar i = 0; i < N; i++) begin : g_i
    for (genvar j = 0; j < N; j++) begin : g_j
      always @(negedge clk) begin
        if (track && p_valid) begin
          // Both units of an element share one address.
          if (reg_code == '0 && dut.u_ctrl.mask_q == '0)
            cov_orig[2*(i*N+j)] <= cov_orig[2*(i*N+j)] | (16'd1 << dut.u_array.g_row[i].g_col[j].addr);
          cov_all[2*(i*N+j)] <= cov_all[2*(i*N+j)] | (16'd1 << dut.u_array.g_row[i].g_col[j].addr);
        end
      end
    end
  end

  int n_change, n_regcode, n_inverted, n_outmask, n_ignored, n_invalid, n_reloc;
  int n_hidden, n_revealed, n_auto, n_wrap, n_mux_hidden, n_mux_revealed;

  function automatic bit is_output_unit(int k);
    int i, j;
    i = (k / 2) / N; j = (k / 2) % N;
    if (k % 2 == 0) return (j == 0) || (i == N - 1);
    return (i == N - 1) && (j == N - 1);
  endfunction

  task automatic change_version(input logic [Z-1:0] r, input logic [NLUT-1:0] m, input bit poke);
    int cycles;
    bit saw_invalid;
    bit internal;
    bit outside;
    @(negedge clk);
    tbl_we = 1'b1; tbl_addr = '0; tbl_reg_code = r; tbl_inv_mask = m; seq_len = 5'd1;
    @(negedge clk);
    tbl_we = 1'b0; tbl_reg_code = ~r; tbl_inv_mask = ~m;
    seq_step = 1'b1;
    @(negedge clk);
    seq_step = 1'b0;
    cycles = 1;
    if (poke) begin
      // A second step while busy must not be taken: the table entry is
      // overwritten meanwhile, and the register must still get r.
      @(negedge clk);
      cycles++;
      tbl_we = 1'b1; tbl_reg_code = ~r; tbl_inv_mask = '0;
      seq_step = 1'b1;
      @(negedge clk);
      cycles++;
      tbl_we = 1'b0; seq_step = 1'b0;
    end
    saw_invalid = 1'b0;
    while ((!p_valid || cycles < 3) && cycles < 4 * NLUT) begin
      saw_invalid |= ver_busy;
      @(negedge clk);
      cycles++;
    end
    n_change++;
    if (saw_invalid) n_invalid++;
    checks++;
    if (!p_valid || reg_code !== r) begin
      failures++;
      $display("version change: valid %b register %h expected %h", p_valid, reg_code, r);
    end else if (poke) n_ignored++;
    checks++;
    if (!poke && cycles != Z + NLUT + 2) begin
      failures++; $display("version change took %0d cycles", cycles);
    end
    if (r != '0) n_regcode++;
    internal = 1'b0; outside = 1'b0;
    for (int k = 0; k < NLUT; k++) begin
      if (m[k] && !is_output_unit(k)) internal = 1'b1;
      if (m[k] && is_output_unit(k))  outside  = 1'b1;
    end
    if (internal) n_inverted++;
    if (outside)  n_outmask++;
  endtask

  task automatic try(input logic [N-1:0] x, input logic [N-1:0] y);
    a = x; b = y;
    @(negedge clk);
    checks++;
    if (p !== (2*N)'(x) * (2*N)'(y)) begin
      failures++;
      if (failures < 10) $display("%0d * %0d = %0d, got %0d", x, y, x * y, p);
    end
  endtask

  task automatic run_normal();
    track = 1'b1;
    for (int x = 0; x < 2; x++) for (int y = 0; y < 2; y++) try(N'(x), N'(y));
    track = 1'b0;
  endtask

  task automatic run_mixed();
    run_normal();
    try('1, '1); try('1, 8'd2); try(8'd200, 8'd37);
    for (int t = 0; t < 200; t++) try(N'($urandom), N'($urandom));
  endtask

  function automatic logic [NLUT-1:0] random_mask();
    logic [NLUT-1:0] m;
    for (int w = 0; w < NLUT; w += 32) m[w +: 32] = $urandom;
    return m;
  endfunction

  initial begin
    int errs_normal, errs_emerg;
    int fi, fj, fk, k_c, k_d;
    logic [Z-1:0] r;
    logic [NLUT-1:0] m;
    rst_n = 1'b0; a = '0; b = '0;
    tbl_we = 1'b0; tbl_addr = '0; tbl_reg_code = '0; tbl_inv_mask = '0;
    seq_len = '0; seq_step = 1'b0; seq_dwell = '0;
    track = 1'b0;
    foreach (cov_orig[k]) begin cov_orig[k] = '0; cov_all[k] = '0; end
    n_change = 0; n_regcode = 0; n_inverted = 0; n_outmask = 0; n_ignored = 0;
    n_invalid = 0; n_reloc = 0; n_hidden = 0; n_revealed = 0; n_auto = 0; n_wrap = 0;
    n_mux_hidden = 0; n_mux_revealed = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    checks++;
    @(negedge clk);
    if (p_valid) begin failures++; $display("p_valid before the first load"); end
    while (!p_valid) @(negedge clk);
    run_mixed();

    // Versions.
    change_version(Z'($urandom), '0, 1'b0);
    run_mixed();
    m = random_mask();
    for (int k = 0; k < NLUT; k++) if (is_output_unit(k)) m[k] = 1'b0;
    change_version('0, m, 1'b0);
    run_mixed();
    change_version(Z'($urandom), random_mask(), 1'b1);
    run_mixed();
    change_version(Z'($urandom), '1, 1'b0);
    run_mixed();
    for (int t = 0; t < 6; t++) begin
      change_version(Z'($urandom), random_mask(), 1'b0);
      run_mixed();
    end

    // Relocation: normal-mode reads that reach positions unused under the
    // original version.
    for (int k = 0; k < NLUT; k += 2) n_reloc += $countones(cov_all[k] & ~cov_orig[k]);

    // Hidden fault: sum unit of element (3, 3) (fed by a_3, b_3, the sum of
    // element (2, 4) and the carry of element (3, 2)), cell F stuck at 0.
    fi = 3; fj = 3;
    fk = 2 * (fi * N + fj);
    k_c = 2 * ((fi - 1) * N + fj + 1);
    k_d = 2 * (fi * N + fj - 1) + 1;
    change_version('0, '0, 1'b0);
    checks++;
    if (cov_orig[fk][15]) begin failures++; $display("cell F is read in normal mode"); end
    force dut.u_array.g_row[3].g_col[3].u_sum.mem[15] = 1'b0;
    errs_normal = 0; errs_emerg = 0;
    for (int x = 0; x < 2; x++) for (int y = 0; y < 2; y++) begin
      a = N'(x); b = N'(y); @(negedge clk);
      if (p !== (2*N)'(x) * (2*N)'(y)) errs_normal++;
    end
    for (int x = 2; x < 2**N; x++) for (int y = 2; y < 2**N; y += 3) begin
      a = N'(x); b = N'(y); @(negedge clk);
      if (p !== (2*N)'(x) * (2*N)'(y)) errs_emerg++;
    end
    checks++;
    if (errs_normal != 0 || errs_emerg == 0) begin
      failures++; $display("fault not hidden: %0d normal, %0d emergency errors", errs_normal, errs_emerg);
    end else n_hidden++;
    // Version F for the unit (all four inputs inverted) and the unit itself
    // inverted: normal-mode address 0 now reads physical cell F, which must
    // hold the inverse of the original bit 0, i.e. 1.
    r = '0; r[fj] = 1'b1; r[N + fi] = 1'b1;
    m = '0; m[k_c] = 1'b1; m[k_d] = 1'b1; m[fk] = 1'b1;
    change_version(r, m, 1'b0);
    errs_normal = 0;
    for (int x = 0; x < 2; x++) for (int y = 0; y < 2; y++) begin
      a = N'(x); b = N'(y); @(negedge clk);
      if (p !== (2*N)'(x) * (2*N)'(y)) errs_normal++;
    end
    checks++;
    if (errs_normal == 0) begin failures++; $display("fault not revealed in normal mode"); end
    else n_revealed++;
    release dut.u_array.g_row[3].g_col[3].u_sum.mem[15];
    change_version('0, '0, 1'b0);  // rewrite the cell that was held
    run_mixed();

    // Hidden multiplexer fault: in the same unit the last 2:1 multiplexer
    // (steered by input D) is stuck on its D = 0 side.  Normal-mode factors
    // only address D = 0, so the fault is hidden; a version with register
    // code zero that inverts the carry unit feeding D moves normal-mode reads
    // to D = 1, where the two halves of the memory differ.  The stuck
    // multiplexer is modelled by holding the D = 1 half of the memory equal
    // to the D = 0 half, which is what the unit's output then shows.
    force dut.u_array.g_row[3].g_col[3].u_sum.mem[15:8] = dut.u_array.g_row[3].g_col[3].u_sum.mem[7:0];
    errs_normal = 0; errs_emerg = 0;
    for (int x = 0; x < 2; x++) for (int y = 0; y < 2; y++) begin
      a = N'(x); b = N'(y); @(negedge clk);
      if (p !== (2*N)'(x) * (2*N)'(y)) errs_normal++;
    end
    for (int x = 2; x < 2**N; x++) for (int y = 2; y < 2**N; y += 3) begin
      a = N'(x); b = N'(y); @(negedge clk);
      if (p !== (2*N)'(x) * (2*N)'(y)) errs_emerg++;
    end
    checks++;
    if (errs_normal != 0 || errs_emerg == 0) begin
      failures++; $display("mux fault not hidden: %0d normal, %0d emergency errors", errs_normal, errs_emerg);
    end else n_mux_hidden++;
    m = '0; m[k_d] = 1'b1;
    change_version('0, m, 1'b0);
    errs_normal = 0;
    for (int x = 0; x < 2; x++) for (int y = 0; y < 2; y++) begin
      a = N'(x); b = N'(y); @(negedge clk);
      if (p !== (2*N)'(x) * (2*N)'(y)) errs_normal++;
    end
    checks++;
    if (errs_normal == 0) begin failures++; $display("mux fault not revealed in normal mode"); end
    else n_mux_revealed++;
    release dut.u_array.g_row[3].g_col[3].u_sum.mem[15:8];
    change_version('0, '0, 1'b0);
    run_mixed();

    // Automatic sequence: four entries, 60 cycles each, for 12 changes.
    begin
      logic [Z-1:0]    tr [4];
      logic [NLUT-1:0] tm [4];
      int expect_entry, changes, guard;
      bit was_valid;
      for (int e = 0; e < 4; e++) begin
        tr[e] = Z'($urandom);
        tm[e] = random_mask();
        @(negedge clk);
        tbl_we = 1'b1; tbl_addr = 4'(e); tbl_reg_code = tr[e]; tbl_inv_mask = tm[e];
      end
      @(negedge clk);
      tbl_we = 1'b0;
      seq_len = 5'd4; seq_dwell = 32'd60;
      // The entry last loaded by a step is 0, so the sequence goes on at 1.
      expect_entry = 1; changes = 0; guard = 0; was_valid = 1'b1;
      while (changes < 12 && guard < 20 * (Z + NLUT + 60)) begin
        a = N'($urandom); b = N'($urandom);
        @(negedge clk);
        guard++;
        if (p_valid) begin
          checks++;
          if (p !== (2*N)'(a) * (2*N)'(b)) begin
            failures++;
            if (failures < 10) $display("auto: %0d * %0d, got %0d", a, b, p);
          end
          if (!was_valid) begin
            // A change has just completed.
            changes++;
            n_auto++;
            checks++;
            if (int'(seq_entry) != expect_entry || reg_code !== tr[expect_entry]) begin
              failures++;
              $display("auto: entry %0d register %h, expected entry %0d", seq_entry, reg_code, expect_entry);
            end
            if (expect_entry == 0) n_wrap++;
            expect_entry = (expect_entry + 1) % 4;
          end
        end
        was_valid = p_valid;
      end
      seq_dwell = '0;
    end

    $display("version changes %0d, register codes %0d, inverted pairs %0d, output units dropped %0d",
             n_change, n_regcode, n_inverted, n_outmask);
    $display("ignored requests %0d, invalid windows %0d, relocated positions %0d, hidden %0d, revealed %0d",
             n_ignored, n_invalid, n_reloc, n_hidden, n_revealed);
    $display("automatic advances %0d, wraps %0d, mux fault hidden %0d revealed %0d",
             n_auto, n_wrap, n_mux_hidden, n_mux_revealed);
    checks++; if (n_change   == 0) begin failures++; $display("no version change"); end
    checks++; if (n_regcode  == 0) begin failures++; $display("no register code"); end
    checks++; if (n_inverted == 0) begin failures++; $display("no inverted pair"); end
    checks++; if (n_outmask  == 0) begin failures++; $display("no output unit dropped"); end
    checks++; if (n_ignored  == 0) begin failures++; $display("no ignored request"); end
    checks++; if (n_invalid  == 0) begin failures++; $display("no invalid window"); end
    checks++; if (n_reloc    == 0) begin failures++; $display("no relocation"); end
    checks++; if (n_hidden   == 0) begin failures++; $display("no hidden fault"); end
    checks++; if (n_revealed == 0) begin failures++; $display("no revealed fault"); end
    checks++; if (n_mux_hidden   == 0) begin failures++; $display("no hidden mux fault"); end
    checks++; if (n_mux_revealed == 0) begin failures++; $display("no revealed mux fault"); end
    checks++; if (n_auto     == 0) begin failures++; $display("no automatic advance"); end
    checks++; if (n_wrap     == 0) begin failures++; $display("no wrap of the sequence"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
