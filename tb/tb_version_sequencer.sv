// Self-checking testbench of version_sequencer (N = 8, K = 16).  A small
// model of the version controller answers each req with BUSY cycles of busy
// and then holds ready.  The tb checks: req is a one-cycle pulse on the edge
// after a step, carrying the codes of the expected table entry; entries run
// 0, 1, .., seq_len-1 and wrap; steps during busy and with seq_len = 0 are
// dropped; with dwell = D the next req follows D ready cycles.
module tb_version_sequencer;
  localparam int N    = 8;
  localparam int K    = 16;
  localparam int Z    = 2 * N;
  localparam int NLUT = 2 * N * N;
  localparam int BUSY = 9;

  logic            clk = 1'b0;
  logic            rst_n;
  logic            tbl_we;
  logic [3:0]      tbl_addr;
  logic [Z-1:0]    tbl_reg_code;
  logic [NLUT-1:0] tbl_inv_mask;
  logic [4:0]      seq_len;
  logic            step;
  logic [31:0]     dwell;
  logic            ctrl_busy, ctrl_ready;
  logic            req;
  logic [Z-1:0]    reg_code;
  logic [NLUT-1:0] inv_mask;
  logic [3:0]      entry;
  logic            active;
  int checks = 0, failures = 0;

  version_sequencer #(.N(N), .K(K)) dut (
    .clk(clk), .rst_n(rst_n), .tbl_we(tbl_we), .tbl_addr(tbl_addr),
    .tbl_reg_code(tbl_reg_code), .tbl_inv_mask(tbl_inv_mask), .seq_len(seq_len),
    .step(step), .dwell(dwell), .ctrl_busy(ctrl_busy), .ctrl_ready(ctrl_ready),
    .req(req), .reg_code(reg_code), .inv_mask(inv_mask), .entry(entry), .active(active)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Controller model.
  int busy_left;
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_left <= 0;
    end else if (req && busy_left == 0) begin
      busy_left <= BUSY;
    end else if (busy_left > 0) begin
      busy_left <= busy_left - 1;
    end
  end
  assign ctrl_busy  = (busy_left > 0);
  assign ctrl_ready = rst_n && (busy_left == 0);

  // Reference table.
  logic [Z-1:0]    ref_r [K];
  logic [NLUT-1:0] ref_m [K];

  // Requests seen.
  int n_req;
  logic [Z-1:0]    last_r;
  logic [NLUT-1:0] last_m;
  int              last_req_cycle, cycle;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (req) begin
      n_req <= n_req + 1;
      last_r <= reg_code;
      last_m <= inv_mask;
      last_req_cycle <= cycle;
    end
  end

  task automatic write_entry(input int e);
    ref_r[e] = Z'($urandom);
    for (int w = 0; w < NLUT; w += 32) ref_m[e][w +: 32] = $urandom;
    @(negedge clk);
    tbl_we = 1'b1; tbl_addr = 4'(e); tbl_reg_code = ref_r[e]; tbl_inv_mask = ref_m[e];
    @(negedge clk);
    tbl_we = 1'b0; tbl_reg_code = '0; tbl_inv_mask = '0;
  endtask

  task automatic expect_req(input int e, input int n_before);
    checks++;
    if (n_req != n_before + 1) begin failures++; $display("%0d requests, expected %0d", n_req, n_before + 1); end
    checks++;
    if (int'(entry) != e || !active || last_r !== ref_r[e] || last_m !== ref_m[e]) begin
      failures++; $display("entry %0d active %b, expected entry %0d codes", entry, active, e);
    end
  endtask

  task automatic pulse_step();
    @(negedge clk); step = 1'b1;
    @(negedge clk); step = 1'b0;
  endtask

  task automatic wait_idle();
    while (ctrl_busy || req) @(negedge clk);
  endtask

  initial begin
    int n_before, t_start;
    rst_n = 1'b0; tbl_we = 1'b0; tbl_addr = '0; tbl_reg_code = '0; tbl_inv_mask = '0;
    seq_len = '0; step = 1'b0; dwell = '0; n_req = 0; cycle = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int e = 0; e < K; e++) write_entry(e);
    // seq_len = 0: a step does nothing.
    pulse_step();
    repeat (3) @(negedge clk);
    checks++;
    if (n_req != 0 || active) begin failures++; $display("step taken with seq_len 0"); end
    // Manual steps through five entries, twice round.
    seq_len = 5'd5;
    for (int t = 0; t < 11; t++) begin
      n_before = n_req;
      pulse_step();
      checks++;
      if (!req) begin failures++; $display("req not on the edge after step"); end
      @(negedge clk);
      checks++;
      if (req) begin failures++; $display("req longer than one cycle"); end
      expect_req(t % 5, n_before);
      // A step while the controller is busy is dropped.
      if (t == 3) begin
        pulse_step();
        checks++;
        if (n_req != n_before + 1) begin failures++; $display("step during busy taken"); end
      end
      wait_idle();
    end
    // Rewrite an entry while running, then a full sequence of sixteen.
    write_entry(1);
    seq_len = 5'd16;
    for (int t = 0; t < 16; t++) begin
      n_before = n_req;
      pulse_step();
      @(negedge clk);
      expect_req((1 + t) % 16, n_before);
      wait_idle();
    end
    // Dwell: the next request follows 7 ready cycles.
    seq_len = 5'd3;
    dwell = 32'd7;
    for (int t = 0; t < 6; t++) begin
      n_before = n_req;
      wait_idle();
      t_start = cycle;
      while (n_req == n_before) @(negedge clk);
      checks++;
      if (last_req_cycle - t_start + 1 != 7) begin
        failures++; $display("dwell %0d cycles", last_req_cycle - t_start + 1);
      end
    end
    dwell = '0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
