// Checkable N x N multiplier: an iterative array multiplier of 4-input LUT
// units, extended so that it can run on a sequence of program-code versions.
//
// Problem: in a LUT-based circuit whose inputs vary little in normal
// operation, many LUT memory bits (and the 2:1 multiplexer paths to them) are
// read only when inputs take emergency-range values, so faults there stay
// hidden.  A version of the program code stores the same function at other
// memory positions, so that normal-mode inputs reach the other positions.
// Units fed directly by circuit inputs cannot take versions for those
// inputs, so the operands pass first through 2N modulo-two adders
// (mod2_adder_stage) whose second inputs come from a 2N-bit shift register
// (version_shift_register).  A one in the register inverts that operand bit,
// and the units behind it take the matching version.
//
// version_sequencer holds a table of up to K versions and steps through the
// first seq_len of them, on seq_step or every seq_dwell cycles.
// version_controller applies each one: it shifts the register code in
// serially and rewrites all 2N^2 LUT memories.  With both codes zero (the
// state after reset) the circuit is the original multiplier.
//
// Interface: a, b operands; p = a * b, valid while p_valid is high, after
// the combinational delay of the adders and the array.  The table is written
// through tbl_we / tbl_addr / tbl_reg_code / tbl_inv_mask (register code
// bit j inverts a_j, bit N+i inverts b_i; mask bit k inverts LUT unit k).  A
// version change takes 2N + 2N^2 + 2 clock cycles from the step; p_valid is
// low during it.  seq_entry / seq_active tell which entry is loaded;
// reg_code shows the version register.  rst_n is active low and
// asynchronous; after it the original version is loaded automatically.
//
// The register, the adders, the LUT array and the version rule follow the
// method; the sequencer and controller that apply versions from inside the
// design stand in for loading the register through device pins and
// rewriting LUT codes by reconfiguration.
module checkable_multiplier #(
  parameter int unsigned N    = 8,
  parameter int unsigned K    = 16,
  localparam int unsigned Z    = 2 * N,
  localparam int unsigned NLUT = 2 * N * N,
  localparam int unsigned SELW = $clog2(NLUT),
  localparam int unsigned AW   = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned LW   = $clog2(K + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N-1:0]      a,
  input  logic [N-1:0]      b,
  output logic [2*N-1:0]    p,
  output logic              p_valid,
  input  logic              tbl_we,
  input  logic [AW-1:0]     tbl_addr,
  input  logic [Z-1:0]      tbl_reg_code,
  input  logic [NLUT-1:0]   tbl_inv_mask,
  input  logic [LW-1:0]     seq_len,
  input  logic              seq_step,
  input  logic [31:0]       seq_dwell,
  output logic [AW-1:0]     seq_entry,
  output logic              seq_active,
  output logic              ver_busy,
  output logic [Z-1:0]      reg_code
);

  logic                ver_req;
  logic [Z-1:0]        ver_reg_code;
  logic [NLUT-1:0]     ver_inv_mask;
  logic                sr_din, sr_sync;
  logic                cfg_we;
  logic [SELW-1:0]     cfg_sel;
  cm_pkg::lut_code_t   cfg_code;
  logic [Z-1:0]        xored;

  version_sequencer #(.N(N), .K(K)) u_seq (
    .clk          (clk),
    .rst_n        (rst_n),
    .tbl_we       (tbl_we),
    .tbl_addr     (tbl_addr),
    .tbl_reg_code (tbl_reg_code),
    .tbl_inv_mask (tbl_inv_mask),
    .seq_len      (seq_len),
    .step         (seq_step),
    .dwell        (seq_dwell),
    .ctrl_busy    (ver_busy),
    .ctrl_ready   (p_valid),
    .req          (ver_req),
    .reg_code     (ver_reg_code),
    .inv_mask     (ver_inv_mask),
    .entry        (seq_entry),
    .active       (seq_active)
  );

  version_controller #(.N(N)) u_ctrl (
    .clk      (clk),
    .rst_n    (rst_n),
    .req      (ver_req),
    .reg_code (ver_reg_code),
    .inv_mask (ver_inv_mask),
    .busy     (ver_busy),
    .ready    (p_valid),
    .sr_din   (sr_din),
    .sr_sync  (sr_sync),
    .cfg_we   (cfg_we),
    .cfg_sel  (cfg_sel),
    .cfg_code (cfg_code)
  );

  version_shift_register #(.Z(Z)) u_reg (
    .clk   (clk),
    .rst_n (rst_n),
    .sync  (sr_sync),
    .din   (sr_din),
    .q     (reg_code)
  );

  // Operand bit a_j meets register bit j, b_i meets register bit N + i.
  mod2_adder_stage #(.Z(Z)) u_xor (
    .x ({b, a}),
    .r (reg_code),
    .y (xored)
  );

  lut_array_multiplier #(.N(N)) u_array (
    .clk      (clk),
    .cfg_we   (cfg_we),
    .cfg_sel  (cfg_sel),
    .cfg_code (cfg_code),
    .a        (xored[N-1:0]),
    .b        (xored[Z-1:N]),
    .p        (p)
  );

endmodule
