// Iterative array multiplier built of 4-input LUT units.
//
// Computes p = a * b for unsigned N-bit operands in one combinational pass
// through an N x N array of operational elements.  Row i adds the partial
// product a & {N{b_i}} to the upper N bits of the previous row's result with
// a ripple of N elements; element (i, j) is a partial-product AND and a full
// adder.  Row i delivers product bit p_i from its rightmost element and passes
// the rest, with its final carry, down to row i + 1; the last row delivers
// the upper half of the product.
//
// Each element is two LUT units (sum and carry) with the same inputs:
//   A = a_j, B = b_i, C = sum from element (i-1, j+1) (or the carry out of
//   row i-1 for j = N-1, zero in row 0), D = carry from element (i, j-1)
//   (zero for j = 0).
// LUT unit k (k = 2*(i*N + j) for the sum unit, +1 for the carry unit) takes
// its 16-bit program code from cfg_code when cfg_we is high and cfg_sel = k.
// The array computes a product only after every unit has been configured,
// either with the original codes or with a consistent program-code version.
//
// The array of N*N elements follows the iterative array multiplier the design
// is built around; the row-ripple arrangement (its longest path runs through
// 3N-2 elements) and the mapping onto two LUT units per element are this
// design's choice.
module lut_array_multiplier #(
  parameter int unsigned N    = 8,
  localparam int unsigned NLUT = 2 * N * N,
  localparam int unsigned SELW = $clog2(NLUT)
) (
  input  logic              clk,
  input  logic              cfg_we,
  input  logic [SELW-1:0]   cfg_sel,
  input  cm_pkg::lut_code_t cfg_code,
  input  logic [N-1:0]      a,
  input  logic [N-1:0]      b,
  output logic [2*N-1:0]    p
);

  // Sum and carry outputs of every element, one row per vector.
  logic [N-1:0] s_row [N];
  logic [N-1:0] c_row [N];

  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_col
      localparam int unsigned SUM_IDX   = 2 * (i * N + j);
      localparam int unsigned CARRY_IDX = SUM_IDX + 1;

      logic in_c, in_d;
      logic [3:0] addr;

      if (i == 0) begin : g_top
        assign in_c = 1'b0;
      end else if (j < N - 1) begin : g_mid
        assign in_c = s_row[i-1][j+1];
      end else begin : g_left
        assign in_c = c_row[i-1][N-1];
      end

      if (j == 0) begin : g_right
        assign in_d = 1'b0;
      end else begin : g_chain
        assign in_d = c_row[i][j-1];
      end

      assign addr = {in_d, in_c, b[i], a[j]};

      lut4 u_sum (
        .clk      (clk),
        .cfg_we   (cfg_we && (cfg_sel == SELW'(SUM_IDX))),
        .cfg_code (cfg_code),
        .addr     (addr),
        .y        (s_row[i][j])
      );

      lut4 u_carry (
        .clk      (clk),
        .cfg_we   (cfg_we && (cfg_sel == SELW'(CARRY_IDX))),
        .cfg_code (cfg_code),
        .addr     (addr),
        .y        (c_row[i][j])
      );
    end

    assign p[i] = s_row[i][0];
  end

  assign p[2*N-1:N] = {c_row[N-1][N-1], s_row[N-1][N-1:1]};

endmodule
