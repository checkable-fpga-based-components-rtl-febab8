// Program-code version controller of the checkable multiplier.
//
// A version of the project is given by two codes:
//   reg_code  (Z = 2N bits): which circuit inputs the modulo-two adders
//             invert; bit j stands for a_j, bit N+i for b_i;
//   inv_mask  (2N^2 bits): which LUT units are inverted first units of a
//             pair, i.e. store their code inverted (bit k for LUT unit k).
// On a one-cycle req in the idle state the controller latches both codes and
//   1. shifts reg_code into the version register through its serial input
//      (sr_din, sr_sync), most significant bit first, Z cycles;
//   2. rewrites every LUT unit, one per cycle in index order (cfg_we,
//      cfg_sel, cfg_code), with the version of its original code: an input
//      fed by an inverted circuit input or by an inverted LUT unit has its
//      version bit set, the bit at address x becomes the original bit at
//      x ^ v, and an inverted unit stores the complement.  Units that drive
//      a product output are never inverted, whatever inv_mask says.
// busy is high from the clock edge that takes req until the last LUT unit is
// written; ready is high when a complete, consistent version is loaded and
// the product may be used, Z + 2N^2 + 1 clock edges after the edge that took
// req.  A req while busy is ignored.  After reset the controller loads the
// original version (both codes zero) on its own, so ready rises Z + 2N^2
// clock edges after reset is released.
//
// That a version is set by the register code together with the inversion
// of first units of LUT pairs, and the rule relocating bit x ^ v to x, follow
// the method; the sequencing, its timing and the handshake are this design's.
module version_controller #(
  parameter int unsigned N    = 8,
  localparam int unsigned Z    = 2 * N,
  localparam int unsigned NLUT = 2 * N * N,
  localparam int unsigned SELW = $clog2(NLUT)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req,
  input  logic [Z-1:0]      reg_code,
  input  logic [NLUT-1:0]   inv_mask,
  output logic              busy,
  output logic              ready,
  output logic              sr_din,
  output logic              sr_sync,
  output logic              cfg_we,
  output logic [SELW-1:0]   cfg_sel,
  output cm_pkg::lut_code_t cfg_code
);

  import cm_pkg::*;

  typedef enum logic [1:0] {S_IDLE, S_SHIFT, S_LOAD} state_t;

  localparam int unsigned CNTW = (SELW > $clog2(Z)) ? SELW : $clog2(Z);

  state_t            state;
  logic [CNTW-1:0]   cnt;
  logic [Z-1:0]      code_q;
  logic [NLUT-1:0]   mask_q;
  logic              loaded;

  // True for units whose output is a product bit.
  function automatic logic drives_output(int unsigned i, int unsigned j, logic is_carry);
    if (!is_carry && j == 0)                  return 1'b1;
    if (i == N - 1 && !is_carry)              return 1'b1;
    if (i == N - 1 && j == N - 1 && is_carry) return 1'b1;
    return 1'b0;
  endfunction

  // Versioned code of LUT unit idx under register code r and inversion mask m.
  function automatic lut_code_t unit_code(logic [SELW-1:0] idx, logic [Z-1:0] r,
                                          logic [NLUT-1:0] m);
    int unsigned elem, i, j;
    logic        is_carry, inv;
    logic [3:0]  v;
    elem     = int'(idx) / 2;
    i        = elem / N;
    j        = elem % N;
    is_carry = idx[0];
    v[0]     = r[j];
    v[1]     = r[N + i];
    if (i == 0)          v[2] = 1'b0;
    else if (j < N - 1)  v[2] = m[lut_index(N, i - 1, j + 1, 1'b0)];
    else                 v[2] = m[lut_index(N, i - 1, N - 1, 1'b1)];
    if (j == 0)          v[3] = 1'b0;
    else                 v[3] = m[lut_index(N, i, j - 1, 1'b1)];
    inv = m[idx] & ~drives_output(i, j, is_carry);
    return version_code(is_carry ? carry_code() : sum_code(), v, inv);
  endfunction

  // Output units are cleared from the mask once, when the version is latched.
  function automatic logic [NLUT-1:0] legal_mask(logic [NLUT-1:0] m);
    logic [NLUT-1:0] res;
    res = m;
    for (int unsigned k = 0; k < NLUT; k++) begin
      if (drives_output(k / 2 / N, (k / 2) % N, k[0])) res[k] = 1'b0;
    end
    return res;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_SHIFT;
      cnt    <= '0;
      code_q <= '0;
      mask_q <= '0;
      loaded <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (req) begin
            state  <= S_SHIFT;
            cnt    <= '0;
            code_q <= reg_code;
            mask_q <= legal_mask(inv_mask);
            loaded <= 1'b0;
          end
        end
        S_SHIFT: begin
          if (cnt == CNTW'(Z - 1)) begin
            state <= S_LOAD;
            cnt   <= '0;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_LOAD: begin
          if (cnt == CNTW'(NLUT - 1)) begin
            state  <= S_IDLE;
            cnt    <= '0;
            loaded <= 1'b1;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy     = (state != S_IDLE);
  assign ready    = loaded && (state == S_IDLE);
  assign sr_sync  = (state == S_SHIFT);
  assign sr_din   = code_q[Z - 1 - (int'(cnt) % Z)];
  assign cfg_we   = (state == S_LOAD);
  assign cfg_sel  = SELW'(cnt);
  assign cfg_code = unit_code(SELW'(cnt), code_q, mask_q);

endmodule
