// Shared constants and functions of the checkable LUT-based multiplier.
//
// Every operational element of the array multiplier is a partial-product AND
// followed by a full adder, mapped onto two 4-input LUT units that see the
// same four inputs: A = a_j (multiplicand bit), B = b_i (multiplier bit),
// C = sum from the row above, D = carry from the neighbour on the right.
// The LUT address is the code dcba, so memory bit x holds the unit's output
// for a = x[0], b = x[1], c = x[2], d = x[3].
//
// A program-code version v of a LUT unit is the code that gives the same
// function when the inputs marked by v arrive inverted: the bit stored at
// address x is the original bit at address x ^ v.  The first unit of an
// inverted pair additionally stores its whole code inverted.
package cm_pkg;

  localparam int unsigned LUT_BITS = 16;

  typedef logic [LUT_BITS-1:0] lut_code_t;

  // Original code of the "sum" unit: (a & b) ^ c ^ d.
  function automatic lut_code_t sum_code();
    lut_code_t code;
    for (int x = 0; x < LUT_BITS; x++) begin
      code[x] = (x[0] & x[1]) ^ x[2] ^ x[3];
    end
    return code;
  endfunction

  // Original code of the "carry" unit: majority of (a & b), c and d.
  function automatic lut_code_t carry_code();
    lut_code_t code;
    logic pp;
    for (int x = 0; x < LUT_BITS; x++) begin
      pp      = x[0] & x[1];
      code[x] = (pp & x[2]) | (pp & x[3]) | (x[2] & x[3]);
    end
    return code;
  endfunction

  // Version of a code: relocate bit x ^ v to position x, then invert the
  // whole memory when the unit is the inverted first unit of a pair.
  function automatic lut_code_t version_code(lut_code_t orig, logic [3:0] v, logic inv);
    lut_code_t code;
    for (int x = 0; x < LUT_BITS; x++) begin
      code[x] = inv ^ orig[4'(x) ^ v];
    end
    return code;
  endfunction

  // Index of a LUT unit in the array: two units per element, element (i, j)
  // in row i (multiplier bit b_i) and column j (multiplicand bit a_j).
  function automatic int unsigned lut_index(int unsigned n, int unsigned i, int unsigned j,
                                            logic is_carry);
    return 2 * (i * n + j) + (is_carry ? 1 : 0);
  endfunction

endpackage
