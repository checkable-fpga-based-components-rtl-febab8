// 4-input LUT unit.
//
// A 16-bit memory holds the unit's program code; it is written as a whole
// from the configuration port (cfg_we, cfg_code) on a rising clock edge.
// The output is the memory bit at address {d, c, b, a} = addr, read through
// a 16:1 multiplexer built as a four-level tree of 2:1 multiplexers: the first
// level is steered by input A (addr[0]), the last by input D (addr[3]).
// Reading is combinational.  The memory has no reset: the configuration is
// loaded before the unit is used, as in an SRAM-based FPGA.
//
// The memory, the dcba addressing and the 2:1 multiplexer tree are those of
// the LUT unit the method is built on; the whole-code write port is this
// design's way of loading it.
module lut4 (
  input  logic                  clk,
  input  logic                  cfg_we,
  input  cm_pkg::lut_code_t     cfg_code,
  input  logic [3:0]            addr,
  output logic                  y
);

  cm_pkg::lut_code_t mem;

  always_ff @(posedge clk) begin
    if (cfg_we) mem <= cfg_code;
  end

  // Tree of 2:1 multiplexers.
  logic [7:0] lvl_a;
  logic [3:0] lvl_b;
  logic [1:0] lvl_c;

  always_comb begin
    for (int k = 0; k < 8; k++) lvl_a[k] = addr[0] ? mem[2*k+1]   : mem[2*k];
    for (int k = 0; k < 4; k++) lvl_b[k] = addr[1] ? lvl_a[2*k+1] : lvl_a[2*k];
    for (int k = 0; k < 2; k++) lvl_c[k] = addr[2] ? lvl_b[2*k+1] : lvl_b[2*k];
    y = addr[3] ? lvl_c[1] : lvl_c[0];
  end

endmodule
