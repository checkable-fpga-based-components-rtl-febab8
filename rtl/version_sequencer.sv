// Version sequencer: runs the multiplier on a repeating sequence of
// program-code versions.
//
// A table of K versions (register code and LUT inversion mask each) is written
// by the host through tbl_we / tbl_addr / tbl_reg_code / tbl_inv_mask.  Entries
// 0 .. seq_len-1 form the sequence.  The sequencer advances to the next entry,
// wrapping to 0 after the last, on a one-cycle step pulse, or on its own after
// the current version has been in use (ctrl_ready high) for dwell cycles when
// dwell is not zero.  Advancing issues a one-cycle req to version_controller
// with the entry's codes on reg_code / inv_mask, held until the next advance.
// The first advance after reset loads entry 0.  Nothing advances while the
// controller is busy, while a request is outstanding, or when seq_len is 0;
// a step pulse arriving then is dropped.  entry is the index of the entry last
// requested; active is low until the first advance.
//
// Operating the circuit on a succession of versions, instead of waiting for
// inputs to change, is the method's; the table, its size, the step/dwell
// triggers and the handshake are this design's choices.
module version_sequencer #(
  parameter int unsigned N    = 8,
  parameter int unsigned K    = 16,
  localparam int unsigned Z    = 2 * N,
  localparam int unsigned NLUT = 2 * N * N,
  localparam int unsigned AW   = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned LW   = $clog2(K + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              tbl_we,
  input  logic [AW-1:0]     tbl_addr,
  input  logic [Z-1:0]      tbl_reg_code,
  input  logic [NLUT-1:0]   tbl_inv_mask,
  input  logic [LW-1:0]     seq_len,
  input  logic              step,
  input  logic [31:0]       dwell,
  input  logic              ctrl_busy,
  input  logic              ctrl_ready,
  output logic              req,
  output logic [Z-1:0]      reg_code,
  output logic [NLUT-1:0]   inv_mask,
  output logic [AW-1:0]     entry,
  output logic              active
);

  typedef struct packed {
    logic [Z-1:0]    reg_code;
    logic [NLUT-1:0] inv_mask;
  } version_t;

  version_t        table_q [K];
  logic [31:0]     dwell_cnt;
  logic            advance;
  logic [AW-1:0]   next_entry;

  always_ff @(posedge clk) begin
    if (tbl_we) table_q[tbl_addr] <= '{reg_code: tbl_reg_code, inv_mask: tbl_inv_mask};
  end

  always_comb begin
    if (!active || (32'(entry) + 1 >= 32'(seq_len))) next_entry = '0;
    else                                               next_entry = entry + 1'b1;
    advance = (seq_len != '0) && !ctrl_busy && !req &&
              (step || (dwell != '0 && ctrl_ready && dwell_cnt >= dwell - 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req       <= 1'b0;
      reg_code  <= '0;
      inv_mask  <= '0;
      entry     <= '0;
      active    <= 1'b0;
      dwell_cnt <= '0;
    end else begin
      req <= 1'b0;
      if (advance) begin
        req       <= 1'b1;
        reg_code  <= table_q[next_entry].reg_code;
        inv_mask  <= table_q[next_entry].inv_mask;
        entry     <= next_entry;
        active    <= 1'b1;
        dwell_cnt <= '0;
      end else if (ctrl_ready && dwell_cnt != '1) begin
        dwell_cnt <= dwell_cnt + 1'b1;
      end
    end
  end

endmodule
