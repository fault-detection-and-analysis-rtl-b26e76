// sram_8t_array: behavioural model of a DEPTH x WIDTH array of 8T SRAM cells
// with its periphery (not synthesizable logic; it stands for an SRAM macro).
//
// Because the 8T cell has a separate read stack, the array has one write
// port and one read port that work in the same cycle.
//   Write port: when we_i is high at a rising clock edge, waddr_i and wdata_i
//     are registered. The bit-line drivers put wdata on BL and its inverse on
//     BLB, and in the low half of the following clock cycle the write word
//     line of the addressed row is pulsed. Outside a write both bit lines
//     stay precharged high, so no cell changes. The word is stored half a
//     cycle after the edge that took the request.
//   Read port: when re_i is high at a rising edge, raddr_i is registered and
//     the read word line of that row is held high for the next cycle. Each
//     column's read bit line is precharged high and pulled low by any
//     selected cell that holds 0, so rdata_o, valid in the cycle after the
//     request, is the stored word. Sampled at the end of that cycle, a read
//     of a row being written in the same cycle returns the new word.
//     rdata_o is all ones (precharged lines) when no read is in progress.
//   seu_i: one strike input per cell; a rising edge flips that cell.
// DEPTH is this design's choice (no array size is given for the design);
// WIDTH = 8 holds one (8,4) SECDED word per row.
module sram_8t_array #(
  parameter int unsigned DEPTH  = 16,
  parameter int unsigned WIDTH  = 8,
  parameter int unsigned ADDR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         we_i,
  input  logic [ADDR_W-1:0]            waddr_i,
  input  logic [WIDTH-1:0]             wdata_i,
  input  logic                         re_i,
  input  logic [ADDR_W-1:0]            raddr_i,
  output logic [WIDTH-1:0]             rdata_o,
  input  logic [DEPTH-1:0][WIDTH-1:0]  seu_i
);

  logic              wpend_q, rpend_q;
  logic [ADDR_W-1:0] wrow_q, rrow_q;
  logic [WIDTH-1:0]  bl, blb;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wpend_q <= 1'b0;
      rpend_q <= 1'b0;
      wrow_q  <= '0;
      rrow_q  <= '0;
      bl      <= '1;
      blb     <= '1;
    end else begin
      wpend_q <= we_i;
      rpend_q <= re_i;
      if (we_i) begin
        wrow_q <= waddr_i;
        bl     <= wdata_i;
        blb    <= ~wdata_i;
      end else begin
        bl     <= '1;
        blb    <= '1;
      end
      if (re_i) rrow_q <= raddr_i;
    end
  end

  logic [DEPTH-1:0]             wwl, rwl;
  logic [DEPTH-1:0][WIDTH-1:0]  pull;
  logic [WIDTH-1:0]             col_pull;

  // Row decoders. The write word line is gated with the low clock phase.
  always_comb begin
    for (int unsigned r = 0; r < DEPTH; r++) begin
      wwl[r] = wpend_q && !clk && (wrow_q == ADDR_W'(r));
      rwl[r] = rpend_q && (rrow_q == ADDR_W'(r));
    end
  end

  for (genvar r = 0; r < DEPTH; r++) begin : g_row
    for (genvar c = 0; c < WIDTH; c++) begin : g_col
      sram_8t_cell u_cell (
        .wwl     (wwl[r]),
        .bl      (bl[c]),
        .blb     (blb[c]),
        .rwl     (rwl[r]),
        .seu     (seu_i[r][c]),
        .rbl_pull(pull[r][c])
      );
    end
  end

  // Precharged read bit lines: a column reads 0 if any selected cell pulls.
  always_comb begin
    col_pull = '0;
    for (int unsigned r = 0; r < DEPTH; r++) col_pull |= pull[r];
  end

  assign rdata_o = ~col_pull;

endmodule
