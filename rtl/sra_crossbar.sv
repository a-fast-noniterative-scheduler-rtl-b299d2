// sra_crossbar: memoryless crossbar with K row links per input port.
//
// A plain N x N crossbar lets each input put one cell through per slot.  SRA
// lets an input send several cells in one slot, so the published design
// widens the crossbar to K*N rows, K per input (row i*K + r is link r of
// input i), and keeps N columns, one per output.  Each column is switched to
// at most one row per slot by the scheduler: col_en_i[j] closes the
// crosspoint between column j and row col_sel_i[j].  The crossbar stores
// nothing; it is combinational, with K*N*N crosspoints in total.
module sra_crossbar #(
  parameter int unsigned N      = sra_pkg::N_PORTS,
  parameter int unsigned K      = sra_pkg::K_ROWS,
  parameter int unsigned CELL_W = sra_pkg::CELL_W,
  parameter int unsigned RW     = (K * N > 1) ? $clog2(K * N) : 1
) (
  input  logic [CELL_W-1:0] row_cell_i [K*N],
  input  logic [K*N-1:0]    row_vld_i,
  input  logic [N-1:0]      col_en_i,
  input  logic [RW-1:0]     col_sel_i [N],
  output logic [CELL_W-1:0] col_cell_o [N],
  output logic [N-1:0]      col_vld_o
);

  for (genvar j = 0; j < N; j++) begin : g_col
    always_comb begin
      col_cell_o[j] = '0;
      col_vld_o[j]  = 1'b0;
      for (int unsigned r = 0; r < K * N; r++) begin
        if (col_en_i[j] && col_sel_i[j] == RW'(r)) begin
          col_cell_o[j] = row_cell_i[r];
          col_vld_o[j]  = row_vld_i[r];
        end
      end
    end
  end

endmodule
