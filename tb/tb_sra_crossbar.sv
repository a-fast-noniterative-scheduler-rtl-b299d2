// tb_sra_crossbar: self-checking test of the K*N x N memoryless crossbar.
//
// Each round puts random cells and valid bits on all K*N rows and random
// crosspoint settings on all N columns, then checks every column against the
// row it was switched to (or against an idle column when its crosspoint is
// open).  The crossbar is combinational, so the result is checked in the
// same slot.
module tb_sra_crossbar;
  localparam int N = 4;
  localparam int K = 3;
  localparam int W = 32;
  localparam int RW = $clog2(K * N);

  logic [W-1:0] row_cell [K*N];
  logic [K*N-1:0] row_vld;
  logic [N-1:0] col_en;
  logic [RW-1:0] col_sel [N];
  logic [W-1:0] col_cell [N];
  logic [N-1:0] col_vld;
  int checks = 0, failures = 0;

  sra_crossbar #(.N(N), .K(K), .CELL_W(W)) dut (
    .row_cell_i(row_cell), .row_vld_i(row_vld), .col_en_i(col_en),
    .col_sel_i(col_sel), .col_cell_o(col_cell), .col_vld_o(col_vld));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int unsigned got, int unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    for (int t = 0; t < 2000; t++) begin
      for (int r = 0; r < K * N; r++) row_cell[r] = $urandom;
      row_vld = (K * N)'($urandom);
      col_en  = N'($urandom);
      for (int j = 0; j < N; j++) col_sel[j] = RW'($urandom % (K * N));
      #1;
      for (int j = 0; j < N; j++) begin
        if (col_en[j]) begin
          check("cell", col_cell[j], row_cell[col_sel[j]]);
          check("vld", 32'(col_vld[j]), 32'(row_vld[col_sel[j]]));
        end else begin
          check("idle_vld", 32'(col_vld[j]), 0);
        end
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
