// tb_sra_input_port: self-checking test of one SRA input port.
//
// The model keeps one queue of cells per VOQ.  Each slot the test offers a
// random arriving cell and random grants (only for VOQs the model says hold
// cells, as the arbiters guarantee), then checks: the empty-to-nonempty
// status (set_o), the to-become-empty status (last_o), the drop of a cell
// for a full VOQ, that at most K grants are served and only granted ones,
// and that each served VOQ's head cell appears on the row link it was given.
// A small VOQ depth makes overflow happen; the test counts the mechanisms
// it saw (drops, multi-cell sends, blocked grants, last flags) and fails if
// one never occurred.
module tb_sra_input_port;
  localparam int N = 4;
  localparam int K = 2;
  localparam int W = 32;
  localparam int D = 4;
  localparam int IW = $clog2(N);
  localparam int LW = $clog2(K);
  localparam int DW = $clog2(D);

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_vld, drop;
  logic [IW-1:0] in_dest;
  logic [W-1:0] in_cell;
  logic [N-1:0] set, gnt, acc, last;
  logic [LW-1:0] lane [N];
  logic [K-1:0] row_vld;
  logic [W-1:0] row_cell [K];
  logic [IW:0] mult;
  logic blocked;
  logic [DW:0] voq_len [N];
  logic [N-1:0] acc_s;
  int checks = 0, failures = 0;
  int unsigned voq [N][$];
  int n_drop = 0, n_multi = 0, n_block = 0, n_last = 0, n_set = 0;

  sra_input_port #(.N(N), .K(K), .CELL_W(W), .DEPTH(D)) dut (
    .clk(clk), .rst_n(rst_n), .in_vld_i(in_vld), .in_dest_i(in_dest),
    .in_cell_i(in_cell), .drop_o(drop), .set_o(set), .gnt_i(gnt),
    .acc_o(acc), .last_o(last), .lane_o(lane), .row_vld_o(row_vld),
    .row_cell_o(row_cell), .mult_o(mult), .blocked_o(blocked),
    .voq_len_o(voq_len));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int unsigned got, int unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h expected %0h at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    in_vld = 0; in_dest = '0; in_cell = '0; gnt = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 20000; t++) begin
      int unsigned nacc, ngnt;
      bit arrive_ok, arr_j;
      nacc = 0;
      ngnt = 0;
      in_vld  = ($urandom % 4 != 0);
      in_dest = IW'($urandom % N);
      in_cell = $urandom;
      gnt = '0;
      for (int j = 0; j < N; j++)
        if (voq[j].size() != 0 && ($urandom % 8 < ((t < 10000) ? 5 : 1))) gnt[j] = 1'b1;
      #1;
      arrive_ok = in_vld && (voq[in_dest].size() < D);
      check("drop", 32'(drop), 32'(in_vld && !arrive_ok));
      for (int j = 0; j < N; j++) begin
        arr_j = arrive_ok && (in_dest == IW'(j));
        check("set", 32'(set[j]), 32'(arr_j && voq[j].size() == 0));
        check("acc_subset", 32'(acc[j] && !gnt[j]), 0);
        check("last", 32'(last[j]), 32'(acc[j] && voq[j].size() == 1 && !arr_j));
        if (gnt[j]) ngnt++;
        if (acc[j]) begin
          nacc++;
          check("row_vld", 32'(row_vld[lane[j]]), 1);
          check("row_cell", row_cell[lane[j]], voq[j][0]);
        end
      end
      check("served", nacc, (ngnt < K) ? ngnt : K);
      check("mult", 32'(mult), nacc);
      check("blocked", 32'(blocked), 32'(ngnt > K));
      if (drop) n_drop++;
      if (nacc > 1) n_multi++;
      if (blocked) n_block++;
      if (last != '0) n_last++;
      if (set != '0) n_set++;
      acc_s = acc;
      @(posedge clk);
      #1;
      for (int j = 0; j < N; j++) if (acc_s[j]) void'(voq[j].pop_front());
      if (arrive_ok) voq[in_dest].push_back(in_cell);
      for (int j = 0; j < N; j++) check("len", 32'(voq_len[j]), voq[j].size());
    end
    $display("mechanisms: drop=%0d multi=%0d blocked=%0d last=%0d set=%0d",
             n_drop, n_multi, n_block, n_last, n_set);
    checks += 5;
    if (n_drop == 0) failures++;
    if (n_multi == 0) failures++;
    if (n_block == 0) failures++;
    if (n_last == 0) failures++;
    if (n_set == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
