// tb_sra_read_limiter: self-checking test of the per-input grant limiter.
//
// Random grant vectors are applied slot by slot.  The model keeps its own
// copy of the rotating pointer and works out which grants must be served
// (the first K in output order from the pointer), the row lane of each, the
// multiplicity and the blocked flag, and where the pointer moves (to the
// first refused output).  A directed case checks that a refused grant is
// served in the very next slot.
module tb_sra_read_limiter;
  localparam int N = 8;
  localparam int K = 3;
  localparam int IW = $clog2(N);
  localparam int LW = $clog2(K);

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] gnt, acc;
  logic [LW-1:0] lane [N];
  logic [IW:0] mult;
  logic blocked;
  int checks = 0, failures = 0;
  int ptr = 0;

  sra_read_limiter #(.N(N), .K(K)) dut (
    .clk(clk), .rst_n(rst_n), .gnt_i(gnt), .acc_o(acc), .lane_o(lane),
    .mult_o(mult), .blocked_o(blocked));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  task automatic slot(logic [N-1:0] g);
    int used = 0, nptr = ptr;
    bit refused = 0;
    gnt = g;
    #1;
    for (int s = 0; s < N; s++) begin
      int j = (ptr + s) % N;
      if (g[j]) begin
        if (used < K) begin
          check("acc", int'(acc[j]), 1);
          check("lane", int'(lane[j]), used);
          used++;
        end else begin
          check("refused", int'(acc[j]), 0);
          if (!refused) begin refused = 1; nptr = j; end
        end
      end else check("no_grant_no_acc", int'(acc[j]), 0);
    end
    check("mult", int'(mult), used);
    check("blocked", int'(blocked), int'(refused));
    @(posedge clk);
    #1;
    ptr = nptr;
  endtask

  initial begin
    gnt = '0;
    repeat (2) @(posedge clk);
    #1;
    rst_n = 1'b1;
    // five grants: outputs 0,1,2 served, 3 and 6 refused
    slot(8'b0100_1111);
    // the refused output 3 comes first now
    gnt = 8'b0000_1001;
    #1;
    check("refused_served_next", int'(acc[3] && lane[3] == 0 && lane[0] == 1), 1);
    slot(8'b0000_1001);
    for (int t = 0; t < 4000; t++) slot(N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
