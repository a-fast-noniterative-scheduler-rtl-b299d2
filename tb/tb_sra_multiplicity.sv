// tb_sra_multiplicity: the cell-multiplicity workload.
//
// Runs two 16-port sra_switch instances with K = 16 read ports per input,
// so that no grant is ever refused and the switch behaves as unrestricted
// SRA, each through sra_size_harness with its own checks: uniform traffic
// at 95 % load, and bursty traffic at 80 % load (128-cell mean bursts,
// 256-cell VOQs).  Each prints how often an input sends k = 1, 2, 3, ...
// cells in one slot, the number that sizes the read ports and crossbar
// rows of an input, and its mean delay.  Ends with the summed check and
// failure counts.
module tb_sra_multiplicity;
  localparam int NI = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [NI-1:0] done;
  int chk [NI];
  int fail [NI];

  always #5 clk = ~clk;

  sra_size_harness #(.N(16), .K(16), .MODE(0), .LOAD_PERMILLE(950), .SLOTS(6000)) m16u
    (.clk(clk), .rst_n(rst_n), .done_o(done[0]), .checks_o(chk[0]), .failures_o(fail[0]));
  sra_size_harness #(.N(16), .K(16), .DEPTH(256), .MODE(1), .LOAD_PERMILLE(800), .SLOTS(20000)) m16b
    (.clk(clk), .rst_n(rst_n), .done_o(done[1]), .checks_o(chk[1]), .failures_o(fail[1]));

  function automatic int total(int a [NI]);
    int s = 0;
    foreach (a[i]) s += a[i];
    return s;
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", total(chk), total(fail) + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (done == '1);
    #1;
    $display("TB_RESULT checks=%0d failures=%0d", total(chk), total(fail));
    $finish;
  end
endmodule
