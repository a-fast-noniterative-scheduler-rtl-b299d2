// tb_sra_switch_sizes: the switch-size and cell-multiplicity workloads.
//
// Runs several sra_switch instances side by side, each through
// sra_size_harness with its own checks:
//   uniform traffic at 90 % load on 4-, 8- and 32-port switches with the
//   default K = 3 (delay and cell multiplicity against switch size).
// Prints each instance's mean delay and multiplicity histogram and ends with
// the summed check and failure counts.
module tb_sra_switch_sizes;
  localparam int NI = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [NI-1:0] done;
  int chk [NI];
  int fail [NI];

  always #5 clk = ~clk;

  sra_size_harness #(.N(4),  .K(3), .MODE(0), .LOAD_PERMILLE(900), .SLOTS(4000)) h4
    (.clk(clk), .rst_n(rst_n), .done_o(done[0]), .checks_o(chk[0]), .failures_o(fail[0]));
  sra_size_harness #(.N(8),  .K(3), .MODE(0), .LOAD_PERMILLE(900), .SLOTS(4000)) h8
    (.clk(clk), .rst_n(rst_n), .done_o(done[1]), .checks_o(chk[1]), .failures_o(fail[1]));
  sra_size_harness #(.N(32), .K(3), .MODE(0), .LOAD_PERMILLE(900), .SLOTS(4000)) h32
    (.clk(clk), .rst_n(rst_n), .done_o(done[2]), .checks_o(chk[2]), .failures_o(fail[2]));

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
