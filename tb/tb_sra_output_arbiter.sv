// tb_sra_output_arbiter: self-checking test of one SRA output arbiter.
//
// A reference model (a SystemVerilog queue of input numbers) follows the
// published rule: grant the head, remove it when served, re-queue it at the
// tail unless its VOQ became empty, and append newly active inputs at the
// tail (lowest input number first within a slot).  Random status messages,
// acceptances and refusals are driven for many slots and the grant and queue
// length are compared every slot.  A directed prologue checks that an input
// announced in slot t is granted in slot t+1, and that three inputs are
// served in round-robin order.
module tb_sra_output_arbiter;
  localparam int N = 8;
  localparam int IW = $clog2(N);

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] set_i;
  logic gnt_vld;
  logic [IW-1:0] gnt_id;
  logic acc, last;
  logic [IW:0] cnt;
  logic [N-1:0] member;
  int checks = 0, failures = 0;
  int q[$];

  sra_output_arbiter #(.N(N)) dut (
    .clk(clk), .rst_n(rst_n), .set_i(set_i), .gnt_vld_o(gnt_vld),
    .gnt_id_o(gnt_id), .acc_i(acc), .last_i(last), .count_o(cnt),
    .member_o(member));

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

  // compare the DUT against the model, then apply one slot of stimulus
  task automatic slot(logic [N-1:0] s, logic a, logic l);
    check("gnt_vld", int'(gnt_vld), int'(q.size() != 0));
    if (q.size() != 0) check("gnt_id", int'(gnt_id), q[0]);
    check("count", int'(cnt), q.size());
    set_i = s; acc = a; last = l;
    @(posedge clk);
    #1;
    if (a && q.size() != 0) begin
      int h = q.pop_front();
      if (!l) q.push_back(h);
    end
    for (int i = 0; i < N; i++) if (s[i]) q.push_back(i);
  endtask

  initial begin
    set_i = '0; acc = 0; last = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    #1;
    // directed: input 5 announced, granted next slot
    slot(8'b0010_0000, 0, 0);
    check("grant_next_slot", int'(gnt_vld && gnt_id == 5), 1);
    // inputs 1 and 3 join; serve round robin 5,1,3,5,1,3
    slot(8'b0000_1010, 0, 0);
    for (int r = 0; r < 6; r++) begin
      int exp_id;
      exp_id = (r % 3 == 0) ? 5 : (r % 3 == 1) ? 1 : 3;
      check("round_robin", int'(gnt_id), exp_id);
      slot('0, 1, 0);
    end
    // drain with last flags
    while (q.size() != 0) slot('0, 1, 1);
    check("empty", int'(gnt_vld), 0);
    // random
    for (int t = 0; t < 5000; t++) begin
      logic [N-1:0] s;
      logic a, l;
      s = '0;
      for (int i = 0; i < N; i++)
        if (!(i inside {q}) && !member[i] && ($urandom % 4 == 0)) s[i] = 1'b1;
      a = ($urandom % 4 != 0) && (q.size() != 0);
      l = a && ($urandom % 3 == 0);
      // only inputs not queued (in the model and in the arbiter) announce
      slot(s, a, l);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
