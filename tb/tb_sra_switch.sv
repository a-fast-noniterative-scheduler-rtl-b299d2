// tb_sra_switch: end-to-end test of the SRA switch fabric at its default
// size (16 x 16, three crossbar rows per input, 64-cell VOQs).
//
// Every cell carries its source, destination, arrival slot and a sequence
// number per (source, destination) flow:
//   [63:56] source  [55:48] destination  [47:24] arrival slot  [23:0] sequence
// The test checks, for every cell leaving an output: it left the output it
// was sent to, its reported source matches, and it is the next cell of its
// flow (no loss, duplication or reordering except cells reported dropped at
// arrival).  Every slot in which no input refused a grant it also checks the
// maximum-matching property: each output that has a queued cell anywhere
// sends one, and no other output does.  A directed prologue checks the
// two-slot minimum latency.  Traffic then runs through these phases:
//   uniform i.i.d. Bernoulli traffic at 50 % and 95 % load,
//   bursty on/off (interrupted Bernoulli) traffic, mean burst 128 cells,
//   all cells of a burst to one output, alpha = 1, 50 % load,
//   a hot-spot overload that fills VOQs until arrivals are dropped,
//   and a drain, after which every accepted cell must have been delivered.
// It prints the mean delay per phase and the cell-multiplicity histogram,
// and fails if a mechanism never happened: multi-cell sends, input blocking,
// VOQ overflow, re-queueing of a served input, and removal of an input whose
// VOQ emptied.
module tb_sra_switch;
  import sra_pkg::*;
  localparam int N  = N_PORTS;
  localparam int IW = $clog2(N);
  localparam int W  = CELL_W;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] in_vld, out_vld, in_drop, in_blocked;
  logic [IW-1:0] in_dest [N];
  logic [W-1:0] in_cell [N], out_cell [N];
  logic [IW-1:0] out_src [N];
  logic [IW:0] in_mult [N];

  sra_switch dut (
    .clk(clk), .rst_n(rst_n), .in_vld_i(in_vld), .in_dest_i(in_dest),
    .in_cell_i(in_cell), .out_vld_o(out_vld), .out_cell_o(out_cell),
    .out_src_o(out_src), .in_drop_o(in_drop), .in_mult_o(in_mult),
    .in_blocked_o(in_blocked));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int slot_no = 0;
  int unsigned tx_seq [N][N];     // next sequence number to send per flow
  int unsigned rx_seq [N][N];     // next sequence number expected per flow
  int queued [N][N];              // cells accepted and not yet delivered
  int unsigned accepted = 0, delivered = 0, dropped = 0;
  longint unsigned delay_sum = 0;
  int unsigned delay_cnt = 0;
  int unsigned mult_hist [N+1];
  int unsigned n_multi = 0, n_block = 0, n_requeue = 0, n_last = 0;
  // bursty source state
  bit ibp_on [N];
  int ibp_dest [N];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d at slot %0d", what, got, exp, slot_no);
    end
  endtask

  function automatic int backlog(int j);
    int b = 0;
    for (int i = 0; i < N; i++) b += queued[i][j];
    return b;
  endfunction

  // Check the cells that left in the slot just ended.
  task automatic collect();
    for (int j = 0; j < N; j++) begin
      if (out_vld[j]) begin
        int s, d;
        s = int'(out_cell[j][63:56]);
        d = int'(out_cell[j][55:48]);
        check("dest", d, j);
        check("src", int'(out_src[j]), s);
        check("flow_order", longint'(out_cell[j][23:0]), longint'(rx_seq[s][d] & 24'hFFFFFF));
        rx_seq[s][d]++;
        queued[s][d]--;
        delivered++;
        delay_sum += longint'(slot_no) - longint'(out_cell[j][47:24]);
        delay_cnt++;
        if (slot_no - int'(out_cell[j][47:24]) < 2) begin
          failures++;
          $display("FAIL latency below two slots");
        end
      end
    end
  endtask

  // One slot: present arrivals, check, clock.
  // want[i] = destination or -1 for no arrival.
  task automatic run_slot(int want [N]);
    logic [N-1:0] expect_srv;
    bit any_block;
    for (int i = 0; i < N; i++) begin
      in_vld[i]  = (want[i] >= 0);
      in_dest[i] = IW'((want[i] >= 0) ? want[i] : 0);
      in_cell[i] = {8'(i), 8'(want[i]), 24'(slot_no), 24'(tx_seq[i][(want[i] >= 0) ? want[i] : 0])};
    end
    for (int j = 0; j < N; j++) expect_srv[j] = (backlog(j) != 0);
    #1;
    any_block = (in_blocked != '0);
    for (int i = 0; i < N; i++) begin
      mult_hist[in_mult[i]]++;
      if (in_mult[i] > 1) n_multi++;
      if (in_blocked[i]) n_block++;
      if (in_vld[i]) begin
        if (in_drop[i]) dropped++;
        else begin
          tx_seq[i][want[i]]++;
          queued[i][want[i]]++;
          accepted++;
        end
      end
    end
    for (int j = 0; j < N; j++) begin
      if (dut.arb_acc[j] && !dut.arb_last[j]) n_requeue++;
      if (dut.arb_last[j]) n_last++;
    end
    @(posedge clk);
    #1;
    slot_no++;
    // maximum matching: every output with a queued cell was served
    if (!any_block) check("max_matching", longint'(out_vld), longint'(expect_srv));
    else check("served_only_backlogged", longint'(out_vld & ~expect_srv), 0);
    collect();
  endtask

  task automatic uniform(int slots, int load_permille);
    int want [N];
    longint unsigned ds0 = delay_sum;
    int unsigned dc0 = delay_cnt;
    for (int t = 0; t < slots; t++) begin
      for (int i = 0; i < N; i++)
        want[i] = (($urandom % 1000) < load_permille) ? int'($urandom % N) : -1;
      run_slot(want);
    end
    $display("uniform load %0d/1000: mean delay %0d.%02d slots", load_permille,
             (delay_sum - ds0) / (delay_cnt - dc0),
             ((delay_sum - ds0) * 100 / (delay_cnt - dc0)) % 100);
  endtask

  // Interrupted Bernoulli process: stay on with probability p, stay off with
  // probability q; alpha = 1, so every on slot carries a cell.
  task automatic bursty(int slots, int p_ppm, int q_ppm);
    int want [N];
    longint unsigned ds0 = delay_sum;
    int unsigned dc0 = delay_cnt;
    for (int t = 0; t < slots; t++) begin
      for (int i = 0; i < N; i++) begin
        if (ibp_on[i]) begin
          if (($urandom % 1000000) >= p_ppm) ibp_on[i] = 0;
        end else begin
          if (($urandom % 1000000) >= q_ppm) begin
            ibp_on[i] = 1;
            ibp_dest[i] = int'($urandom % N);
          end
        end
        want[i] = ibp_on[i] ? ibp_dest[i] : -1;
      end
      run_slot(want);
    end
    $display("bursty: mean delay %0d slots over %0d cells",
             (dc0 == delay_cnt) ? 0 : (delay_sum - ds0) / (delay_cnt - dc0), delay_cnt - dc0);
  endtask

  initial begin
    int want [N];
    for (int i = 0; i < N; i++) begin
      in_vld[i] = 0; in_dest[i] = '0; in_cell[i] = '0;
      ibp_on[i] = 0; ibp_dest[i] = 0;
      for (int j = 0; j < N; j++) begin
        tx_seq[i][j] = 0; rx_seq[i][j] = 0; queued[i][j] = 0;
      end
    end
    for (int m = 0; m <= N; m++) mult_hist[m] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk);
    #1;

    // directed: one cell, input 3 -> output 5, idle switch
    for (int i = 0; i < N; i++) want[i] = -1;
    want[3] = 5;
    run_slot(want);
    want[3] = -1;
    check("latency_1", int'(out_vld), 0);
    run_slot(want);
    check("latency_2_arrived", int'(out_vld[5]), 1);
    check("latency_2_delivered", int'(delivered), 1);
    check("latency_2_delay", int'(delay_sum), 2);

    // directed: inputs 0..7 each send one cell to output 0 in one slot;
    // the output serves them one per slot in input order, the first one
    // two slots after arrival.
    for (int i = 0; i < 8; i++) want[i] = 0;
    run_slot(want);
    for (int i = 0; i < N; i++) want[i] = -1;
    for (int r = 0; r < 8; r++) begin
      run_slot(want);
      check("fifo_order_vld", int'(out_vld[0]), 1);
      check("fifo_order_src", int'(out_src[0]), r);
    end
    for (int r = 0; r < 4; r++) run_slot(want);

    uniform(3000, 500);
    uniform(6000, 950);
    // mean burst 128 cells: p = 1 - 1/128; load 0.5 needs q = p
    bursty(8000, 992188, 992188);
    // hot spot: every input sends to output 0 for 400 slots
    for (int t = 0; t < 400; t++) begin
      for (int i = 0; i < N; i++) want[i] = 0;
      run_slot(want);
    end
    // drain
    for (int i = 0; i < N; i++) want[i] = -1;
    for (int t = 0; t < 2000 && delivered != accepted; t++) run_slot(want);
    check("all_delivered", delivered, accepted);
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) check("flow_complete", rx_seq[i][j], tx_seq[i][j]);

    $display("cells accepted %0d delivered %0d dropped %0d", accepted, delivered, dropped);
    $write("cell multiplicity histogram (input-slots):");
    for (int m = 0; m <= 4; m++) $write(" k=%0d:%0d", m, mult_hist[m]);
    $display("");
    $display("mechanisms: multi-cell sends %0d, input blocking %0d, VOQ overflow %0d, re-queue %0d, VOQ emptied %0d",
             n_multi, n_block, dropped, n_requeue, n_last);
    checks += 5;
    if (n_multi == 0) begin failures++; $display("FAIL no multi-cell send"); end
    if (n_block == 0) begin failures++; $display("FAIL no input blocking"); end
    if (dropped == 0) begin failures++; $display("FAIL no VOQ overflow"); end
    if (n_requeue == 0) begin failures++; $display("FAIL no re-queue"); end
    if (n_last == 0) begin failures++; $display("FAIL no VOQ emptied"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
