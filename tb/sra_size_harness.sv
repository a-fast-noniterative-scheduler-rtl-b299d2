// sra_size_harness: drives one sra_switch instance of a chosen size with
// uniform or bursty traffic and checks it; used by tb_sra_switch_sizes.
//
// Traffic: MODE 0 is i.i.d. Bernoulli arrivals at LOAD_PERMILLE per input
// per slot with uniformly chosen destinations; MODE 1 is an interrupted
// Bernoulli (on/off) source with alpha = 1, mean burst 128 cells to a single
// destination, and the off-state probability set for the requested load:
// q = 1 - load * (1 - p) / (1 - load).  After SLOTS slots of traffic the
// switch is drained.  Checks, as in tb_sra_switch: every delivered cell
// leaves the right output, names the right source and is the next cell of
// its flow; in slots without input blocking, exactly the outputs with a
// queued cell send (maximum matching); all accepted cells are delivered.
// Reports the mean delay and the cell-multiplicity histogram, and raises
// done_o with its check and failure counts.
module sra_size_harness #(
  parameter int N             = 16,
  parameter int K             = 3,
  parameter int DEPTH         = 64,
  parameter int MODE          = 0,
  parameter int LOAD_PERMILLE = 900,
  parameter int SLOTS         = 3000
) (
  input  logic clk,
  input  logic rst_n,
  output logic done_o,
  output int   checks_o,
  output int   failures_o
);
  localparam int IW = $clog2(N);
  localparam int W  = 64;
  // bursty source: p = 1 - 1/128 in parts per million
  localparam int P_PPM = 1000000 - 1000000 / 128;
  localparam int Q_PPM = 1000000 - int'(longint'(LOAD_PERMILLE) * (1000000 - P_PPM) / (1000 - LOAD_PERMILLE));

  logic [N-1:0] in_vld, out_vld, in_drop, in_blocked;
  logic [IW-1:0] in_dest [N];
  logic [W-1:0] in_cell [N], out_cell [N];
  logic [IW-1:0] out_src [N];
  logic [IW:0] in_mult [N];

  sra_switch #(.N(N), .K(K), .CELL_W(W), .DEPTH(DEPTH)) dut (
    .clk(clk), .rst_n(rst_n), .in_vld_i(in_vld), .in_dest_i(in_dest),
    .in_cell_i(in_cell), .out_vld_o(out_vld), .out_cell_o(out_cell),
    .out_src_o(out_src), .in_drop_o(in_drop), .in_mult_o(in_mult),
    .in_blocked_o(in_blocked));

  int checks = 0, failures = 0, slot_no = 0;
  int unsigned tx_seq [N][N];
  int unsigned rx_seq [N][N];
  int queued [N][N];
  int unsigned accepted = 0, delivered = 0, dropped = 0, sends = 0;
  longint unsigned delay_sum = 0;
  int unsigned mult_hist [N+1];
  int unsigned n_block = 0;
  bit ibp_on [N];
  int ibp_dest [N];

  assign checks_o   = checks;
  assign failures_o = failures;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL N=%0d %s: got %0d expected %0d at slot %0d", N, what, got, exp, slot_no);
    end
  endtask

  task automatic run_slot(int want [N]);
    logic [N-1:0] expect_srv;
    bit any_block;
    for (int i = 0; i < N; i++) begin
      int d;
      d = (want[i] >= 0) ? want[i] : 0;
      in_vld[i]  = (want[i] >= 0);
      in_dest[i] = IW'(d);
      in_cell[i] = {8'(i), 8'(d), 24'(slot_no), 24'(tx_seq[i][d])};
    end
    for (int j = 0; j < N; j++) begin
      int b;
      b = 0;
      for (int i = 0; i < N; i++) b += queued[i][j];
      expect_srv[j] = (b != 0);
    end
    #1;
    any_block = (in_blocked != '0);
    for (int i = 0; i < N; i++) begin
      if (in_mult[i] != '0) begin
        mult_hist[in_mult[i]]++;
        sends++;
      end
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
    @(posedge clk);
    #1;
    slot_no++;
    if (!any_block) begin
      checks++;
      if (out_vld != expect_srv) begin
        failures++;
        if (failures < 10) $display("FAIL N=%0d max_matching at slot %0d", N, slot_no);
      end
    end
    for (int j = 0; j < N; j++) begin
      if (out_vld[j]) begin
        int s, d;
        s = int'(out_cell[j][63:56]);
        d = int'(out_cell[j][55:48]);
        check("dest", longint'(d), longint'(j));
        check("src", longint'(out_src[j]), longint'(s));
        check("flow_order", longint'(out_cell[j][23:0]), longint'(rx_seq[s][d] & 32'hFFFFFF));
        rx_seq[s][d]++;
        queued[s][d]--;
        delivered++;
        delay_sum += longint'(slot_no) - longint'(out_cell[j][47:24]);
      end
    end
  endtask

  initial begin
    int want [N];
    done_o = 1'b0;
    for (int i = 0; i < N; i++) begin
      in_vld[i] = 0; in_dest[i] = '0; in_cell[i] = '0;
      ibp_on[i] = 0; ibp_dest[i] = 0;
      for (int j = 0; j < N; j++) begin
        tx_seq[i][j] = 0; rx_seq[i][j] = 0; queued[i][j] = 0;
      end
    end
    for (int m = 0; m <= N; m++) mult_hist[m] = 0;
    @(posedge rst_n);
    @(posedge clk);
    #1;
    for (int t = 0; t < SLOTS; t++) begin
      for (int i = 0; i < N; i++) begin
        if (MODE == 0) begin
          want[i] = (($urandom % 1000) < LOAD_PERMILLE) ? int'($urandom % N) : -1;
        end else begin
          if (ibp_on[i]) begin
            if (($urandom % 1000000) >= P_PPM) ibp_on[i] = 0;
          end else if (($urandom % 1000000) >= Q_PPM) begin
            ibp_on[i] = 1;
            ibp_dest[i] = int'($urandom % N);
          end
          want[i] = ibp_on[i] ? ibp_dest[i] : -1;
        end
      end
      run_slot(want);
    end
    for (int i = 0; i < N; i++) want[i] = -1;
    for (int t = 0; t < 100000 && delivered != accepted; t++) run_slot(want);
    check("all_delivered", longint'(delivered), longint'(accepted));
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) check("flow_complete", longint'(rx_seq[i][j]), longint'(tx_seq[i][j]));
    $display("N=%0d K=%0d %s load %0d/1000: cells %0d dropped %0d mean delay %0d.%02d slots, input-blocked slots %0d",
             N, K, (MODE == 0) ? "uniform" : "bursty", LOAD_PERMILLE, accepted, dropped,
             delay_sum / ((delivered == 0) ? 1 : delivered),
             (delay_sum * 100 / ((delivered == 0) ? 1 : delivered)) % 100, n_block);
    $write("  multiplicity of %0d sends (per mille):", sends);
    for (int m = 1; m <= ((N < 8) ? N : 8); m++)
      $write(" k=%0d:%0d", m, longint'(mult_hist[m]) * 1000 / ((sends == 0) ? 1 : sends));
    $display("");
    done_o = 1'b1;
  end
endmodule
