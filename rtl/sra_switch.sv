// sra_switch: N x N input-queued switch fabric scheduled by SRA (single
// round-robin arbitration).
//
// Structure (as published): N input ports, each with N virtual output queues
// (VOQs); N output arbiters, one per output, that together form the
// scheduler; and a memoryless crossbar.  Each output arbiter keeps its own
// FIFO of the inputs that hold cells for it and grants the head every slot,
// so one slot yields a maximum matching in a single pass, without the
// request/grant/accept iterations of iSLIP or PIM.  An input may be granted
// by several outputs in the same slot; it serves up to K of them at once
// through K crossbar rows (K = 3 by default).  The grants it cannot serve are
// refused and retried the next slot (own choice, see sra_read_limiter).
// There is no egress buffer and no backpressure: the crossbar columns are
// registered once and leave the fabric as the output links.
//
// Timing: one clock cycle per time slot.  A cell presented on in_* in slot t
// is queued at the end of t, can be switched in slot t+1 and appears on
// out_* during slot t+2, so the minimum latency is two cycles.
// Ports:
//   in_vld_i[i], in_dest_i[i], in_cell_i[i]: one cell per input per slot
//     with its destination output (already segmented by the line card).
//   out_vld_o[j], out_cell_o[j], out_src_o[j]: the cell leaving output j
//     and the input it came from.
//   in_drop_o[i]: an arrival was lost because its VOQ was full.
//   in_mult_o[i]: cells input i sent this slot (cell multiplicity).
//   in_blocked_o[i]: input i refused a grant this slot (input blocking).
module sra_switch #(
  parameter int unsigned N      = sra_pkg::N_PORTS,
  parameter int unsigned K      = sra_pkg::K_ROWS,
  parameter int unsigned CELL_W = sra_pkg::CELL_W,
  parameter int unsigned DEPTH  = sra_pkg::VOQ_DEPTH,
  parameter int unsigned IW     = (N > 1) ? $clog2(N) : 1,
  parameter int unsigned LW     = (K > 1) ? $clog2(K) : 1,
  parameter int unsigned RW     = (K * N > 1) ? $clog2(K * N) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N-1:0]      in_vld_i,
  input  logic [IW-1:0]     in_dest_i  [N],
  input  logic [CELL_W-1:0] in_cell_i  [N],
  output logic [N-1:0]      out_vld_o,
  output logic [CELL_W-1:0] out_cell_o [N],
  output logic [IW-1:0]     out_src_o  [N],
  output logic [N-1:0]      in_drop_o,
  output logic [IW:0]       in_mult_o  [N],
  output logic [N-1:0]      in_blocked_o
);

  localparam int unsigned DW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  // [input][output] matrices of the status and grant messages
  logic [N-1:0]      set_m  [N];
  logic [N-1:0]      gnt_m  [N];
  logic [N-1:0]      acc_m  [N];
  logic [N-1:0]      last_m [N];
  logic [LW-1:0]     lane_m [N][N];
  // per-output view
  logic [N-1:0]      set_t  [N];
  logic [N-1:0]      gnt_vld;
  logic [IW-1:0]     gnt_id [N];
  logic [N-1:0]      arb_acc;
  logic [N-1:0]      arb_last;
  logic [IW:0]       arb_cnt [N];
  logic [N-1:0]      arb_mem [N];
  // crossbar
  logic [CELL_W-1:0] row_cell [K*N];
  logic [K*N-1:0]    row_vld;
  logic [N-1:0]      col_en;
  logic [RW-1:0]     col_sel [N];
  logic [CELL_W-1:0] col_cell [N];
  logic [N-1:0]      col_vld;
  logic [DW:0]       voq_len [N][N];

  for (genvar i = 0; i < N; i++) begin : g_in
    logic [K-1:0]      rv;
    logic [CELL_W-1:0] rc [K];

    sra_input_port #(.N(N), .K(K), .CELL_W(CELL_W), .DEPTH(DEPTH)) u_port (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_vld_i  (in_vld_i[i]),
      .in_dest_i (in_dest_i[i]),
      .in_cell_i (in_cell_i[i]),
      .drop_o    (in_drop_o[i]),
      .set_o     (set_m[i]),
      .gnt_i     (gnt_m[i]),
      .acc_o     (acc_m[i]),
      .last_o    (last_m[i]),
      .lane_o    (lane_m[i]),
      .row_vld_o (rv),
      .row_cell_o(rc),
      .mult_o    (in_mult_o[i]),
      .blocked_o (in_blocked_o[i]),
      .voq_len_o (voq_len[i])
    );

    for (genvar r = 0; r < K; r++) begin : g_row
      assign row_vld[i*K + r]  = rv[r];
      assign row_cell[i*K + r] = rc[r];
    end

    for (genvar j = 0; j < N; j++) begin : g_gnt
      assign gnt_m[i][j] = gnt_vld[j] && (gnt_id[j] == IW'(i));
      assign set_t[j][i] = set_m[i][j];
    end
  end

  for (genvar j = 0; j < N; j++) begin : g_out
    sra_output_arbiter #(.N(N)) u_arb (
      .clk      (clk),
      .rst_n    (rst_n),
      .set_i    (set_t[j]),
      .gnt_vld_o(gnt_vld[j]),
      .gnt_id_o (gnt_id[j]),
      .acc_i    (arb_acc[j]),
      .last_i   (arb_last[j]),
      .count_o  (arb_cnt[j]),
      .member_o (arb_mem[j])
    );

    // The granted input answers with its acceptance, the to-be-empty status
    // and the row link it puts the cell on; that sets the crosspoint.
    assign arb_acc[j]  = gnt_vld[j] && acc_m[gnt_id[j]][j];
    assign arb_last[j] = gnt_vld[j] && last_m[gnt_id[j]][j];
    assign col_en[j]   = arb_acc[j];
    assign col_sel[j]  = RW'(32'(gnt_id[j]) * K + 32'(lane_m[gnt_id[j]][j]));
  end

  sra_crossbar #(.N(N), .K(K), .CELL_W(CELL_W)) u_xbar (
    .row_cell_i(row_cell),
    .row_vld_i (row_vld),
    .col_en_i  (col_en),
    .col_sel_i (col_sel),
    .col_cell_o(col_cell),
    .col_vld_o (col_vld)
  );

  // Output links: one register stage after the crossbar, no egress memory.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_vld_o <= '0;
      for (int unsigned j = 0; j < N; j++) begin
        out_cell_o[j] <= '0;
        out_src_o[j]  <= '0;
      end
    end else begin
      out_vld_o <= col_vld;
      for (int unsigned j = 0; j < N; j++) begin
        out_cell_o[j] <= col_cell[j];
        out_src_o[j]  <= gnt_id[j];
      end
    end
  end

  // Every arbiter queues exactly the inputs whose VOQ for it holds cells.
  for (genvar j = 0; j < N; j++) begin : g_inv
    for (genvar i = 0; i < N; i++) begin : g_i
      a_member: assert property (@(posedge clk) disable iff (!rst_n)
                                 arb_mem[j][i] == (voq_len[i][j] != '0));
    end
    a_count: assert property (@(posedge clk) disable iff (!rst_n)
                              32'(arb_cnt[j]) == $countones(arb_mem[j]));
  end

endmodule
