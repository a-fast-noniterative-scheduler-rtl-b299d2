// sra_input_port: one ingress port of the SRA switch fabric.
//
// The port holds one virtual output queue (VOQ) per output in a single cell
// memory of N*DEPTH words; VOQ j occupies words j*DEPTH .. j*DEPTH+DEPTH-1 and
// is a circular FIFO with its own head, tail and length.  Per the published
// scheme the port talks to the output arbiters only through status messages:
//   set_o[j]   VOQ j goes from empty to holding a cell (an arrival this slot),
//   last_o[j]  sent with a served grant when that cell was the last one of
//              VOQ j and no new cell for j arrives in the same slot.
// A grant from output j (gnt_i[j]) is served if sra_read_limiter finds one of
// the K row links free; the port then reads the head cell of VOQ j and drives
// it onto that row.  The memory therefore has one write port and K read
// ports, which is the concurrent read the scheme asks of input memory.
//
// Timing: one clock cycle is one time slot.  An arriving cell (in_vld_i,
// in_dest_i, in_cell_i) is written at the end of the slot; it can be granted
// in the next slot at the earliest.  Grants, acceptances, status messages and
// row outputs are combinational within the slot.
// Own choices: a cell arriving for a full VOQ is dropped and flagged on
// drop_o (the design assumes unbounded queues); DEPTH must be a power of two.
module sra_input_port #(
  parameter int unsigned N      = sra_pkg::N_PORTS,
  parameter int unsigned K      = sra_pkg::K_ROWS,
  parameter int unsigned CELL_W = sra_pkg::CELL_W,
  parameter int unsigned DEPTH  = sra_pkg::VOQ_DEPTH,
  parameter int unsigned IW     = (N > 1) ? $clog2(N) : 1,
  parameter int unsigned LW     = (K > 1) ? $clog2(K) : 1,
  parameter int unsigned DW     = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // arriving cell, at most one per slot
  input  logic              in_vld_i,
  input  logic [IW-1:0]     in_dest_i,
  input  logic [CELL_W-1:0] in_cell_i,
  output logic              drop_o,
  // status messages to / grants from the output arbiters
  output logic [N-1:0]      set_o,
  input  logic [N-1:0]      gnt_i,
  output logic [N-1:0]      acc_o,
  output logic [N-1:0]      last_o,
  output logic [LW-1:0]     lane_o [N],
  // K row links into the crossbar
  output logic [K-1:0]      row_vld_o,
  output logic [CELL_W-1:0] row_cell_o [K],
  // observation
  output logic [IW:0]       mult_o,
  output logic              blocked_o,
  output logic [DW:0]       voq_len_o [N]
);

  logic [CELL_W-1:0] mem [N*DEPTH];
  logic [DW-1:0]     head_q [N];
  logic [DW-1:0]     tail_q [N];
  logic [DW:0]       len_q  [N];
  logic [N-1:0]      arr;       // accepted arrival, one-hot by VOQ
  logic [IW-1:0]     row_sel [K];

  sra_read_limiter #(.N(N), .K(K)) u_lim (
    .clk      (clk),
    .rst_n    (rst_n),
    .gnt_i    (gnt_i),
    .acc_o    (acc_o),
    .lane_o   (lane_o),
    .mult_o   (mult_o),
    .blocked_o(blocked_o)
  );

  always_comb begin
    arr    = '0;
    drop_o = 1'b0;
    if (in_vld_i) begin
      if (len_q[in_dest_i] == (DW + 1)'(DEPTH)) drop_o = 1'b1;
      else                                      arr[in_dest_i] = 1'b1;
    end
    for (int unsigned j = 0; j < N; j++) begin
      set_o[j]  = arr[j] && (len_q[j] == '0);
      last_o[j] = acc_o[j] && (len_q[j] == (DW + 1)'(1)) && !arr[j];
    end
  end

  // Route each accepted VOQ onto the row link it was given.
  always_comb begin
    row_vld_o = '0;
    for (int unsigned r = 0; r < K; r++) row_sel[r] = '0;
    for (int unsigned j = 0; j < N; j++) begin
      if (acc_o[j]) begin
        row_vld_o[lane_o[j]] = 1'b1;
        row_sel[lane_o[j]]   = IW'(j);
      end
    end
  end

  for (genvar r = 0; r < K; r++) begin : g_rd
    assign row_cell_o[r] = mem[{row_sel[r], head_q[row_sel[r]]}];
  end

  for (genvar j = 0; j < N; j++) begin : g_len
    assign voq_len_o[j] = len_q[j];
  end

  always_ff @(posedge clk) begin
    if (in_vld_i && !drop_o) mem[{in_dest_i, tail_q[in_dest_i]}] <= in_cell_i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned j = 0; j < N; j++) begin
        head_q[j] <= '0;
        tail_q[j] <= '0;
        len_q[j]  <= '0;
      end
    end else begin
      for (int unsigned j = 0; j < N; j++) begin
        if (acc_o[j]) head_q[j] <= head_q[j] + 1'b1;
        if (arr[j])   tail_q[j] <= tail_q[j] + 1'b1;
        len_q[j] <= len_q[j] + (DW + 1)'(arr[j]) - (DW + 1)'(acc_o[j]);
      end
    end
  end

  // A grant only ever names a VOQ that holds a cell.
  for (genvar j = 0; j < N; j++) begin : g_chk
    a_gnt_nonempty: assert property (@(posedge clk) disable iff (!rst_n)
                                     gnt_i[j] |-> (len_q[j] != '0));
  end

endmodule
