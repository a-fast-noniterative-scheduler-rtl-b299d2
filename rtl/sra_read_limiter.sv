// sra_read_limiter: chooses which grants one input port can serve this slot.
//
// Under SRA several output arbiters may grant the same input in one slot.
// The input then has to read several cells from its VOQ memory at once and
// put them on separate crossbar rows; the fabric gives each input K rows
// (K = 3 by default), so at most K grants can be served.  Up to K grants
// pass, the rest are refused ("input blocking") and their arbiters retry the
// same input next slot.  The K-row crossbar follows the published design;
// how the K grants are picked is this implementation's choice: grants are
// scanned in output order starting at a rotating pointer, and when a grant
// is refused the pointer moves to the first refused output, so a blocked
// grant is served first in the next slot and blocking never lasts
// longer than ceil(N/K) slots.
//
// Interface:
//   gnt_i[j]   output arbiter j grants this input in this slot.
//   acc_o[j]   the grant of output j is served this slot.
//   lane_o[j]  row link (0..K-1) that carries the cell for output j.
//   mult_o     cell multiplicity: number of cells the input sends this slot.
//   blocked_o  at least one grant was refused this slot.
// Purely combinational from gnt_i and the pointer register; the pointer
// updates at the end of the slot.
module sra_read_limiter #(
  parameter int unsigned N  = sra_pkg::N_PORTS,
  parameter int unsigned K  = sra_pkg::K_ROWS,
  parameter int unsigned IW = (N > 1) ? $clog2(N) : 1,
  parameter int unsigned LW = (K > 1) ? $clog2(K) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  gnt_i,
  output logic [N-1:0]  acc_o,
  output logic [LW-1:0] lane_o [N],
  output logic [IW:0]   mult_o,
  output logic          blocked_o
);

  logic [IW-1:0] ptr_q, ptr_d;

  always_comb begin
    logic [IW:0]   used;
    logic          refused;
    logic [IW-1:0] j;
    used    = '0;
    refused = 1'b0;
    ptr_d   = ptr_q;
    acc_o   = '0;
    for (int unsigned o = 0; o < N; o++) lane_o[o] = '0;
    for (int unsigned s = 0; s < N; s++) begin
      j = IW'((32'(ptr_q) + s) % N);
      if (gnt_i[j]) begin
        if (used < (IW + 1)'(K)) begin
          acc_o[j]  = 1'b1;
          lane_o[j] = LW'(used);
          used      = used + 1'b1;
        end else if (!refused) begin
          refused = 1'b1;
          ptr_d   = j;
        end
      end
    end
    mult_o    = used;
    blocked_o = refused;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ptr_q <= '0;
    else        ptr_q <= ptr_d;
  end

endmodule
