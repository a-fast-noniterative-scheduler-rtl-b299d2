// sra_output_arbiter: the scheduler of one output port in an SRA switch.
//
// The arbiter keeps a FIFO of the numbers of the input ports that hold cells
// for its output, in the order in which their virtual output queues (VOQs)
// became nonempty.  In every time slot it grants the input at the head of the
// FIFO.  When that input sends its cell the head is removed and, unless the
// input reports that its VOQ has just become empty, put back at the tail.
// Serving the head and re-queueing it behind the others is what makes the
// arbiter round-robin over the inputs that have traffic, and no input can
// appear twice, so the FIFO never holds more than N entries.  This is the
// published algorithm.
//
// Interface (one clock cycle = one time slot):
//   set_i[i]   input i reports that its VOQ for this output went from empty
//              to nonempty in this slot; i is appended at the end of the slot.
//   gnt_vld_o  / gnt_id_o: the grant of this slot (the head of the FIFO),
//              a function of registered state only.
//   acc_i      the granted input sent its cell this slot.  If it did not
//              (the input was short of read ports, see sra_read_limiter) the
//              head stays and is granted again next slot.  Waiting on an
//              acceptance is this implementation's addition.
//   last_i     with acc_i: the cell sent was the last one of the VOQ, so the
//              input is not re-queued.
// Ordering within one slot (own choice): the re-queued head goes in first,
// then the newly active inputs in ascending input number.
module sra_output_arbiter #(
  parameter int unsigned N  = sra_pkg::N_PORTS,
  parameter int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  set_i,
  output logic          gnt_vld_o,
  output logic [IW-1:0] gnt_id_o,
  input  logic          acc_i,
  input  logic          last_i,
  output logic [IW:0]   count_o,
  output logic [N-1:0]  member_o
);

  logic [IW-1:0] q_q   [N];
  logic [IW-1:0] q_d   [N];
  logic [IW:0]   cnt_q, cnt_d;
  logic [N-1:0]  mem_q, mem_d;

  assign gnt_vld_o = (cnt_q != '0);
  assign gnt_id_o  = q_q[0];
  assign count_o   = cnt_q;
  assign member_o  = mem_q;

  always_comb begin
    logic        pop;
    logic [IW:0] wr;
    pop   = gnt_vld_o && acc_i;
    mem_d = mem_q;
    // Remove the head when it was served.
    for (int unsigned e = 0; e < N; e++) begin
      if (pop) q_d[e] = (e + 1 < N) ? q_q[e + 1] : '0;
      else     q_d[e] = q_q[e];
    end
    wr = pop ? cnt_q - 1'b1 : cnt_q;
    if (pop) mem_d[q_q[0]] = 1'b0;
    // Put the served input back at the tail if its VOQ still holds cells.
    if (pop && !last_i) begin
      q_d[wr[IW-1:0]] = q_q[0];
      mem_d[q_q[0]]   = 1'b1;
      wr              = wr + 1'b1;
    end
    // Append inputs whose VOQ became nonempty, lowest input number first.
    for (int unsigned i = 0; i < N; i++) begin
      if (set_i[i] && wr < (IW + 1)'(N)) begin
        q_d[wr[IW-1:0]] = IW'(i);
        mem_d[i]        = 1'b1;
        wr              = wr + 1'b1;
      end
    end
    cnt_d = wr;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q <= '0;
      mem_q <= '0;
      for (int unsigned e = 0; e < N; e++) q_q[e] <= '0;
    end else begin
      cnt_q <= cnt_d;
      mem_q <= mem_d;
      for (int unsigned e = 0; e < N; e++) q_q[e] <= q_d[e];
    end
  end

  // An input announces a nonempty VOQ only while it is not queued here, so
  // the FIFO can never overflow.
  a_no_dup_set: assert property (@(posedge clk) disable iff (!rst_n)
                                 (set_i & mem_q) == '0);
  a_last_needs_acc: assert property (@(posedge clk) disable iff (!rst_n)
                                     last_i |-> acc_i);

endmodule
