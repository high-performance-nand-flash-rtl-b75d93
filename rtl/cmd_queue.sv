// cmd_queue: the sequencer's command queue, a circular buffer of QDEPTH_P
// entries kept in arrival order (head = oldest).
//
// Each entry holds the command and its progress flags (see nand_pkg::qentry_t):
// issued, done, data_ok (program page present in the input buffer) and the
// two-plane pairing state. A command that arrives with its sequential-valid
// bit set (cmd.seq) is held in `wait_seq` until the next command arrives. When
// a command arrives that forms a two-plane pair with the newest entry still
// waiting to issue (same op, chip and die, same page, block bit 0 going
// 0 -> 1; see nand_pkg::pairable), that entry's `seq` bit is set and the new
// entry is marked `second`; the pair then issues as one two-plane command. If
// the successor does not pair, the held entry simply issues alone. The
// sequential-valid bit is the document's; holding on it, pairing only against
// the entry just before, and the flag names are this design's choice.
//
// Entries leave only from the head (in-order commitment): `pop` removes the
// head, which the sequencer does once its `done` flag is set. The slot index
// of an entry is fixed for its lifetime and is used as its tag in the
// interface controllers and as its input-buffer slot.
// All updates take effect at the next clock edge; enq_ready = not full.
module cmd_queue
  import nand_pkg::*;
#(
  parameter int unsigned QDEPTH_P = QDEPTH,
  localparam int unsigned IDXW    = $clog2(QDEPTH_P)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // enqueue at the tail
  input  logic                 enq_valid,
  output logic                 enq_ready,
  input  cmd_t                 enq_cmd,
  output logic [IDXW-1:0]      enq_idx,
  // program data of an entry has been written
  input  logic                 data_ok_set,
  input  logic [IDXW-1:0]      data_ok_idx,
  // entry (and, for a pair, the next one) handed to an interface controller
  input  logic                 iss_set,
  input  logic [IDXW-1:0]      iss_idx,
  input  logic                 iss_pair,
  // finished entries, one bit per slot
  input  logic [QDEPTH_P-1:0]  done_set,
  // remove the head
  input  logic                 pop,
  // state
  output qentry_t [QDEPTH_P-1:0] q,
  output logic [IDXW-1:0]      head,
  output logic [IDXW:0]        count
);

  logic [IDXW-1:0] tail, prev;

  function automatic logic [IDXW-1:0] inc(logic [IDXW-1:0] i);
    return (i == IDXW'(QDEPTH_P - 1)) ? '0 : i + 1'b1;
  endfunction

  assign enq_ready = (count != (IDXW+1)'(QDEPTH_P));
  assign enq_idx   = tail;
  assign prev      = (tail == '0) ? IDXW'(QDEPTH_P - 1) : tail - 1'b1;

  wire enq = enq_valid && enq_ready;

  // pair the new command with the newest waiting entry
  wire prev_pairable = (count != '0) && q[prev].valid && !q[prev].issued &&
                       !q[prev].seq && !q[prev].second &&
                       !(iss_set && iss_idx == prev) &&
                       !(pop && head == prev) &&
                       pairable(q[prev].cmd, enq_cmd);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q     <= '0;
      head  <= '0;
      tail  <= '0;
      count <= '0;
    end else begin
      for (int i = 0; i < QDEPTH_P; i++) begin
        if (done_set[i]) q[i].done <= 1'b1;
      end
      if (data_ok_set) q[data_ok_idx].data_ok <= 1'b1;
      if (iss_set) begin
        q[iss_idx].issued <= 1'b1;
        if (iss_pair) q[inc(iss_idx)].issued <= 1'b1;
      end
      if (pop) begin
        q[head] <= '0;
        head    <= inc(head);
      end
      if (enq) begin
        q[prev].wait_seq <= 1'b0;
        q[tail].valid   <= 1'b1;
        q[tail].wait_seq <= enq_cmd.seq;
        q[tail].issued  <= 1'b0;
        q[tail].done    <= 1'b0;
        q[tail].data_ok <= (enq_cmd.op != OP_PROGRAM);
        q[tail].seq     <= 1'b0;
        q[tail].second  <= prev_pairable;
        q[tail].cmd     <= enq_cmd;
        if (prev_pairable) q[prev].seq <= 1'b1;
        tail <= inc(tail);
      end
      count <= count + (IDXW+1)'(enq) - (IDXW+1)'(pop);
    end
  end

  // a pair is issued only as a whole, and only from its first entry
  a_issue: assert property (@(posedge clk) disable iff (!rst_n)
    iss_set |-> (q[iss_idx].valid && !q[iss_idx].issued && !q[iss_idx].second))
    else $error("cmd_queue: bad issue of slot %0d", iss_idx);
  a_pair: assert property (@(posedge clk) disable iff (!rst_n)
    iss_set |-> (iss_pair == q[iss_idx].seq))
    else $error("cmd_queue: pair flag does not match the sequential bit");
  a_pop: assert property (@(posedge clk) disable iff (!rst_n)
    pop |-> (q[head].valid && q[head].done))
    else $error("cmd_queue: pop of an unfinished head");

endmodule
