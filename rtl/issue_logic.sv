// issue_logic: the sequencer's out-of-order issue decision (combinational).
//
// Commands are grouped into reads and writes (program, erase). Walking the
// queue from oldest to newest, an entry may issue when
//   - it is valid, not yet issued and not the second half of a two-plane pair
//     (that half goes out with the first), it does not wait for its
//     sequential successor (wait_seq), and its program data, and its
//     partner's, is in the input buffer;
//   - its chip's interface controller can take a command (chip_ready) and
//     its die FSM reports the die idle (die_free), so a command never waits
//     inside the interface controller for a busy die and blocks the chip;
//   - no issued, uncommitted entry already occupies its die, and no older
//     entry for the same die still waits to issue: commands to one die run in
//     order, and a die stays reserved until its command commits so a read's
//     page is not overwritten in the data register before it is transferred;
//   - for a write: no older read is still in the queue (write-after-read
//     prevention; the document halts every write until all earlier reads are
//     finished, on any die, since the data to be written may come from them).
// Only the chip and die are compared, not full addresses; that is enough
// because a die is the smallest unit of execution. The oldest entry that may
// issue is chosen. These rules are the document's; the die reservation until
// commit is this design's reading of them.
//
// Status outputs for observation: ooo (the chosen entry is not the oldest
// waiting one), war_block (some write waits only because of an older read),
// die_block (some entry waits only because of its die).
module issue_logic
  import nand_pkg::*;
#(
  parameter int unsigned QDEPTH_P = QDEPTH,
  parameter int unsigned NCHIP_P  = NCHIP,
  localparam int unsigned IDXW    = $clog2(QDEPTH_P)
) (
  input  qentry_t [QDEPTH_P-1:0] q,
  input  logic [IDXW-1:0]        head,
  input  logic [NCHIP_P-1:0]     chip_ready,
  input  logic [NCHIP_P-1:0][1:0] die_free,   // die FSM idle: may take a command
  output logic                   iss_valid,
  output logic [IDXW-1:0]        iss_idx,
  output logic                   iss_pair,
  output logic [IDXW-1:0]        iss_idx1,
  output logic                   ooo,
  output logic                   war_block,
  output logic                   die_block
);

  function automatic logic [IDXW-1:0] slot(logic [IDXW-1:0] h, int k);
    return IDXW'((int'(h) + k) % QDEPTH_P);
  endfunction

  always_comb begin
    logic [NCHIP_P-1:0][1:0] occupied, older_wait;
    logic                    older_read, first_wait_found, data_ready_all;
    logic                    base_ok, die_ok, war_ok;
    logic [IDXW-1:0]         i, nxt;
    logic                    d;
    int unsigned             c;

    data_ready_all = 1'b0;
    base_ok    = 1'b0;
    die_ok     = 1'b0;
    war_ok     = 1'b0;
    i          = '0;
    nxt        = '0;
    d          = 1'b0;
    c          = 0;
    occupied   = '0;
    older_wait = '0;
    older_read = 1'b0;
    first_wait_found = 1'b0;
    iss_valid  = 1'b0;
    iss_idx    = '0;
    iss_pair   = 1'b0;
    iss_idx1   = '0;
    ooo        = 1'b0;
    war_block  = 1'b0;
    die_block  = 1'b0;

    for (int k = 0; k < QDEPTH_P; k++) begin
      i = IDXW'(k);
      if (q[i].valid && q[i].issued)
        occupied[32'(q[i].cmd.chip) % NCHIP_P][q[i].cmd.row[DIE_BIT]] = 1'b1;
    end

    for (int k = 0; k < QDEPTH_P; k++) begin
      i   = slot(head, k);
      nxt = slot(head, k + 1);
      c   = 32'(q[i].cmd.chip) % NCHIP_P;
      d   = q[i].cmd.row[DIE_BIT];
      if (q[i].valid && !q[i].issued && !q[i].second) begin
        data_ready_all = q[i].data_ok && !q[i].wait_seq && (!q[i].seq || (q[nxt].valid && q[nxt].data_ok));
        base_ok = data_ready_all && chip_ready[c] && die_free[c][d];
        die_ok  = !occupied[c][d] && !older_wait[c][d];
        war_ok  = !(is_write(q[i].cmd.op) && older_read);
        if (base_ok && die_ok && war_ok && !iss_valid) begin
          iss_valid = 1'b1;
          iss_idx   = i;
          iss_pair  = q[i].seq;
          iss_idx1  = nxt;
          ooo       = first_wait_found;
        end
        if (data_ready_all && die_ok && !war_ok) war_block = 1'b1;
        if (data_ready_all && !die_ok && war_ok) die_block = 1'b1;
        first_wait_found = 1'b1;
      end
      if (q[i].valid && !q[i].issued) older_wait[c][d] = 1'b1;
      if (q[i].valid && q[i].cmd.op == OP_READ) older_read = 1'b1;
    end
  end

endmodule
