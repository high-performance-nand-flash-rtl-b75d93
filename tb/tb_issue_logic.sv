// tb_issue_logic: compares the issue logic with a reference written here in
// a different form. For every queue position the reference scans all older
// entries explicitly rather than carrying accumulators:
//   a command may go if it is valid, not issued, not the second half of a
//   pair, its program data (and its partner's) is present, it is not waiting
//   for a sequential successor, its chip's interface controller is free, no
//   issued command holds its die, no older unissued command targets its die
//   (in-order per die), and, for program/erase, no older read is still in the
//   queue (write-after-read rule). The oldest such command is chosen.
// Random queue states (20000) with the default 8 entries and 4 chips; also
// checks the out-of-order flag and the two blocked-cause flags.
module tb_issue_logic;
  import nand_pkg::*;

  localparam int unsigned Q = QDEPTH;

  qentry_t [Q-1:0] q;
  logic [2:0]      head;
  logic [3:0]      chip_ready;
  logic [3:0][1:0] die_free;
  logic            iss_valid, iss_pair, ooo, war_block, die_block;
  logic [2:0]      iss_idx, iss_idx1;

  issue_logic dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int at(int k);   // slot of age k
    return (int'(head) + k) % Q;
  endfunction

  function automatic bit same_die(qentry_t a, qentry_t b);
    return a.cmd.chip == b.cmd.chip && a.cmd.row[19] == b.cmd.row[19];
  endfunction

  function automatic bit can_go(int k);
    qentry_t e = q[at(k)];
    qentry_t n = q[at(k + 1)];
    if (!e.valid || e.issued || e.second) return 0;
    if (!e.data_ok || e.wait_seq) return 0;
    if (e.seq && !(n.valid && n.data_ok)) return 0;
    if (!chip_ready[e.cmd.chip]) return 0;
    if (!die_free[e.cmd.chip][e.cmd.row[DIE_BIT]]) return 0;
    for (int j = 0; j < Q; j++)
      if (q[j].valid && q[j].issued && same_die(q[j], e)) return 0;
    for (int a = 0; a < k; a++)
      if (q[at(a)].valid && !q[at(a)].issued && same_die(q[at(a)], e)) return 0;
    if (e.cmd.op != OP_READ)
      for (int a = 0; a < k; a++)
        if (q[at(a)].valid && q[at(a)].cmd.op == OP_READ) return 0;
    return 1;
  endfunction

  int n_valid = 0, n_ooo = 0, n_war = 0, n_die = 0, n_pair = 0;

  initial begin
    for (int n = 0; n < 20000; n++) begin
      int exp_k, first_unissued;
      head       = 3'($urandom);
      chip_ready = 4'($urandom) | 4'($urandom);
      die_free   = 8'($urandom) | 8'($urandom);
      for (int s = 0; s < Q; s++) begin
        q[s]            = '0;
        q[s].valid      = ($urandom % 8) != 0;
        q[s].issued     = ($urandom % 4) == 0;
        q[s].done       = q[s].issued && ($urandom % 2);
        q[s].cmd.op     = op_e'($urandom % 3);
        q[s].data_ok    = (q[s].cmd.op != OP_PROGRAM) || ($urandom % 4 != 0);
        q[s].wait_seq   = ($urandom % 8) == 0;
        q[s].cmd.chip   = 2'($urandom % ((n % 3 == 0) ? 2 : 4));
        q[s].cmd.row    = ROW_W'($urandom);
      end
      // some pairs: a first half followed by its second half
      for (int k = 0; k < Q - 1; k++) begin
        if (q[at(k)].valid && !q[at(k)].issued && !q[at(k)].second && ($urandom % 5 == 0)) begin
          q[at(k)].seq = 1;
          q[at(k + 1)].second = 1;
          q[at(k + 1)].valid  = 1;
          q[at(k + 1)].issued = 0;
          q[at(k + 1)].cmd.op   = q[at(k)].cmd.op;
          q[at(k + 1)].cmd.chip = q[at(k)].cmd.chip;
          q[at(k + 1)].cmd.row  = q[at(k)].cmd.row | 1;
          k++;
        end
      end
      #1;
      exp_k = -1;
      for (int k = 0; k < Q; k++) if (exp_k < 0 && can_go(k)) exp_k = k;
      first_unissued = -1;
      for (int k = 0; k < Q; k++)
        if (first_unissued < 0 && q[at(k)].valid && !q[at(k)].issued && !q[at(k)].second) first_unissued = k;
      check(iss_valid == (exp_k >= 0), $sformatf("case %0d: iss_valid %0d expected %0d", n, iss_valid, exp_k >= 0));
      if (exp_k >= 0 && iss_valid) begin
        check(iss_idx == 3'(at(exp_k)), $sformatf("case %0d: slot %0d expected %0d", n, iss_idx, at(exp_k)));
        check(iss_pair == q[at(exp_k)].seq, $sformatf("case %0d: pair flag", n));
        check(!iss_pair || iss_idx1 == 3'(at(exp_k + 1)), $sformatf("case %0d: partner slot", n));
        check(ooo == (exp_k != first_unissued), $sformatf("case %0d: ooo flag", n));
        n_valid++;
        n_ooo  += int'(ooo);
        n_pair += int'(iss_pair);
      end
      n_war += int'(war_block);
      n_die += int'(die_block);
    end
    $display("issued %0d, out of order %0d, pairs %0d, war-blocked %0d, die-blocked %0d",
             n_valid, n_ooo, n_pair, n_war, n_die);
    check(n_ooo > 100 && n_pair > 100 && n_war > 100 && n_die > 100, "all cases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
