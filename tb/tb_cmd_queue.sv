// tb_cmd_queue: random traffic on all ports of the command queue, compared
// after every clock with a reference queue kept here. The reference decides
// two-plane pairing from decoded fields (die, block, page): a new command
// joins the newest entry when both have the same operation, chip and die,
// blocks 2n and 2n+1 in that order, the same page (not compared for erase),
// and the newest entry is still waiting (not issued, not already in a pair,
// not issued or removed in the same clock). Also checked: the full/empty
// limits of the eight-entry queue, the wait-for-successor flag, program data
// flags, and that entries leave only from the head.
module tb_cmd_queue;
  import nand_pkg::*;

  localparam int unsigned Q = QDEPTH;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        enq_valid = 0, enq_ready, data_ok_set = 0, iss_set = 0, iss_pair = 0, pop = 0;
  cmd_t        enq_cmd = '0;
  logic [2:0]  enq_idx, data_ok_idx = '0, iss_idx = '0, head;
  logic [Q-1:0] done_set = '0;
  qentry_t [Q-1:0] q;
  logic [3:0]  count;

  cmd_queue dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  qentry_t rq [Q];
  int rhead = 0, rtail = 0, rcount = 0;

  function automatic bit ref_pairable(cmd_t a, cmd_t b);
    int da = a.row[19], db = b.row[19];
    // block = {row[18:8], row[0]}, page = row[7:1]
    int ba = ((a.row >> 8) % 2048) * 2 + a.row[0], bb = ((b.row >> 8) % 2048) * 2 + b.row[0];
    int pa = (a.row >> 1) % 128, pb = (b.row >> 1) % 128;
    return a.op == b.op && a.chip == b.chip && da == db && (ba % 2 == 0) && bb == ba + 1 &&
           (a.op == OP_ERASE || pa == pb);
  endfunction

  cmd_t last_cmd = '0;
  int n_pairs = 0, n_full = 0, n_pop = 0;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 30000; n++) begin
      int prev, cand[$];
      bit exp_pair;
      // ---- choose this clock's inputs -----------------------------------
      enq_valid = $urandom % 3 != 0;
      if ($urandom % 2) begin
        // the logical successor of the last command
        enq_cmd = last_cmd;
        enq_cmd.row = last_cmd.row + 1;
        if ($urandom % 6 == 0) enq_cmd.op = op_e'($urandom % 3);
        if ($urandom % 6 == 0) enq_cmd.row = enq_cmd.row + ROW_W'(256);
      end else begin
        enq_cmd.op   = op_e'($urandom % 3);
        enq_cmd.chip = 2'($urandom);
        enq_cmd.row  = ROW_W'($urandom);
      end
      enq_cmd.seq = $urandom % 2;
      // issue a waiting first-half entry
      iss_set = 0; cand = {};
      for (int s = 0; s < Q; s++) if (rq[s].valid && !rq[s].issued && !rq[s].second) cand.push_back(s);
      if (cand.size() > 0 && $urandom % 2) begin
        iss_set = 1; iss_idx = 3'(cand[$urandom % cand.size()]); iss_pair = rq[iss_idx].seq;
      end
      // finish some issued entries
      done_set = '0;
      for (int s = 0; s < Q; s++) if (rq[s].valid && rq[s].issued && !rq[s].done && $urandom % 3 == 0) done_set[s] = 1;
      // program data arrives
      data_ok_set = 0; cand = {};
      for (int s = 0; s < Q; s++) if (rq[s].valid && !rq[s].data_ok) cand.push_back(s);
      if (cand.size() > 0 && $urandom % 2) begin data_ok_set = 1; data_ok_idx = 3'(cand[0]); end
      pop = rq[rhead].valid && rq[rhead].done && ($urandom % 4 != 0);
      #1;
      check(enq_ready == (rcount < Q), $sformatf("enq_ready with %0d entries", rcount));
      check(enq_idx == 3'(rtail), "enq_idx is the tail");
      // ---- reference next state ----------------------------------------
      prev = (rtail + Q - 1) % Q;
      exp_pair = enq_valid && rcount < Q && rcount > 0 && rq[prev].valid && !rq[prev].issued &&
                 !rq[prev].seq && !rq[prev].second && !(iss_set && iss_idx == 3'(prev)) &&
                 !(pop && rhead == prev) && ref_pairable(rq[prev].cmd, enq_cmd);
      for (int s = 0; s < Q; s++) if (done_set[s]) rq[s].done = 1;
      if (data_ok_set) rq[data_ok_idx].data_ok = 1;
      if (iss_set) begin
        rq[iss_idx].issued = 1;
        if (iss_pair) rq[(iss_idx + 1) % Q].issued = 1;
      end
      if (pop) begin rq[rhead] = '0; rhead = (rhead + 1) % Q; rcount--; n_pop++; end
      if (enq_valid && rcount + int'(pop) < Q) begin
        rq[prev].wait_seq = 0;
        if (exp_pair) begin rq[prev].seq = 1; n_pairs++; end
        rq[rtail] = '0;
        rq[rtail].valid = 1;
        rq[rtail].wait_seq = enq_cmd.seq;
        rq[rtail].data_ok = enq_cmd.op != OP_PROGRAM;
        rq[rtail].second = exp_pair;
        rq[rtail].cmd = enq_cmd;
        rtail = (rtail + 1) % Q;
        rcount++;
        last_cmd = enq_cmd;
      end
      if (enq_valid && !enq_ready) n_full++;
      @(negedge clk);
      enq_valid = 0; iss_set = 0; done_set = '0; data_ok_set = 0; pop = 0;
      // ---- compare -------------------------------------------------------
      check(head == 3'(rhead) && count == 4'(rcount), $sformatf("head %0d/%0d count %0d/%0d", head, rhead, count, rcount));
      for (int s = 0; s < Q; s++)
        if (rq[s].valid || q[s].valid)
          check(q[s] == rq[s], $sformatf("slot %0d: %p expected %p", s, q[s], rq[s]));
    end
    $display("pairs %0d, full cycles %0d, pops %0d", n_pairs, n_full, n_pop);
    check(n_pairs > 200 && n_full > 200 && n_pop > 1000, "traffic covered pairing, full queue and removal");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
