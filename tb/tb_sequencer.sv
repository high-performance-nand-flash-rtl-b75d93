// tb_sequencer: the sequencer (command queue, issue logic, I/O data buffer)
// with four behavioural channels written here in place of the interface
// controllers. A fake channel takes one job at a time, reads program data
// out of the input buffer through its read port, keeps page contents in a
// shared array, reports program/erase completion after a random delay,
// makes a read's data available after a random delay, and streams a page
// when the sequencer asks for the transfer.
// The flash-transfer-layer side sends a random mix of reads, programs and
// erases over few dies (so that commands collide), including logically
// sequential pairs marked with the sequential-valid bit. Checked:
//   - commands commit in the order they were given;
//   - read data come out in command order and equal the data of the last
//     older program to the same page (or erased/empty = FFh);
//   - at every issue: no older unissued command to the same die, no issued
//     uncommitted command on the same die, no write while an older read is
//     still in the queue, and pairs are even/odd logical rows of one kind;
//   - out-of-order issue, pairing, both hold-back causes and commit waiting
//     all occur.
module tb_sequencer;
  import nand_pkg::*;

  localparam int unsigned PB = 8;
  localparam int unsigned NC = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              cmd_valid = 0, cmd_ready, wdata_valid = 0, wdata_ready;
  cmd_t              cmd = '0;
  logic [7:0]        wdata = '0, rdata;
  logic              rdata_valid, rdata_ready = 0, cmt_valid;
  cmd_t              cmt_cmd;
  logic [NC-1:0]     iss_valid, iss_ready, xfer_valid, xfer_ready;
  logic [NC-1:0][1:0] die_busy = '0, die_data_ready = '1;   // fake channels: dies always free
  op_e               iss_op;
  logic              iss_pair;
  logic [ROW_W-1:0]  iss_row0, iss_row1, xfer_row;
  logic [2:0]        iss_idx0, iss_idx1, xfer_idx;
  logic [NC-1:0]     fin_valid, fin_pair, ch_rd_valid, ch_rd_ready;
  logic [NC-1:0][2:0] fin_idx0, fin_idx1, buf_idx;
  logic [NC-1:0][2:0] buf_addr;
  logic [NC-1:0][7:0] buf_rdata, ch_rd_data;
  logic              ev_issue, ev_ooo, ev_pair, ev_war_block, ev_die_block, ev_commit_wait;

  sequencer #(.PAGE_BYTES_P(PB)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("FAIL: watchdog (%0d given, %0d committed, head slot %0d)", n_enq, n_commit, dut.head);
    foreach (ents[i]) $display("  waiting: slot %0d op %0d chip %0d row %05h issued %0d", ents[i].slot, ents[i].c.op, ents[i].c.chip, ents[i].c.row, ents[i].issued);
    for (int s = 0; s < QDEPTH; s++) $display("  q[%0d] = %p", s, dut.q[s]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] pbyte(int seed, int b);
    return 8'(seed * 29 + b * 11 + 5);
  endfunction

  // ---- fake channels ------------------------------------------------------
  typedef bit [21:0] key_t;                 // {chip, logical row}
  logic [7:0] fmem [key_t][PB];             // page contents held by the fake flash
  longint     ready_at [key_t];             // when a read's data is available
  longint     cyc = 0;
  always @(posedge clk) cyc++;

  function automatic key_t key(logic [1:0] chip, logic [ROW_W-1:0] row);
    return {chip, row};
  endfunction
  function automatic void erase_block(logic [1:0] chip, logic [ROW_W-1:0] row);
    key_t ks[$];
    foreach (fmem[k]) if (k[21:20] == chip && k[19:8] == row[19:8] && k[0] == row[0]) ks.push_back(k);
    foreach (ks[i]) fmem.delete(ks[i]);
  endfunction

  logic       c_iss_ready [NC], c_xfer_ready [NC], c_fin [NC], c_fin_pair [NC], c_rd_valid [NC];
  logic [2:0] c_fin0 [NC], c_fin1 [NC], c_bidx [NC], c_baddr [NC];
  logic [7:0] c_rd_data [NC];
  always_comb
    for (int c = 0; c < NC; c++) begin
      iss_ready[c]   = c_iss_ready[c];
      xfer_ready[c]  = c_xfer_ready[c];
      fin_valid[c]   = c_fin[c];
      fin_pair[c]    = c_fin_pair[c];
      fin_idx0[c]    = c_fin0[c];
      fin_idx1[c]    = c_fin1[c];
      buf_idx[c]     = c_bidx[c];
      buf_addr[c]    = c_baddr[c];
      ch_rd_valid[c] = c_rd_valid[c];
      ch_rd_data[c]  = c_rd_data[c];
    end

  for (genvar gc = 0; gc < NC; gc++) begin : g_ch
    initial begin
      automatic int c = gc;
      c_iss_ready[c] = 0; c_xfer_ready[c] = 0; c_fin[c] = 0; c_fin_pair[c] = 0;
      c_fin0[c] = 0; c_fin1[c] = 0; c_bidx[c] = 0; c_baddr[c] = 0; c_rd_valid[c] = 0; c_rd_data[c] = 0;
      wait (rst_n);
      forever begin
        @(negedge clk);
        c_fin[c] = 0; c_fin_pair[c] = 0;
        // a waiting transfer goes first, as in the interface controller
        c_xfer_ready[c] = 1;
        #1;
        c_iss_ready[c] = !xfer_valid[c];
        #1;
        if (xfer_valid[c]) begin
          // transfer of the head read
          automatic key_t k = key(2'(c), xfer_row);
          automatic int idx = xfer_idx;
          @(negedge clk);
          c_iss_ready[c] = 0; c_xfer_ready[c] = 0;
          while (!ready_at.exists(k) || cyc < ready_at[k]) @(negedge clk);
          ready_at.delete(k);
          for (int b = 0; b < PB; ) begin
            c_rd_valid[c] = 1;
            c_rd_data[c] = fmem.exists(k) ? fmem[k][b] : 8'hFF;
            #1;
            if (ch_rd_ready[c]) b++;
            @(negedge clk);
          end
          c_rd_valid[c] = 0;
          c_fin[c] = 1; c_fin0[c] = 3'(idx);
        end else if (iss_valid[c]) begin
          automatic op_e op = iss_op;
          automatic bit pr = iss_pair;
          automatic logic [ROW_W-1:0] r[2] = '{iss_row0, iss_row1};
          automatic int ix[2] = '{iss_idx0, iss_idx1};
          @(negedge clk);
          c_iss_ready[c] = 0; c_xfer_ready[c] = 0;
          for (int p = 0; p <= int'(pr); p++) begin
            automatic key_t k = key(2'(c), r[p]);
            if (op == OP_PROGRAM) begin
              logic [7:0] pg [PB];
              // synchronous read port: the byte of an address arrives one clock later
              for (int b = 0; b <= PB; b++) begin
                if (b > 0) pg[b - 1] = buf_rdata[c];
                if (b < PB) begin c_bidx[c] = 3'(ix[p]); c_baddr[c] = 3'(b); @(negedge clk); end
              end
              fmem[k] = pg;
            end else if (op == OP_ERASE) begin
              erase_block(2'(c), r[p]);
            end else begin
              ready_at[k] = cyc + 20 + $urandom % 150;
            end
          end
          if (op != OP_READ) begin
            repeat (2 + $urandom % 40) @(negedge clk);
            c_fin[c] = 1; c_fin_pair[c] = pr; c_fin0[c] = 3'(ix[0]); c_fin1[c] = 3'(ix[1]);
          end
        end
      end
    end
  end

  // ---- scoreboard ----------------------------------------------------------
  typedef struct { cmd_t c; int slot; bit issued; } ent_t;
  ent_t       ents[$];          // given, not yet committed, in order
  cmd_t       sent[$];          // given, in order
  logic [7:0] exp_bytes[$];     // read data in command order
  int         shadow [key_t];   // seed of the last program of a page
  int         n_enq = 0, n_commit = 0, n_rbytes = 0, n_seen_pair = 0;
  int         cnt_issue = 0, cnt_ooo = 0, cnt_pair = 0, cnt_war = 0, cnt_die = 0, cnt_cw = 0;

  always @(negedge clk) if (rst_n) begin
    #2;
    // commit (registered: the entry left the queue at the last edge)
    if (cmt_valid) begin
      check(ents.size() > 0 && ents[0].c == cmt_cmd && ents[0].issued, $sformatf("commit %0d in order", n_commit));
      if (ents.size() > 0) void'(ents.pop_front());
      n_commit++;
    end
    // issue handshakes (inputs are stable between negedge and posedge)
    for (int c = 0; c < NC; c++)
      if (iss_valid[c] && iss_ready[c]) begin
        automatic int pos = -1;
        foreach (ents[i]) if (ents[i].slot == int'(iss_idx0) && !ents[i].issued && pos < 0) pos = i;
        check(pos >= 0, "issued slot is a waiting command");
        if (pos >= 0) begin
          automatic ent_t e = ents[pos];
          check(int'(e.c.chip) == c, "issued to the command's own channel");
          for (int j = 0; j < ents.size(); j++) begin
            automatic bit sd = ents[j].c.chip == e.c.chip && ents[j].c.row[DIE_BIT] == e.c.row[DIE_BIT];
            if (j < pos && !ents[j].issued && sd) check(0, "same-die command issued ahead of an older one");
            if (j != pos && ents[j].issued && sd) check(0, "die already holds an uncommitted command");
            if (j < pos && is_write(e.c.op) && ents[j].c.op == OP_READ) check(0, "write issued before an older read committed");
          end
          checks++;
          ents[pos].issued = 1;
          if (iss_pair) begin
            check(pos + 1 < ents.size() && ents[pos + 1].slot == int'(iss_idx1), "pair partner is the next command");
            if (pos + 1 < ents.size()) begin
              check(ents[pos + 1].c.op == e.c.op && ents[pos + 1].c.chip == e.c.chip &&
                    !e.c.row[0] && ents[pos + 1].c.row == (e.c.row | 1), "pair is an even/odd row couple");
              ents[pos + 1].issued = 1;
            end
            n_seen_pair++;
          end
        end
      end
    // read data
    if (rdata_valid && rdata_ready) begin
      check(exp_bytes.size() > 0, "read byte expected");
      if (exp_bytes.size() > 0) begin
        automatic logic [7:0] eb = exp_bytes.pop_front();
        check(rdata == eb, $sformatf("read byte %0d: %02h expected %02h", n_rbytes, rdata, eb));
      end
      n_rbytes++;
    end
  end

  always @(posedge clk) if (rst_n) begin
    cnt_issue += int'(ev_issue);
    cnt_ooo   += int'(ev_ooo);
    cnt_pair  += int'(ev_pair);
    cnt_war   += int'(ev_war_block);
    cnt_die   += int'(ev_die_block);
    cnt_cw    += int'(ev_commit_wait);
  end

  always @(negedge clk) rdata_ready <= ($urandom % 4) != 0;

  task automatic give(cmd_t c);
    int seed = n_enq + 1;
    cmd_valid = 1; cmd = c;
    #1;
    while (!cmd_ready) begin @(negedge clk); #1; end
    ents.push_back('{c: c, slot: n_enq % QDEPTH, issued: 0});
    sent.push_back(c);
    n_enq++;
    if (c.op == OP_PROGRAM) shadow[key(c.chip, c.row)] = seed;
    if (c.op == OP_ERASE) begin
      key_t ks[$];
      foreach (shadow[k]) if (k[21:20] == c.chip && k[19:8] == c.row[19:8] && k[0] == c.row[0]) ks.push_back(k);
      foreach (ks[i]) shadow.delete(ks[i]);
    end
    if (c.op == OP_READ)
      for (int b = 0; b < PB; b++)
        exp_bytes.push_back(shadow.exists(key(c.chip, c.row)) ? pbyte(shadow[key(c.chip, c.row)], b) : 8'hFF);
    @(negedge clk);
    cmd_valid = 0;
    if (c.op == OP_PROGRAM)
      for (int b = 0; b < PB; ) begin
        wdata_valid = ($urandom % 5) != 0; wdata = pbyte(seed, b);
        #1;
        if (wdata_valid && wdata_ready) b++;
        @(negedge clk);
      end
    wdata_valid = 0;
  endtask

  function automatic cmd_t mk(op_e op, int chip, int die, int blk, int page, bit seq);
    cmd_t c;
    c.seq = seq; c.op = op; c.chip = 2'(chip);
    c.row = ROW_W'((die << 19) | ((blk >> 1) << 8) | (page << 1) | (blk & 1));
    return c;
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    for (int n = 0; n < 1500; n++) begin
      automatic int r = $urandom % 10;
      automatic int chip = $urandom % 3, die = $urandom % 2, blk = $urandom % 4, page = $urandom % 4;
      automatic op_e op = (r < 5) ? OP_READ : (r < 9) ? OP_PROGRAM : OP_ERASE;
      if ($urandom % 3 == 0) begin
        // a logically sequential couple: even block then odd block
        blk = blk & ~1;
        give(mk(op, chip, die, blk, page, 1));
        give(mk(op, chip, die, blk + 1, page, 0));
      end else
        give(mk(op, chip, die, blk, page, 0));
    end
    // drain
    while (n_commit < n_enq) @(negedge clk);
    repeat (50) @(negedge clk);
    check(exp_bytes.size() == 0, $sformatf("%0d read bytes never arrived", exp_bytes.size()));
    check(ents.size() == 0, "everything committed");
    $display("commands %0d, issued %0d, out of order %0d, pairs %0d, war hold %0d, die hold %0d, commit wait %0d",
             n_enq, cnt_issue, cnt_ooo, cnt_pair, cnt_war, cnt_die, cnt_cw);
    check(cnt_pair == n_seen_pair && cnt_pair > 50, "pairs issued");
    check(cnt_ooo > 50 && cnt_war > 50 && cnt_die > 50 && cnt_cw > 50, "all mechanisms exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
