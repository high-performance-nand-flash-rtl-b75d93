// tb_nand_ctrl_top: end-to-end test of the controller with four flash-chip
// models, small pages and short array times.
//
// The testbench plays the flash transfer layer. It keeps a shadow copy of the
// flash contents updated in command order, so the data every read must return
// is known when the read is sent; since the controller must behave as if it
// ran the commands in order, any hazard it mishandles shows up as a data
// mismatch. It also checks that commits come back in command order, that the
// chip models saw no protocol violation, and that every mechanism of the
// design happened: out-of-order issue, two-plane read/program/erase,
// interleaved use of the two dies of a chip, write-after-read holding,
// same-die holding, in-order commit holding and a full command queue.
// A directed case repeats the in-order commitment example: reads on idle
// chips overtake a program that waits for its erasing die, and their pages
// must stay in the dies until the program has committed.
// One cycle-count check: a single page read on an idle chip must commit
// within the number of clocks the bus sequence and tR add up to.
module tb_nand_ctrl_top;
  import nand_pkg::*;

  localparam int unsigned PB     = 16;
  localparam int unsigned T_R    = 300;
  localparam int unsigned T_PROG = 900;
  localparam int unsigned T_BERS = 1500;
  localparam int unsigned T_RST  = 60;
  localparam int unsigned NC     = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic             cmd_valid = 0, cmd_ready;
  cmd_t             cmd;
  logic             wdata_valid = 0, wdata_ready;
  logic [7:0]       wdata = 0;
  logic             rdata_valid, rdata_ready = 0;
  logic [7:0]       rdata;
  logic             cmt_valid;
  cmd_t             cmt_cmd;
  logic [NC-1:0]    init_done, proto_err;
  logic [NC-1:0][1:0] die_busy, die_data_ready;
  logic ev_issue, ev_ooo, ev_pair, ev_war_block, ev_die_block, ev_commit_wait;
  logic [NC-1:0]    ce_n, cle, ale, we_n, re_n, wp_n, dq_oe, rb_n;
  logic [NC-1:0][7:0] dq_out, dq_in;

  nand_ctrl_top #(.PAGE_BYTES_P(PB)) dut (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd, .wdata_valid, .wdata_ready, .wdata,
    .rdata_valid, .rdata_ready, .rdata, .cmt_valid, .cmt_cmd,
    .init_done, .die_busy, .die_data_ready, .proto_err,
    .ev_issue, .ev_ooo, .ev_pair, .ev_war_block, .ev_die_block, .ev_commit_wait,
    .ce_n, .cle, .ale, .we_n, .re_n, .wp_n, .dq_out, .dq_oe, .dq_in, .rb_n
  );

  for (genvar c = 0; c < NC; c++) begin : g_flash
    nand_flash_model #(.PAGE_BYTES(PB), .T_R(T_R), .T_PROG(T_PROG), .T_BERS(T_BERS), .T_RST(T_RST)) u_f (
      .clk, .ce_n(ce_n[c]), .cle(cle[c]), .ale(ale[c]), .we_n(we_n[c]), .re_n(re_n[c]),
      .wp_n(wp_n[c]), .dq_i(dq_out[c]), .dq_o(dq_in[c]), .rb_n(rb_n[c])
    );
  end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  // ---- shadow flash contents, in command order ---------------------------
  int   seed_of [bit [21:0]];   // {chip, logical row} -> data seed
  cmd_t sent_q[$];              // commands sent, awaiting commit
  logic [7:0] exp_bytes[$];     // read bytes expected, in order

  function automatic logic [7:0] data_byte(int seed, int i);
    return 8'((seed * 29) + (i * 7) + (i >> 3));
  endfunction

  function automatic bit same_block(logic [ROW_W-1:0] a, logic [ROW_W-1:0] b);
    return a[ROW_W-1:PAGE_W+1] == b[ROW_W-1:PAGE_W+1] && a[0] == b[0];
  endfunction

  int next_seed = 1;
  int n_sent = 0;
  int queue_full = 0;

  task automatic send(op_e op, int chip, logic [ROW_W-1:0] row, bit seq = 0);
    cmd_t c;
    int   s;
    c.seq = seq; c.op = op; c.chip = 2'(chip); c.row = row;
    // shadow update and expected read data, in command order
    if (op == OP_READ) begin
      s = seed_of.exists({2'(chip), row}) ? seed_of[{2'(chip), row}] : -1;
      for (int i = 0; i < PB; i++) exp_bytes.push_back(s < 0 ? 8'hFF : data_byte(s, i));
    end else if (op == OP_ERASE) begin
      bit [21:0] keys[$];
      foreach (seed_of[k]) if (k[21:20] == 2'(chip) && same_block(k[19:0], row)) keys.push_back(k);
      foreach (keys[j]) seed_of.delete(keys[j]);
    end else begin
      s = next_seed++;
      seed_of[{2'(chip), row}] = s;
    end
    sent_q.push_back(c);
    n_sent++;
    // drive between clock edges; a transfer happens at the rising edge when
    // valid and ready are both high
    @(negedge clk);
    cmd_valid = 1'b1; cmd = c;
    while (!cmd_ready) begin queue_full++; @(negedge clk); end
    @(negedge clk);
    cmd_valid = 1'b0;
    if (op == OP_PROGRAM) begin
      for (int i = 0; i < PB; i++) begin
        wdata_valid = 1'b1; wdata = data_byte(s, i);
        while (!wdata_ready) @(negedge clk);
        @(negedge clk);
      end
      wdata_valid = 1'b0;
    end
  endtask

  function automatic logic [ROW_W-1:0] lrow(int die, int blk, int page);
    // logical two-plane row: {die, block[11:1], page, block[0]}
    logic [ROW_W-1:0] r;
    r = '0;
    r[DIE_BIT] = 1'(die);
    r[DIE_BIT-1:PAGE_W+1] = 11'(blk >> 1);
    r[PAGE_W:1] = 7'(page);
    r[0] = 1'(blk & 1);
    return r;
  endfunction

  // ---- read-data and commit monitors ----------------------------------------
  int n_rbytes = 0, n_commits = 0;
  always @(posedge clk) begin
    rdata_ready <= ($urandom % 8) != 0;
    if (rst_n && rdata_valid && rdata_ready) begin
      n_rbytes++;
      if (exp_bytes.size() == 0) check(0, "read byte with none expected");
      else begin
        logic [7:0] e;
        e = exp_bytes.pop_front();
        check(rdata == e, $sformatf("read byte %0d: got %02h expected %02h", n_rbytes, rdata, e));
      end
    end
    if (rst_n && cmt_valid) begin
      n_commits++;
      if (sent_q.size() == 0) check(0, "commit with nothing outstanding");
      else begin
        cmd_t e;
        e = sent_q.pop_front();
        check(cmt_cmd == e, $sformatf("commit order: got op%0d chip%0d row%05h expected op%0d chip%0d row%05h",
              cmt_cmd.op, cmt_cmd.chip, cmt_cmd.row, e.op, e.chip, e.row));
      end
    end
  end

  // ---- mechanism counters ------------------------------------------------------
  int c_ooo = 0, c_pair = 0, c_war = 0, c_die = 0, c_cwait = 0, c_perr = 0;
  always @(posedge clk) if (rst_n) begin
    c_ooo   += int'(ev_ooo);
    c_pair  += int'(ev_pair);
    c_war   += int'(ev_war_block);
    c_die   += int'(ev_die_block);
    c_cwait += int'(ev_commit_wait);
    c_perr  += int'(|proto_err);
  end

  // scenario 7 monitor: cycles in which chip 2 die 0 holds a read page while
  // the program on chip 1 has not committed yet
  bit s7_pending = 0;
  int s7_held = 0;
  always @(posedge clk) if (s7_pending) begin
    if (die_data_ready[2][0]) s7_held++;
    if (cmt_valid && cmt_cmd.op == OP_PROGRAM && cmt_cmd.chip == 2'd1) s7_pending = 0;
  end

  task automatic drain();
    int t;
    t = 0;
    while ((sent_q.size() != 0 || exp_bytes.size() != 0) && t < 200000) begin @(posedge clk); t++; end
    check(sent_q.size() == 0 && exp_bytes.size() == 0, "drain: all commands committed and data read");
  endtask

  initial begin
    #200000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int t0, lat;
  int sum_viol, sum_r2, sum_p2, sum_e2, sum_il;

  initial begin
    cmd = '0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    wait (&init_done);
    @(posedge clk);
    check(1, "init");

    // 1. single read of an erased page on an idle chip: latency check
    t0 = $time / 10;
    send(OP_READ, 3, lrow(1, 40, 5));
    wait (cmt_valid);
    lat = $time / 10 - t0;
    // poll 78h: 4 bus cycles (8 clk) + tWHR (7) + status (2); read setup:
    // 7 bus cycles (14 clk) + tR; poll again after tR: 17; 00h: 2 + 7;
    // page out: 2*PB; plus a few clocks of hand-over.
    $display("single read latency %0d clocks", lat);
    check(lat >= int'(T_R) + 2 * int'(PB) + 40 && lat <= int'(T_R) + 2 * int'(PB) + 120,
          $sformatf("single read latency %0d", lat));
    drain();

    // 2. erase: two-plane erases of blocks 0/1 on every die of every chip,
    //    a single-plane erase of block 2 on chip 0 die 0
    for (int c = 0; c < NC; c++)
      for (int d = 0; d < 2; d++) begin
        send(OP_ERASE, c, lrow(d, 0, 0), 1);
        send(OP_ERASE, c, lrow(d, 1, 0));
      end
    send(OP_ERASE, 0, lrow(0, 2, 0));
    drain();

    // 3. sequential program: pages 0..3 of blocks 0/1 (two-plane pairs),
    //    interleaving the dies, and one single page in block 2
    for (int p = 0; p < 4; p++)
      for (int c = 0; c < NC; c++)
        for (int d = 0; d < 2; d++) begin
          send(OP_PROGRAM, c, lrow(d, 0, p), 1);
          send(OP_PROGRAM, c, lrow(d, 1, p));
        end
    send(OP_PROGRAM, 0, lrow(0, 2, 0));
    drain();

    // 4. sequential reads (two-plane) and random single reads
    for (int c = 0; c < NC; c++) begin
      send(OP_READ, c, lrow(1, 0, 2), 1);
      send(OP_READ, c, lrow(1, 1, 2));
    end
    for (int k = 0; k < 24; k++)
      send(OP_READ, $urandom % NC, lrow($urandom % 2, $urandom % 3, $urandom % 5));
    drain();

    // 5. write after read (the pattern of the document's example):
    //    W0 R0 W1 R2 R3 R2 R1 R2
    send(OP_PROGRAM, 0, lrow(0, 0, 4));
    send(OP_READ,    0, lrow(0, 0, 1));
    send(OP_PROGRAM, 1, lrow(0, 0, 4));
    send(OP_READ,    2, lrow(0, 0, 0));
    send(OP_READ,    3, lrow(1, 1, 3));
    send(OP_READ,    2, lrow(1, 0, 2));
    send(OP_READ,    1, lrow(0, 0, 4));
    send(OP_READ,    2, lrow(0, 1, 1));
    drain();

    // 6. read after write on the same page, and erase then read back
    send(OP_PROGRAM, 3, lrow(0, 1, 4));
    send(OP_READ,    3, lrow(0, 1, 4));
    send(OP_ERASE,   2, lrow(1, 0, 0));
    send(OP_READ,    2, lrow(1, 0, 1));
    send(OP_READ,    2, lrow(1, 1, 1));
    drain();

    // 7. in-order commitment (the document's example): a program on chip 1
    //    waits for its die (busy erasing), reads on chips 2 and 3 behind it
    //    issue first and finish their array reads, but their data transfer
    //    and commit wait for the program
    begin
      int ooo0;
      ooo0 = c_ooo;
      s7_pending = 1;
      send(OP_ERASE,   1, lrow(0, 8, 0));
      send(OP_PROGRAM, 1, lrow(0, 8, 0));
      send(OP_READ,    2, lrow(0, 0, 0));
      send(OP_READ,    3, lrow(0, 0, 1));
      drain();
      check(c_ooo > ooo0, "reads issued ahead of the waiting program");
      check(s7_held > 0, "a read page waited in its die while the older program was uncommitted");
    end

    repeat (20) @(posedge clk);

    sum_viol = 0; sum_r2 = 0; sum_p2 = 0; sum_e2 = 0; sum_il = 0;
    sum_viol = g_flash[0].u_f.violations + g_flash[1].u_f.violations + g_flash[2].u_f.violations + g_flash[3].u_f.violations;
    sum_r2 = g_flash[0].u_f.n_read_2p + g_flash[1].u_f.n_read_2p + g_flash[2].u_f.n_read_2p + g_flash[3].u_f.n_read_2p;
    sum_p2 = g_flash[0].u_f.n_prog_2p + g_flash[1].u_f.n_prog_2p + g_flash[2].u_f.n_prog_2p + g_flash[3].u_f.n_prog_2p;
    sum_e2 = g_flash[0].u_f.n_erase_2p + g_flash[1].u_f.n_erase_2p + g_flash[2].u_f.n_erase_2p + g_flash[3].u_f.n_erase_2p;
    sum_il = g_flash[0].u_f.n_interleave + g_flash[1].u_f.n_interleave + g_flash[2].u_f.n_interleave + g_flash[3].u_f.n_interleave;

    $display("mechanisms: ooo=%0d pair=%0d war_hold=%0d die_hold=%0d commit_wait=%0d queue_full=%0d",
             c_ooo, c_pair, c_war, c_die, c_cwait, queue_full);
    $display("flash: read2p=%0d prog2p=%0d erase2p=%0d interleave=%0d violations=%0d",
             sum_r2, sum_p2, sum_e2, sum_il, sum_viol);
    check(sum_viol == 0, "no protocol violations at the chips");
    check(c_perr == 0, "no die FSM protocol errors");
    check(c_ooo > 0, "out-of-order issue happened");
    check(c_pair > 0, "two-plane issue happened");
    check(c_war > 0, "write-after-read hold happened");
    check(c_die > 0, "same-die hold happened");
    check(c_cwait > 0, "in-order commit hold happened");
    check(queue_full > 0, "command queue filled up");
    check(sum_r2 > 0, "two-plane read reached a chip");
    check(sum_p2 > 0, "two-plane program reached a chip");
    check(sum_e2 > 0, "two-plane erase reached a chip");
    check(sum_il > 0, "interleaved die use happened");
    check(n_commits == n_sent, $sformatf("%0d commits for %0d commands", n_commits, n_sent));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
