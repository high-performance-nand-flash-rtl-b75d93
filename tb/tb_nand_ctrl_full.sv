// tb_nand_ctrl_full: the controller at its full size (four channels, eight
// queue entries, 4314-byte pages, no parameter changed) with four flash-chip
// models at the part's real array times in 80 MHz clocks (tR 50 us, tPROG
// 900 us, tBERS 3.5 ms, tRST 5 us).
// One complete operation on one die: a two-plane erase of blocks 0/1, a
// two-plane program of page 0 of both blocks with whole 4314-byte pages, and
// a two-plane read of both pages back; meanwhile a single read of an erased
// page on another chip. Checked: every byte read, commit order, no protocol
// violation, the two-plane forms at the chip, and the bus rates that the
// design is built for: one byte every two clocks on the data bus (25 ns,
// 40 MB/s at 80 MHz, a 4314-byte page in 107.85 us) and a single-page read
// that commits within tR + page transfer + a few hundred clocks of command,
// address and polling cycles.
module tb_nand_ctrl_full;
  import nand_pkg::*;

  localparam int unsigned NC = NCHIP;
  localparam int unsigned PB = PAGE_BYTES;
  localparam int unsigned T_R = 4000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;   // one clock = 12.5 ns of the real part; 10 time units here

  logic             cmd_valid = 0, cmd_ready;
  cmd_t             cmd;
  logic             wdata_valid = 0, wdata_ready;
  logic [7:0]       wdata = 0;
  logic             rdata_valid, rdata_ready = 1;
  logic [7:0]       rdata;
  logic             cmt_valid;
  cmd_t             cmt_cmd;
  logic [NC-1:0]    init_done, proto_err;
  logic [NC-1:0][1:0] die_busy, die_data_ready;
  logic ev_issue, ev_ooo, ev_pair, ev_war_block, ev_die_block, ev_commit_wait;
  logic [NC-1:0]    ce_n, cle, ale, we_n, re_n, wp_n, dq_oe, rb_n;
  logic [NC-1:0][7:0] dq_out, dq_in;

  nand_ctrl_top dut (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd, .wdata_valid, .wdata_ready, .wdata,
    .rdata_valid, .rdata_ready, .rdata, .cmt_valid, .cmt_cmd,
    .init_done, .die_busy, .die_data_ready, .proto_err,
    .ev_issue, .ev_ooo, .ev_pair, .ev_war_block, .ev_die_block, .ev_commit_wait,
    .ce_n, .cle, .ale, .we_n, .re_n, .wp_n, .dq_out, .dq_oe, .dq_in, .rb_n
  );

  for (genvar c = 0; c < NC; c++) begin : g_flash
    nand_flash_model u_f (
      .clk, .ce_n(ce_n[c]), .cle(cle[c]), .ale(ale[c]), .we_n(we_n[c]), .re_n(re_n[c]),
      .wp_n(wp_n[c]), .dq_i(dq_out[c]), .dq_o(dq_in[c]), .rb_n(rb_n[c])
    );
  end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  initial begin
    #50000000;   // 5 million clocks
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] data_byte(int seed, int i);
    return 8'((seed * 29) + (i * 7) + (i >> 3));
  endfunction

  function automatic logic [ROW_W-1:0] lrow(int die, int blk, int page);
    return ROW_W'((die << DIE_BIT) | ((blk >> 1) << (PAGE_W + 1)) | (page << 1) | (blk & 1));
  endfunction

  cmd_t       sent_q[$];
  logic [7:0] exp_bytes[$];
  int         n_sent = 0, n_commits = 0, n_rbytes = 0;
  longint     cyc = 0, first_byte = -1, last_byte = -1, t_single = -1;
  always @(posedge clk) cyc++;

  task automatic send(op_e op, int chip, logic [ROW_W-1:0] row, bit seq, int seed);
    cmd_t c;
    c.seq = seq; c.op = op; c.chip = 2'(chip); c.row = row;
    sent_q.push_back(c);
    n_sent++;
    if (op == OP_READ)
      for (int i = 0; i < PB; i++) exp_bytes.push_back(seed < 0 ? 8'hFF : data_byte(seed, i));
    @(negedge clk);
    cmd_valid = 1'b1; cmd = c;
    while (!cmd_ready) @(negedge clk);
    @(negedge clk);
    cmd_valid = 1'b0;
    if (op == OP_PROGRAM) begin
      for (int i = 0; i < PB; i++) begin
        wdata_valid = 1'b1; wdata = data_byte(seed, i);
        while (!wdata_ready) @(negedge clk);
        @(negedge clk);
      end
      wdata_valid = 1'b0;
    end
  endtask

  // read bytes of the two-plane pair: timestamps of the first and last byte
  always @(posedge clk) if (rst_n) begin
    if (rdata_valid && rdata_ready) begin
      n_rbytes++;
      if (exp_bytes.size() == 0) check(0, "read byte with none expected");
      else begin
        logic [7:0] e;
        e = exp_bytes.pop_front();
        if (rdata != e) check(0, $sformatf("read byte %0d: got %02h expected %02h", n_rbytes, rdata, e));
      end
      if (n_rbytes == PB + 1) first_byte = cyc;
      if (n_rbytes == 2 * PB) last_byte = cyc;
    end
    if (cmt_valid) begin
      n_commits++;
      if (sent_q.size() == 0) check(0, "commit with nothing outstanding");
      else begin
        cmd_t e;
        e = sent_q.pop_front();
        check(cmt_cmd == e, $sformatf("commit %0d in command order", n_commits));
        if (n_commits == 1) t_single = cyc;
      end
    end
  end

  longint t0;
  int sum_viol;

  initial begin
    cmd = '0;
    repeat (5) @(negedge clk);
    rst_n = 1;
    wait (&init_done);
    @(negedge clk);
    // a single read of an erased page on chip 2, die 1: latency
    t0 = cyc;
    send(OP_READ, 2, lrow(1, 77, 9), 0, -1);
    wait (n_commits == 1);
    $display("single page read: %0d clocks (%0.2f us) from command to commit", t_single - t0,
             real'(t_single - t0) * 0.0125);
    // tR + 2 clocks per byte + command/address/poll cycles (about 100 clocks)
    check(t_single - t0 >= T_R + 2 * PB && t_single - t0 <= T_R + 2 * PB + 200,
          $sformatf("single read latency %0d clocks", t_single - t0));
    // complete operation on chip 0 die 0: erase pair, program pair, read pair
    send(OP_ERASE,   0, lrow(0, 0, 0), 1, 0);
    send(OP_ERASE,   0, lrow(0, 1, 0), 0, 0);
    send(OP_PROGRAM, 0, lrow(0, 0, 0), 1, 11);
    send(OP_PROGRAM, 0, lrow(0, 1, 0), 0, 12);
    send(OP_READ,    0, lrow(0, 0, 0), 1, 11);
    send(OP_READ,    0, lrow(0, 1, 0), 0, 12);
    wait (n_commits == n_sent);
    repeat (20) @(negedge clk);
    check(exp_bytes.size() == 0 && n_rbytes == 3 * PB, $sformatf("%0d bytes read", n_rbytes));
    // pair read: PB bytes of the second plane arrive at one per two clocks
    $display("second page: %0d clocks for %0d bytes", last_byte - first_byte, PB - 1);
    check(last_byte - first_byte == 2 * (PB - 1), "page transfer at one byte per 25 ns");
    sum_viol = 0;
    sum_viol = g_flash[0].u_f.violations + g_flash[1].u_f.violations + g_flash[2].u_f.violations + g_flash[3].u_f.violations;
    check(sum_viol == 0, "no protocol violation at the chips");
    check(g_flash[0].u_f.n_erase_2p == 1 && g_flash[0].u_f.n_prog_2p == 1 && g_flash[0].u_f.n_read_2p == 1,
          "two-plane erase, program and read reached chip 0");
    check(g_flash[0].u_f.n_reset == 1, "chip 0 reset once");
    check(proto_err == '0, "no die-state error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
