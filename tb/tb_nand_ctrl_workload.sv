// tb_nand_ctrl_workload: throughput of the controller at full size (four
// chips, eight queue entries, 4314-byte pages, real array times at 80 MHz)
// under the four access patterns it is meant for: sequential read, random
// read, sequential program and random program, each at several access
// lengths. Every access starts at a random address. Program accesses first
// erase the block pair they write (two-plane erase), and the erase time is
// part of the measured time.
//
// Throughput is counted as 4096 data bytes per page (the spare area is not
// user data) over the time from the first command (sent once every die is
// idle) to the last commit / last
// read byte, with 12.5 ns per clock. The testbench plays the flash transfer
// layer: commands back to back, program data at one byte per clock, read data
// taken every clock. It checks every read byte against a shadow copy, the
// commit order, the chips' protocol rules, and that each pattern runs at
// least as fast as one page at a time on one die would (the conventional
// single-command controller: 26 MB/s read, 4 MB/s program) and no faster
// than the 40 MB/s of one 8-bit bus at 25 ns per byte for reads. The
// measured figures are printed next to those the design was evaluated with.
// Sequential program runs at the evaluated 2-block length (256 pages); the
// other run lengths (pages per pattern) are kept small enough to finish in a few
// minutes of simulation; throughput hardly depends on them once the queue is
// in steady state.
module tb_nand_ctrl_workload;
  import nand_pkg::*;

  localparam int unsigned NC = NCHIP;
  localparam int unsigned PB = PAGE_BYTES;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

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
    #1000000000;   // 100 million clocks
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- shadow contents and command stream ------------------------------------
  int         seed_of [bit [21:0]];
  int         next_seed = 1;
  cmd_t       sent_q[$];
  logic [7:0] exp_bytes[$];
  int         n_bad = 0;
  longint     cyc = 0;
  always @(posedge clk) cyc++;

  function automatic logic [7:0] data_byte(int seed, int i);
    return 8'((seed * 29) + (i * 7) + (i >> 3));
  endfunction

  task automatic send(op_e op, int chip, logic [ROW_W-1:0] row, bit seq);
    cmd_t c;
    int   s;
    c.seq = seq; c.op = op; c.chip = 2'(chip); c.row = row;
    s = -1;
    if (op == OP_READ) begin
      s = seed_of.exists({2'(chip), row}) ? seed_of[{2'(chip), row}] : -1;
      for (int i = 0; i < PB; i++) exp_bytes.push_back(s < 0 ? 8'hFF : data_byte(s, i));
    end else if (op == OP_ERASE) begin
      bit [21:0] keys[$];
      foreach (seed_of[k])
        if (k[21:20] == 2'(chip) && k[19:PAGE_W+1] == row[19:PAGE_W+1] && k[0] == row[0]) keys.push_back(k);
      foreach (keys[j]) seed_of.delete(keys[j]);
    end else begin
      s = next_seed++;
      seed_of[{2'(chip), row}] = s;
    end
    sent_q.push_back(c);
    @(negedge clk);
    cmd_valid = 1'b1; cmd = c;
    while (!cmd_ready) @(negedge clk);
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

  always @(posedge clk) if (rst_n) begin
    if (rdata_valid && rdata_ready) begin
      if (exp_bytes.size() == 0) begin n_bad++; end
      else if (rdata != exp_bytes.pop_front()) n_bad++;
    end
    if (cmt_valid) begin
      if (sent_q.size() == 0 || sent_q[0] != cmt_cmd) n_bad++;
      if (sent_q.size() != 0) void'(sent_q.pop_front());
    end
  end

  // ---- access patterns ---------------------------------------------------------
  // Logical rows: {die, block pair, page, plane}; consecutive logical rows
  // alternate between the planes, so an even row and the next one form a
  // two-plane pair and carry the sequential-valid bit on the even one.
  localparam int unsigned ROWS_PER_PAIR = 256;   // 128 pages x 2 planes

  function automatic logic [ROW_W-1:0] base_row(int die, int bpair);
    return ROW_W'((die << DIE_BIT) | (bpair << (PAGE_W + 1)));
  endfunction

  // len logical pages from row r0 of (chip, die, block pair)
  task automatic access(op_e op, int chip, int die, int bpair, int r0, int len);
    logic [ROW_W-1:0] b = base_row(die, bpair);
    if (op == OP_PROGRAM) begin
      send(OP_ERASE, chip, b, 1'b1);
      send(OP_ERASE, chip, b | 1, 1'b0);
    end
    for (int k = 0; k < len; k++) begin
      int r = r0 + k;
      send(op, chip, b + ROW_W'(r), (r % 2 == 0) && (k + 1 < len));
    end
  endtask

  task automatic drain();
    while (sent_q.size() != 0 || exp_bytes.size() != 0) @(negedge clk);
  endtask

  real mbps;
  int  pages;
  longint t0;
  int  bp_next = 0;

  task automatic measure_start();
    drain();
    // start from idle chips: a program or erase of the previous pattern may
    // still be running in an array after its commit
    while (die_busy != '0) @(negedge clk);
    repeat (10) @(negedge clk);
    pages = 0;
    t0 = cyc;
  endtask

  task automatic measure_end(string name, real paper, real floor_mbps, real ceil_mbps);
    drain();
    mbps = real'(pages) * 4096.0 / (real'(cyc - t0) * 0.0125);
    $display("%-34s %6d pages %9d clocks %7.2f MB/s   (evaluated design: %5.2f MB/s)",
             name, pages, cyc - t0, mbps, paper);
    check(mbps >= floor_mbps, $sformatf("%s: %0.2f MB/s below %0.2f", name, mbps, floor_mbps));
    check(mbps <= ceil_mbps, $sformatf("%s: %0.2f MB/s above %0.2f", name, mbps, ceil_mbps));
  endtask

  int chip, die, r0, len, sum_viol;
  int rr_len[5] = '{1, 2, 4, 8, 16};
  real rr_paper[5] = '{35.7, 36.83, 33.52, 32.09, 31.41};
  int rp_len[3] = '{2, 8, 32};
  real rp_paper[3] = '{9.59, 12.47, 10.8};

  // first fill the pages that the read patterns will read, so that reads
  // return programmed data (not timed)
  task automatic prefill(int chip_i, int die_i, int bpair, int n);
    access(OP_PROGRAM, chip_i, die_i, bpair, 0, n);
  endtask

  initial begin
    cmd = '0;
    repeat (5) @(negedge clk);
    rst_n = 1;
    wait (&init_done);

    // sequential read, one block (128 pages) from the start of a block pair
    prefill(1, 0, 10, 128);
    measure_start();
    access(OP_READ, 1, 0, 10, 0, 128);
    pages = 128;
    measure_end("sequential read, 1 block", 30.84, 25.99, 40.0);

    // random read: access lengths 1..16 pages, random chip/die/start
    for (int li = 0; li < 5; li++) begin
      measure_start();
      while (pages < 48) begin
        chip = $urandom % NC; die = $urandom % 2;
        r0 = $urandom % (ROWS_PER_PAIR - rr_len[li]);
        access(OP_READ, chip, die, 20 + ($urandom % 8), r0, rr_len[li]);
        pages += rr_len[li];
      end
      measure_end($sformatf("random read, %0d page(s)", rr_len[li]), rr_paper[li], 25.99, 40.0);
    end

    // sequential program: 2 blocks (one whole block pair, 256 pages), erase included
    measure_start();
    access(OP_PROGRAM, 2, 1, 40, 0, 256);
    pages = 256;
    measure_end("sequential program, 2 blocks", 7.67, 4.02, 8.2);

    // random program: each access erases its block pair, then programs
    for (int li = 0; li < 3; li++) begin
      measure_start();
      while (pages < 64) begin
        chip = $urandom % NC; die = $urandom % 2;
        r0 = $urandom % (ROWS_PER_PAIR - rp_len[li]);
        access(OP_PROGRAM, chip, die, 100 + bp_next, r0, rp_len[li]);
        bp_next++;
        pages += rp_len[li];
      end
      measure_end($sformatf("random program, %0d pages", rp_len[li]), rp_paper[li], 2.0, 40.0);
    end

    sum_viol = 0;
    sum_viol = g_flash[0].u_f.violations + g_flash[1].u_f.violations + g_flash[2].u_f.violations + g_flash[3].u_f.violations;
    check(n_bad == 0, $sformatf("%0d wrong read bytes or commits", n_bad));
    check(sum_viol == 0, "no protocol violation at the chips");
    check(proto_err == '0, "no die-state error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
