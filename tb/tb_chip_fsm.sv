// tb_chip_fsm: runs the chip FSM against one flash-chip model.
//
// Sequence: power-up reset (FFh), a two-plane erase, a two-plane program of
// two pages whose data come from a page store in the testbench, a
// single-plane program on the other die while the first die is still busy
// (interleaving), a two-plane read and the transfer of both pages, and a read
// of the second die's page. Checked: read data, completion pulses and their
// queue indices, die events, no protocol violation in the model, the model's
// operation counts, and exact cycle counts of a single erase job and of the
// page transfer, worked out here from the bus sequence (two clocks per bus
// cycle, WHR_CYC+1 clocks of tWHR wait). Finally the single-status poll job
// is run on a busy and on a finished die.
module tb_chip_fsm;
  import nand_pkg::*;

  localparam int unsigned PB  = 12;
  localparam int unsigned WHR = 6;
  localparam int unsigned T_R = 200, T_PROG = 600, T_BERS = 900, T_RST = 40;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic             job_valid = 0, job_ready, job_xfer = 0, job_pair = 0, job_poll = 0;
  op_e              job_op = OP_READ;
  logic [ROW_W-1:0] job_row0 = '0, job_row1 = '0;
  logic [2:0]       job_idx0 = '0, job_idx1 = '0;
  logic             fin_valid, fin_pair;
  logic [2:0]       fin_idx0, fin_idx1;
  logic             ev_start_read, ev_start_write, ev_two_plane, ev_poll_ready, ev_xfer_done, ev_die, init_done;
  logic [2:0]       buf_idx;
  logic [3:0]       buf_addr;
  logic [7:0]       buf_rdata;
  logic             rd_valid, rd_ready = 1;
  logic [7:0]       rd_data;
  logic             ce_n, cle, ale, we_n, re_n, wp_n, dq_oe, rb_n;
  logic [7:0]       dq_out, dq_in;

  chip_fsm #(.PAGE_BYTES_P(PB), .QDEPTH_P(8), .WHR_CYC(WHR), .WB_CYC(8)) dut (.*);

  nand_flash_model #(.PAGE_BYTES(PB), .T_R(T_R), .T_PROG(T_PROG), .T_BERS(T_BERS), .T_RST(T_RST)) u_f (
    .clk, .ce_n, .cle, .ale, .we_n, .re_n, .wp_n, .dq_i(dq_out), .dq_o(dq_in), .rb_n
  );

  // page store: slot s byte b = pat(s, b); synchronous read
  function automatic logic [7:0] pat(int s, int b);
    return 8'(s * 37 + b * 5 + 1);
  endfunction
  always @(posedge clk) buf_rdata <= pat(buf_idx, buf_addr);

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

  // capture completions and read bytes
  int fins[$];
  logic [7:0] rbytes[$];
  int n_sr = 0, n_sw = 0, n_pr = 0, n_xd = 0;
  always @(posedge clk) begin
    if (fin_valid) begin
      fins.push_back(fin_idx0);
      if (fin_pair) fins.push_back(fin_idx1);
    end
    if (rd_valid && rd_ready) rbytes.push_back(rd_data);
    n_sr += int'(ev_start_read);
    n_sw += int'(ev_start_write);
    n_pr += int'(ev_poll_ready);
    n_xd += int'(ev_xfer_done);
  end

  // physical row: die, block, page
  function automatic logic [ROW_W-1:0] prow(int die, int blk, int page);
    return ROW_W'((die << 19) | (blk << 7) | page);
  endfunction

  int t_start;
  task automatic run_job(bit xfer, op_e op, bit pair, logic [ROW_W-1:0] r0, logic [ROW_W-1:0] r1,
                         int i0, int i1);
    @(negedge clk);
    while (!job_ready) @(negedge clk);
    job_valid = 1; job_xfer = xfer; job_op = op; job_pair = pair;
    job_row0 = r0; job_row1 = r1; job_idx0 = 3'(i0); job_idx1 = 3'(i1);
    t_start = $time / 10;
    @(negedge clk);
    job_valid = 0;
  endtask

  task automatic wait_idle();
    @(negedge clk);
    while (!job_ready) @(negedge clk);
  endtask

  int t_fin, expect_cyc;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    check(!init_done, "init_done low during reset wait");
    wait (init_done);
    check(u_f.n_reset == 1, "FFh reset sent once");

    // single erase: exact timing to the fin pulse
    run_job(0, OP_ERASE, 0, prow(0, 4, 0), '0, 5, 0);
    @(posedge clk iff fin_valid);
    t_fin = $time / 10;
    // counted from the clock edge that accepts the job to the edge that ends
    // the D0h bus cycle (fin is high in the clock before it):
    // 78h (2) + 3 row cycles (6) + tWHR (WHR+1) + status (2) + 60h (2)
    // + 3 row cycles (6) + D0h (2)
    expect_cyc = 2 + 6 + (WHR + 1) + 2 + 2 + 6 + 2;
    check(t_fin - t_start == expect_cyc, $sformatf("erase job took %0d clocks, expected %0d", t_fin - t_start, expect_cyc));
    wait_idle();

    // two-plane erase of blocks 0/1 on die 0 (polls until the single erase is done)
    run_job(0, OP_ERASE, 1, prow(0, 0, 0), prow(0, 1, 0), 1, 2);
    wait_idle();
    // two-plane program page 0 of blocks 0/1 die 0, slots 3 and 4
    run_job(0, OP_PROGRAM, 1, prow(0, 0, 0), prow(0, 1, 0), 3, 4);
    wait_idle();
    // die 1: erase block 6 and program page 0 while die 0 is busy
    run_job(0, OP_ERASE, 0, prow(1, 6, 0), '0, 6, 0);
    wait_idle();
    run_job(0, OP_PROGRAM, 0, prow(1, 6, 0), '0, 7, 0);
    wait_idle();
    // two-plane read of the pair, then transfer plane 0 and plane 1
    run_job(0, OP_READ, 1, prow(0, 0, 0), prow(0, 1, 0), 0, 1);
    wait_idle();
    run_job(1, OP_READ, 0, prow(0, 0, 0), '0, 0, 0);
    wait_idle();
    run_job(1, OP_READ, 0, prow(0, 1, 0), '0, 1, 0);
    wait_idle();
    // read the die-1 page with read stream back-pressure
    run_job(0, OP_READ, 0, prow(1, 6, 0), '0, 2, 0);
    wait_idle();
    fork
      begin
        repeat (40) begin @(negedge clk); rd_ready = $urandom % 2; end
        rd_ready = 1;
      end
    join_none
    run_job(1, OP_READ, 0, prow(1, 6, 0), '0, 2, 0);
    wait_idle();
    // timing of an uninterrupted transfer: die ready, read stream always ready
    rd_ready = 1;
    repeat (50) @(negedge clk);
    run_job(1, OP_READ, 0, prow(0, 0, 0), '0, 0, 0);
    @(posedge clk iff fin_valid);
    t_fin = $time / 10;
    // poll (2+6+WHR+1+2) + 00h (2) + tWHR (WHR+1) + PB bytes x 2
    expect_cyc = 2 + 6 + (WHR + 1) + 2 + 2 + (WHR + 1) + 2 * PB;
    check(t_fin - t_start == expect_cyc, $sformatf("transfer job took %0d clocks, expected %0d", t_fin - t_start, expect_cyc));
    wait_idle();
    repeat (5) @(negedge clk);

    // completions in order
    begin
      int exp_f[$] = '{5, 1, 2, 3, 4, 6, 7, 0, 1, 2, 0};
      check(fins.size() == exp_f.size(), $sformatf("%0d completions", fins.size()));
      foreach (exp_f[k]) if (k < fins.size()) check(fins[k] == exp_f[k], $sformatf("completion %0d is slot %0d", k, fins[k]));
    end
    // read data: plane0 = slot 3, plane1 = slot 4, die1 = slot 7, then slot 3 again
    check(rbytes.size() == 4 * PB, $sformatf("%0d bytes read", rbytes.size()));
    for (int b = 0; b < PB && rbytes.size() >= 4 * PB; b++) begin
      check(rbytes[b]          == pat(3, b), $sformatf("plane 0 byte %0d", b));
      check(rbytes[PB + b]     == pat(4, b), $sformatf("plane 1 byte %0d", b));
      check(rbytes[2 * PB + b] == pat(7, b), $sformatf("die 1 byte %0d", b));
      check(rbytes[3 * PB + b] == pat(3, b), $sformatf("re-read byte %0d", b));
    end
    check(u_f.violations == 0, "no protocol violations");
    check(u_f.n_erase_2p == 1 && u_f.n_prog_2p == 1 && u_f.n_read_2p == 1, "two-plane forms used once each");
    check(u_f.n_erase == 3 && u_f.n_prog == 2 && u_f.n_read == 2, "confirm counts");
    check(u_f.n_interleave > 0, "die 1 was used while die 0 was busy");
    check(n_sr == 2 && n_sw == 5 && n_xd == 4, $sformatf("die events sr=%0d sw=%0d xd=%0d", n_sr, n_sw, n_xd));
    check(n_pr == 11, $sformatf("poll-ready events %0d", n_pr));

    // poll job: one 78h status read of a die, nothing else on the bus.
    // On a busy die it ends without a ready event; once the die is done, the
    // same job reports ready. Bus time 78h (2) + 3 row cycles (6) + tWHR
    // (WHR+1) + status (2); job_ready returns two clocks after the status read
    // (one clock in the finishing state, one back to idle).
    begin
      int pr0, nf0, cmd0;
      run_job(0, OP_ERASE, 0, prow(1, 9, 0), '0, 3, 0);
      wait_idle();
      pr0 = n_pr; nf0 = fins.size(); cmd0 = u_f.n_erase;
      @(negedge clk);
      job_valid = 1; job_poll = 1; job_xfer = 0; job_pair = 1; job_row0 = prow(1, 0, 0);
      t_start = $time / 10;
      @(negedge clk);
      job_valid = 0;
      @(posedge clk iff job_ready);
      t_fin = $time / 10;
      job_poll = 0;
      check(t_fin - t_start == 2 + 6 + (WHR + 1) + 2 + 2,
            $sformatf("poll job took %0d clocks", t_fin - t_start));
      check(n_pr == pr0, "poll of a busy die reports no ready");
      repeat (T_BERS + 50) @(negedge clk);
      job_valid = 1; job_poll = 1; job_row0 = prow(1, 0, 0);
      @(negedge clk);
      job_valid = 0;
      wait_idle();
      job_poll = 0;
      check(n_pr == pr0 + 1, "poll of a finished die reports ready once");
      check(fins.size() == nf0 && u_f.n_erase == cmd0 && u_f.violations == 0,
            "poll jobs complete nothing and send no command");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
