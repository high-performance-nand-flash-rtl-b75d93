// tb_interface_controller: one interface controller driving one flash-chip
// model. Commands are given with logical rows (as the sequencer holds them)
// and must land on the right physical pages: a two-plane erase and program
// of logical rows 2n/2n+1 must hit the same page of blocks 2m and 2m+1,
// which is checked by looking into the model's array. Reads on die 0 (as a
// two-plane pair) and die 1 are issued back to back and both dies must be
// busy at the same time (interleaving); the three pages are then transferred
// and compared byte by byte. Also checked: the die status outputs, that a
// pending transfer takes priority over a new issue, completion indices, no
// protocol error in the die FSMs and no violation in the model.
module tb_interface_controller;
  import nand_pkg::*;

  localparam int unsigned PB = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic             iss_valid = 0, iss_ready, iss_pair = 0;
  op_e              iss_op = OP_READ;
  logic [ROW_W-1:0] iss_row0 = '0, iss_row1 = '0, xfer_row = '0;
  logic [2:0]       iss_idx0 = '0, iss_idx1 = '0, xfer_idx = '0;
  logic             xfer_valid = 0, xfer_ready;
  logic             fin_valid, fin_pair;
  logic [2:0]       fin_idx0, fin_idx1, buf_idx;
  logic [1:0]       die_busy, die_data_ready;
  logic             proto_err, init_done;
  logic [3:0]       buf_addr;
  logic [7:0]       buf_rdata, rd_data, dq_out, dq_in;
  logic             rd_valid, rd_ready = 1;
  logic             ce_n, cle, ale, we_n, re_n, wp_n, dq_oe, rb_n;

  interface_controller #(.PAGE_BYTES_P(PB)) dut (.*);

  nand_flash_model #(.PAGE_BYTES(PB), .T_R(300), .T_PROG(800), .T_BERS(1200), .T_RST(50)) u_f (
    .clk, .ce_n, .cle, .ale, .we_n, .re_n, .wp_n, .dq_i(dq_out), .dq_o(dq_in), .rb_n
  );

  function automatic logic [7:0] pat(int s, int b);
    return 8'(s * 53 + b * 7 + 3);
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

  // logical row of (die, block, page): {die, block[11:1], page, block[0]}
  function automatic logic [ROW_W-1:0] lrow(int die, int blk, int page);
    return ROW_W'((die << 19) | ((blk >> 1) << 8) | (page << 1) | (blk & 1));
  endfunction
  function automatic logic [23:0] prow(int die, int blk, int page);
    return 24'((die << 19) | (blk << 7) | page);
  endfunction

  int fins[$];
  logic [7:0] rbytes[$];
  int both_busy = 0, perr = 0;
  always @(posedge clk) begin
    if (fin_valid) begin
      fins.push_back(fin_idx0);
      if (fin_pair) fins.push_back(fin_idx1);
    end
    if (rd_valid && rd_ready) rbytes.push_back(rd_data);
    if (die_busy == 2'b11) both_busy++;
    if (proto_err) perr++;
  end

  task automatic issue(op_e op, bit pair, logic [ROW_W-1:0] r0, logic [ROW_W-1:0] r1, int i0, int i1);
    @(negedge clk);
    iss_valid = 1; iss_op = op; iss_pair = pair; iss_row0 = r0; iss_row1 = r1;
    iss_idx0 = 3'(i0); iss_idx1 = 3'(i1);
    while (!iss_ready) @(negedge clk);
    @(negedge clk);
    iss_valid = 0;
  endtask

  task automatic xfer(logic [ROW_W-1:0] r, int i);
    @(negedge clk);
    xfer_valid = 1; xfer_row = r; xfer_idx = 3'(i);
    while (!xfer_ready) @(negedge clk);
    @(negedge clk);
    xfer_valid = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (init_done);
    issue(OP_ERASE,   1, lrow(0, 2, 0), lrow(0, 3, 0), 0, 1);
    issue(OP_ERASE,   0, lrow(1, 8, 0), '0,            2, 0);
    issue(OP_PROGRAM, 1, lrow(0, 2, 0), lrow(0, 3, 0), 3, 4);
    issue(OP_PROGRAM, 0, lrow(1, 8, 0), '0,            5, 0);
    // wait until both dies are idle, then read on both back to back
    @(negedge clk);
    while (!iss_ready) @(negedge clk);
    issue(OP_READ, 1, lrow(0, 2, 0), lrow(0, 3, 0), 6, 7);
    check(die_busy[0], "die 0 busy after its read");
    issue(OP_READ, 0, lrow(1, 8, 0), '0, 0, 0);
    check(die_busy == 2'b11 || die_data_ready[0], "die 1 read issued while die 0 still reading");
    // transfer priority: a pending transfer blocks a new issue
    @(negedge clk);
    iss_valid = 1; iss_op = OP_ERASE; iss_pair = 0; iss_row0 = lrow(1, 20, 0); iss_idx0 = 3'd1;
    xfer_valid = 1; xfer_row = lrow(0, 2, 0); xfer_idx = 3'd6;
    while (!xfer_ready) begin
      check(!iss_ready, "issue held back while a transfer waits");
      @(negedge clk);
    end
    check(!iss_ready, "issue not accepted together with the transfer");
    @(negedge clk);
    xfer_valid = 0; iss_valid = 0;
    @(negedge clk);
    while (!xfer_ready) @(negedge clk);
    check(rbytes.size() == PB && die_data_ready[0], "die 0 holds data until both planes are transferred");
    xfer(lrow(0, 3, 0), 7);
    xfer(lrow(1, 8, 0), 0);
    @(negedge clk);
    while (!iss_ready) @(negedge clk);
    repeat (3) @(negedge clk);
    check(die_data_ready == 2'b00, "no page left in the data registers");
    // data
    check(rbytes.size() == 3 * PB, $sformatf("%0d bytes transferred", rbytes.size()));
    for (int b = 0; b < PB && rbytes.size() == 3 * PB; b++) begin
      check(rbytes[b]          == pat(3, b), $sformatf("block 2 byte %0d", b));
      check(rbytes[PB + b]     == pat(4, b), $sformatf("block 3 byte %0d", b));
      check(rbytes[2 * PB + b] == pat(5, b), $sformatf("die 1 block 8 byte %0d", b));
    end
    // placement in the array
    for (int b = 0; b < PB; b++) begin
      check(u_f.mem.exists({prow(0, 2, 0), 16'(b)}) && u_f.mem[{prow(0, 2, 0), 16'(b)}] == pat(3, b), "slot 3 stored in die 0 block 2 page 0");
      check(u_f.mem.exists({prow(0, 3, 0), 16'(b)}) && u_f.mem[{prow(0, 3, 0), 16'(b)}] == pat(4, b), "slot 4 stored in die 0 block 3 page 0");
      check(u_f.mem.exists({prow(1, 8, 0), 16'(b)}) && u_f.mem[{prow(1, 8, 0), 16'(b)}] == pat(5, b), "slot 5 stored in die 1 block 8 page 0");
    end
    begin
      int exp_f[$] = '{0, 1, 2, 3, 4, 5, 6, 7, 0};
      check(fins == exp_f, $sformatf("completion order %p", fins));
    end
    check(both_busy > 100, $sformatf("both dies busy for %0d clocks", both_busy));
    check(u_f.n_read_2p == 1 && u_f.n_prog_2p == 1 && u_f.n_erase_2p == 1, "two-plane operations");
    check(perr == 0, "no die-FSM protocol error");
    check(u_f.violations == 0, "no bus violation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
