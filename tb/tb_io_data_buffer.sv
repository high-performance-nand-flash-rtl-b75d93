// tb_io_data_buffer: checks the I/O data buffer at its default size (eight
// page slots of 4314 bytes, four read ports, 16-byte output FIFO).
// Input half: every byte of every slot is written, then all four channel
// ports read random slot/byte addresses at once each clock and must return
// the stored byte one clock later (synchronous read, one-cycle latency);
// slots are then partly rewritten while being read. Output half: random
// push/pop traffic is compared with a reference queue; in_ready must fall
// exactly at 16 bytes and out_valid exactly at empty.
module tb_io_data_buffer;
  import nand_pkg::*;

  localparam int unsigned PB = PAGE_BYTES;
  localparam int unsigned Q  = QDEPTH;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                 wr_en = 0;
  logic [2:0]           wr_idx = '0;
  logic [12:0]          wr_addr = '0;
  logic [7:0]           wr_data = '0;
  logic [3:0][2:0]      rd_idx = '0;
  logic [3:0][12:0]     rd_addr = '0;
  logic [3:0][7:0]      rd_data;
  logic                 in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [7:0]           in_data = '0, out_data;

  io_data_buffer dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] shadow [Q][PB];
  logic [7:0] fq[$];

  initial begin
    int exp_rd [4];
    bit pend;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // fill every slot
    for (int s = 0; s < Q; s++)
      for (int b = 0; b < PB; b++) begin
        wr_en = 1; wr_idx = 3'(s); wr_addr = 13'(b); wr_data = 8'($urandom);
        shadow[s][b] = wr_data;
        @(negedge clk);
      end
    wr_en = 0;
    // random reads on all ports, with concurrent writes to other slots
    pend = 0;
    for (int n = 0; n < 20000; n++) begin
      int ws, wb;
      for (int c = 0; c < 4; c++) begin
        rd_idx[c]  = 3'($urandom % Q);
        rd_addr[c] = 13'($urandom % PB);
        exp_rd[c]  = shadow[rd_idx[c]][rd_addr[c]];
      end
      // write a byte that none of the ports reads this clock
      ws = $urandom % Q; wb = $urandom % PB;
      wr_en = 1;
      for (int c = 0; c < 4; c++) if (rd_idx[c] == 3'(ws) && rd_addr[c] == 13'(wb)) wr_en = 0;
      wr_idx = 3'(ws); wr_addr = 13'(wb); wr_data = 8'($urandom);
      if (wr_en) shadow[ws][wb] = wr_data;
      @(negedge clk);
      for (int c = 0; c < 4; c++)
        check(rd_data[c] == 8'(exp_rd[c]), $sformatf("port %0d read %02h expected %02h", c, rd_data[c], exp_rd[c]));
    end
    wr_en = 0;
    // output FIFO
    for (int n = 0; n < 20000; n++) begin
      int phase = (n / 500) % 3;   // fill-heavy, drain-heavy, balanced
      in_valid  = (phase == 0) ? ($urandom % 4 != 0) : (phase == 1) ? ($urandom % 4 == 0) : $urandom % 2;
      out_ready = (phase == 1) ? ($urandom % 4 != 0) : (phase == 0) ? ($urandom % 4 == 0) : $urandom % 2;
      in_data   = 8'($urandom);
      #1;
      check(in_ready == (fq.size() < 16), $sformatf("in_ready with %0d stored", fq.size()));
      check(out_valid == (fq.size() > 0), $sformatf("out_valid with %0d stored", fq.size()));
      if (out_valid && fq.size() > 0) check(out_data == fq[0], "FIFO order");
      begin
        bit do_pop, do_push;
        do_pop  = out_valid && out_ready;
        do_push = in_valid && in_ready;
        @(negedge clk);
        if (do_pop) void'(fq.pop_front());
        if (do_push) fq.push_back(in_data);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
