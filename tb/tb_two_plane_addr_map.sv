// tb_two_plane_addr_map: checks the two-plane row mapping against its
// definition: logical row {die, block[11:1], page[6:0], block[0]} must come
// out as physical {die, block[11:1], block[0], page[6:0]}, and every even/odd
// pair of consecutive logical rows must give the same page in two blocks that
// differ only in bit 0 (one per plane). Random rows plus all 256 values of the
// low byte.
module tb_two_plane_addr_map;
  import nand_pkg::*;

  logic [ROW_W-1:0] lrow, prow, lrow2, prow2;
  int checks = 0, failures = 0;

  two_plane_addr_map dut  (.logical_row(lrow),  .physical_row(prow));
  two_plane_addr_map dut2 (.logical_row(lrow2), .physical_row(prow2));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned die, blk, page;
    for (int n = 0; n < 3000; n++) begin
      if (n < 256) begin
        die = 0; blk = n & 1; page = n >> 1;
      end else begin
        die = $urandom % 2; blk = $urandom % 4096; page = $urandom % 128;
      end
      lrow = ROW_W'((die << 19) | ((blk >> 1) << 8) | (page << 1) | (blk & 1));
      lrow2 = lrow | 1;
      #1;
      check(prow[6:0] == 7'(page), $sformatf("page field of %05h: %05h", lrow, prow));
      check(prow[18:7] == 12'(blk), $sformatf("block field of %05h: %05h", lrow, prow));
      check(prow[19] == 1'(die), $sformatf("die bit of %05h", lrow));
      // partner of an even row: same page, other plane
      if (!lrow[0]) begin
        check(prow2[6:0] == prow[6:0] && prow2[18:8] == prow[18:8] && prow2[7] != prow[7],
              $sformatf("two-plane partner of %05h", lrow));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
