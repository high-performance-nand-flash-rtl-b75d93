// tb_die_fsm: drives the die FSM with random event sequences and compares
// busy, data_ready and proto_err with a reference model of the die's life
// cycle written here: a read makes the die busy until a status poll sees it
// ready, then holds one page (two for a two-plane read) until each has been
// transferred; a program/erase keeps it busy until a poll sees it ready.
// Events that make no sense in the present state must raise proto_err.
module tb_die_fsm;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start_read = 0, start_write = 0, two_plane = 0, poll_ready = 0, xfer_done = 0;
  logic busy, data_ready, proto_err;

  die_fsm dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: 0 idle, 1 read busy, 2 read data, 3 write busy; pages left
  int ref_st = 0, ref_pages = 0;
  bit ref_err;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      int r;
      @(negedge clk);
      check(busy == (ref_st != 0), $sformatf("busy, ref state %0d", ref_st));
      check(data_ready == (ref_st == 2), $sformatf("data_ready, ref state %0d", ref_st));
      // pick a mostly legal event
      start_read = 0; start_write = 0; poll_ready = 0; xfer_done = 0;
      two_plane = $urandom % 2;
      r = $urandom % 10;
      if (r == 9) begin
        // random, possibly illegal event
        case ($urandom % 4)
          0: start_read = 1;
          1: start_write = 1;
          2: poll_ready = 1;
          default: xfer_done = 1;
        endcase
      end else begin
        case (ref_st)
          0: if (r < 4) start_read = 1; else if (r < 7) start_write = 1; else poll_ready = 1;
          1: if (r < 6) poll_ready = 1;
          2: if (r < 6) xfer_done = 1; else if (r < 8) poll_ready = 1;
          default: if (r < 6) poll_ready = 1;
        endcase
      end
      // reference next state
      ref_err = 0;
      case (ref_st)
        0: begin
          if (xfer_done) ref_err = 1;
          if (start_read) begin ref_st = 1; ref_pages = two_plane ? 2 : 1; end
          else if (start_write) ref_st = 3;
        end
        1: begin
          if (start_read || start_write || xfer_done) ref_err = 1;
          if (poll_ready) ref_st = 2;
        end
        2: begin
          if (start_read || start_write) ref_err = 1;
          if (xfer_done) begin ref_pages--; if (ref_pages == 0) ref_st = 0; end
        end
        default: begin
          if (xfer_done) ref_err = 1;
          if (poll_ready) begin
            if (start_read) begin ref_st = 1; ref_pages = two_plane ? 2 : 1; end
            else if (start_write) ref_st = 3;
            else ref_st = 0;
          end else if (start_read || start_write) ref_err = 1;
        end
      endcase
      @(negedge clk);
      start_read = 0; start_write = 0; poll_ready = 0; xfer_done = 0;
      check(proto_err == ref_err, $sformatf("proto_err, expected %0d", ref_err));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
