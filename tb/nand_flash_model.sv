// nand_flash_model: behavioural model (simulation only) of a two-die,
// two-plane asynchronous NAND flash chip of the MT29F32G08Q class, as seen on
// its pins: CE#, CLE, ALE, WE#, RE#, WP#, the 8-bit I/O bus and R/B#.
//
// Command and address bytes are latched on the rising edge of WE#; read and
// status bytes appear on dq_o after the falling edge of RE#, and the column
// pointer advances on its rising edge. Supported: FFh reset (all pages back to
// FFh, as the simulation model described with the design does), 78h status of
// the die/plane named by a 3-cycle row address (also selects that plane's
// data register for output), 70h status, 00h-[32h]-30h page read,
// 80h-[11h]-10h page program, 60h-[D1h]-D0h block erase; bracketed forms queue
// one plane of a two-plane operation. Array times are given in clock cycles of
// `clk` (the model counts time with the controller clock). Each die runs on
// its own; R/B# is low while any die is busy.
//
// The model counts protocol violations: a command to a busy die, a two-plane
// pair whose pages differ or whose planes are equal, a program to a page that
// is not erased, a page programmed out of order inside its block, and data
// output from a die that is still busy. It also counts operations by kind so
// that testbenches can see two-plane and interleaved use.
module nand_flash_model #(
  parameter int unsigned PAGE_BYTES = 4314,
  parameter int unsigned T_R        = 4000,    // 50 us at 80 MHz
  parameter int unsigned T_PROG     = 72000,   // 900 us
  parameter int unsigned T_BERS     = 280000,  // 3.5 ms
  parameter int unsigned T_RST      = 400      // 5 us
) (
  input  logic       clk,
  input  logic       ce_n,
  input  logic       cle,
  input  logic       ale,
  input  logic       we_n,
  input  logic       re_n,
  input  logic       wp_n,
  input  logic [7:0] dq_i,
  output logic [7:0] dq_o,
  output logic       rb_n
);

  // ---- storage: one byte per {row, column}; absent = erased (FFh) -------
  bit [7:0] mem [bit [39:0]];
  bit       written [bit [23:0]];
  int       next_page [bit [23:0]];   // per {die, block}: next page to program

  logic [7:0] preg [2][2][PAGE_BYTES];

  // ---- per-die state ------------------------------------------------------
  int         busy [2];
  logic       qmask [2][2];            // planes queued for a multi-plane op
  logic [23:0] qrow [2][2];

  // ---- bus state ----------------------------------------------------------
  typedef enum int {M_NONE, M_STATUS, M_DATA_OUT, M_ADDR_RD, M_ADDR_PG, M_ADDR_ER, M_ADDR_ST, M_DATA_IN} mode_e;
  mode_e      mode;
  int         acnt;
  logic [39:0] abuf;
  logic       sel_die, sel_plane;
  int         out_ptr, in_ptr;
  logic       cur_die, cur_plane;
  logic [23:0] cur_row;

  // ---- counters for testbenches ------------------------------------------
  int violations = 0;
  int n_read = 0, n_read_2p = 0, n_prog = 0, n_prog_2p = 0, n_erase = 0, n_erase_2p = 0;
  int n_status = 0, n_interleave = 0, n_reset = 0, n_both_busy = 0;

  initial begin
    busy[0] = 0; busy[1] = 0;
    mode = M_NONE; acnt = 0; abuf = '0; sel_die = 0; sel_plane = 0;
    out_ptr = 0; in_ptr = 0; cur_die = 0; cur_plane = 0; cur_row = '0;
    dq_o = 8'hFF;
    for (int d = 0; d < 2; d++)
      for (int p = 0; p < 2; p++) begin
        qmask[d][p] = 1'b0; qrow[d][p] = '0;
        for (int c = 0; c < PAGE_BYTES; c++) preg[d][p][c] = 8'hFF;
      end
  end

  assign rb_n = (busy[0] == 0) && (busy[1] == 0);

  always @(posedge clk) begin
    for (int d = 0; d < 2; d++) if (busy[d] > 0) busy[d] = busy[d] - 1;
    if (busy[0] > 1 && busy[1] > 1) n_both_busy = n_both_busy + 1;
  end

  function automatic logic [7:0] status_of(logic die);
    return {wp_n, busy[die] == 0, busy[die] == 0, 4'b0, 1'b0};
  endfunction

  function automatic logic [23:0] row_of(logic [39:0] a, bit five);
    return five ? a[39:16] : a[23:0];
  endfunction

  task automatic violation(string what);
    violations++;
    $display("nand_flash_model %m: protocol violation: %s (t=%0t)", what, $time);
  endtask

  task automatic check_free(logic die);
    if (busy[die] != 0) violation("command to a busy die");
    if (busy[!die] != 0) n_interleave++;
  endtask

  // Check a queued plane pair and return the planes to operate on.
  task automatic check_pair(logic die, logic plane, logic [23:0] row, bit page_matters);
    if (qmask[die][plane]) violation("plane queued twice");
    if (qmask[die][!plane]) begin
      if (page_matters && qrow[die][!plane][6:0] != row[6:0]) violation("two-plane pages differ");
    end
  endtask

  task automatic do_erase(logic [23:0] row);
    logic [23:0] r;
    for (int pg = 0; pg < 128; pg++) begin
      r = {row[23:7], 7'(pg)};
      if (written.exists(r)) begin
        for (int c = 0; c < PAGE_BYTES; c++) mem.delete({r, 16'(c)});
        written.delete(r);
      end
    end
    next_page[{row[23:7], 7'd0}] = 0;
  endtask

  task automatic do_program(logic die, logic plane, logic [23:0] row);
    logic [23:0] bk;
    bk = {row[23:7], 7'd0};
    if (written.exists(row)) violation("program of a page that is not erased");
    if (!next_page.exists(bk)) next_page[bk] = 0;
    if (int'(row[6:0]) < next_page[bk]) violation("page programmed out of order in its block");
    next_page[bk] = int'(row[6:0]) + 1;
    written[row] = 1'b1;
    for (int c = 0; c < PAGE_BYTES; c++) begin
      logic [7:0] old;
      old = mem.exists({row, 16'(c)}) ? mem[{row, 16'(c)}] : 8'hFF;
      mem[{row, 16'(c)}] = old & preg[die][plane][c];
    end
  endtask

  task automatic do_read(logic die, logic plane, logic [23:0] row);
    for (int c = 0; c < PAGE_BYTES; c++)
      preg[die][plane][c] = mem.exists({row, 16'(c)}) ? mem[{row, 16'(c)}] : 8'hFF;
  endtask

  // ---- WE# rising edge: command, address or data ----------------------------
  always @(posedge we_n) if (!ce_n) begin
    if (cle && !ale) begin
      unique case (dq_i)
        8'hFF: begin
          mem.delete(); written.delete(); next_page.delete();
          busy[0] = T_RST; busy[1] = T_RST; n_reset++;
          for (int d = 0; d < 2; d++) begin qmask[d][0] = 0; qmask[d][1] = 0; end
          mode = M_NONE;
        end
        8'h70: begin mode = M_STATUS; n_status++; end
        8'h78: begin mode = M_ADDR_ST; acnt = 0; abuf = '0; n_status++; end
        8'h00: begin mode = M_ADDR_RD; acnt = 0; abuf = '0; out_ptr = 0; end
        8'h80: begin mode = M_ADDR_PG; acnt = 0; abuf = '0; end
        8'h60: begin mode = M_ADDR_ER; acnt = 0; abuf = '0; end
        8'h30, 8'h32: begin
          if (mode != M_ADDR_RD || acnt != 5) violation("read confirm without address");
          else begin
            check_free(cur_die);
            check_pair(cur_die, cur_plane, cur_row, 1);
            qmask[cur_die][cur_plane] = 1'b1; qrow[cur_die][cur_plane] = cur_row;
            if (dq_i == 8'h30) begin
              for (int p = 0; p < 2; p++)
                if (qmask[cur_die][p]) begin do_read(cur_die, 1'(p), qrow[cur_die][p]); qmask[cur_die][p] = 0; end
              busy[cur_die] = T_R;
              n_read++;
            end else n_read_2p++;
          end
          mode = M_NONE;
        end
        8'h10, 8'h11: begin
          if (mode != M_DATA_IN) violation("program confirm without data");
          else begin
            check_free(cur_die);
            check_pair(cur_die, cur_plane, cur_row, 1);
            qmask[cur_die][cur_plane] = 1'b1; qrow[cur_die][cur_plane] = cur_row;
            if (dq_i == 8'h10) begin
              for (int p = 0; p < 2; p++)
                if (qmask[cur_die][p]) begin do_program(cur_die, 1'(p), qrow[cur_die][p]); qmask[cur_die][p] = 0; end
              busy[cur_die] = T_PROG;
              n_prog++;
            end else n_prog_2p++;
          end
          mode = M_NONE;
        end
        8'hD0, 8'hD1: begin
          if (mode != M_ADDR_ER || acnt != 3) violation("erase confirm without address");
          else begin
            check_free(cur_die);
            check_pair(cur_die, cur_plane, cur_row, 0);
            qmask[cur_die][cur_plane] = 1'b1; qrow[cur_die][cur_plane] = cur_row;
            if (dq_i == 8'hD0) begin
              for (int p = 0; p < 2; p++)
                if (qmask[cur_die][p]) begin do_erase(qrow[cur_die][p]); qmask[cur_die][p] = 0; end
              busy[cur_die] = T_BERS;
              n_erase++;
            end else n_erase_2p++;
          end
          mode = M_NONE;
        end
        default: begin violation("unknown command"); mode = M_NONE; end
      endcase
    end else if (ale && !cle) begin
      abuf[8*acnt +: 8] = dq_i;
      acnt++;
      unique case (mode)
        M_ADDR_ST: if (acnt == 3) begin
          sel_die = abuf[19]; sel_plane = abuf[7]; mode = M_STATUS;
        end
        M_ADDR_RD: if (acnt == 5) begin
          cur_row = row_of(abuf, 1); cur_die = cur_row[19]; cur_plane = cur_row[7];
        end
        M_ADDR_PG: if (acnt == 5) begin
          cur_row = row_of(abuf, 1); cur_die = cur_row[19]; cur_plane = cur_row[7];
          in_ptr = int'(abuf[12:0]);
          for (int c = 0; c < PAGE_BYTES; c++) preg[cur_die][cur_plane][c] = 8'hFF;
          mode = M_DATA_IN;
        end
        M_ADDR_ER: if (acnt == 3) begin
          cur_row = row_of(abuf, 0); cur_die = cur_row[19]; cur_plane = cur_row[7];
        end
        default: violation("address cycle out of place");
      endcase
    end else if (!ale && !cle) begin
      if (mode == M_DATA_IN) begin
        if (in_ptr < PAGE_BYTES) preg[cur_die][cur_plane][in_ptr] = dq_i;
        else violation("data beyond the page");
        in_ptr++;
      end else violation("data input out of place");
    end
  end

  // After 00h with no address the bus returns to data output of the selected plane.
  // ---- RE# ------------------------------------------------------------------
  always @(negedge re_n) if (!ce_n) begin
    if (mode == M_ADDR_RD && acnt == 0) mode = M_DATA_OUT;
    unique case (mode)
      M_STATUS:   dq_o = status_of(sel_die);
      M_DATA_OUT: begin
        if (busy[sel_die] != 0) violation("data output from a busy die");
        dq_o = (out_ptr < PAGE_BYTES) ? preg[sel_die][sel_plane][out_ptr] : 8'hFF;
      end
      default: begin dq_o = 8'hFF; violation("RE# with nothing to output"); end
    endcase
  end

  always @(posedge re_n) if (!ce_n) begin
    if (mode == M_DATA_OUT) out_ptr++;
  end

endmodule
