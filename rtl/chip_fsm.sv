// chip_fsm: the bus engine of one interface controller. It drives the pins of
// one NAND flash chip (CE#, CLE, ALE, WE#, RE#, WP#, the 8-bit I/O bus) and
// reads R/B#.
//
// Jobs come from the interface controller, one at a time:
//   issue, op READ     78h + row (poll until the die is ready), 00h, 5 address
//                      cycles, [32h, 00h, 5 address cycles of plane 1], 30h
//   issue, op PROGRAM  poll, 80h, 5 address cycles, page data, [11h, 80h,
//                      5 address cycles, page data of plane 1], 10h
//   issue, op ERASE    poll, 60h, 3 row cycles, [D1h, 60h, 3 row cycles], D0h
//   transfer           poll the die/plane with 78h (this also selects the
//                      plane for output), 00h, then PAGE_BYTES RE# cycles
//                      whose bytes go out on the read stream.
//   poll               78h + row of the die and one status read; RDY is
//                      reported on ev_poll_ready, nothing else is sent. The
//                      interface controller uses it to watch busy dies
//                      without tying up the bus.
// Bracketed parts are sent only for a two-plane pair. The 78h status poll
// before every access, the 00h after it for data output and the plain
// command/address sequences follow the document; the status poll before
// program/erase (the document calls it optional) and the ONFI 32h/11h/D1h
// multi-plane opcodes are this design's choice. After reset the FSM sends FFh
// and waits for R/B# to go high.
//
// Timing: the controller clock is twice the bus rate (12.5 ns against the
// 25 ns tRC/tWC of the part), so every bus cycle takes two clocks: WE# (or
// RE#) low for one clock, high for one. Command, address and data are latched
// by the device on the WE# rising edge; read data is sampled by the
// controller on the clock edge that raises RE#. WHR_CYC clocks separate the
// last address cycle from the first RE# (tWHR), WB_CYC clocks separate FFh
// from the first R/B# sample (tWB). A finished program/erase job pulses
// fin_valid with the queue index (or both indices of a pair) right after the
// confirm opcode; a transfer pulses it after the last byte.
//
// Program data comes from the input buffer through a synchronous read port
// (buf_idx/buf_addr this cycle, buf_rdata next cycle). The read stream has no
// skid buffer: a byte is started only while rd_ready is high, and the only
// other user of the buffer can only drain it, so the push is never refused.
// rd_data is dq_in itself (rd_valid marks the clock the byte is sampled), and
// wp_n is tied high: the controller never write-protects the chip. Both are
// therefore plain wires or constants after synthesis, on purpose.
module chip_fsm
  import nand_pkg::*;
#(
  parameter int unsigned PAGE_BYTES_P = PAGE_BYTES,
  parameter int unsigned QDEPTH_P     = QDEPTH,
  parameter int unsigned WHR_CYC      = 6,
  parameter int unsigned WB_CYC       = 8,
  localparam int unsigned IDXW        = $clog2(QDEPTH_P),
  localparam int unsigned BAW         = $clog2(PAGE_BYTES_P)
) (
  input  logic             clk,
  input  logic             rst_n,
  // job from the interface controller
  input  logic             job_valid,
  output logic             job_ready,
  input  logic             job_xfer,     // 1: read-data transfer, 0: issue
  input  logic             job_poll,     // 1: one status poll only (job_row0 names the die)
  input  op_e              job_op,
  input  logic             job_pair,
  input  logic [ROW_W-1:0] job_row0,     // physical rows
  input  logic [ROW_W-1:0] job_row1,
  input  logic [IDXW-1:0]  job_idx0,
  input  logic [IDXW-1:0]  job_idx1,
  // completion
  output logic             fin_valid,
  output logic             fin_pair,
  output logic [IDXW-1:0]  fin_idx0,
  output logic [IDXW-1:0]  fin_idx1,
  // events for the die FSMs
  output logic             ev_start_read,
  output logic             ev_start_write,
  output logic             ev_two_plane,
  output logic             ev_poll_ready,
  output logic             ev_xfer_done,
  output logic             ev_die,
  output logic             init_done,
  // input-buffer read port (program data)
  output logic [IDXW-1:0]  buf_idx,
  output logic [BAW-1:0]   buf_addr,
  input  logic [7:0]       buf_rdata,
  // read-data stream
  output logic             rd_valid,
  output logic [7:0]       rd_data,
  input  logic             rd_ready,
  // NAND pins
  output logic             ce_n,
  output logic             cle,
  output logic             ale,
  output logic             we_n,
  output logic             re_n,
  output logic             wp_n,
  output logic [7:0]       dq_out,
  output logic             dq_oe,
  input  logic [7:0]       dq_in,
  input  logic             rb_n
);

  typedef enum logic [4:0] {
    S_RST_CMD, S_RST_WAIT, S_IDLE,
    S_P_CMD, S_P_ADDR, S_P_WAIT, S_P_READ,
    S_C1, S_A1, S_D1, S_CM, S_C2, S_A2, S_D2, S_CF,
    S_X_CMD, S_X_WAIT, S_X_DATA, S_FIN
  } state_e;

  state_e           st;
  logic             ph;        // 0: first clock of a bus cycle, 1: second
  logic [BAW:0]     cnt;       // address-cycle / byte / wait counter
  // latched job
  logic             j_xfer, j_pair, j_poll;
  op_e              j_op;
  logic [ROW_W-1:0] j_row0, j_row1;
  logic [IDXW-1:0]  j_idx0, j_idx1;

  localparam int unsigned PB = PAGE_BYTES_P;

  // Address byte k of a row/column sequence. Five cycles: col lo, col hi,
  // row[7:0], row[15:8], row[23:16]; three cycles skip the column.
  function automatic logic [7:0] addr_byte(logic [ROW_W-1:0] row, logic [2:0] k, logic five);
    logic [23:0] r;
    logic [2:0]  kk;
    r  = 24'(row);
    kk = five ? k : k + 3'd2;
    unique case (kk)
      3'd0, 3'd1: return 8'h00;            // column 0, bits [15:13] zero
      3'd2:       return r[7:0];
      3'd3:       return r[15:8];
      default:    return r[23:16];
    endcase
  endfunction

  function automatic logic [7:0] first_opc(op_e op);
    unique case (op)
      OP_READ:    return OPC_READ1;
      OP_PROGRAM: return OPC_PROG1;
      default:    return OPC_ERASE1;
    endcase
  endfunction

  function automatic logic [7:0] mid_opc(op_e op);
    unique case (op)
      OP_READ:    return OPC_READ_MP;
      OP_PROGRAM: return OPC_PROG_MP;
      default:    return OPC_ERASE_MP;
    endcase
  endfunction

  function automatic logic [7:0] conf_opc(op_e op);
    unique case (op)
      OP_READ:    return OPC_READ2;
      OP_PROGRAM: return OPC_PROG2;
      default:    return OPC_ERASE2;
    endcase
  endfunction

  wire       five   = (j_op != OP_ERASE);
  wire [2:0] n_addr = five ? 3'd5 : 3'd3;
  wire       last_b = (cnt == (BAW+1)'(PB - 1));

  // Row polled before the access: for a transfer, j_row0 is the plane's own
  // page; for an issue, the first plane's row selects the die.
  assign job_ready = (st == S_IDLE);
  assign ev_die    = j_row0[DIE_BIT];
  assign init_done = (st != S_RST_CMD) && (st != S_RST_WAIT);
  assign wp_n      = 1'b1;

  // input-buffer address: one byte ahead during the second clock of a cycle
  always_comb begin
    buf_idx  = (st == S_CM || st == S_C2 || st == S_A2 || st == S_D2) ? j_idx1 : j_idx0;
    buf_addr = '0;
    if (st == S_D1 || st == S_D2)
      buf_addr = ph ? BAW'(cnt + 1'b1) : BAW'(cnt);
  end

  // read stream: the byte on dq_in at the clock that raises RE#
  assign rd_valid = (st == S_X_DATA) && ph;
  assign rd_data  = dq_in;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st     <= S_RST_CMD;
      ph     <= 1'b0;
      cnt    <= '0;
      ce_n   <= 1'b1;
      cle    <= 1'b0;
      ale    <= 1'b0;
      we_n   <= 1'b1;
      re_n   <= 1'b1;
      dq_out <= '0;
      dq_oe  <= 1'b0;
      j_xfer <= 1'b0;
      j_pair <= 1'b0;
      j_poll <= 1'b0;
      j_op   <= OP_READ;
      j_row0 <= '0;
      j_row1 <= '0;
      j_idx0 <= '0;
      j_idx1 <= '0;
    end else begin
      unique case (st)
        // ---------------- reset -------------------------------------------
        S_RST_CMD: begin
          ce_n <= 1'b0;
          if (!ph) begin
            cle <= 1'b1; we_n <= 1'b0; dq_out <= OPC_RESET; dq_oe <= 1'b1; ph <= 1'b1;
          end else begin
            we_n <= 1'b1; ph <= 1'b0; cnt <= '0; st <= S_RST_WAIT;
          end
        end
        S_RST_WAIT: begin
          cle <= 1'b0; dq_oe <= 1'b0;
          if (cnt < (BAW+1)'(WB_CYC)) cnt <= cnt + 1'b1;
          else if (rb_n) begin ce_n <= 1'b1; st <= S_IDLE; end
        end
        // ---------------- idle --------------------------------------------
        S_IDLE: begin
          ce_n <= 1'b1; cle <= 1'b0; ale <= 1'b0; dq_oe <= 1'b0;
          if (job_valid) begin
            j_xfer <= job_xfer; j_op <= job_op; j_pair <= job_pair && !job_xfer && !job_poll;
            j_poll <= job_poll && !job_xfer;
            j_row0 <= job_row0; j_row1 <= job_row1;
            j_idx0 <= job_idx0; j_idx1 <= job_idx1;
            cnt <= '0; ph <= 1'b0;
            st <= S_P_CMD;
          end
        end
        // ---------------- 78h status poll ---------------------------------
        S_P_CMD: begin
          ce_n <= 1'b0;
          if (!ph) begin
            cle <= 1'b1; ale <= 1'b0; we_n <= 1'b0; dq_out <= OPC_STATUS_ENH; dq_oe <= 1'b1; ph <= 1'b1;
          end else begin
            we_n <= 1'b1; ph <= 1'b0; cnt <= '0; st <= S_P_ADDR;
          end
        end
        S_P_ADDR: begin
          if (!ph) begin
            cle <= 1'b0; ale <= 1'b1; we_n <= 1'b0; dq_out <= addr_byte(j_row0, cnt[2:0], 1'b0); ph <= 1'b1;
          end else begin
            we_n <= 1'b1; ph <= 1'b0;
            if (cnt == 2) begin cnt <= '0; st <= S_P_WAIT; end
            else cnt <= cnt + 1'b1;
          end
        end
        S_P_WAIT: begin
          ale <= 1'b0; dq_oe <= 1'b0;
          if (cnt < (BAW+1)'(WHR_CYC)) cnt <= cnt + 1'b1;
          else begin cnt <= '0; st <= S_P_READ; end
        end
        S_P_READ: begin
          if (!ph) begin
            re_n <= 1'b0; ph <= 1'b1;
          end else begin
            re_n <= 1'b1; ph <= 1'b0;
            if (j_poll) begin
              st <= S_FIN;                 // one status read, ready or not
            end else if (dq_in[ST_RDY]) begin
              cnt <= '0;
              st  <= j_xfer ? S_X_CMD : S_C1;
            end
          end
        end
        // ---------------- issue: plane 0 ----------------------------------
        S_C1: begin
          if (!ph) begin
            cle <= 1'b1; ale <= 1'b0; we_n <= 1'b0; dq_out <= first_opc(j_op); dq_oe <= 1'b1; ph <= 1'b1;
          end else begin
            we_n <= 1'b1; ph <= 1'b0; cnt <= '0; st <= S_A1;
          end
        end
        S_A1, S_A2: begin
          if (!ph) begin
            cle <= 1'b0; ale <= 1'b1; we_n <= 1'b0;
            dq_out <= addr_byte((st == S_A1) ? j_row0 : j_row1, cnt[2:0], five); ph <= 1'b1;
          end else begin
            we_n <= 1'b1; ph <= 1'b0;
            if (cnt == (BAW+1)'(n_addr - 1)) begin
              cnt <= '0;
              if (j_op == OP_PROGRAM) st <= (st == S_A1) ? S_D1 : S_D2;
              else if (st == S_A1 && j_pair) st <= S_CM;
              else st <= S_CF;
            end else cnt <= cnt + 1'b1;
          end
        end
        S_D1, S_D2: begin
          if (!ph) begin
            ale <= 1'b0; cle <= 1'b0; we_n <= 1'b0; dq_out <= buf_rdata; ph <= 1'b1;
          end else begin
            we_n <= 1'b1; ph <= 1'b0;
            if (last_b) begin
              cnt <= '0;
              st  <= (st == S_D1 && j_pair) ? S_CM : S_CF;
            end else cnt <= cnt + 1'b1;
          end
        end
        S_CM: begin
          if (!ph) begin
            cle <= 1'b1; ale <= 1'b0; we_n <= 1'b0; dq_out <= mid_opc(j_op); ph <= 1'b1;
          end else begin
            we_n <= 1'b1; ph <= 1'b0; st <= S_C2;
          end
        end
        // ---------------- issue: plane 1 ----------------------------------
        S_C2: begin
          if (!ph) begin
            cle <= 1'b1; ale <= 1'b0; we_n <= 1'b0; dq_out <= first_opc(j_op); ph <= 1'b1;
          end else begin
            we_n <= 1'b1; ph <= 1'b0; cnt <= '0; st <= S_A2;
          end
        end
        S_CF: begin
          if (!ph) begin
            cle <= 1'b1; ale <= 1'b0; we_n <= 1'b0; dq_out <= conf_opc(j_op); ph <= 1'b1;
          end else begin
            we_n <= 1'b1; ph <= 1'b0; st <= S_FIN;
          end
        end
        // ---------------- transfer ----------------------------------------
        S_X_CMD: begin
          if (!ph) begin
            cle <= 1'b1; ale <= 1'b0; we_n <= 1'b0; dq_out <= OPC_READ1; dq_oe <= 1'b1; ph <= 1'b1;
          end else begin
            we_n <= 1'b1; ph <= 1'b0; cnt <= '0; st <= S_X_WAIT;
          end
        end
        S_X_WAIT: begin
          cle <= 1'b0; dq_oe <= 1'b0;
          if (cnt < (BAW+1)'(WHR_CYC)) cnt <= cnt + 1'b1;
          else begin cnt <= '0; st <= S_X_DATA; end
        end
        S_X_DATA: begin
          if (!ph) begin
            if (rd_ready) begin re_n <= 1'b0; ph <= 1'b1; end
          end else begin
            re_n <= 1'b1; ph <= 1'b0;
            if (last_b) begin cnt <= '0; st <= S_FIN; end
            else cnt <= cnt + 1'b1;
          end
        end
        S_FIN: begin
          cle <= 1'b0; ale <= 1'b0; dq_oe <= 1'b0; ce_n <= 1'b1;
          st  <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // Completion and die events: pulses decoded from the state.
  wire cf_done = (st == S_CF) && ph;
  assign ev_start_read  = cf_done && (j_op == OP_READ);
  assign ev_start_write = cf_done && (j_op != OP_READ);
  assign ev_two_plane   = j_pair;
  assign ev_poll_ready  = (st == S_P_READ) && ph && dq_in[ST_RDY];
  assign ev_xfer_done   = (st == S_X_DATA) && ph && last_b;
  assign fin_valid      = (cf_done && (j_op != OP_READ)) || ev_xfer_done;
  assign fin_pair       = j_pair && !j_xfer;
  assign fin_idx0       = j_idx0;
  assign fin_idx1       = j_idx1;

endmodule
