// sequencer: the central part of the controller, between the flash transfer
// layer (FTL) and the per-chip interface controllers. It contains the command
// queue, the issue logic and the I/O data buffer.
//
// FTL side:
//   cmd_valid/cmd_ready/cmd      one command (read, program or erase of one
//                                page/block); a program command is followed by
//                                its PAGE_BYTES_P data bytes on wdata_*, and no
//                                new command is taken until they have arrived
//   rdata_valid/rdata_ready/rdata read pages, whole and in command order
//   cmt_valid/cmt_cmd            one pulse per command, in command order
//                                (in-order commitment)
// Channel side, per chip c: iss_valid[c]/iss_ready[c] with a shared issue
// payload, xfer_valid[c]/xfer_ready[c] with a shared transfer payload,
// fin_* from the channel, an input-buffer read port and a read stream.
//
// Operation: every cycle the issue logic may hand one waiting command (or a
// two-plane pair) to its chip; several chips and both dies of a chip then work
// in parallel. Commitment is strictly in order: the head entry commits once it
// is done. A program or erase is done when its chip has sent it; a read is
// done when its page has been transferred, and that transfer is requested
// only when the read reaches the head, so read data leaves in command order
// even though the array reads ran out of order.
// The structure and rules follow the document; the FTL handshake and the
// point at which a read is transferred are this design's own.
// ev_* outputs pulse for observation: a command issued, issued out of order,
// issued as a two-plane pair, a write held by write-after-read prevention, an
// entry held by same-die ordering, a finished entry held by in-order commit.
module sequencer
  import nand_pkg::*;
#(
  parameter int unsigned PAGE_BYTES_P = PAGE_BYTES,
  parameter int unsigned QDEPTH_P     = QDEPTH,
  parameter int unsigned NCHIP_P      = NCHIP,
  parameter int unsigned OFIFO_DEPTH  = 16,
  localparam int unsigned IDXW        = $clog2(QDEPTH_P),
  localparam int unsigned BAW         = $clog2(PAGE_BYTES_P)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // FTL: commands
  input  logic                         cmd_valid,
  output logic                         cmd_ready,
  input  cmd_t                         cmd,
  // FTL: program data
  input  logic                         wdata_valid,
  output logic                         wdata_ready,
  input  logic [7:0]                   wdata,
  // FTL: read data
  output logic                         rdata_valid,
  input  logic                         rdata_ready,
  output logic [7:0]                   rdata,
  // FTL: commit
  output logic                         cmt_valid,
  output cmd_t                         cmt_cmd,
  // channels: issue
  output logic [NCHIP_P-1:0]           iss_valid,
  input  logic [NCHIP_P-1:0]           iss_ready,
  output op_e                          iss_op,
  output logic                         iss_pair,
  output logic [ROW_W-1:0]             iss_row0,
  output logic [ROW_W-1:0]             iss_row1,
  output logic [IDXW-1:0]              iss_idx0,
  output logic [IDXW-1:0]              iss_idx1,
  // channels: read-data transfer
  output logic [NCHIP_P-1:0]           xfer_valid,
  input  logic [NCHIP_P-1:0]           xfer_ready,
  output logic [ROW_W-1:0]             xfer_row,
  output logic [IDXW-1:0]              xfer_idx,
  // channels: die state (from the die FSMs)
  input  logic [NCHIP_P-1:0][1:0]      die_busy,
  input  logic [NCHIP_P-1:0][1:0]      die_data_ready,
  // channels: completion
  input  logic [NCHIP_P-1:0]           fin_valid,
  input  logic [NCHIP_P-1:0]           fin_pair,
  input  logic [NCHIP_P-1:0][IDXW-1:0] fin_idx0,
  input  logic [NCHIP_P-1:0][IDXW-1:0] fin_idx1,
  // channels: input-buffer read ports
  input  logic [NCHIP_P-1:0][IDXW-1:0] buf_idx,
  input  logic [NCHIP_P-1:0][BAW-1:0]  buf_addr,
  output logic [NCHIP_P-1:0][7:0]      buf_rdata,
  // channels: read streams
  input  logic [NCHIP_P-1:0]           ch_rd_valid,
  input  logic [NCHIP_P-1:0][7:0]      ch_rd_data,
  output logic [NCHIP_P-1:0]           ch_rd_ready,
  // observation
  output logic                         ev_issue,
  output logic                         ev_ooo,
  output logic                         ev_pair,
  output logic                         ev_war_block,
  output logic                         ev_die_block,
  output logic                         ev_commit_wait
);

  qentry_t [QDEPTH_P-1:0] q;
  logic [IDXW-1:0]        head, enq_idx;
  logic                   enq_ready;

  // ---- program-data fill ------------------------------------------------
  logic                   fill_act;
  logic [IDXW-1:0]        fill_idx;
  logic [BAW-1:0]         fill_cnt;
  wire                    fill_last = (fill_cnt == BAW'(PAGE_BYTES_P - 1));
  wire                    wbeat = wdata_valid && wdata_ready;

  assign cmd_ready   = enq_ready && !fill_act;
  assign wdata_ready = fill_act;
  wire   enq         = cmd_valid && cmd_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fill_act <= 1'b0;
      fill_idx <= '0;
      fill_cnt <= '0;
    end else begin
      if (enq && cmd.op == OP_PROGRAM) begin
        fill_act <= 1'b1;
        fill_idx <= enq_idx;
        fill_cnt <= '0;
      end else if (wbeat) begin
        fill_cnt <= fill_cnt + 1'b1;
        if (fill_last) fill_act <= 1'b0;
      end
    end
  end

  // ---- issue --------------------------------------------------------------
  logic            sel_valid, sel_pair, ooo, war_block, die_block;
  logic [IDXW-1:0] sel_idx, sel_idx1;

  issue_logic #(.QDEPTH_P(QDEPTH_P), .NCHIP_P(NCHIP_P)) u_issue (
    .q, .head, .chip_ready(iss_ready), .die_free(~die_busy),
    .iss_valid(sel_valid), .iss_idx(sel_idx), .iss_pair(sel_pair), .iss_idx1(sel_idx1),
    .ooo, .war_block, .die_block
  );

  wire [1:0] sel_chip = q[sel_idx].cmd.chip;

  always_comb begin
    iss_valid = '0;
    if (sel_valid) iss_valid[32'(sel_chip) % NCHIP_P] = 1'b1;
  end
  assign iss_op   = q[sel_idx].cmd.op;
  assign iss_pair = sel_pair;
  assign iss_row0 = q[sel_idx].cmd.row;
  assign iss_row1 = q[sel_idx1].cmd.row;
  assign iss_idx0 = sel_idx;
  assign iss_idx1 = sel_idx1;
  wire   iss_fire = sel_valid && iss_ready[32'(sel_chip) % NCHIP_P];

  // ---- transfer of the head read ---------------------------------------
  qentry_t h;
  logic    xfer_sent;
  assign h = q[head];
  wire [1:0] h_chip   = h.cmd.chip;
  wire       h_die    = h.cmd.row[DIE_BIT];
  wire       want_xfer = h.valid && h.issued && !h.done && (h.cmd.op == OP_READ) && !xfer_sent &&
                         die_data_ready[32'(h_chip) % NCHIP_P][h_die];

  always_comb begin
    xfer_valid = '0;
    if (want_xfer) xfer_valid[32'(h_chip) % NCHIP_P] = 1'b1;
  end
  assign xfer_row = h.cmd.row;
  assign xfer_idx = head;
  wire xfer_fire = want_xfer && xfer_ready[32'(h_chip) % NCHIP_P];

  // ---- completion and commit -----------------------------------------------
  logic [QDEPTH_P-1:0] done_set;
  always_comb begin
    done_set = '0;
    for (int c = 0; c < NCHIP_P; c++) begin
      if (fin_valid[c]) begin
        done_set[fin_idx0[c]] = 1'b1;
        if (fin_pair[c]) done_set[fin_idx1[c]] = 1'b1;
      end
    end
  end

  wire pop = h.valid && h.done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xfer_sent <= 1'b0;
      cmt_valid <= 1'b0;
      cmt_cmd   <= '0;
    end else begin
      if (pop) xfer_sent <= 1'b0;
      else if (xfer_fire) xfer_sent <= 1'b1;
      cmt_valid <= pop;
      if (pop) cmt_cmd <= h.cmd;
    end
  end

  cmd_queue #(.QDEPTH_P(QDEPTH_P)) u_queue (
    .clk, .rst_n,
    .enq_valid(enq), .enq_ready, .enq_cmd(cmd), .enq_idx,
    .data_ok_set(wbeat && fill_last), .data_ok_idx(fill_idx),
    .iss_set(iss_fire), .iss_idx(sel_idx), .iss_pair(sel_pair),
    .done_set, .pop,
    .q, .head, .count()
  );

  // ---- I/O data buffer -------------------------------------------------------
  logic       of_in_valid, of_in_ready;
  logic [7:0] of_in_data;

  always_comb begin
    of_in_valid = ch_rd_valid[32'(h_chip) % NCHIP_P];
    of_in_data  = ch_rd_data[32'(h_chip) % NCHIP_P];
    ch_rd_ready = '0;
    ch_rd_ready[32'(h_chip) % NCHIP_P] = of_in_ready;
  end

  io_data_buffer #(
    .PAGE_BYTES_P(PAGE_BYTES_P), .QDEPTH_P(QDEPTH_P), .NCH(NCHIP_P), .OFIFO_DEPTH(OFIFO_DEPTH)
  ) u_buf (
    .clk, .rst_n,
    .wr_en(wbeat), .wr_idx(fill_idx), .wr_addr(fill_cnt), .wr_data(wdata),
    .rd_idx(buf_idx), .rd_addr(buf_addr), .rd_data(buf_rdata),
    .in_valid(of_in_valid), .in_ready(of_in_ready), .in_data(of_in_data),
    .out_valid(rdata_valid), .out_ready(rdata_ready), .out_data(rdata)
  );

  // ---- observation -------------------------------------------------------------
  logic later_done;
  always_comb begin
    later_done = 1'b0;
    for (int k = 1; k < QDEPTH_P; k++) begin
      if (q[(int'(head) + k) % QDEPTH_P].valid && q[(int'(head) + k) % QDEPTH_P].done)
        later_done = 1'b1;
    end
  end

  assign ev_issue       = iss_fire;
  assign ev_ooo         = iss_fire && ooo;
  assign ev_pair        = iss_fire && sel_pair;
  assign ev_war_block   = war_block;
  assign ev_die_block   = die_block;
  assign ev_commit_wait = h.valid && !h.done && later_done;

  // only the channel serving the head read may deliver read data
  for (genvar c = 0; c < NCHIP_P; c++) begin : g_chk
    a_rd_order: assert property (@(posedge clk) disable iff (!rst_n)
      ch_rd_valid[c] |-> (c == int'(32'(h_chip) % NCHIP_P)))
      else $error("sequencer: read data from channel %0d out of order", c);
  end

endmodule
