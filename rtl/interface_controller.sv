// interface_controller: the per-chip half of the controller. One instance
// sits between the sequencer and each flash chip.
//
// It holds the distributed state machines the interleaved (multi-die) command
// set needs: a chip FSM that owns the chip's shared bus and one die FSM per
// die that records what that die is doing, so that a command can be sent to
// an idle die while the other die is still busy. It also applies the
// two-plane address mapping to every row before it reaches the bus, so the
// sequencer and the flash transfer layer above keep seeing plain sequential
// page numbers.
//
// Sequencer side:
//   issue    iss_valid/iss_ready with op, pair flag, two logical rows and two
//            queue indices (the second only for a two-plane pair)
//   transfer xfer_valid/xfer_ready with one logical row and index: read the
//            finished page of a read command out to the read stream
//   fin      one-cycle pulse with the queue index (or both indices of a pair)
//            of a program/erase that has been sent or a read that has been
//            transferred
// A transfer request wins over an issue when both wait; either is accepted
// only while the chip FSM is idle. When neither waits and a die is busy in its
// array, the controller polls that die (78h, one status read) every POLL_GAP
// clocks, so the die FSMs learn when a die becomes ready without a waiting
// command holding the bus; die_busy/die_data_ready tell the sequencer which
// die may take a command and which holds a page ready for transfer. Bus
// timing is that of chip_fsm.
// The structure (chip FSM plus per-die FSMs, address transform here) follows
// the document; the handshake signals are this design's own. As in chip_fsm,
// rd_data is the chip's dq_in passed through and wp_n is constant high.
module interface_controller
  import nand_pkg::*;
#(
  parameter int unsigned PAGE_BYTES_P = PAGE_BYTES,
  parameter int unsigned QDEPTH_P     = QDEPTH,
  parameter int unsigned WHR_CYC      = 6,
  parameter int unsigned WB_CYC       = 8,
  parameter int unsigned POLL_GAP     = 16,
  localparam int unsigned IDXW        = $clog2(QDEPTH_P),
  localparam int unsigned BAW         = $clog2(PAGE_BYTES_P)
) (
  input  logic             clk,
  input  logic             rst_n,
  // issue
  input  logic             iss_valid,
  output logic             iss_ready,
  input  op_e              iss_op,
  input  logic             iss_pair,
  input  logic [ROW_W-1:0] iss_row0,
  input  logic [ROW_W-1:0] iss_row1,
  input  logic [IDXW-1:0]  iss_idx0,
  input  logic [IDXW-1:0]  iss_idx1,
  // read-data transfer
  input  logic             xfer_valid,
  output logic             xfer_ready,
  input  logic [ROW_W-1:0] xfer_row,
  input  logic [IDXW-1:0]  xfer_idx,
  // completion
  output logic             fin_valid,
  output logic             fin_pair,
  output logic [IDXW-1:0]  fin_idx0,
  output logic [IDXW-1:0]  fin_idx1,
  // status
  output logic [1:0]       die_busy,
  output logic [1:0]       die_data_ready,
  output logic             proto_err,
  output logic             init_done,
  // input-buffer read port
  output logic [IDXW-1:0]  buf_idx,
  output logic [BAW-1:0]   buf_addr,
  input  logic [7:0]       buf_rdata,
  // read stream
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

  logic [ROW_W-1:0] prow0, prow1, pxrow;

  two_plane_addr_map u_map0 (.logical_row(iss_row0), .physical_row(prow0));
  two_plane_addr_map u_map1 (.logical_row(iss_row1), .physical_row(prow1));
  two_plane_addr_map u_mapx (.logical_row(xfer_row), .physical_row(pxrow));

  logic job_ready;
  logic take_xfer;

  assign take_xfer  = xfer_valid;
  assign xfer_ready = job_ready;
  assign iss_ready  = job_ready && !xfer_valid;

  // Background status polling: while a die works on its array (read busy or
  // program/erase busy) and nothing else wants the bus, poll it with 78h,
  // alternating between the dies, at most once every POLL_GAP clocks.
  logic [1:0] need_poll;
  logic       poll_rr, poll_die;
  logic [$clog2(POLL_GAP+1)-1:0] poll_wait;
  assign need_poll = die_busy & ~die_data_ready;
  assign poll_die  = need_poll[poll_rr] ? poll_rr : !poll_rr;
  wire   bg_poll   = (|need_poll) && (poll_wait == '0) && !xfer_valid && !iss_valid;
  wire   bg_fire   = bg_poll && job_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      poll_rr   <= 1'b0;
      poll_wait <= '0;
    end else if (bg_fire) begin
      poll_rr   <= !poll_die;
      poll_wait <= ($clog2(POLL_GAP+1))'(POLL_GAP);
    end else if (poll_wait != '0) begin
      poll_wait <= poll_wait - 1'b1;
    end
  end

  logic [ROW_W-1:0] poll_row;
  always_comb begin
    poll_row          = '0;
    poll_row[DIE_BIT] = poll_die;
  end

  logic ev_start_read, ev_start_write, ev_two_plane, ev_poll_ready, ev_xfer_done, ev_die;

  chip_fsm #(
    .PAGE_BYTES_P(PAGE_BYTES_P), .QDEPTH_P(QDEPTH_P), .WHR_CYC(WHR_CYC), .WB_CYC(WB_CYC)
  ) u_chip (
    .clk, .rst_n,
    .job_valid (xfer_valid || iss_valid || bg_poll),
    .job_ready (job_ready),
    .job_xfer  (take_xfer),
    .job_poll  (!xfer_valid && !iss_valid),
    .job_op    (take_xfer ? OP_READ : iss_op),
    .job_pair  (take_xfer ? 1'b0 : iss_pair),
    .job_row0  (take_xfer ? pxrow : iss_valid ? prow0 : poll_row),
    .job_row1  (prow1),
    .job_idx0  (take_xfer ? xfer_idx : iss_idx0),
    .job_idx1  (iss_idx1),
    .fin_valid, .fin_pair, .fin_idx0, .fin_idx1,
    .ev_start_read, .ev_start_write, .ev_two_plane, .ev_poll_ready, .ev_xfer_done, .ev_die,
    .init_done,
    .buf_idx, .buf_addr, .buf_rdata,
    .rd_valid, .rd_data, .rd_ready,
    .ce_n, .cle, .ale, .we_n, .re_n, .wp_n, .dq_out, .dq_oe, .dq_in, .rb_n
  );

  logic [1:0] err;

  for (genvar d = 0; d < 2; d++) begin : g_die
    wire sel = (ev_die == 1'(d));
    die_fsm u_die (
      .clk, .rst_n,
      .start_read  (sel && ev_start_read),
      .start_write (sel && ev_start_write),
      .two_plane   (ev_two_plane),
      .poll_ready  (sel && ev_poll_ready),
      .xfer_done   (sel && ev_xfer_done),
      .busy        (die_busy[d]),
      .data_ready  (die_data_ready[d]),
      .proto_err   (err[d])
    );
  end

  assign proto_err = |err;

endmodule
