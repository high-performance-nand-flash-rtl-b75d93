// nand_ctrl_top: out-of-order, two-plane NAND flash controller.
//
// One sequencer (command queue, issue logic, I/O data buffer) serves NCHIP_P
// interface controllers, one per flash chip, each with its own NAND bus. The
// flash transfer layer above hands in physical page commands (logical
// two-plane row numbers, see two_plane_addr_map) and program data, and gets
// read data and one commit pulse per command back, in command order.
//
// Performance comes from three things: commands to different chips and dies
// run in parallel (issue out of order, commit in order), two sequential pages
// become one two-plane command, and the per-die state machines let a chip take
// a command for one die while the other is busy (interleaving).
//
// Clock: 80 MHz in the target system (two clocks per 25 ns NAND bus cycle).
// Reset: active-low asynchronous; after reset each channel sends FFh to its
// chip and waits for R/B# (init_done per channel).
// Pins per chip c: ce_n[c], cle[c], ale[c], we_n[c], re_n[c], wp_n[c],
// dq_out[c]/dq_oe[c] (controller drives the I/O bus when dq_oe is high),
// dq_in[c], rb_n[c]. The bidirectional pad is outside this module. wp_n is
// held high (write protection is never used), so those pins are constants.
module nand_ctrl_top
  import nand_pkg::*;
#(
  parameter int unsigned PAGE_BYTES_P = PAGE_BYTES,
  parameter int unsigned QDEPTH_P     = QDEPTH,
  parameter int unsigned NCHIP_P      = NCHIP,
  parameter int unsigned OFIFO_DEPTH  = 16,
  parameter int unsigned WHR_CYC      = 6,
  parameter int unsigned WB_CYC       = 8,
  localparam int unsigned IDXW        = $clog2(QDEPTH_P)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // flash transfer layer
  input  logic                    cmd_valid,
  output logic                    cmd_ready,
  input  cmd_t                    cmd,
  input  logic                    wdata_valid,
  output logic                    wdata_ready,
  input  logic [7:0]              wdata,
  output logic                    rdata_valid,
  input  logic                    rdata_ready,
  output logic [7:0]              rdata,
  output logic                    cmt_valid,
  output cmd_t                    cmt_cmd,
  // status
  output logic [NCHIP_P-1:0]      init_done,
  output logic [NCHIP_P-1:0][1:0] die_busy,
  output logic [NCHIP_P-1:0][1:0] die_data_ready,
  output logic [NCHIP_P-1:0]      proto_err,
  output logic                    ev_issue,
  output logic                    ev_ooo,
  output logic                    ev_pair,
  output logic                    ev_war_block,
  output logic                    ev_die_block,
  output logic                    ev_commit_wait,
  // NAND pins
  output logic [NCHIP_P-1:0]      ce_n,
  output logic [NCHIP_P-1:0]      cle,
  output logic [NCHIP_P-1:0]      ale,
  output logic [NCHIP_P-1:0]      we_n,
  output logic [NCHIP_P-1:0]      re_n,
  output logic [NCHIP_P-1:0]      wp_n,
  output logic [NCHIP_P-1:0][7:0] dq_out,
  output logic [NCHIP_P-1:0]      dq_oe,
  input  logic [NCHIP_P-1:0][7:0] dq_in,
  input  logic [NCHIP_P-1:0]      rb_n
);

  localparam int unsigned BAW = $clog2(PAGE_BYTES_P);

  logic [NCHIP_P-1:0]           iss_valid, iss_ready, xfer_valid, xfer_ready;
  op_e                          iss_op;
  logic                         iss_pair;
  logic [ROW_W-1:0]             iss_row0, iss_row1, xfer_row;
  logic [IDXW-1:0]              iss_idx0, iss_idx1, xfer_idx;
  logic [NCHIP_P-1:0]           fin_valid, fin_pair;
  logic [NCHIP_P-1:0][IDXW-1:0] fin_idx0, fin_idx1, buf_idx;
  logic [NCHIP_P-1:0][BAW-1:0]  buf_addr;
  logic [NCHIP_P-1:0][7:0]      buf_rdata, ch_rd_data;
  logic [NCHIP_P-1:0]           ch_rd_valid, ch_rd_ready;

  sequencer #(
    .PAGE_BYTES_P(PAGE_BYTES_P), .QDEPTH_P(QDEPTH_P), .NCHIP_P(NCHIP_P), .OFIFO_DEPTH(OFIFO_DEPTH)
  ) u_seq (
    .clk, .rst_n,
    .cmd_valid, .cmd_ready, .cmd,
    .wdata_valid, .wdata_ready, .wdata,
    .rdata_valid, .rdata_ready, .rdata,
    .cmt_valid, .cmt_cmd,
    .iss_valid, .iss_ready, .iss_op, .iss_pair, .iss_row0, .iss_row1, .iss_idx0, .iss_idx1,
    .xfer_valid, .xfer_ready, .xfer_row, .xfer_idx,
    .die_busy, .die_data_ready,
    .fin_valid, .fin_pair, .fin_idx0, .fin_idx1,
    .buf_idx, .buf_addr, .buf_rdata,
    .ch_rd_valid, .ch_rd_data, .ch_rd_ready,
    .ev_issue, .ev_ooo, .ev_pair, .ev_war_block, .ev_die_block, .ev_commit_wait
  );

  for (genvar c = 0; c < NCHIP_P; c++) begin : g_ch
    interface_controller #(
      .PAGE_BYTES_P(PAGE_BYTES_P), .QDEPTH_P(QDEPTH_P), .WHR_CYC(WHR_CYC), .WB_CYC(WB_CYC)
    ) u_ifc (
      .clk, .rst_n,
      .iss_valid(iss_valid[c]), .iss_ready(iss_ready[c]),
      .iss_op, .iss_pair, .iss_row0, .iss_row1, .iss_idx0, .iss_idx1,
      .xfer_valid(xfer_valid[c]), .xfer_ready(xfer_ready[c]), .xfer_row, .xfer_idx,
      .fin_valid(fin_valid[c]), .fin_pair(fin_pair[c]), .fin_idx0(fin_idx0[c]), .fin_idx1(fin_idx1[c]),
      .die_busy(die_busy[c]), .die_data_ready(die_data_ready[c]), .proto_err(proto_err[c]), .init_done(init_done[c]),
      .buf_idx(buf_idx[c]), .buf_addr(buf_addr[c]), .buf_rdata(buf_rdata[c]),
      .rd_valid(ch_rd_valid[c]), .rd_data(ch_rd_data[c]), .rd_ready(ch_rd_ready[c]),
      .ce_n(ce_n[c]), .cle(cle[c]), .ale(ale[c]), .we_n(we_n[c]), .re_n(re_n[c]), .wp_n(wp_n[c]),
      .dq_out(dq_out[c]), .dq_oe(dq_oe[c]), .dq_in(dq_in[c]), .rb_n(rb_n[c])
    );
  end

endmodule
