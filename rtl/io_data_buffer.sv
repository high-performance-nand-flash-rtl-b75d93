// io_data_buffer: the controller's I/O data buffer, split into an input half
// and an output half so that program data can flow in while read data flows
// out.
//
// Input half: one page slot per command-queue entry (QDEPTH_P x PAGE_BYTES_P
// bytes). The flash transfer layer writes a program command's page into the
// slot of its queue entry; because commands are issued out of order, any
// interface controller may later read any slot, so there is one synchronous
// read port per channel (address this cycle, data next cycle).
// Output half: a byte FIFO (OFIFO_DEPTH entries, valid/ready on both sides)
// that carries read data from the interface controller doing the in-order
// transfer to the flash transfer layer.
// The split into two sets follows the document; the slot-per-entry
// organisation and the FIFO depth are this design's choice.
module io_data_buffer
  import nand_pkg::*;
#(
  parameter int unsigned PAGE_BYTES_P = PAGE_BYTES,
  parameter int unsigned QDEPTH_P     = QDEPTH,
  parameter int unsigned NCH          = NCHIP,
  parameter int unsigned OFIFO_DEPTH  = 16,
  localparam int unsigned IDXW        = $clog2(QDEPTH_P),
  localparam int unsigned BAW         = $clog2(PAGE_BYTES_P),
  localparam int unsigned OAW         = $clog2(OFIFO_DEPTH)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // input half: write port
  input  logic                      wr_en,
  input  logic [IDXW-1:0]           wr_idx,
  input  logic [BAW-1:0]            wr_addr,
  input  logic [7:0]                wr_data,
  // input half: read ports, one per channel
  input  logic [NCH-1:0][IDXW-1:0]  rd_idx,
  input  logic [NCH-1:0][BAW-1:0]   rd_addr,
  output logic [NCH-1:0][7:0]       rd_data,
  // output half: FIFO
  input  logic                      in_valid,
  output logic                      in_ready,
  input  logic [7:0]                in_data,
  output logic                      out_valid,
  input  logic                      out_ready,
  output logic [7:0]                out_data
);

  localparam int unsigned WORDS = QDEPTH_P * PAGE_BYTES_P;
  localparam int unsigned MAW   = $clog2(WORDS);

  logic [7:0] ibuf [WORDS];

  function automatic logic [MAW-1:0] flat(logic [IDXW-1:0] idx, logic [BAW-1:0] a);
    return MAW'(idx) * MAW'(PAGE_BYTES_P) + MAW'(a);
  endfunction

  always_ff @(posedge clk) begin
    if (wr_en) ibuf[flat(wr_idx, wr_addr)] <= wr_data;
  end

  for (genvar c = 0; c < NCH; c++) begin : g_rd
    always_ff @(posedge clk) rd_data[c] <= ibuf[flat(rd_idx[c], rd_addr[c])];
  end

  // ---- output FIFO --------------------------------------------------------
  logic [7:0]   ofifo [OFIFO_DEPTH];
  logic [OAW-1:0] wp, rp;
  logic [OAW:0]   cnt;

  assign in_ready  = (cnt != (OAW+1)'(OFIFO_DEPTH));
  assign out_valid = (cnt != '0);
  assign out_data  = ofifo[rp];

  wire push = in_valid && in_ready;
  wire pop  = out_valid && out_ready;

  always_ff @(posedge clk) begin
    if (push) ofifo[wp] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp  <= '0;
      rp  <= '0;
      cnt <= '0;
    end else begin
      if (push) wp <= (wp == OAW'(OFIFO_DEPTH - 1)) ? '0 : wp + 1'b1;
      if (pop)  rp <= (rp == OAW'(OFIFO_DEPTH - 1)) ? '0 : rp + 1'b1;
      cnt <= cnt + (OAW+1)'(push) - (OAW+1)'(pop);
    end
  end

endmodule
