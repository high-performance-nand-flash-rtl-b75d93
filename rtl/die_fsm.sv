// die_fsm: execution status of one die inside a flash chip.
//
// Each die of a chip runs its array operation on its own, so the interface
// controller keeps one of these per die and the chip FSM only drives the shared
// bus. States:
//   IDLE       nothing outstanding on the die
//   READ_BUSY  a page read was started (30h); array busy for tR
//   READ_DATA  status polling saw the die ready; page waits in the data register
//   WRITE_BUSY a program (10h) or erase (D0h) was started; array busy
// Events (one-cycle pulses from the chip FSM):
//   start_read / start_write  the confirm opcode went out on the bus
//                             (two_plane qualifies start_read: two pages,
//                             one per plane, wait in the data registers)
//   poll_ready                a status read (78h) found this die ready
//   xfer_done                 one page was read out of a data register; the
//                             die returns to IDLE after the last page
// A program/erase counts as finished for the queue once it has been sent; the
// die leaves WRITE_BUSY only when a later status poll sees it ready, and the
// chip FSM polls before it sends anything else to the die. The state
// encoding and the exact event set are this design's own choice; the document
// only says each die FSM records its own execution status.
// `busy` is high in every state but IDLE; `proto_err` pulses on an event that
// is illegal in the present state (e.g. a second start while busy).
module die_fsm (
  input  logic clk,
  input  logic rst_n,
  input  logic start_read,
  input  logic start_write,
  input  logic two_plane,
  input  logic poll_ready,
  input  logic xfer_done,
  output logic busy,
  output logic data_ready,
  output logic proto_err
);

  typedef enum logic [1:0] {
    D_IDLE       = 2'd0,
    D_READ_BUSY  = 2'd1,
    D_READ_DATA  = 2'd2,
    D_WRITE_BUSY = 2'd3
  } dstate_e;

  dstate_e st, st_n;
  logic    err_n;
  logic    two, two_n;   // a second page is still waiting after this one

  always_comb begin
    st_n  = st;
    two_n = two;
    err_n = 1'b0;
    unique case (st)
      D_IDLE: begin
        two_n = two_plane;
        if (start_read)       st_n = D_READ_BUSY;
        else if (start_write) st_n = D_WRITE_BUSY;
        if (xfer_done) err_n = 1'b1;
      end
      D_READ_BUSY: begin
        if (poll_ready) st_n = D_READ_DATA;
        if (start_read || start_write || xfer_done) err_n = 1'b1;
      end
      D_READ_DATA: begin
        if (xfer_done) begin
          if (two) two_n = 1'b0;
          else     st_n  = D_IDLE;
        end
        if (start_read || start_write) err_n = 1'b1;
      end
      D_WRITE_BUSY: begin
        if (poll_ready) begin
          // ready: the die may take the next command in the same cycle
          two_n = two_plane;
          if (start_read)       st_n = D_READ_BUSY;
          else if (start_write) st_n = D_WRITE_BUSY;
          else                  st_n = D_IDLE;
        end else if (start_read || start_write) begin
          err_n = 1'b1;
        end
        if (xfer_done) err_n = 1'b1;
      end
      default: st_n = D_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= D_IDLE;
      two       <= 1'b0;
      proto_err <= 1'b0;
    end else begin
      st        <= st_n;
      two       <= two_n;
      proto_err <= err_n;
    end
  end

  assign busy       = (st != D_IDLE);
  assign data_ready = (st == D_READ_DATA);

endmodule
