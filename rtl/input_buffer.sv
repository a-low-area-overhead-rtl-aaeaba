// input_buffer: the buffer B of one switch input port.
//
// A circular FIFO (depth BUF_DEPTH, width FLIT_W) takes flits from the
// neighbour with the tx/ack handshake of the link: the sender holds rx high
// and data_in stable; the buffer stores the flit in the first cycle it sees rx
// with room free and answers with ack_rx high for the next cycle. The sender
// drops or changes the flit only after seeing ack_rx, so one flit moves every
// two clock cycles on each link.
//
// Towards the switch, the buffer runs a three-state controller:
//   IDLE - nothing to do; when a flit is at the FIFO head it is a header flit,
//          and the buffer moves to REQ.
//   REQ  - h is high: routing is requested from the arbiter; the header is
//          visible on `data`. Stays until ack_h says the connection exists.
//   CONN - the connection is open: data_av is high while the FIFO holds a
//          flit, and a flit leaves the FIFO in a cycle where data_av and
//          data_ack are both high. `close` (from the flit counter of the
//          output this input drives, high in the cycle of the last flit's
//          transfer) returns the buffer to IDLE.
// The FIFO, its depth of eight, the handshake names and the h/ack_h and
// data_av/data_ack pairs follow the switch description; the three-state
// controller and the registered one-cycle ack_rx pulse are this design's
// choices. Reset is active low and synchronous, and empties the FIFO.
module input_buffer #(
  parameter int unsigned FLIT_W    = 8,
  parameter int unsigned BUF_DEPTH = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // link side
  input  logic              rx,
  input  logic [FLIT_W-1:0] data_in,
  output logic              ack_rx,
  // arbiter side
  output logic              h,
  input  logic              ack_h,
  // switch side
  output logic              data_av,
  output logic [FLIT_W-1:0] data,
  input  logic              data_ack,
  input  logic              close
);

  localparam int unsigned PTR_W = (BUF_DEPTH > 1) ? $clog2(BUF_DEPTH) : 1;

  typedef enum logic [1:0] {S_IDLE, S_REQ, S_CONN} state_e;
  state_e state;

  logic [FLIT_W-1:0] mem [BUF_DEPTH];
  logic [PTR_W-1:0]  wr_ptr, rd_ptr;
  logic [PTR_W:0]    count;
  logic              empty, full, wr_en, rd_en;

  assign empty = (count == '0);
  assign full  = (count == (PTR_W+1)'(BUF_DEPTH));
  assign wr_en = rx && !ack_rx && !full;
  assign rd_en = data_av && data_ack;

  assign h       = (state == S_REQ);
  assign data_av = (state == S_CONN) && !empty;
  assign data    = mem[rd_ptr];

  function automatic logic [PTR_W-1:0] ptr_inc(input logic [PTR_W-1:0] p);
    return (p == PTR_W'(BUF_DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_ptr] <= data_in;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
      ack_rx <= 1'b0;
    end else begin
      ack_rx <= wr_en;
      if (wr_en) wr_ptr <= ptr_inc(wr_ptr);
      if (rd_en) rd_ptr <= ptr_inc(rd_ptr);
      case ({wr_en, rd_en})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) state <= S_IDLE;
    else begin
      unique case (state)
        S_IDLE: if (!empty) state <= S_REQ;
        S_REQ:  if (ack_h)  state <= S_CONN;
        S_CONN: if (close)  state <= S_IDLE;
        default:            state <= S_IDLE;
      endcase
    end
  end

  // A flit offered to the switch stays offered, unchanged, until taken.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (data_av && !data_ack) |=> (data_av && $stable(data)));
  // The connection can only be closed while it is open.
  a_close: assert property (@(posedge clk) disable iff (!rst_n)
    close |-> (state == S_CONN));

endmodule
