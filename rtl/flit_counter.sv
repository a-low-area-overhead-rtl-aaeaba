// flit_counter: the packet-length counter of one switch output port.
//
// It watches the flits leaving its output (a flit leaves in a cycle where tx
// and ack_tx are both high). The first flit of a packet is the header; the
// second carries the payload length N, which loads the counter; each payload
// flit sent then decrements it. `close` is high in the cycle in which the last
// flit of the packet leaves (the N-th payload flit, or the length flit itself
// when N = 0), and tells the routing logic to free the output in that clock
// edge. One counter per output port, loaded by the second flit and
// decremented per flit sent until zero, follows the switch description;
// closing in the cycle of the last transfer, rather than one cycle after the
// counter reaches zero, is this design's choice.
module flit_counter #(
  parameter int unsigned FLIT_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              tx,
  input  logic              ack_tx,
  input  logic [FLIT_W-1:0] data_out,
  output logic [FLIT_W-1:0] counter_flit,
  output logic              close
);

  typedef enum logic [1:0] {C_HEADER, C_SIZE, C_PAYLOAD} state_e;
  state_e state;

  logic xfer;
  assign xfer = tx && ack_tx;

  always_comb begin
    close = 1'b0;
    if (xfer) begin
      if (state == C_SIZE    && data_out == '0)             close = 1'b1;
      if (state == C_PAYLOAD && counter_flit == FLIT_W'(1)) close = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state        <= C_HEADER;
      counter_flit <= '0;
    end else if (xfer) begin
      unique case (state)
        C_HEADER: state <= C_SIZE;
        C_SIZE: begin
          counter_flit <= data_out;
          state        <= (data_out == '0) ? C_HEADER : C_PAYLOAD;
        end
        C_PAYLOAD: begin
          counter_flit <= counter_flit - 1'b1;
          if (counter_flit == FLIT_W'(1)) state <= C_HEADER;
        end
        default: state <= C_HEADER;
      endcase
    end
  end

endmodule
