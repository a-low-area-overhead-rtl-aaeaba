// crossbar: the output and acknowledge multiplexers of the switch.
//
// For every output port o that is busy, the input out_sel[o] is connected:
// tx[o] follows that input's data_av and data_out[o] its head flit. For every
// input port i that is busy, data_ack[i] follows ack_tx of the output
// in_sel[i] drives, and close_in[i] follows that output's flit-counter close.
// Free outputs send nothing and idle inputs see no acknowledge. Purely
// combinational. The multiplexers selected by the switching table follow the
// switch block diagram; their exact form is this design's.
module crossbar
  import hermes_pkg::*;
#(
  parameter int unsigned FLIT_W = 8
) (
  input  logic [NPORTS-1:0]              free,
  input  logic [NPORTS-1:0]              in_busy,
  input  logic [NPORTS-1:0][PORT_W-1:0]  in_sel,
  input  logic [NPORTS-1:0][PORT_W-1:0]  out_sel,
  // from the input buffers
  input  logic [NPORTS-1:0]              data_av,
  input  logic [NPORTS-1:0][FLIT_W-1:0]  data,
  output logic [NPORTS-1:0]              data_ack,
  output logic [NPORTS-1:0]              close_in,
  // output ports
  output logic [NPORTS-1:0]              tx,
  output logic [NPORTS-1:0][FLIT_W-1:0]  data_out,
  input  logic [NPORTS-1:0]              ack_tx,
  input  logic [NPORTS-1:0]              close_out
);

  always_comb begin
    for (int o = 0; o < NPORTS; o++) begin
      tx[o]       = !free[o] && data_av[out_sel[o]];
      data_out[o] = data[out_sel[o]];
    end
    for (int i = 0; i < NPORTS; i++) begin
      data_ack[i] = in_busy[i] && ack_tx[in_sel[i]];
      close_in[i] = in_busy[i] && close_out[in_sel[i]];
    end
  end

endmodule
