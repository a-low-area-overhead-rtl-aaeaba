// tb_link_source: testbench traffic source for one link input (a core or a
// neighbour). It sends NPKT packets with the tx/ack handshake: a flit is
// held with tx high until ack is seen, then the next flit follows, with
// random idle gaps when GAPS is set. Packet k from source SRC_ID is
//   header = target address (X upper half, Y lower half), chosen at random
//            in an NX x NY mesh,
//   length = N (random, 2..MAXLEN),
//   payload[0] = SRC_ID, payload[1] = k, payload[j] = (SRC_ID*37 + k*11 + j)
// so that a sink can check every flit without a shared scoreboard.
// sent_to[t] counts the packets sent to target t = y*NX + x.
module tb_link_source #(
  parameter int unsigned SRC_ID = 0,
  parameter int unsigned NX     = 2,
  parameter int unsigned NY     = 2,
  parameter int unsigned NPKT   = 10,
  parameter int unsigned MAXLEN = 8,
  parameter bit          GAPS   = 1'b1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enable,
  output logic              tx,
  output logic [7:0]        data_out,
  input  logic              ack,
  output logic              done,
  output int unsigned       sent_to [NX*NY]
);

  initial begin
    tx       = 1'b0;
    data_out = '0;
    done     = 1'b0;
    for (int t = 0; t < NX*NY; t++) sent_to[t] = 0;
    @(negedge clk);
    while (!(rst_n && enable)) @(negedge clk);
    for (int k = 0; k < NPKT; k++) begin
      automatic int unsigned tx_ = $urandom % NX;
      automatic int unsigned ty_ = $urandom % NY;
      automatic int unsigned n   = 2 + ($urandom % (MAXLEN - 1));
      automatic logic [7:0]  pkt [$];
      pkt.push_back(8'((tx_ << 4) | ty_));
      pkt.push_back(8'(n));
      pkt.push_back(8'(SRC_ID));
      pkt.push_back(8'(k));
      for (int j = 2; j < n; j++) pkt.push_back(8'(SRC_ID*37 + k*11 + j));
      foreach (pkt[i]) begin
        if (GAPS && ($urandom % 4 == 0)) begin
          tx = 1'b0;
          @(negedge clk);
        end
        tx       = 1'b1;
        data_out = pkt[i];
        do @(negedge clk); while (!ack);
      end
      tx = 1'b0;
      sent_to[ty_*NX + tx_]++;
    end
    done = 1'b1;
  end

endmodule
