// tb_crossbar: self-checking test of the switch multiplexers. Random legal
// switching tables (a random partial one-to-one pairing of inputs and
// outputs) with random data_av, data, ack_tx and close_out; the expected
// outputs are built here by walking the busy inputs.
module tb_crossbar;
  import hermes_pkg::*;

  int unsigned checks = 0, failures = 0;

  logic [NPORTS-1:0]             free, in_busy, data_av, data_ack, close_in, tx, ack_tx, close_out;
  logic [NPORTS-1:0][PORT_W-1:0] in_sel, out_sel;
  logic [NPORTS-1:0][7:0]        data, data_out;

  crossbar dut (.free, .in_busy, .in_sel, .out_sel, .data_av, .data, .data_ack, .close_in,
                .tx, .data_out, .ack_tx, .close_out);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 500; it++) begin
      automatic int unsigned perm [NPORTS];
      automatic logic [NPORTS-1:0] e_tx = '0, e_ack = '0, e_close = '0;
      // random permutation of outputs
      for (int i = 0; i < NPORTS; i++) perm[i] = i;
      for (int i = NPORTS - 1; i > 0; i--) begin
        automatic int unsigned j = $urandom % (i + 1);
        automatic int unsigned t = perm[i];
        perm[i] = perm[j]; perm[j] = t;
      end
      free = '1; in_busy = '0;
      for (int o = 0; o < NPORTS; o++) out_sel[o] = PORT_W'($urandom % NPORTS);
      for (int i = 0; i < NPORTS; i++) in_sel[i] = PORT_W'($urandom % NPORTS);
      for (int i = 0; i < NPORTS; i++) if ($urandom % 3 != 0) begin
        in_busy[i] = 1'b1;
        in_sel[i]  = PORT_W'(perm[i]);
        free[perm[i]]    = 1'b0;
        out_sel[perm[i]] = PORT_W'(i);
      end
      data_av = 5'($urandom); ack_tx = 5'($urandom); close_out = 5'($urandom);
      for (int i = 0; i < NPORTS; i++) data[i] = 8'($urandom);
      for (int i = 0; i < NPORTS; i++) if (in_busy[i]) begin
        e_tx[perm[i]] = data_av[i];
        e_ack[i]      = ack_tx[perm[i]];
        e_close[i]    = close_out[perm[i]];
      end
      #1;
      check(tx == e_tx, $sformatf("tx %b want %b", tx, e_tx));
      check(data_ack == e_ack, $sformatf("data_ack %b want %b", data_ack, e_ack));
      check(close_in == e_close, $sformatf("close_in %b want %b", close_in, e_close));
      for (int i = 0; i < NPORTS; i++) if (in_busy[i])
        check(data_out[perm[i]] == data[i], "data_out follows its input");
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
