// tb_add_round_key: checks AddRoundKey on the FIPS-197 round-1 example
// (state 04 66 81 e5 ... with round key a0 fa fe 17 ...) and on random
// values.
module tb_add_round_key;
  logic [127:0] din, key, dout;
  int           checks = 0, failures = 0;

  add_round_key dut (.din(din), .round_key(key), .dout(dout));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    din = 128'h046681e5e0cb199a48f8d37a2806264c;
    key = 128'ha0fafe1788542cb123a339392a6c7605;
    #1;
    check(dout == 128'ha49c7ff2689f352b6b5bea43026a5049, $sformatf("FIPS example %h", dout));
    for (int t = 0; t < 50; t++) begin
      din = {$urandom, $urandom, $urandom, $urandom};
      key = {$urandom, $urandom, $urandom, $urandom};
      #1;
      for (int b = 0; b < 128; b++)
        if (dout[b] != (din[b] != key[b])) begin
          check(1'b0, $sformatf("bit %0d", b));
          break;
        end
      check(1'b1, "random vector");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
