// tb_inv_mix_columns: checks InvMixColumns on known columns, on random
// states against the reference matrix product, and that it undoes
// MixColumns.
module tb_inv_mix_columns;
  import aes_ref_pkg::*;

  logic [127:0] din, dout;
  int           checks = 0, failures = 0;

  inv_mix_columns dut (.din(din), .dout(dout));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    din = 128'h8e4da1bc_9fdc589d_01010101_c6c6c6c6;
    #1;
    check(dout == 128'hdb135345_f20a225c_01010101_c6c6c6c6, $sformatf("test columns %h", dout));
    din = 128'h046681e5e0cb199a48f8d37a2806264c;
    #1;
    check(dout == 128'hd4bf5d30e0b452aeb84111f11e2798e5, $sformatf("FIPS example %h", dout));
    for (int t = 0; t < 50; t++) begin
      din = {$urandom, $urandom, $urandom, $urandom};
      #1;
      check(dout == rmix(din, 1), $sformatf("random %h -> %h", din, dout));
      din = rmix(din, 0);
      #1;
      check(dout == rmix(din, 1), "inverse of a mixed state");
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
