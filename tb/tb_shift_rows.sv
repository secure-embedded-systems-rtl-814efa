// tb_shift_rows: checks ShiftRows and InvShiftRows against the reference on
// a fixed pattern whose bytes name their position and on random states,
// and that the inverse undoes the forward shift.
module tb_shift_rows;
  import aes_ref_pkg::*;

  logic [127:0] din, dout_f, dout_i, back;
  int           checks = 0, failures = 0;

  shift_rows #(.INVERSE(1'b0)) dut_f (.din(din), .dout(dout_f));
  shift_rows #(.INVERSE(1'b1)) dut_i (.din(din), .dout(dout_i));
  shift_rows #(.INVERSE(1'b1)) dut_b (.din(dout_f), .dout(back));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    // byte value = row*16 + column, i.e. the "rc" labels of the state
    din = 128'h00102030_01112131_02122232_03132333;
    #1;
    check(dout_f == 128'h00112233_01122330_02132031_03102132, $sformatf("ShiftRows pattern %h", dout_f));
    check(dout_i == 128'h00132231_01102332_02112033_03122130, $sformatf("InvShiftRows pattern %h", dout_i));
    for (int t = 0; t < 50; t++) begin
      din = {$urandom, $urandom, $urandom, $urandom};
      #1;
      check(dout_f == rshift(din, 0), "ShiftRows random");
      check(dout_i == rshift(din, 1), "InvShiftRows random");
      check(back == din, "InvShiftRows(ShiftRows(x)) == x");
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
