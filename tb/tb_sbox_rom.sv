// tb_sbox_rom: checks both S-box memories (forward and inverse) against the
// reference S-box for all 256 addresses, the one-cycle read latency, the
// example 0x95 -> 0x2A and that the output holds while `en` is low.
module tb_sbox_rom;
  import aes_ref_pkg::*;

  logic       clk = 1'b0;
  logic       en;
  logic [7:0] addr;
  logic [7:0] dout_f, dout_i;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  sbox_rom #(.INVERSE(1'b0)) dut_f (.clk(clk), .en(en), .addr(addr), .dout(dout_f));
  sbox_rom #(.INVERSE(1'b1)) dut_i (.clk(clk), .en(en), .addr(addr), .dout(dout_i));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    logic [7:0] ref_f [256];
    logic [7:0] ref_i [256];
    for (int i = 0; i < 256; i++) begin
      ref_f[i] = rsbox(8'(i));
      ref_i[ref_f[i]] = 8'(i);
    end
    en = 1'b1;
    addr = 8'h00;
    @(negedge clk);
    for (int i = 0; i < 256; i++) begin
      addr = 8'(i);
      @(negedge clk);   // one clock edge later the data is there
      check(dout_f == ref_f[i], $sformatf("fwd[%02h]=%02h exp %02h", i, dout_f, ref_f[i]));
      check(dout_i == ref_i[i], $sformatf("inv[%02h]=%02h exp %02h", i, dout_i, ref_i[i]));
    end
    addr = 8'h95;
    @(negedge clk);
    check(dout_f == 8'h2A, "S-box example 95 -> 2A");
    check(dout_i == 8'hAD, "inverse S-box 95 -> AD");
    en   = 1'b0;
    addr = 8'h00;
    @(negedge clk);
    check(dout_f == 8'h2A && dout_i == 8'hAD, "output holds while en is low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
