// tb_key_expansion: expands the FIPS-197 key and random keys, reads all 11
// round keys back by round number and compares them with the reference key
// schedule (and with the published last round key), checks that `ready`
// drops on `gen` and rises 70 clock edges later, and that round numbers above 10
// read as zero.
module tb_key_expansion;
  import aes_ref_pkg::*;

  logic         clk = 1'b0;
  logic         rst;
  logic         gen;
  logic [127:0] key;
  logic         ready;
  logic [3:0]   rd_round;
  logic [127:0] rd_key;
  int           checks = 0, failures = 0;

  always #5 clk = ~clk;

  key_expansion dut (.clk(clk), .rst(rst), .gen(gen), .key(key), .ready(ready),
                     .rd_round(rd_round), .rd_key(rd_key));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic expand(input logic [127:0] k);
    int cyc;
    key = k;
    gen = 1'b1;
    cyc = 0;
    do begin
      @(negedge clk);
      gen = 1'b0;
      key = ~k;
      cyc++;
      if (cyc == 1) check(!ready, "ready drops after gen");
    end while (!ready && cyc < 500);
    check(cyc - 1 == 70, $sformatf("expansion took %0d edges, expected 70", cyc - 1));
    for (int n = 0; n <= 10; n++) begin
      rd_round = 4'(n);
      #1;
      check(rd_key == rround_key(k, n), $sformatf("round key %0d = %h", n, rd_key));
    end
  endtask

  initial begin
    rst = 1'b1;
    gen = 1'b0;
    key = '0;
    rd_round = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    check(!ready, "not ready after reset");
    expand(128'h2b7e151628aed2a6abf7158809cf4f3c);
    rd_round = 4'd10;
    #1;
    check(rd_key == 128'hd014f9a8c9ee2589e13f0cc8b6630ca6, "FIPS-197 w[40..43]");
    rd_round = 4'd11;
    #1;
    check(rd_key == '0, "round 11 reads zero");
    @(negedge clk);
    for (int t = 0; t < 3; t++) expand({$urandom, $urandom, $urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
