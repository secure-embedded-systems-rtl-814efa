// tb_aes_encrypt: checks the AES-128 encryption core on the FIPS-197 example
// vectors and on random keys and blocks against the reference model.  It
// checks the key expansion time (ready 70 cycles after key_load), the block
// time (done 190 cycles after start), that a start before the key is ready
// is ignored, that several blocks reuse one expanded key, and that the key
// can be reloaded.
module tb_aes_encrypt;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic        clk = 1'b0;
  logic        rst;
  cipher_req_t req;
  cipher_rsp_t rsp;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  aes_encrypt dut (.clk(clk), .rst(rst), .req(req), .rsp(rsp));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic load_key(input logic [127:0] k);
    int cyc;
    req.key      = k;
    req.key_load = 1'b1;
    cyc = 0;
    do begin
      @(negedge clk);
      req.key_load = 1'b0;
      req.key      = ~k;
      cyc++;
    end while (!rsp.key_ready && cyc < 500);
    check(cyc - 1 == 70, $sformatf("key expansion %0d edges, expected 70", cyc - 1));
  endtask

  task automatic run_block(input logic [127:0] v, input logic [127:0] expv);
    int cyc;
    req.din   = v;
    req.start = 1'b1;
    cyc = 0;
    do begin
      @(negedge clk);
      req.start = 1'b0;
      req.din   = ~v;
      cyc++;
      if (cyc <= 190) check(rsp.busy, "busy while processing");
    end while (!rsp.done && cyc < 1000);
    check(cyc - 1 == 190, $sformatf("block took %0d edges, expected 190", cyc - 1));
    check(rsp.dout == expv, $sformatf("%h -> %h, expected %h", v, rsp.dout, expv));
    @(negedge clk);
    check(!rsp.done && !rsp.busy, "done is a single pulse and the core is idle");
  endtask

  initial begin
    logic [127:0] k, v;
    rst = 1'b1;
    req = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    // a start with no key loaded is ignored
    req.start = 1'b1;
    @(negedge clk);
    req.start = 1'b0;
    repeat (3) @(negedge clk);
    check(!rsp.busy && !rsp.key_ready, "start ignored without a key");

    load_key(128'h000102030405060708090a0b0c0d0e0f);
    run_block(128'h00112233445566778899aabbccddeeff, 128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    load_key(128'h2b7e151628aed2a6abf7158809cf4f3c);
    run_block(128'h3243f6a8885a308d313198a2e0370734, 128'h3925841d02dc09fbdc118597196a0b32);
    for (int t = 0; t < 3; t++) begin
      k = {$urandom, $urandom, $urandom, $urandom};
      load_key(k);
      for (int b = 0; b < 3; b++) begin
        v = {$urandom, $urandom, $urandom, $urandom};
        run_block(v, ref_encrypt(k, v));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
