// tb_word_xor: checks that word_xor builds round key n+1 from round key n
// and g(w[4n+3]), for all ten steps of the FIPS-197 key and of random keys.
module tb_word_xor;
  import aes_ref_pkg::*;

  logic [127:0] prev_key, next_key;
  logic [31:0]  g_word;
  int           checks = 0, failures = 0;

  word_xor dut (.prev_key(prev_key), .g_word(g_word), .next_key(next_key));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [31:0] ref_g(logic [31:0] w, logic [7:0] rc);
    logic [31:0] r;
    r = {rsbox(w[23:16]), rsbox(w[15:8]), rsbox(w[7:0]), rsbox(w[31:24])};
    return r ^ {rc, 24'h0};
  endfunction

  task automatic run_key(input logic [127:0] key);
    logic [7:0] rc;
    rc = 8'h01;
    for (int n = 0; n < 10; n++) begin
      prev_key = rround_key(key, n);
      g_word   = ref_g(prev_key[31:0], rc);
      #1;
      check(next_key == rround_key(key, n + 1), $sformatf("round key %0d", n + 1));
      rc = rmul(rc, 8'h02);
    end
  endtask

  initial begin
    run_key(128'h2b7e151628aed2a6abf7158809cf4f3c);
    check(next_key == 128'hd014f9a8c9ee2589e13f0cc8b6630ca6, "FIPS-197 w[40..43]");
    for (int t = 0; t < 3; t++) run_key({$urandom, $urandom, $urandom, $urandom});
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
