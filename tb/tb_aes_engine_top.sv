// tb_aes_engine_top: end-to-end test of the accelerator at its default
// parameters, driven the way the processor software drives it.
//
// The software side pads each text message (a 0x01 byte, then 0x00 bytes up
// to a whole 16-byte block, always at least one byte), sends an encryption
// session over the incoming FSL FIFO, collects the ciphertext from the
// outgoing one, then sends the ciphertext back in a decryption session with
// the same session key, strips the padding and compares with the original
// text.  Every ciphertext block is compared with the reference AES model,
// and the FIPS-197 vector is run as a one-block session.  Messages range
// from one byte to a 139-byte text of nine blocks.  The FIFO models
// insert random gaps before incoming words and random full periods after
// outgoing words.  The test counts each mechanism and fails if one never
// happened: key expansion in both cores, blocks in both cores, the last
// round with MixColumns bypassed in both cores, a switch between modes, a
// session without blocks, a message that needs a whole padding block, input
// gaps and output stalls.  It also checks that each block keeps its core
// busy for exactly 190 cycles.
module tb_aes_engine_top;
  import aes_ref_pkg::*;

  logic        clk = 1'b0;
  logic        rst;
  logic [31:0] fsl_s_data;
  logic        fsl_s_exists;
  logic        fsl_s_read;
  logic [31:0] fsl_m_data;
  logic        fsl_m_write;
  logic        fsl_m_full;
  logic        mode_decrypt;
  logic        session_active;
  logic [31:0] blocks_left;
  logic        enc_busy, dec_busy;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  aes_engine_top dut (
    .clk(clk), .rst(rst),
    .fsl_s_data(fsl_s_data), .fsl_s_exists(fsl_s_exists), .fsl_s_read(fsl_s_read),
    .fsl_m_data(fsl_m_data), .fsl_m_write(fsl_m_write), .fsl_m_full(fsl_m_full),
    .mode_decrypt(mode_decrypt), .session_active(session_active), .blocks_left(blocks_left),
    .enc_busy(enc_busy), .dec_busy(dec_busy)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---- FSL FIFO models ------------------------------------------------------
  logic [31:0] in_q [$];
  logic [31:0] out_q [$];
  logic        avail;
  logic        rd_q, wr_q;
  logic [31:0] wd_q;

  assign fsl_s_exists = avail && (in_q.size() > 0);
  assign fsl_s_data   = (in_q.size() > 0) ? in_q[0] : 32'h0;

  always @(posedge clk) begin
    rd_q <= fsl_s_read;
    wr_q <= fsl_m_write;
    wd_q <= fsl_m_data;
  end

  always @(negedge clk) begin
    if (rd_q) begin
      void'(in_q.pop_front());
      avail = ($urandom_range(0, 3) != 0);
    end else if (!avail) begin
      avail = ($urandom_range(0, 1) != 0);
    end
    if (wr_q) begin
      out_q.push_back(wd_q);
      fsl_m_full = ($urandom_range(0, 3) == 0);
    end else if (fsl_m_full) begin
      fsl_m_full = ($urandom_range(0, 1) != 0);
    end
  end

  // ---- mechanism counters ---------------------------------------------------
  int n_gap = 0, n_stall = 0, n_mode_switch = 0, n_empty_session = 0, n_full_pad = 0;
  int n_enc_kexp = 0, n_dec_kexp = 0, n_enc_blk = 0, n_dec_blk = 0;
  int n_enc_last = 0, n_dec_last = 0, enc_busy_cycles = 0, dec_busy_cycles = 0;
  int exp_enc_blk = 0, exp_dec_blk = 0, exp_enc_kexp = 0, exp_dec_kexp = 0;
  logic mode_q, enc_ready_q, dec_ready_q;

  always @(posedge clk) begin
    if (!rst) begin
      if (in_q.size() > 0 && !avail) n_gap++;
      if (fsl_m_full) n_stall++;
      if (mode_decrypt != mode_q) n_mode_switch++;
      if (dut.enc_rsp.key_ready && !enc_ready_q) n_enc_kexp++;
      if (dut.dec_rsp.key_ready && !dec_ready_q) n_dec_kexp++;
      if (dut.enc_rsp.done) n_enc_blk++;
      if (dut.dec_rsp.done) n_dec_blk++;
      if (dut.u_enc.round_done && dut.u_enc.rn == 4'd10) n_enc_last++;
      if (dut.u_dec.round_done && dut.u_dec.rn == 4'd10) n_dec_last++;
      if (enc_busy) enc_busy_cycles++;
      if (dec_busy) dec_busy_cycles++;
    end
    mode_q      <= mode_decrypt;
    enc_ready_q <= dut.enc_rsp.key_ready;
    dec_ready_q <= dut.dec_rsp.key_ready;
  end

  // ---- software side ----------------------------------------------------------
  // Runs one session and returns the processed blocks.
  task automatic session(input bit dec, input logic [127:0] key,
                         input logic [127:0] blks [], output logic [127:0] res []);
    int t, nblk;
    nblk = blks.size();
    res = new[nblk];
    if (nblk == 0) n_empty_session++;
    if (dec) begin exp_dec_blk += nblk; exp_dec_kexp++; end
    else begin exp_enc_blk += nblk; exp_enc_kexp++; end
    in_q.push_back({31'h0, dec});
    in_q.push_back(32'(nblk));
    for (int w = 0; w < 4; w++) in_q.push_back(key[127-32*w -: 32]);
    for (int b = 0; b < nblk; b++)
      for (int w = 0; w < 4; w++) in_q.push_back(blks[b][127-32*w -: 32]);
    t = 0;
    while ((in_q.size() > 0 || out_q.size() < 4*nblk || session_active) && t < 100000) begin
      @(negedge clk);
      t++;
    end
    check(t < 100000, "session finished");
    check(out_q.size() == 4*nblk, $sformatf("%0d result words, expected %0d", out_q.size(), 4*nblk));
    for (int b = 0; b < nblk; b++)
      for (int w = 0; w < 4; w++)
        res[b][127-32*w -: 32] = (out_q.size() > 0) ? out_q.pop_front() : 32'h0;
  endtask

  // Pads a message: 0x01 then 0x00 up to a multiple of 16 bytes.
  function automatic void pad(input string msg, output logic [127:0] blks []);
    int len, padsz, n;
    logic [7:0] b;
    len   = msg.len();
    padsz = 16 - (len % 16);
    n     = (len + padsz) / 16;
    blks  = new[n];
    for (int i = 0; i < 16*n; i++) begin
      b = (i < len) ? msg[i] : ((i == len) ? 8'h01 : 8'h00);
      blks[i/16][127 - 8*(i%16) -: 8] = b;
    end
  endfunction

  // Removes the padding: skip 0x00 bytes from the end up to the 0x01 byte.
  function automatic string unpad(input logic [127:0] blks []);
    int n;
    string s;
    n = 16 * blks.size();
    while (n > 0 && blks[(n-1)/16][127 - 8*((n-1)%16) -: 8] == 8'h00) n--;
    n--;  // the 0x01 marker
    s = "";
    for (int i = 0; i < n; i++) s = {s, string'(blks[i/16][127 - 8*(i%16) -: 8])};
    return s;
  endfunction

  task automatic round_trip(input string msg);
    logic [127:0] key;
    logic [127:0] pt [], ct [], back [];
    key = {$urandom, $urandom, $urandom, $urandom};
    pad(msg, pt);
    if (msg.len() % 16 == 0) n_full_pad++;
    session(1'b0, key, pt, ct);
    for (int b = 0; b < pt.size(); b++)
      check(ct[b] == ref_encrypt(key, pt[b]), $sformatf("ciphertext block %0d = %h", b, ct[b]));
    session(1'b1, key, ct, back);
    for (int b = 0; b < pt.size(); b++)
      check(back[b] == pt[b], $sformatf("decrypted block %0d = %h, expected %h", b, back[b], pt[b]));
    check(unpad(back) == msg, $sformatf("round trip of \"%s\" gave \"%s\"", msg, unpad(back)));
  endtask

  initial begin
    logic [127:0] one [], res [], none [];
    rst = 1'b1;
    avail = 1'b1;
    fsl_m_full = 1'b0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);

    one = new[1];
    one[0] = 128'h00112233445566778899aabbccddeeff;
    session(1'b0, 128'h000102030405060708090a0b0c0d0e0f, one, res);
    check(res[0] == 128'h69c4e0d86a7b0430d8cdb78070b4c55a, $sformatf("FIPS-197 vector: %h", res[0]));

    round_trip("Sensitive data must be kept secret!");
    round_trip("sixteen byte msg");
    none = new[0];
    session(1'b1, {$urandom, $urandom, $urandom, $urandom}, none, res);
    round_trip("A");
    round_trip({"In this system messages from a PC are encrypted and decrypted, ",
                "but the same engine can protect any data an embedded device stores or sends."});

    check(n_gap > 0,           $sformatf("input gaps: %0d", n_gap));
    check(n_stall > 0,         $sformatf("output stalls: %0d", n_stall));
    check(n_mode_switch > 0,   $sformatf("mode switches: %0d", n_mode_switch));
    check(n_empty_session > 0, $sformatf("sessions without blocks: %0d", n_empty_session));
    check(n_full_pad > 0,      $sformatf("whole padding blocks: %0d", n_full_pad));
    check(n_enc_kexp == exp_enc_kexp,     $sformatf("encryption key expansions: %0d", n_enc_kexp));
    check(n_dec_kexp == exp_dec_kexp,     $sformatf("decryption key expansions: %0d", n_dec_kexp));
    check(n_enc_blk == exp_enc_blk,      $sformatf("encrypted blocks: %0d", n_enc_blk));
    check(n_dec_blk == exp_dec_blk,      $sformatf("decrypted blocks: %0d", n_dec_blk));
    check(n_enc_last == n_enc_blk && n_dec_last == n_dec_blk,
          $sformatf("last rounds without MixColumns: %0d / %0d", n_enc_last, n_dec_last));
    check(enc_busy_cycles == 190 * n_enc_blk, $sformatf("encryption busy %0d cycles", enc_busy_cycles));
    check(dec_busy_cycles == 190 * n_dec_blk, $sformatf("decryption busy %0d cycles", dec_busy_cycles));
    $display("mechanisms: gaps=%0d stalls=%0d mode_switches=%0d empty_sessions=%0d full_pad=%0d",
             n_gap, n_stall, n_mode_switch, n_empty_session, n_full_pad);
    $display("mechanisms: enc_kexp=%0d dec_kexp=%0d enc_blocks=%0d dec_blocks=%0d",
             n_enc_kexp, n_dec_kexp, n_enc_blk, n_dec_blk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
