// g_function: the g() step of AES key expansion, applied to the last word
// of the previous round key.
//
// g(w) = SubWord(RotWord(w)) ^ {rcon, 00, 00, 00}.  RotWord is done by
// reordering the input bytes before substitution.  SubWord uses its own
// S-box block memory, one byte per cycle like SubBytes, so `done` rises on
// the 5th clock edge after the edge that samples `start`.  The bytes are substituted from the
// least significant to the most significant, so the last byte out of the
// memory is the leftmost one, which is the one XORed with the round
// constant supplied by the key expansion control unit.  `word_out` holds
// until the next `start`.
module g_function
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  word_t      word_in,
  input  logic [7:0] rcon,
  output logic       done,
  output word_t      word_out
);

  word_t      rot_q;
  logic [1:0] cnt;
  logic       run;
  logic       rd_valid;
  logic [1:0] rd_idx;
  logic [7:0] rcon_q;
  logic [7:0] rom_dout;

  sbox_rom #(.INVERSE(1'b0)) u_rom (
    .clk  (clk),
    .en   (run),
    .addr (rot_q[8*cnt +: 8]),
    .dout (rom_dout)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      rot_q    <= '0;
      cnt      <= '0;
      run      <= 1'b0;
      rd_valid <= 1'b0;
      rd_idx   <= '0;
      rcon_q   <= '0;
      done     <= 1'b0;
      word_out <= '0;
    end else begin
      done     <= 1'b0;
      rd_valid <= run;
      rd_idx   <= cnt;
      if (start && !run && !rd_valid) begin
        rot_q  <= {word_in[23:0], word_in[31:24]};   // RotWord
        rcon_q <= rcon;
        cnt    <= '0;
        run    <= 1'b1;
      end else if (run) begin
        cnt <= cnt + 2'd1;
        if (cnt == 2'd3) run <= 1'b0;
      end
      if (rd_valid) begin
        if (rd_idx == 2'd3) begin
          word_out[31:24] <= rom_dout ^ rcon_q;
          done            <= 1'b1;
        end else begin
          word_out[8*rd_idx +: 8] <= rom_dout;
        end
      end
    end
  end

endmodule
